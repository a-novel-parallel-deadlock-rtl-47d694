// ddu_pkg: types and constants shared by the Deadlock Detection Unit (DDU).
//
// An element m_ij of the resource allocation matrix says how processor p_i and
// resource q_j are related: p_i requests q_j (r), q_j is granted to p_i (g), or
// neither (0). The two-bit code follows the document: r = 10, g = 01, 0 = 00, so
// bit 1 is the "request" bit and bit 0 the "grant" bit. The default size of
// 50 processors by 50 resources is the largest configuration the document
// synthesises. The event operation codes that update the allocation matrix are
// this design's own choice.
package ddu_pkg;

  // Default number of processors (matrix rows, m) and resources (columns, n).
  parameter int unsigned DDU_M = 50;
  parameter int unsigned DDU_N = 50;

  // Matrix element. Bit 1 = request, bit 0 = grant; 11 never occurs.
  typedef enum logic [1:0] {
    CELL_ZERO  = 2'b00,
    CELL_GRANT = 2'b01,
    CELL_REQ   = 2'b10
  } cell_t;

  // Allocation events applied to the state matrix.
  typedef enum logic [1:0] {
    EV_NOP     = 2'd0,  // no change
    EV_REQUEST = 2'd1,  // processor requests each resource in the mask
    EV_GRANT   = 2'd2,  // each resource in the mask is granted to the processor
    EV_RELEASE = 2'd3   // processor releases (or withdraws its request for) each resource in the mask
  } ev_op_t;

endpackage
