// morpho_pkg: types and constants shared by the processing element (PE) and the array.
//
// The 12-bit instruction word follows the field layout printed in the instruction-format
// figure of the design: bit 11 selects Minimum or Maximum, bit 10 selects a geodesic
// operator, bits 9..5 enable the neighbourhood members B (the PE's own value), N, E, S and
// O (west), and bits 4..0 give the number of local iterations. The polarity of bit 11
// (1 = Maximum) is this design's choice; the original design names the bit without a polarity.
package morpho_pkg;

  localparam int unsigned INSTR_W = 12;  // instruction word width
  localparam int unsigned ITER_W  = 5;   // iteration count field width

  typedef struct packed {
    logic              max_op;    // I11: 1 = Maximum (dilation), 0 = Minimum (erosion)
    logic              geodesic;  // I10: combine with the reference pixel using the dual op
    logic              nb_b;      // I9 : include the PE's own previous value
    logic              nb_n;      // I8 : north neighbour
    logic              nb_e;      // I7 : east neighbour
    logic              nb_s;      // I6 : south neighbour
    logic              nb_o;      // I5 : west (ouest) neighbour
    logic [ITER_W-1:0] n_iter;    // I4..I0: number of local iterations
  } instr_t;

  // Source selected by the operand multiplexer in front of the Q-Flops.
  typedef enum logic [2:0] {
    SEL_I = 3'd0,  // reference pixel
    SEL_N = 3'd1,
    SEL_E = 3'd2,
    SEL_S = 3'd3,
    SEL_O = 3'd4
  } opsel_t;

endpackage
