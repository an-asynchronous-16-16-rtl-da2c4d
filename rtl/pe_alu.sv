// pe_alu: the operative part of a processing element.
//
// Computes the minimum or the maximum of operand A (the value sampled by the Q-Flops) and
// operand B (the temporary value), or passes A through unchanged. As in the original design, the
// comparison is made with a carry-ripple adder: A + ~B + 1 is rippled bit by bit and its
// carry out is set exactly when A >= B; multiplexers then pick the result. The Min/Max and
// Pass/Calc controls are the two control inputs the original datapath drawing shows.
// Purely combinational; in the fabricated chip the ALU is a latched precharged stage of a
// two-stage self-timed ring, here the holding latch is the B register that follows it.
module pe_alu #(
  parameter int unsigned PIX_W = 8
) (
  input  logic [PIX_W-1:0] a,        // sampled neighbour or reference pixel
  input  logic [PIX_W-1:0] b,        // temporary value B
  input  logic             max_op,   // 1 = maximum, 0 = minimum
  input  logic             pass,     // 1 = pass A, 0 = calculate
  output logic [PIX_W-1:0] y
);

  logic [PIX_W:0] carry;
  logic           a_ge_b;

  // Ripple of A - B = A + ~B + 1; only the carry chain is needed for the comparison.
  assign carry[0] = 1'b1;
  for (genvar i = 0; i < PIX_W; i++) begin : g_ripple
    assign carry[i+1] = (a[i] & ~b[i]) | (a[i] & carry[i]) | (~b[i] & carry[i]);
  end

  assign a_ge_b = carry[PIX_W];

  always_comb begin
    if (pass)        y = a;
    else if (max_op) y = a_ge_b ? a : b;
    else             y = a_ge_b ? b : a;
  end

endmodule
