// pe: one processing element of the morphological array processor.
//
// The datapath follows the original design: three 8-bit pixel registers, L (the current iteration
// value, visible to the four neighbours), B (the temporary value inside an iteration,
// held by the latched multiplexer) and I (the reference pixel); three serial/parallel
// pipeline registers E (input pixel), R (reference input) and S (result output) chained
// along the row; an operand multiplexer with Q-Flops that samples I or a neighbour's L;
// and an ALU that computes the minimum or maximum of the sampled value and B.
// pe_control sequences it (see there for the timing). The PE updates its own value with
// whatever its neighbours currently hold in L, so neighbouring PEs need not be at the same
// iteration: this is the functionally asynchronous update of the original design.
//
// Interface: the serial chains pass through e_sin -> e_sout, r_sin -> r_sout and
// s_sin -> s_sout, one bit per `shift`. `l` is this PE's L register for its neighbours;
// ln/le/ls/lo are the L registers of the north, east, south and west neighbours.
// The reset values (all registers zero) are this design's choice. The parallel output of
// S (s_q) is deliberately left unread: S is only ever emptied through its serial output.
module pe
  import morpho_pkg::*;
#(
  parameter int unsigned PIX_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  instr_t           instr,
  input  logic             req,
  input  logic             step_en,
  output logic             done,
  input  logic             shift,
  input  logic             e_sin,
  output logic             e_sout,
  input  logic             r_sin,
  output logic             r_sout,
  input  logic             s_sin,
  output logic             s_sout,
  input  logic [PIX_W-1:0] ln,
  input  logic [PIX_W-1:0] le,
  input  logic [PIX_W-1:0] ls,
  input  logic [PIX_W-1:0] lo,
  output logic [PIX_W-1:0] l
);

  logic             start, l_load, sample, b_en, alu_pass, alu_max;
  opsel_t           sel;
  logic [PIX_W-1:0] e_q, r_q, s_q, i_q, b_q, a_q, alu_y;

  pe_control u_ctrl (
    .clk, .rst_n, .req, .instr, .step_en,
    .start, .l_load, .sel, .sample, .b_en, .alu_pass, .alu_max, .done
  );

  // Pipeline registers: E and R are only shifted, S is loaded with B at the start.
  pe_pipe_reg #(.PIX_W(PIX_W)) u_e (
    .clk, .rst_n, .shift, .sin(e_sin), .load(1'b0), .d('0), .q(e_q), .sout(e_sout)
  );
  pe_pipe_reg #(.PIX_W(PIX_W)) u_r (
    .clk, .rst_n, .shift, .sin(r_sin), .load(1'b0), .d('0), .q(r_q), .sout(r_sout)
  );
  pe_pipe_reg #(.PIX_W(PIX_W)) u_s (
    .clk, .rst_n, .shift, .sin(s_sin), .load(start), .d(b_q), .q(s_q), .sout(s_sout)
  );

  // Second-level registers I (reference) and L (value shown to the neighbours).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i_q <= '0;
      l   <= '0;
    end else begin
      if (start)  i_q <= r_q;
      if (l_load) l   <= b_q;
    end
  end

  pe_operand_sel #(.PIX_W(PIX_W)) u_sel (
    .clk, .rst_n, .sel, .sample, .ref_i(i_q), .ln, .le, .ls, .lo, .q(a_q)
  );

  pe_alu #(.PIX_W(PIX_W)) u_alu (
    .a(a_q), .b(b_q), .max_op(alu_max), .pass(alu_pass), .y(alu_y)
  );

  pe_bmux #(.PIX_W(PIX_W)) u_b (
    .clk, .rst_n, .en(start | b_en), .sel_e(start), .e(e_q), .alu_y, .b(b_q)
  );

endmodule
