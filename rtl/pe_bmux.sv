// pe_bmux: the latched multiplexer that holds the temporary value B.
//
// In the original design, B is not a separate register: the multiplexer that chooses between the
// input pixel E (to initialise B) and the ALU result stores the value itself. Here that
// storage is an edge-triggered register written when `en` is high; `sel_e` chooses E,
// otherwise the ALU output is taken. B is visible on `b` the cycle after the write.
module pe_bmux #(
  parameter int unsigned PIX_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             sel_e,    // 1 = load E, 0 = load ALU result
  input  logic [PIX_W-1:0] e,
  input  logic [PIX_W-1:0] alu_y,
  output logic [PIX_W-1:0] b
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  b <= '0;
    else if (en) b <= sel_e ? e : alu_y;
  end

endmodule
