// pe_operand_sel: operand multiplexer and Q-Flops of a processing element.
//
// A multiplexer selects the reference pixel I or one of the four neighbours' L registers
// (north, east, south, west); Q-Flops then sample that value when the local control asks
// for it. The neighbours are sampled directly, without any request/acknowledge exchange
// with them, which is how the original design lets each PE read the most recent state of its
// neighbours at any moment. In this synchronous model the Q-Flops are an edge-triggered
// register enabled by `sample`; the value is available on `q` the cycle after `sample`.
module pe_operand_sel
  import morpho_pkg::*;
#(
  parameter int unsigned PIX_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  opsel_t           sel,
  input  logic             sample,   // local clock request of the Q-Flops
  input  logic [PIX_W-1:0] ref_i,    // register I
  input  logic [PIX_W-1:0] ln,       // north neighbour's L
  input  logic [PIX_W-1:0] le,       // east neighbour's L
  input  logic [PIX_W-1:0] ls,       // south neighbour's L
  input  logic [PIX_W-1:0] lo,       // west neighbour's L
  output logic [PIX_W-1:0] q
);

  logic [PIX_W-1:0] mux_y;

  always_comb begin
    unique case (sel)
      SEL_I:   mux_y = ref_i;
      SEL_N:   mux_y = ln;
      SEL_E:   mux_y = le;
      SEL_S:   mux_y = ls;
      SEL_O:   mux_y = lo;
      default: mux_y = ref_i;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      q <= '0;
    else if (sample) q <= mux_y;
  end

endmodule
