// pe_pipe_reg: one serial/parallel pipeline register (E, R or S) of a processing element.
//
// The pipeline registers of a row of PEs are chained into a bit-serial shift register, so
// that a new image can be shifted in and the previous result shifted out while the PEs
// compute. Each `shift` moves the chain one bit: the incoming bit enters at the MSB and
// the LSB leaves on `sout`, so a pixel is transferred LSB first. E and R are read in
// parallel on `q`; S is written in parallel with `load` (load takes priority over shift).
// The one-bit serial links, the bit order and the load priority are this design's
// choices; the original design only says there are three serial links per row of PEs.
module pe_pipe_reg #(
  parameter int unsigned PIX_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             shift,
  input  logic             sin,
  input  logic             load,
  input  logic [PIX_W-1:0] d,
  output logic [PIX_W-1:0] q,
  output logic             sout
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= '0;
    else if (load)  q <= d;
    else if (shift) q <= {sin, q[PIX_W-1:1]};
  end

  assign sout = q[0];

endmodule
