// tb_pe_operand_sel: self-checking test of the operand multiplexer and Q-Flops.
// Random neighbour and reference values and a random select are applied each cycle; when
// `sample` is high the Q-Flop output must show the selected value on the next cycle,
// otherwise it must hold its previous value, whatever the inputs do.
module tb_pe_operand_sel;
  import morpho_pkg::*;
  localparam int unsigned PIX_W = 8;

  logic             clk = 1'b0, rst_n = 1'b0, sample = 1'b0;
  opsel_t           sel = SEL_I;
  logic [PIX_W-1:0] ref_i = '0, ln = '0, le = '0, ls = '0, lo = '0, q;
  logic [PIX_W-1:0] expq;
  int               checks = 0, failures = 0;

  pe_operand_sel dut (.clk, .rst_n, .sel, .sample, .ref_i, .ln, .le, .ls, .lo, .q);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    expq  = '0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      ref_i  = PIX_W'($urandom);
      ln     = PIX_W'($urandom);
      le     = PIX_W'($urandom);
      ls     = PIX_W'($urandom);
      lo     = PIX_W'($urandom);
      sel    = opsel_t'($urandom_range(0, 4));
      sample = ($urandom_range(0, 2) != 0);
      if (sample) begin
        case (sel)
          SEL_I: expq = ref_i;
          SEL_N: expq = ln;
          SEL_E: expq = le;
          SEL_S: expq = ls;
          default: expq = lo;
        endcase
      end
      @(posedge clk);
      #1;
      checks++;
      if (q !== expq) begin
        failures++;
        if (failures < 10) $display("cycle %0d sel=%0d sample=%0b: q=%0d expected %0d", n, sel, sample, q, expq);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
