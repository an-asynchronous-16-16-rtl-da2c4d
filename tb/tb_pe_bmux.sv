// tb_pe_bmux: self-checking test of the latched B multiplexer.
// Random E and ALU values, enable and select are applied each cycle; B must take E or the
// ALU value when enabled and hold otherwise.
module tb_pe_bmux;
  localparam int unsigned PIX_W = 8;

  logic             clk = 1'b0, rst_n = 1'b0, en = 1'b0, sel_e = 1'b0;
  logic [PIX_W-1:0] e = '0, alu_y = '0, b, expb;
  int               checks = 0, failures = 0;

  pe_bmux dut (.clk, .rst_n, .en, .sel_e, .e, .alu_y, .b);

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
    expb  = '0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      e     = PIX_W'($urandom);
      alu_y = PIX_W'($urandom);
      en    = $urandom_range(0, 1) != 0;
      sel_e = $urandom_range(0, 1) != 0;
      if (en) expb = sel_e ? e : alu_y;
      @(posedge clk);
      #1;
      checks++;
      if (b !== expb) begin
        failures++;
        if (failures < 10) $display("cycle %0d: b=%0d expected %0d", n, b, expb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
