// tb_pe_pipe_reg: self-checking test of a chain of serial/parallel pipeline registers.
// Four registers are chained as in a row of PEs. Random pixels are shifted in (last
// register's pixel first, LSB first) and read back in parallel; then every register is
// loaded in parallel and the serial output stream is compared with the loaded pixels.
module tb_pe_pipe_reg;
  localparam int unsigned PIX_W = 8;
  localparam int unsigned N     = 4;

  logic                      clk = 1'b0, rst_n = 1'b0, shift = 1'b0, load = 1'b0;
  logic [N:0]                ch;
  logic [N-1:0][PIX_W-1:0]   d, q;
  logic [PIX_W-1:0]          pix [N];
  logic                      sin = 1'b0;
  int                        checks = 0, failures = 0;

  assign ch[0] = sin;

  for (genvar i = 0; i < N; i++) begin : g_reg
    pe_pipe_reg dut (
      .clk, .rst_n, .shift, .sin(ch[i]), .load, .d(d[i]), .q(q[i]), .sout(ch[i+1])
    );
  end

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int round = 0; round < 50; round++) begin
      // Serial in, parallel out; idle cycles in between must not disturb the chain.
      foreach (pix[i]) pix[i] = PIX_W'($urandom);
      for (int c = N - 1; c >= 0; c--) begin
        for (int bt = 0; bt < PIX_W; bt++) begin
          @(negedge clk);
          sin   = pix[c][bt];
          shift = 1'b1;
          @(negedge clk);
          shift = 1'b0;
          sin   = 1'b0;
        end
      end
      for (int c = 0; c < N; c++) begin
        checks++;
        if (q[c] !== pix[c]) begin
          failures++;
          $display("round %0d reg %0d: q=%0h expected %0h", round, c, q[c], pix[c]);
        end
      end
      // Parallel in, serial out.
      @(negedge clk);
      foreach (pix[i]) begin
        pix[i] = PIX_W'($urandom);
        d[i]   = pix[i];
      end
      load  = 1'b1;
      shift = 1'b1;   // load has priority
      @(negedge clk);
      load  = 1'b0;
      for (int c = N - 1; c >= 0; c--) begin
        for (int bt = 0; bt < PIX_W; bt++) begin
          checks++;
          if (ch[N] !== pix[c][bt]) begin
            failures++;
            if (failures < 10) $display("round %0d: serial bit %0d of reg %0d wrong", round, bt, c);
          end
          @(negedge clk);
        end
      end
      shift = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
