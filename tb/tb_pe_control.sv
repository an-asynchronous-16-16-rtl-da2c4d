// tb_pe_control: self-checking test of the PE controller.
// Random instructions are run through the four-phase Req/Done handshake. Every control
// action the controller takes (transfer, L copy, operand sample with its select, ALU
// write with its pass and min/max controls) is recorded and compared with the sequence
// expected from the instruction: per iteration an L copy, then N, E, S, O (those enabled)
// and, for a geodesic instruction, I with the dual operation, the first operand passed
// when the PE's own value is not in the neighbourhood. With step_en held high the number
// of cycles from the transfer to done must be 2 + n * (1 + 2k) for n iterations of k
// operands; with a random step_en only the sequence is checked.
module tb_pe_control;
  import morpho_pkg::*;

  logic   clk = 1'b0, rst_n = 1'b0, req = 1'b0, step_en = 1'b1;
  instr_t instr = '0;
  logic   start, l_load, sample, b_en, alu_pass, alu_max, done;
  opsel_t sel;
  int     checks = 0, failures = 0;
  int     events[$];
  int     cycle = 0, t_start = 0, t_done = 0;
  logic   done_d = 1'b0;

  pe_control dut (.clk, .rst_n, .req, .instr, .step_en,
                  .start, .l_load, .sel, .sample, .b_en, .alu_pass, .alu_max, .done);

  always #5 clk = ~clk;

  // Record the control actions taken at each clock edge.
  always @(posedge clk) begin
    cycle <= cycle + 1;
    done_d <= done;
    if (rst_n) begin
      if (start)  begin events.push_back(100); t_start = cycle; end
      if (l_load) events.push_back(200);
      if (sample) events.push_back(300 + int'(sel));
      if (b_en)   events.push_back(400 + 10 * int'(alu_pass) + int'(alu_max));
      if (done && !done_d) begin events.push_back(500); t_done = cycle; end
    end
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    int exp[$];
    int ops[$];
    bit rand_step;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      rand_step = (t % 2 == 1);
      @(negedge clk);
      instr = instr_t'($urandom);
      if (t < 4) instr.n_iter = ITER_W'(t);   // include the zero-iteration case
      else       instr.n_iter = ITER_W'($urandom_range(0, 6));
      events.delete();
      // Expected sequence.
      ops.delete();
      if (instr.nb_n)     ops.push_back(int'(SEL_N));
      if (instr.nb_e)     ops.push_back(int'(SEL_E));
      if (instr.nb_s)     ops.push_back(int'(SEL_S));
      if (instr.nb_o)     ops.push_back(int'(SEL_O));
      if (instr.geodesic) ops.push_back(int'(SEL_I));
      exp.delete();
      exp.push_back(100);
      for (int it = 0; it < int'(instr.n_iter); it++) begin
        exp.push_back(200);
        foreach (ops[k]) begin
          exp.push_back(300 + ops[k]);
          exp.push_back(400 + 10 * int'(k == 0 && !instr.nb_b)
                            + int'(instr.max_op ^ (ops[k] == int'(SEL_I))));
        end
      end
      exp.push_back(500);
      // Run the handshake.
      req = 1'b1;
      while (!done) begin
        @(negedge clk);
        step_en = rand_step ? ($urandom_range(0, 3) != 0) : 1'b1;
      end
      step_en = 1'b1;
      @(negedge clk);
      check(done, "done must stay high while req is high");
      req = 1'b0;
      @(negedge clk);
      check(!done, "done must fall after req falls");
      check(events.size() == exp.size(),
            $sformatf("instr %03h: %0d actions, expected %0d", instr, events.size(), exp.size()));
      for (int i = 0; i < exp.size() && i < events.size(); i++)
        check(events[i] == exp[i],
              $sformatf("instr %03h action %0d: %0d expected %0d", instr, i, events[i], exp[i]));
      if (!rand_step)
        check(t_done - t_start == 2 + int'(instr.n_iter) * (1 + 2 * ops.size()),
              $sformatf("instr %03h: latency %0d expected %0d", instr, t_done - t_start,
                        2 + int'(instr.n_iter) * (1 + 2 * ops.size())));
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
