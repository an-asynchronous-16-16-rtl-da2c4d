// tb_pe: self-checking test of one processing element.
// Each round shifts a random input pixel into E and a reference pixel into R, presents
// random neighbour values and a random instruction, and runs the Req/Done handshake.
// The result moves to S when the following round starts and is shifted out while the
// pixels of the round after that are shifted in; it is compared with a model of the instruction written
// here: B starts from E, each iteration combines B (if selected) and the selected
// neighbours with the minimum or maximum, then the reference with the dual operation for
// a geodesic instruction. The L register must hold the value before the last iteration.
module tb_pe;
  import morpho_pkg::*;
  localparam int unsigned PIX_W = 8;

  logic             clk = 1'b0, rst_n = 1'b0, req = 1'b0, step_en = 1'b1, shift = 1'b0;
  logic             e_sin = 1'b0, r_sin = 1'b0, s_sin = 1'b0;
  logic             e_sout, r_sout, s_sout, done;
  instr_t           instr = '0;
  logic [PIX_W-1:0] ln = '0, le = '0, ls = '0, lo = '0, l;
  int               checks = 0, failures = 0;

  pe dut (
    .clk, .rst_n, .instr, .req, .step_en, .done, .shift,
    .e_sin, .e_sout, .r_sin, .r_sout, .s_sin, .s_sout, .ln, .le, .ls, .lo, .l
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int op(input bit mx, input int x, input int y);
    return mx ? ((x > y) ? x : y) : ((x < y) ? x : y);
  endfunction

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    int e_pix, r_pix, b, acc, lexp, prev_result, in_s;
    bit first, have_prev, have_s;
    int got;
    have_prev = 0;
    have_s = 0;
    prev_result = 0;
    in_s = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int round = 0; round < 400; round++) begin
      e_pix = $urandom_range(0, 255);
      r_pix = $urandom_range(0, 255);
      // Shift in E and R while the previous result leaves S.
      got = 0;
      for (int bt = 0; bt < PIX_W; bt++) begin
        @(negedge clk);
        got   |= int'(s_sout) << bt;
        e_sin  = e_pix[bt];
        r_sin  = r_pix[bt];
        shift  = 1'b1;
      end
      @(negedge clk);
      shift = 1'b0;
      if (have_s) check(got == in_s, $sformatf("round %0d: S gave %0d expected %0d", round, got, in_s));
      // Instruction and neighbours.
      instr = instr_t'($urandom);
      instr.n_iter = ITER_W'($urandom_range(0, 5));
      ln = PIX_W'($urandom);
      le = PIX_W'($urandom);
      ls = PIX_W'($urandom);
      lo = PIX_W'($urandom);
      // Model.
      b = e_pix;
      lexp = -1;
      for (int it = 0; it < int'(instr.n_iter); it++) begin
        lexp  = b;
        acc   = b;
        first = !instr.nb_b;
        if (instr.nb_n) begin acc = first ? int'(ln) : op(instr.max_op, acc, int'(ln)); first = 0; end
        if (instr.nb_e) begin acc = first ? int'(le) : op(instr.max_op, acc, int'(le)); first = 0; end
        if (instr.nb_s) begin acc = first ? int'(ls) : op(instr.max_op, acc, int'(ls)); first = 0; end
        if (instr.nb_o) begin acc = first ? int'(lo) : op(instr.max_op, acc, int'(lo)); first = 0; end
        if (instr.geodesic) begin acc = first ? r_pix : op(!instr.max_op, acc, r_pix); first = 0; end
        b = acc;
      end
      // Handshake, with a random local pace on odd rounds. The transfer moves the
      // previous round's result into S.
      req = 1'b1;
      in_s = prev_result;
      have_s = have_prev;
      @(negedge clk);
      while (!done) begin
        step_en = (round % 2 == 0) ? 1'b1 : ($urandom_range(0, 2) != 0);
        @(negedge clk);
      end
      step_en = 1'b1;
      if (lexp >= 0) check(int'(l) == lexp, $sformatf("round %0d: L=%0d expected %0d", round, l, lexp));
      req = 1'b0;
      @(negedge clk);
      check(!done, "done must fall after req");
      prev_result = b;
      have_prev = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
