// tb_morpho_array: end-to-end test of the 16x16 array at its default size.
//
// It runs an opening by reconstruction and other instructions through the array with the
// Req/Ack handshake, shifting each image in and each result out over the bit-serial row
// links while the array computes the previous instruction:
//   op0  erosion (Minimum, full neighbourhood, 2 iterations) of a random image
//   op1  dilation without the centre pixel (first operand passed), 1 iteration
//   op2  geodesic dilation of the op0 result under the original image, 31 iterations,
//        every PE in lock step; its input is the op0 result looped from the S links
//        straight back into the E links
//   op3  the same geodesic dilation with a random pace per PE (functional asynchronism)
//   op4  dilation over the PE itself and its north and east neighbours only, 3 iterations
//        (an asymmetric neighbourhood, so that every neighbour link is checked)
//   op5  zero iterations (result = input), op6 flushes op5's result out
// Lock-step results are compared with a synchronous model of the instruction computed
// here; the asynchronous result is compared with the fixed point of the reconstruction.
// The Req-to-Ack latency of a lock-step instruction with n iterations of k operands must be
// 2 + n * (1 + 2k) cycles (343 for op2). Each mechanism (erosion,
// dilation, pass, geodesic, zero-iteration, I/O overlapped with computation, loop-back,
// PEs finishing at different times) is counted and must occur at least once.
module tb_morpho_array;
  import morpho_pkg::*;
  localparam int ROWS = 16, COLS = 16, PIX_W = 8;
  localparam int NOPS = 7;

  typedef int img_t [ROWS][COLS];

  logic                              clk = 1'b0, rst_n = 1'b0, req = 1'b0, shift = 1'b0;
  logic [INSTR_W-1:0]                instr = '0;
  logic                              ack;
  logic [ROWS-1:0]                   e_sin = '0, r_sin = '0, s_sout;
  logic [COLS-1:0][PIX_W-1:0]        border_n = '0, border_s = '0;
  logic [ROWS-1:0][PIX_W-1:0]        border_w = '0, border_e = '0;
  logic [ROWS-1:0][COLS-1:0]         step_en = '1;
  logic [ROWS-1:0][COLS-1:0]         pe_done;

  int checks = 0, failures = 0;
  int cycle = 0;
  int n_erosion = 0, n_dilation = 0, n_pass = 0, n_geodesic = 0, n_zero = 0;
  int n_overlap = 0, n_loopback = 0, n_async_done = 0;

  morpho_array dut (
    .clk, .rst_n, .instr, .req, .ack, .shift, .e_sin, .r_sin, .s_sout,
    .border_n, .border_s, .border_w, .border_e, .step_en
  );

  for (genvar r = 0; r < ROWS; r++) begin : g_r
    for (genvar c = 0; c < COLS; c++) begin : g_c
      assign pe_done[r][c] = dut.g_row[r].g_col[c].u_pe.done;
    end
  end

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (req && !ack && shift) n_overlap++;
    if (pe_done != '0 && pe_done != '1) n_async_done++;
  end

  initial begin : watchdog
    repeat (300000) @(posedge clk);
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

  function automatic int op(input bit mx, input int x, input int y);
    return mx ? ((x > y) ? x : y) : ((x < y) ? x : y);
  endfunction

  // Synchronous (lock-step) model of one instruction with constant border values.
  function automatic img_t model(input instr_t ins, input img_t e, input img_t rf, input int border);
    img_t b, l;
    int acc, v;
    bit first;
    b = e;
    for (int it = 0; it < int'(ins.n_iter); it++) begin
      l = b;
      for (int r = 0; r < ROWS; r++) begin
        for (int c = 0; c < COLS; c++) begin
          acc   = l[r][c];
          first = !ins.nb_b;
          if (ins.nb_n) begin v = (r > 0) ? l[r-1][c] : border;        acc = first ? v : op(ins.max_op, acc, v); first = 0; end
          if (ins.nb_e) begin v = (c < COLS-1) ? l[r][c+1] : border; acc = first ? v : op(ins.max_op, acc, v); first = 0; end
          if (ins.nb_s) begin v = (r < ROWS-1) ? l[r+1][c] : border; acc = first ? v : op(ins.max_op, acc, v); first = 0; end
          if (ins.nb_o) begin v = (c > 0) ? l[r][c-1] : border;        acc = first ? v : op(ins.max_op, acc, v); first = 0; end
          if (ins.geodesic) begin acc = first ? rf[r][c] : op(!ins.max_op, acc, rf[r][c]); first = 0; end
          b[r][c] = acc;
        end
      end
    end
    return b;
  endfunction

  // Shift a full image into E and R while the previous result leaves S. With loop set,
  // each E link is fed from the S link of its row.
  task automatic shift_io(input img_t e, input img_t rf, input bit loop, output img_t s);
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) s[r][c] = 0;
    for (int k = 0; k < COLS * PIX_W; k++) begin
      int c, bt;
      c  = COLS - 1 - k / PIX_W;
      bt = k % PIX_W;
      @(negedge clk);
      for (int r = 0; r < ROWS; r++) begin
        s[r][c]  |= int'(s_sout[r]) << bt;
        e_sin[r]  = loop ? s_sout[r] : e[r][c][bt];
        r_sin[r]  = rf[r][c][bt];
      end
      if (loop) n_loopback++;
      shift = 1'b1;
    end
    @(negedge clk);
    shift = 1'b0;
  endtask

  task automatic set_border(input int v);
    for (int i = 0; i < COLS; i++) begin border_n[i] = PIX_W'(v); border_s[i] = PIX_W'(v); end
    for (int i = 0; i < ROWS; i++) begin border_w[i] = PIX_W'(v); border_e[i] = PIX_W'(v); end
  endtask

  function automatic bit same(input img_t a, input img_t b, input string what);
    int bad = 0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        if (a[r][c] != b[r][c]) begin
          if (bad < 3 && what != "") $display("%s: pixel (%0d,%0d) = %0d expected %0d", what, r, c, a[r][c], b[r][c]);
          bad++;
        end
    return bad == 0;
  endfunction

  initial begin
    instr_t ins[NOPS];
    img_t   ein[NOPS], rin[NOPS], expected[NOPS];
    int     brd[NOPS];
    bit     loop[NOPS], async[NOPS];
    img_t   img, img2, img3, zero, got, fix, prev;
    int     t_req, lat, k_conv;

    // Test images: a random image made of plateaus, so that the reconstruction has
    // regional maxima to rebuild.
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        img[r][c]  = 16 * ((r / 4 + c / 3 + $urandom_range(0, 3)) % 16) + $urandom_range(0, 15);
        img2[r][c] = $urandom_range(0, 255);
        img3[r][c] = $urandom_range(0, 255);
        zero[r][c] = 0;
      end

    ins[0] = '{max_op:0, geodesic:0, nb_b:1, nb_n:1, nb_e:1, nb_s:1, nb_o:1, n_iter:2};
    ins[1] = '{max_op:1, geodesic:0, nb_b:0, nb_n:1, nb_e:1, nb_s:1, nb_o:1, n_iter:1};
    ins[2] = '{max_op:1, geodesic:1, nb_b:1, nb_n:1, nb_e:1, nb_s:1, nb_o:1, n_iter:31};
    ins[3] = ins[2];
    ins[4] = '{max_op:1, geodesic:0, nb_b:1, nb_n:1, nb_e:1, nb_s:0, nb_o:0, n_iter:3};
    ins[5] = '{max_op:0, geodesic:0, nb_b:1, nb_n:1, nb_e:0, nb_s:0, nb_o:0, n_iter:0};
    ins[6] = ins[5];
    brd    = '{255, 0, 0, 0, 0, 0, 0};
    async  = '{0, 0, 0, 1, 0, 0, 0};
    loop   = '{0, 0, 1, 0, 0, 0, 0};

    ein[0] = img;  rin[0] = img;
    ein[1] = img2; rin[1] = zero;
    expected[0] = model(ins[0], ein[0], rin[0], brd[0]);
    expected[1] = model(ins[1], ein[1], rin[1], brd[1]);
    ein[2] = expected[0]; rin[2] = img;
    expected[2] = model(ins[2], ein[2], rin[2], brd[2]);
    ein[3] = expected[0]; rin[3] = img;
    // Fixed point of the reconstruction, and the lock-step iterations it takes.
    fix = expected[0];
    k_conv = 0;
    do begin
      prev = fix;
      fix  = model('{max_op:1, geodesic:1, nb_b:1, nb_n:1, nb_e:1, nb_s:1, nb_o:1, n_iter:1}, prev, img, 0);
      k_conv++;
    end while (!same(fix, prev, "") && k_conv < 300);
    $display("reconstruction converges after %0d lock-step iterations", k_conv - 1);
    expected[3] = fix;
    ein[4] = img3; rin[4] = zero; expected[4] = model(ins[4], ein[4], rin[4], brd[4]);
    ein[5] = img2; rin[5] = zero; expected[5] = img2;
    ein[6] = zero; rin[6] = zero; expected[6] = zero;
    check(k_conv - 1 <= 16, "test image must converge well within 31 iterations");
    check(same(expected[2], fix, "lock-step model vs fixed point"), "31 lock-step iterations reach the fixed point");

    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // Load op0's images.
    shift_io(ein[0], rin[0], 1'b0, got);

    for (int o = 0; o < NOPS; o++) begin
      instr = INSTR_W'(ins[o]);
      set_border(brd[o]);
      if (ins[o].n_iter == 0)                     n_zero++;
      else if (ins[o].geodesic)                   n_geodesic++;
      else if (ins[o].max_op)                     n_dilation++;
      else                                        n_erosion++;
      if (!ins[o].nb_b && ins[o].n_iter != 0)     n_pass++;
      @(negedge clk);
      req   = 1'b1;
      t_req = cycle;
      @(negedge clk);
      // While the array computes op o: step_en pattern, next images in, result of o-1 out.
      fork
        begin
          while (!ack) begin
            @(negedge clk);
            if (async[o]) begin
              for (int r = 0; r < ROWS; r++)
                for (int c = 0; c < COLS; c++) step_en[r][c] = ($urandom_range(0, 3) != 0);
            end else step_en = '1;
          end
          lat     = cycle - t_req;
          step_en = '1;
        end
        begin
          if (o + 1 < NOPS) shift_io(ein[o+1], rin[o+1], loop[o+1], got);
          else              shift_io(zero, zero, 1'b0, got);
          if (o >= 1)
            check(same(got, expected[o-1], $sformatf("op%0d result", o-1)),
                  $sformatf("result of op%0d", o - 1));
        end
      join
      if (!async[o]) begin
        int k;
        k = int'(ins[o].nb_n) + int'(ins[o].nb_e) + int'(ins[o].nb_s) + int'(ins[o].nb_o) + int'(ins[o].geodesic);
        check(lat == 2 + int'(ins[o].n_iter) * (1 + 2 * k),
              $sformatf("op%0d latency %0d cycles, expected %0d", o, lat, 2 + int'(ins[o].n_iter) * (1 + 2 * k)));
      end
      if (o < NOPS - 1 && !async[o]) $display("op%0d: req to ack %0d cycles", o, lat);
      @(negedge clk);
      req = 1'b0;
      @(negedge clk);
      check(!ack, "ack must fall after req");
    end
    // The last result (op6) stays in B; op5's result was checked during op6.

    check(n_erosion > 0,    "erosion exercised");
    check(n_dilation > 0,   "dilation exercised");
    check(n_pass > 0,       "pass of first operand exercised");
    check(n_geodesic > 0,   "geodesic operator exercised");
    check(n_zero > 0,       "zero-iteration instruction exercised");
    check(n_overlap > 0,    "I/O overlapped with computation");
    check(n_loopback > 0,   "S-to-E loop-back exercised");
    check(n_async_done > 0, "PEs finished at different times");
    $display("mechanisms: erosion=%0d dilation=%0d pass=%0d geodesic=%0d zero_iter=%0d overlap_cycles=%0d loopback_bits=%0d async_done_cycles=%0d",
             n_erosion, n_dilation, n_pass, n_geodesic, n_zero, n_overlap, n_loopback, n_async_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
