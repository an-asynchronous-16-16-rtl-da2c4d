// tb_frame_opening: a 256x256 greyscale frame processed tile by tile on the 16x16 array.
//
// The frame is cut into 256 tiles of 16x16 pixels. Each tile is shifted in over the row
// links while the previous tile is being computed, and each result is shifted out during
// the following tile. The border ports carry the pixels of the neighbouring tiles (255
// outside the frame for the erosion, 0 for the dilation), so one iteration per tile
// equals one iteration over the whole frame. Two passes give an opening of size 1: a
// 5-pixel-cross erosion of the frame, then a 5-pixel-cross dilation of the eroded frame.
// Every tile result is compared with a whole-frame model computed here. The clock cycles
// one pass takes are printed together with the clock rate two passes at 30 frames/s need.
module tb_frame_opening;
  import morpho_pkg::*;
  localparam int ROWS = 16, COLS = 16, PIX_W = 8;
  localparam int FR = 256, FC = 256;
  localparam int TR = FR / ROWS, TC = FC / COLS;

  typedef int tile_t [ROWS][COLS];
  typedef int frame_t [FR][FC];

  logic                          clk = 1'b0, rst_n = 1'b0, req = 1'b0, shift = 1'b0;
  logic [INSTR_W-1:0]            instr = '0;
  logic                          ack;
  logic [ROWS-1:0]               e_sin = '0, r_sin = '0, s_sout;
  logic [COLS-1:0][PIX_W-1:0]    border_n = '0, border_s = '0;
  logic [ROWS-1:0][PIX_W-1:0]    border_w = '0, border_e = '0;
  logic [ROWS-1:0][COLS-1:0]     step_en = '1;

  int checks = 0, failures = 0, cycle = 0;
  frame_t frame, eroded, opened, got_eroded, got_opened;

  morpho_array dut (
    .clk, .rst_n, .instr, .req, .ack, .shift, .e_sin, .r_sin, .s_sout,
    .border_n, .border_s, .border_w, .border_e, .step_en
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
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

  // One iteration over the 5-pixel cross of the whole frame.
  function automatic frame_t cross_iter(input frame_t f, input bit mx, input int outside);
    frame_t o;
    int v[5];
    for (int r = 0; r < FR; r++)
      for (int c = 0; c < FC; c++) begin
        v[0] = f[r][c];
        v[1] = (r > 0)      ? f[r-1][c] : outside;
        v[2] = (c < FC - 1) ? f[r][c+1] : outside;
        v[3] = (r < FR - 1) ? f[r+1][c] : outside;
        v[4] = (c > 0)      ? f[r][c-1] : outside;
        o[r][c] = v[0];
        for (int k = 1; k < 5; k++)
          o[r][c] = mx ? ((v[k] > o[r][c]) ? v[k] : o[r][c]) : ((v[k] < o[r][c]) ? v[k] : o[r][c]);
      end
    return o;
  endfunction

  function automatic int px(input frame_t f, input int r, input int c, input int outside);
    return (r < 0 || r >= FR || c < 0 || c >= FC) ? outside : f[r][c];
  endfunction

  task automatic shift_tile(input frame_t f, input int t, output tile_t s);
    int tr, tc;
    tr = (t / TC) * ROWS;
    tc = (t % TC) * COLS;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) s[r][c] = 0;
    for (int k = 0; k < COLS * PIX_W; k++) begin
      int c, bt;
      c  = COLS - 1 - k / PIX_W;
      bt = k % PIX_W;
      @(negedge clk);
      for (int r = 0; r < ROWS; r++) begin
        s[r][c] |= int'(s_sout[r]) << bt;
        e_sin[r] = (t < TR * TC) ? f[tr + r][tc + c][bt] : 1'b0;
      end
      shift = 1'b1;
    end
    @(negedge clk);
    shift = 1'b0;
  endtask

  task automatic set_borders(input frame_t f, input int t, input int outside);
    int tr, tc;
    tr = (t / TC) * ROWS;
    tc = (t % TC) * COLS;
    for (int c = 0; c < COLS; c++) begin
      border_n[c] = PIX_W'(px(f, tr - 1, tc + c, outside));
      border_s[c] = PIX_W'(px(f, tr + ROWS, tc + c, outside));
    end
    for (int r = 0; r < ROWS; r++) begin
      border_w[r] = PIX_W'(px(f, tr + r, tc - 1, outside));
      border_e[r] = PIX_W'(px(f, tr + r, tc + COLS, outside));
    end
  endtask

  // Run one instruction over every tile of f; tile t's result comes out during tile t+1,
  // a final zero-iteration instruction flushes the last one.
  task automatic run_pass(input instr_t ins, input frame_t f, input int outside,
                          input frame_t want, output frame_t res);
    tile_t got;
    int t0, bad;
    t0 = cycle;
    shift_tile(f, 0, got);
    for (int t = 0; t <= TR * TC; t++) begin
      instr_t cur;
      cur = ins;
      if (t == TR * TC) cur.n_iter = '0;
      instr = INSTR_W'(cur);
      if (t < TR * TC) set_borders(f, t, outside);
      @(negedge clk);
      req = 1'b1;
      @(negedge clk);
      fork
        while (!ack) @(negedge clk);
        shift_tile(f, t + 1, got);
      join
      req = 1'b0;
      @(negedge clk);
      if (t >= 1) begin
        bad = 0;
        for (int r = 0; r < ROWS; r++)
          for (int c = 0; c < COLS; c++) begin
            res[((t-1) / TC) * ROWS + r][((t-1) % TC) * COLS + c] = got[r][c];
            if (got[r][c] != want[((t-1) / TC) * ROWS + r][((t-1) % TC) * COLS + c]) bad = bad + 1;
          end
        check(bad == 0, $sformatf("tile %0d: %0d pixels differ", t - 1, bad));
      end
    end
    $display("pass %03h: %0d cycles for %0d tiles", ins, cycle - t0, TR * TC);
  endtask

  function automatic bit same(input frame_t a, input frame_t b);
    for (int r = 0; r < FR; r++)
      for (int c = 0; c < FC; c++)
        if (a[r][c] != b[r][c]) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    instr_t ero, dil;
    int t_start, total;
    for (int r = 0; r < FR; r++)
      for (int c = 0; c < FC; c++)
        frame[r][c] = 16 * ((r / 5 + c / 7 + $urandom_range(0, 2)) % 16) + $urandom_range(0, 15);
    eroded = cross_iter(frame, 1'b0, 255);
    opened = cross_iter(eroded, 1'b1, 0);
    ero = '{max_op:0, geodesic:0, nb_b:1, nb_n:1, nb_e:1, nb_s:1, nb_o:1, n_iter:1};
    dil = '{max_op:1, geodesic:0, nb_b:1, nb_n:1, nb_e:1, nb_s:1, nb_o:1, n_iter:1};

    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    t_start = cycle;
    run_pass(ero, frame, 255, eroded, got_eroded);
    run_pass(dil, got_eroded, 0, opened, got_opened);
    total = cycle - t_start;
    check(same(got_eroded, eroded), "eroded frame");
    check(same(got_opened, opened), "opened frame");
    $display("opening of a %0dx%0d frame: %0d cycles; 30 frames/s needs a %0d kHz clock",
             FR, FC, total, (total * 30) / 1000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
