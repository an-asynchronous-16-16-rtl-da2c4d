// morpho_array: the 16x16 processor array core of the morphological filtering processor.
//
// A square mesh of processing elements (pe), each reading the L register of its four
// nearest neighbours. The environment talks to it through three bit-serial links per row
// of PEs (E and R in at the west end, S out at the east end), a global 12-bit
// instruction, a Req/Ack handshake and a reset, as in the original design's array architecture.
//
// Operation (four-phase handshake): shift a new image into E and a reference image into
// R (8 * COLS shifts per row, pixels of the east-most column first, each pixel LSB
// first), present the instruction and raise req. In the first clock cycle with req high
// every PE copies B to S, E to B and R to I; from the next cycle the image registers may
// be shifted again while the PEs compute. ack rises when every PE has finished its
// iterations and falls one cycle after req is lowered. The result of a computation is
// moved to S at the start of the next computation and is then shifted out on s_sout.
// shift must be low in the cycle req rises, and instr stable while req is high.
//
// The pixel values seen beyond the array edges come from the border_* inputs, so that an
// image larger than the array can be processed in tiles; step_en gives each PE its own
// pace, standing in for the unsynchronised self-timed PEs of the chip (tie it high for a
// lock-step array). The border inputs, step_en, the clocked implementation and the bit
// order are this design's choices; the array size, pixel width, links and handshake
// follow the original design.
module morpho_array
  import morpho_pkg::*;
#(
  parameter int unsigned ROWS  = 16,
  parameter int unsigned COLS  = 16,
  parameter int unsigned PIX_W = 8
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [INSTR_W-1:0]            instr,
  input  logic                          req,
  output logic                          ack,
  input  logic                          shift,
  input  logic [ROWS-1:0]               e_sin,
  input  logic [ROWS-1:0]               r_sin,
  output logic [ROWS-1:0]               s_sout,
  input  logic [COLS-1:0][PIX_W-1:0]    border_n,
  input  logic [COLS-1:0][PIX_W-1:0]    border_s,
  input  logic [ROWS-1:0][PIX_W-1:0]    border_w,
  input  logic [ROWS-1:0][PIX_W-1:0]    border_e,
  input  logic [ROWS-1:0][COLS-1:0]     step_en
);

  logic [ROWS-1:0][COLS-1:0][PIX_W-1:0] l;
  logic [ROWS-1:0][COLS-1:0]            done;
  logic [ROWS-1:0][COLS:0]              e_ch, r_ch, s_ch;
  instr_t                               ins;

  assign ins = instr_t'(instr);

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    assign e_ch[r][0] = e_sin[r];
    assign r_ch[r][0] = r_sin[r];
    assign s_ch[r][0] = 1'b0;
    assign s_sout[r]  = s_ch[r][COLS];

    for (genvar c = 0; c < COLS; c++) begin : g_col
      logic [PIX_W-1:0] ln, le, ls, lo;

      if (r == 0)        begin : g_n_edge assign ln = border_n[c]; end
      else               begin : g_n_pe   assign ln = l[r-1][c];   end
      if (r == ROWS - 1) begin : g_s_edge assign ls = border_s[c]; end
      else               begin : g_s_pe   assign ls = l[r+1][c];   end
      if (c == 0)        begin : g_o_edge assign lo = border_w[r]; end
      else               begin : g_o_pe   assign lo = l[r][c-1];   end
      if (c == COLS - 1) begin : g_e_edge assign le = border_e[r]; end
      else               begin : g_e_pe   assign le = l[r][c+1];   end

      pe #(.PIX_W(PIX_W)) u_pe (
        .clk, .rst_n, .instr(ins), .req, .step_en(step_en[r][c]), .done(done[r][c]),
        .shift,
        .e_sin(e_ch[r][c]), .e_sout(e_ch[r][c+1]),
        .r_sin(r_ch[r][c]), .r_sout(r_ch[r][c+1]),
        .s_sin(s_ch[r][c]), .s_sout(s_ch[r][c+1]),
        .ln, .le, .ls, .lo, .l(l[r][c])
      );
    end
  end

  // Acknowledge: every PE has completed the instruction.
  assign ack = &done;

  // Handshake rules.
  a_no_shift_at_start : assert property (@(posedge clk) disable iff (!rst_n)
                                         $rose(req) |-> !shift)
    else $error("shift high in the cycle req rises");
  a_ack_returns_low   : assert property (@(posedge clk) disable iff (!rst_n)
                                         (!req && !$past(req)) |-> !ack)
    else $error("ack still high after req was lowered");

endmodule
