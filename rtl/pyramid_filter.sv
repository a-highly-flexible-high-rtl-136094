// pyramid_filter: 3x3 pyramidal smoothing filter, eight pixels per clock.
//
// Removes uncorrelated (temporal and fixed pattern) noise by convolving the
// image with the kernel (1 2 1; 2 4 2; 1 2 1)/16. Because every weight is a
// power of two the filter needs no multipliers: it is built from adders and
// shifts, separated into a vertical pass (top + 2*mid + bottom) and a
// horizontal pass over the vertical sums, followed by a rounding shift by 4.
//
// Structure: two line buffers (MAX_W/NPIX words of NPIX pixels each) hold
// the two previous input lines. While input line r streams in, the vertical
// pass for output line r-1 is formed word by word from the two line buffers
// and the incoming word. The horizontal pass needs the right neighbour of
// the last pixel in a word, so a word is emitted when the next word of the
// line has been vertically summed; the last word of each line is emitted in
// one extra "drain" cycle, during which in_ready is low. After the last input
// line (eof) the filter reads its line buffers once more to emit the last
// output line, with in_ready low for that line. Image borders are handled by
// replicating the edge pixels, lines and columns alike.
//
// Interface: beat_t stream in with valid/ready, out with valid only (no back
// pressure from the following stage). enable is sampled with the sof beat and
// holds for the frame; a disabled frame passes through with one clock of
// latency. busy is high while a frame is inside the filter. Latency when
// enabled: one input line plus two clocks.
//
// From the source design: the kernel, the shift-only arithmetic, the
// eight-pixel parallel data path and the line buffer structure. Choices of
// this design: edge replication, rounding (+8 before >>4), the drain cycle
// per line and the stream framing.
module pyramid_filter
  import nc_pkg::*;
#(
  parameter int unsigned MAX_W = 1280          // maximum line width in pixels
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  enable,
  input  beat_t in_beat,
  input  logic  in_valid,
  output logic  in_ready,
  output beat_t out_beat,
  output logic  out_valid,
  output logic  busy
);
  localparam int unsigned WORDS = MAX_W / NPIX;
  localparam int unsigned AW    = (WORDS > 1) ? $clog2(WORDS) : 1;
  localparam int unsigned VW    = PIX_W + 2;    // vertical sum width

  typedef logic [NPIX-1:0][PIX_W-1:0] word_t;
  typedef logic [NPIX-1:0][VW-1:0]    vword_t;

  word_t lb1 [WORDS];   // line r-1
  word_t lb2 [WORDS];   // line r-2

  logic          frame_en, in_frame;
  logic [1:0]    rowc;          // 0: first line, 1: second line, 2: later
  logic [AW-1:0] col;
  logic          flushing, flush_single;
  logic [AW-1:0] fcol, last_col;
  logic          drain;

  // stage B (horizontal pass) hold register
  vword_t        hold;
  logic [VW-1:0] hold_left;
  logic          hold_valid, hold_sof, hold_eol, hold_eof;

  assign in_ready = !drain && !flushing;

  wire   accept = in_valid && in_ready;
  wire   cur_en = in_beat.sof ? enable : frame_en;

  // ---------------- stage A: vertical pass ----------------
  logic   v_valid, v_first, v_sof, v_eol, v_eof;
  vword_t v_word;
  word_t  a_top, a_mid, a_bot;

  always_comb begin
    v_valid = 1'b0;
    v_first = 1'b0;
    v_sof   = 1'b0;
    v_eol   = 1'b0;
    v_eof   = 1'b0;
    a_top   = '0;
    a_mid   = '0;
    a_bot   = '0;
    if (!drain && flushing) begin
      a_mid   = lb1[fcol];
      a_top   = flush_single ? a_mid : lb2[fcol];
      a_bot   = a_mid;
      v_valid = 1'b1;
      v_first = (fcol == '0);
      v_sof   = flush_single && (fcol == '0);
      v_eol   = (fcol == last_col);
      v_eof   = v_eol;
    end else if (accept && cur_en && !in_beat.sof && rowc != 2'd0) begin
      a_mid   = lb1[col];
      a_top   = (rowc == 2'd1) ? a_mid : lb2[col];
      a_bot   = in_beat.px;
      v_valid = 1'b1;
      v_first = (col == '0);
      v_sof   = (rowc == 2'd1) && (col == '0);
      v_eol   = in_beat.eol;
    end
    for (int k = 0; k < NPIX; k++)
      v_word[k] = VW'(a_top[k]) + (VW'(a_mid[k]) << 1) + VW'(a_bot[k]);
  end

  always_ff @(posedge clk) begin
    if (accept && cur_en) begin
      lb2[col] <= lb1[col];
      lb1[col] <= in_beat.px;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame_en     <= 1'b0;
      in_frame     <= 1'b0;
      rowc         <= '0;
      col          <= '0;
      flushing     <= 1'b0;
      flush_single <= 1'b0;
      fcol         <= '0;
      last_col     <= '0;
    end else begin
      if (accept) begin
        if (in_beat.sof) begin
          frame_en <= enable;
          in_frame <= 1'b1;
        end
        if (in_beat.eol) begin
          col  <= '0;
          rowc <= (rowc == 2'd2) ? 2'd2 : rowc + 2'd1;
        end else begin
          col <= col + AW'(1);
        end
        if (in_beat.eof) begin
          in_frame     <= 1'b0;
          rowc         <= '0;
          flushing     <= cur_en;
          flush_single <= (rowc == 2'd0);
          last_col     <= col;
          fcol         <= '0;
        end
      end
      if (!drain && flushing) begin
        fcol <= fcol + AW'(1);
        if (fcol == last_col) flushing <= 1'b0;
      end
    end
  end

  // ---------------- stage B: horizontal pass ----------------
  function automatic word_t hpass(vword_t c, logic [VW-1:0] l, logic [VW-1:0] r);
    word_t o;
    for (int k = 0; k < NPIX; k++) begin
      logic [VW+1:0] s;
      logic [VW-1:0] lk, rk;
      lk   = (k == 0) ? l : c[k-1];
      rk   = (k == NPIX-1) ? r : c[k+1];
      s    = (VW+2)'(lk) + ((VW+2)'(c[k]) << 1) + (VW+2)'(rk) + (VW+2)'(8);
      o[k] = PIX_W'(s >> 4);
    end
    return o;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      drain      <= 1'b0;
      hold_valid <= 1'b0;
      hold       <= '0;
      hold_left  <= '0;
      hold_sof   <= 1'b0;
      hold_eol   <= 1'b0;
      hold_eof   <= 1'b0;
      out_valid  <= 1'b0;
      out_beat   <= '0;
    end else begin
      out_valid <= 1'b0;
      if (drain) begin
        // last word of the line: right edge replicated
        out_valid    <= 1'b1;
        out_beat.px  <= hpass(hold, hold_left, hold[NPIX-1]);
        out_beat.sof <= hold_sof;
        out_beat.eol <= hold_eol;
        out_beat.eof <= hold_eof;
        hold_valid   <= 1'b0;
        drain        <= 1'b0;
      end else if (v_valid) begin
        if (hold_valid) begin
          out_valid    <= 1'b1;
          out_beat.px  <= hpass(hold, hold_left, v_word[0]);
          out_beat.sof <= hold_sof;
          out_beat.eol <= hold_eol;
          out_beat.eof <= hold_eof;
        end
        hold       <= v_word;
        hold_left  <= v_first ? v_word[0] : hold[NPIX-1];
        hold_valid <= 1'b1;
        hold_sof   <= v_sof;
        hold_eol   <= v_eol;
        hold_eof   <= v_eof;
        drain      <= v_eol;
      end else if (accept && !cur_en) begin
        // filter disabled for this frame: pass through
        out_valid <= 1'b1;
        out_beat  <= in_beat;
      end
    end
  end

  assign busy = in_frame || flushing || drain || hold_valid || out_valid;

  // a new frame may only start once the previous one has left the filter
  a_sof_idle: assert property (@(posedge clk) disable iff (!rst_n)
    (accept && in_beat.sof) |-> !(flushing || drain || hold_valid));
endmodule
