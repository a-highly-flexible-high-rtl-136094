// tb_pyramid_filter: self-checking test of the pyramidal 3x3 filter.
//
// Streams random images of several sizes through the filter, enabled and
// disabled, and compares every output beat with a reference convolution
// computed here with edge replication and round-to-nearest. Also checks
// the framing flags, that a line is accepted at one word per clock apart
// from one drain cycle per line, and the latency from the last input beat
// to the last output beat (last-line flush: width in words + 3 clocks, + 2 for a one-line image).
module tb_pyramid_filter;
  import nc_pkg::*;
  localparam int unsigned MAX_W = 1280;

  logic clk = 0, rst_n = 0, enable;
  beat_t in_beat, out_beat;
  logic in_valid, in_ready, out_valid, busy;
  int checks = 0, failures = 0;
  longint cyc = 0;

  pyramid_filter #(.MAX_W(MAX_W)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int img [1024][MAX_W];
  beat_t exp_q[$];
  longint t_eof_in, t_eof_out;
  int stall_cycles;

  function automatic int px(int r, int c, int W, int H);
    if (r < 0) r = 0;
    if (r >= H) r = H - 1;
    if (c < 0) c = 0;
    if (c >= W) c = W - 1;
    return img[r][c];
  endfunction

  task automatic build_expected(int Wd, int H, bit en);
    int W, c, s;
    beat_t b;
    W = Wd * NPIX;
    for (int r = 0; r < H; r++)
      for (int j = 0; j < Wd; j++) begin
        b.sof = (r == 0 && j == 0);
        b.eol = (j == Wd - 1);
        b.eof = (r == H - 1 && j == Wd - 1);
        for (int k = 0; k < NPIX; k++) begin
          c = j * NPIX + k;
          s = 0;
          if (en) begin
            for (int dr = -1; dr <= 1; dr++)
              for (int dc = -1; dc <= 1; dc++)
                s += px(r + dr, c + dc, W, H) * (2 - (dr < 0 ? -dr : dr)) * (2 - (dc < 0 ? -dc : dc));
            b.px[k] = PIX_W'((s + 8) / 16);
          end else b.px[k] = PIX_W'(img[r][c]);
        end
        exp_q.push_back(b);
      end
  endtask

  // monitor
  beat_t e;
  always @(posedge clk) if (in_valid && in_ready && in_beat.eof) t_eof_in = cyc;
  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (exp_q.size() == 0) begin
      failures++;
      $display("unexpected output beat");
    end else begin
      e = exp_q.pop_front();
      if (out_beat !== e) begin
        failures++;
        if (failures < 10) $display("mismatch at %0d: got %h exp %h", cyc, out_beat, e);
      end
      if (out_beat.eof) t_eof_out = cyc;
    end
  end

  task automatic run_frame(int Wd, int H, bit en, bit gaps, int kind);
    for (int r = 0; r < H; r++)
      for (int c = 0; c < Wd * NPIX; c++)
        img[r][c] = (kind == 0) ? int'($urandom_range(0, 1023)) : (kind == 1 ? 1023 : 0);
    build_expected(Wd, H, en);
    stall_cycles = 0;
    for (int r = 0; r < H; r++)
      for (int j = 0; j < Wd; j++) begin
        if (gaps) while ($urandom_range(0, 3) == 0) begin
          in_valid <= 1'b0;
          @(posedge clk);
        end
        in_valid    <= 1'b1;
        enable      <= en;
        in_beat.sof <= (r == 0 && j == 0);
        in_beat.eol <= (j == Wd - 1);
        in_beat.eof <= (r == H - 1 && j == Wd - 1);
        for (int k = 0; k < NPIX; k++) in_beat.px[k] <= PIX_W'(img[r][j * NPIX + k]);
        @(posedge clk);
        while (!in_ready) begin
          stall_cycles++;
          @(posedge clk);
        end
      end
    in_valid <= 1'b0;
    while (busy) @(posedge clk);
    repeat (3) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("%0d beats missing", exp_q.size());
      exp_q.delete();
    end
    if (en && !gaps) begin
      // one drain cycle for each of the output lines 0..H-2 during input
      checks++;
      if (stall_cycles != (H > 2 ? H - 2 : 0)) begin
        failures++;
        $display("stall cycles %0d, expected %0d", stall_cycles, H - 2);
      end
      checks++;
      if (t_eof_out - t_eof_in != Wd + (H > 1 ? 3 : 2)) begin
        failures++;
        $display("flush latency %0d, expected %0d", t_eof_out - t_eof_in, Wd + (H > 1 ? 3 : 2));
      end
    end
    if (!en && !gaps) begin
      checks++;
      if (stall_cycles != 0) begin
        failures++;
        $display("bypass stalled %0d cycles", stall_cycles);
      end
    end
  endtask

  initial begin
    in_valid = 0;
    enable   = 1;
    in_beat  = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    run_frame(4, 6, 1, 0, 0);
    run_frame(4, 6, 1, 0, 1);
    run_frame(1, 3, 1, 0, 0);
    run_frame(3, 2, 1, 1, 0);
    run_frame(5, 1, 1, 0, 0);
    run_frame(4, 4, 0, 0, 0);
    run_frame(6, 5, 1, 1, 0);
    run_frame(4, 3, 0, 1, 0);
    run_frame(160, 20, 1, 0, 0);
    run_frame(160, 4, 1, 1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
