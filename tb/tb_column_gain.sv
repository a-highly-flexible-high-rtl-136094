// tb_column_gain: sends a sequence of frames with the stage enabled and
// disabled and checks every output pixel against the reference: the first
// enabled frame passes unchanged while it is measured, later enabled frames
// are corrected with the coefficients of the frame before, and a disabled
// frame passes unchanged and invalidates the coefficients; columns beyond
// the measured width pass unchanged. Also checks
// that busy falls 2*width + 57 clocks after the eof beat (coefficient
// calculation) and that coef_valid follows.
module tb_column_gain;
  import nc_pkg::*;
  import nc_ref_pkg::*;
  localparam int MAX_W = 1280, MAX_H = 1024;

  logic clk = 0, rst_n = 0, enable, in_valid, out_valid, busy, coef_valid, calc_busy;
  beat_t in_beat, out_beat;
  int checks = 0, failures = 0, corrected = 0;
  longint cyc = 0, t_eof;
  beat_t eq[$];
  beat_t e, x;
  img_t img;
  line_t ck, cs;
  bit model_valid = 0;

  column_gain #(.MAX_W(MAX_W), .MAX_H(MAX_H)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (in_valid && in_beat.eof) t_eof = cyc;
    if (rst_n && out_valid) begin
      checks++;
      e = eq.pop_front();
      if (out_beat !== e) begin
        failures++;
        if (failures < 10) $display("at %0d (%0d queued) got %h exp %h", cyc, eq.size(), out_beat, e);
      end
    end
  end

  task automatic frame(int Wd, int H, bit en, int kind);
    beat_t b;
    int W;
    W = Wd * NPIX;
    img = new[H];
    foreach (img[r]) begin
      img[r] = new[W];
      // kind 0: random; kind 1: ramp with per-column gain error
      foreach (img[r][c]) img[r][c] = (kind == 0) ? $urandom_range(0, 1023)
                                     : (300 + c / 3 + r) * (90 + (c * 7919) % 21) / 100;
    end
    for (int r = 0; r < H; r++)
      for (int j = 0; j < Wd; j++) begin
        b.sof = (r == 0 && j == 0);
        b.eol = (j == Wd - 1);
        b.eof = (r == H - 1 && j == Wd - 1);
        for (int k = 0; k < NPIX; k++) begin
          b.px[k] = PIX_W'(img[r][j * NPIX + k]);
          x.px[k] = (en && model_valid && j * NPIX + k < ck.size()) ? PIX_W'(gain(img[r][j * NPIX + k], ck[j * NPIX + k])) : PIX_W'(img[r][j * NPIX + k]);
        end
        x.sof = b.sof; x.eol = b.eol; x.eof = b.eof;
        eq.push_back(x);
        in_valid <= 1;
        in_beat  <= b;
        enable   <= en;
        @(posedge clk);
        if ($urandom_range(0, 5) == 0) begin
          in_valid <= 0;
          @(posedge clk);
        end
      end
    in_valid <= 0;
    if (en && model_valid) corrected++;
    if (en) begin
      cs = colsums_of(img);
      ck = coefs(cs, 1'b1);
      model_valid = 1;
    end else model_valid = 0;
    @(posedge clk);
    while (busy) @(posedge clk);
    if (en) begin
      checks++;
      if (cyc - 1 - t_eof != 2 * W + 57) begin
        failures++;
        $display("busy fell %0d clocks after eof, expected %0d", cyc - 1 - t_eof, 2 * W + 57);
      end
    end
    @(posedge clk);
    checks++;
    if (coef_valid !== model_valid) begin
      failures++;
      $display("coef_valid %0d expected %0d", coef_valid, model_valid);
    end
  endtask

  initial begin
    in_valid = 0; in_beat = '0; enable = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    frame(4, 6, 1, 1);
    frame(4, 6, 1, 1);
    frame(4, 5, 1, 0);
    frame(4, 5, 0, 0);
    frame(6, 8, 1, 1);
    frame(6, 8, 1, 1);
    frame(160, 40, 1, 1);
    frame(160, 40, 1, 1);
    repeat (5) @(posedge clk);
    checks++;
    if (eq.size() != 0 || corrected < 3) begin
      failures++;
      $display("%0d beats missing, %0d corrected frames", eq.size(), corrected);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
