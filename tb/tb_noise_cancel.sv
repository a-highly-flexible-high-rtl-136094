// tb_noise_cancel: end-to-end test of the noise cancelling block at its
// default parameters (1280 x 1024 maximum frame, eight pixels per clock).
//
// Sends frames of several regions of interest with the two stages enabled
// in every combination, ending with two full 1280 x 1024 frames, and
// compares every output pixel with the reference (pyramidal filter, then
// column gain correction using the coefficients of the previous enabled
// frame). Input is offered on every clock, as from a sensor that waits for
// in_ready. Counts each mechanism of the design and fails if one never
// happened: the per-line drain stall, the last-line flush, the hold of a
// new frame while coefficients are calculated, filter bypass, column gain
// bypass with coefficient invalidation, a frame measured but uncorrected,
// and a corrected frame. Also checks that a filtered frame is taken in at
// one beat (eight pixels) per clock apart from one stall per line.
module tb_noise_cancel;
  import nc_pkg::*;
  import nc_ref_pkg::*;

  logic clk = 0, rst_n = 0, filt_en, cg_en, in_valid, in_ready, out_valid, coef_valid, busy;
  beat_t in_beat, out_beat;
  int checks = 0, failures = 0;
  int n_drain = 0, n_flush = 0, n_hold = 0, n_fbyp = 0, n_cgbyp = 0, n_meas = 0, n_corr = 0;
  longint cyc = 0;
  beat_t eq[$];
  beat_t e, x;
  img_t img, fimg;
  line_t ck, cs;
  bit model_valid = 0, in_frame = 0;
  int frame_cycles;

  noise_cancel dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (in_valid && !in_ready && in_beat.sof) n_hold++;
    if (in_valid && !in_ready && !in_beat.sof) n_drain++;
    if (dut.u_filter.flushing) n_flush++;
    if (out_valid) begin
      checks++;
      if (eq.size() == 0) begin
        failures++;
        $display("unexpected output");
      end else begin
        e = eq.pop_front();
        if (out_beat !== e) begin
          failures++;
          if (failures < 10) $display("at %0d got %h exp %h", cyc, out_beat, e);
        end
      end
    end
  end

  task automatic frame(int Wd, int H, bit fe, bit ce, int kind);
    beat_t b;
    int W, v;
    longint t0;
    W = Wd * NPIX;
    img = new[H];
    foreach (img[r]) begin
      img[r] = new[W];
      foreach (img[r][c]) begin
        case (kind)
          0: v = $urandom_range(0, 1023);
          // smooth scene with column gain error and a little noise
          default: v = ((200 + (c % 640) / 2 + r / 4) * (92 + (c * 7919) % 17)) / 100
                       + $urandom_range(0, 8);
        endcase
        img[r][c] = (v > 1023) ? 1023 : v;
      end
    end
    fimg = fe ? pyramid(img) : img;
    for (int r = 0; r < H; r++)
      for (int j = 0; j < Wd; j++) begin
        x.sof = (r == 0 && j == 0);
        x.eol = (j == Wd - 1);
        x.eof = (r == H - 1 && j == Wd - 1);
        for (int k = 0; k < NPIX; k++)
          x.px[k] = (ce && model_valid && j * NPIX + k < ck.size()) ? PIX_W'(gain(fimg[r][j * NPIX + k], ck[j * NPIX + k]))
                                        : PIX_W'(fimg[r][j * NPIX + k]);
        eq.push_back(x);
      end
    if (!fe) n_fbyp++;
    if (!ce) n_cgbyp++;
    if (ce && !model_valid) n_meas++;
    if (ce && model_valid) n_corr++;
    // drive the frame, holding each beat until it is taken
    t0 = 0;
    for (int r = 0; r < H; r++)
      for (int j = 0; j < Wd; j++) begin
        b.sof = (r == 0 && j == 0);
        b.eol = (j == Wd - 1);
        b.eof = (r == H - 1 && j == Wd - 1);
        for (int k = 0; k < NPIX; k++) b.px[k] = PIX_W'(img[r][j * NPIX + k]);
        in_valid <= 1;
        in_beat  <= b;
        filt_en  <= fe;
        cg_en    <= ce;
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        if (b.sof) t0 = cyc;
      end
    frame_cycles = int'(cyc - t0) + 1;
    in_valid <= 0;
    if (fe) begin
      checks++;
      if (frame_cycles != Wd * H + (H > 2 ? H - 2 : 0)) begin
        failures++;
        $display("frame took %0d clocks, expected %0d", frame_cycles, Wd * H + H - 2);
      end
    end
    // model of the coefficient state after this frame
    if (ce) begin
      cs = colsums_of(fimg);
      ck = coefs(cs, 1'b1);
      model_valid = 1;
    end else model_valid = 0;
  endtask

  initial begin
    in_valid = 0; in_beat = '0; filt_en = 1; cg_en = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    frame(4, 6, 1, 1, 1);
    frame(4, 6, 1, 1, 1);
    frame(4, 6, 0, 1, 0);
    frame(4, 5, 1, 0, 0);
    frame(5, 4, 0, 0, 1);
    frame(8, 10, 1, 1, 1);
    frame(8, 10, 1, 1, 1);
    frame(160, 1024, 1, 1, 1);
    frame(160, 1024, 1, 1, 1);
    while (busy) @(posedge clk);
    repeat (5) @(posedge clk);
    checks++;
    if (eq.size() != 0) begin
      failures++;
      $display("%0d output beats missing", eq.size());
    end
    checks++;
    if (coef_valid !== 1'b1) begin
      failures++;
      $display("coefficients not valid at the end");
    end
    $display("mechanisms: drain=%0d flush=%0d sof_hold=%0d filter_bypass=%0d cg_bypass=%0d measured=%0d corrected=%0d",
             n_drain, n_flush, n_hold, n_fbyp, n_cgbyp, n_meas, n_corr);
    checks++;
    if (n_drain == 0 || n_flush == 0 || n_hold == 0 || n_fbyp == 0 || n_cgbyp == 0 ||
        n_meas == 0 || n_corr == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
