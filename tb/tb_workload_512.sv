// tb_workload_512: image-quality workload on a 512 x 512 test scene.
//
// Builds a smooth synthetic scene (two-dimensional waves plus a vertical
// step edge), then corrupts it the way the filters of this design are
// meant to be judged: additive Gaussian noise of variance 0.005 (relative
// to full scale) on every pixel, and a fixed per-column gain error, also
// of variance 0.005, standing in for column-parallel readout. Three frames
// of the same scene go through noise_cancel at its default parameters:
//   1. filter and column gain on: measures the column sums;
//   2. both on, new temporal noise, same column gains: corrected frame;
//   3. the same noisy input as frame 2 with only the filter on.
// The testbench computes the PSNR against the clean scene of the noisy
// input, the filter-only output and the fully corrected output, and
// checks that each step improves on the one before. Gaussian samples are
// the sum of twelve uniform samples.
module tb_workload_512;
  import nc_pkg::*;

  localparam int N = 512;
  localparam int WD = N / NPIX;
  localparam real SIGMA = 0.0707107 * 1023.0;   // sqrt(0.005) of full scale

  logic clk = 0, rst_n = 0, filt_en, cg_en, in_valid, in_ready, out_valid, coef_valid, busy;
  beat_t in_beat, out_beat;
  int checks = 0, failures = 0;

  noise_cancel dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real clean [N][N];
  real gcol [N];
  int  noisy [N][N];
  int  outimg [N][N];
  int  orow, ocol;

  function automatic real gauss();
    real s;
    s = 0.0;
    for (int i = 0; i < 12; i++) s += real'($urandom_range(0, 65535)) / 65536.0;
    return s - 6.0;
  endfunction

  function automatic int clip(real v);
    int i;
    i = int'(v);
    return (i < 0) ? 0 : ((i > 1023) ? 1023 : i);
  endfunction

  task automatic make_noisy();
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++)
        noisy[r][c] = clip(clean[r][c] * gcol[c] + SIGMA * gauss());
  endtask

  // collect the output frame
  always @(posedge clk) if (rst_n && out_valid) begin
    if (out_beat.sof) begin
      orow = 0;
      ocol = 0;
    end
    for (int k = 0; k < NPIX; k++) outimg[orow][ocol * NPIX + k] = int'(out_beat.px[k]);
    if (out_beat.eol) begin
      orow++;
      ocol = 0;
    end else ocol++;
  end

  task automatic send(bit fe, bit ce);
    for (int r = 0; r < N; r++)
      for (int j = 0; j < WD; j++) begin
        in_valid    <= 1;
        filt_en     <= fe;
        cg_en       <= ce;
        in_beat.sof <= (r == 0 && j == 0);
        in_beat.eol <= (j == WD - 1);
        in_beat.eof <= (r == N - 1 && j == WD - 1);
        for (int k = 0; k < NPIX; k++) in_beat.px[k] <= PIX_W'(noisy[r][j * NPIX + k]);
        @(posedge clk);
        while (!in_ready) @(posedge clk);
      end
    in_valid <= 0;
    @(posedge clk);
    while (busy) @(posedge clk);
    repeat (4) @(posedge clk);
  endtask

  function automatic real psnr(bit use_out);
    real mse, d;
    mse = 0.0;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        d = real'(use_out ? outimg[r][c] : noisy[r][c]) - clean[r][c];
        mse += d * d;
      end
    mse = mse / real'(N * N);
    return 10.0 * $log10(1023.0 * 1023.0 / mse);
  endfunction

  real p_in, p_filt, p_all;

  initial begin
    in_valid = 0; in_beat = '0; filt_en = 1; cg_en = 1;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++)
        clean[r][c] = 480.0 + 180.0 * $sin(6.2831853 * c / 256.0) * $cos(6.2831853 * r / 300.0)
                      + 60.0 * $sin(6.2831853 * (r + c) / 170.0) + ((c >= 300) ? 150.0 : 0.0);
    for (int c = 0; c < N; c++) gcol[c] = 1.0 + 0.0707107 * gauss();
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    make_noisy();
    send(1, 1);                 // measure
    checks++;
    if (!coef_valid) begin
      failures++;
      $display("no coefficients after the first frame");
    end
    make_noisy();
    p_in = psnr(0);
    send(1, 1);                 // corrected
    p_all = psnr(1);
    send(1, 0);                 // filter only, same input
    p_filt = psnr(1);
    $display("PSNR: noisy input %0.2f dB, filter only %0.2f dB, filter + column gain %0.2f dB",
             p_in, p_filt, p_all);
    checks++;
    if (!(p_filt > p_in + 3.0)) begin
      failures++;
      $display("pyramidal filter gains less than 3 dB");
    end
    checks++;
    if (!(p_all > p_filt + 1.0)) begin
      failures++;
      $display("column gain compensation gains less than 1 dB");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
