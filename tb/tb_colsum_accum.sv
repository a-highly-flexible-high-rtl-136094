// tb_colsum_accum: streams frames of several sizes (with and without idle
// clocks, including one-word lines that exercise the forwarding path and
// back-to-back frames that test the first-line overwrite) and reads every
// column sum back through the second port, comparing with sums computed
// here.
module tb_colsum_accum;
  import nc_pkg::*;
  import nc_ref_pkg::*;
  localparam int MAX_W = 1280, MAX_H = 1024, SW = 20, CAW = 11;

  logic clk = 0, rst_n = 0, in_valid;
  beat_t in_beat;
  logic [CAW-1:0] rd_col;
  logic [SW-1:0] rd_data;
  int checks = 0, failures = 0;
  img_t img;
  line_t ref_s;

  colsum_accum #(.MAX_W(MAX_W), .MAX_H(MAX_H)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic frame(int Wd, int H, bit gaps, int maxv);
    img = new[H];
    foreach (img[r]) begin
      img[r] = new[Wd * NPIX];
      foreach (img[r][c]) img[r][c] = $urandom_range(0, maxv);
    end
    ref_s = colsums_of(img);
    for (int r = 0; r < H; r++)
      for (int j = 0; j < Wd; j++) begin
        if (gaps) while ($urandom_range(0, 2) == 0) begin
          in_valid <= 0;
          @(posedge clk);
        end
        in_valid    <= 1;
        in_beat.sof <= (r == 0 && j == 0);
        in_beat.eol <= (j == Wd - 1);
        in_beat.eof <= (r == H - 1 && j == Wd - 1);
        for (int k = 0; k < NPIX; k++) in_beat.px[k] <= PIX_W'(img[r][j * NPIX + k]);
        @(posedge clk);
      end
    in_valid <= 0;
    repeat (3) @(posedge clk);
    for (int c = 0; c < Wd * NPIX; c++) begin
      rd_col <= CAW'(c);
      @(posedge clk);
      @(posedge clk);
      #1;
      checks++;
      if (rd_data !== SW'(ref_s[c])) begin
        failures++;
        if (failures < 10) $display("col %0d got %0d exp %0d", c, rd_data, ref_s[c]);
      end
    end
  endtask

  initial begin
    in_valid = 0; in_beat = '0; rd_col = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    frame(4, 5, 0, 1023);
    frame(4, 3, 1, 1023);
    frame(1, 7, 0, 1023);
    frame(1, 4, 1, 1023);
    frame(2, 1, 0, 1023);
    frame(160, 1024, 0, 1023);
    frame(160, 12, 1, 50);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
