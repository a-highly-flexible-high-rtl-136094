// tb_gain_comp: loads random coefficients (around 1.0, and some large
// enough to saturate) through the write port, streams frames with apply on
// and off, and checks every pixel against round(px*ck/2^14) limited to
// 1023, the pass-through of disabled frames and of unmeasured columns, the flags and the two-clock
// latency.
module tb_gain_comp;
  import nc_pkg::*;
  import nc_ref_pkg::*;
  localparam int MAX_W = 1280, CAW = 11;

  logic clk = 0, rst_n = 0, apply, in_valid, out_valid, coef_we;
  beat_t in_beat, out_beat;
  logic [CAW-1:0] coef_col;
  logic [COEF_W-1:0] coef_data;
  logic [CAW:0] coef_cols;
  int checks = 0, failures = 0, sat_seen = 0;
  longint cyc = 0;
  int ck[MAX_W];
  typedef struct { beat_t b; } exp_t;
  exp_t eq[$];
  exp_t e;

  gain_comp #(.MAX_W(MAX_W)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint tq[$];
  longint t_in;
  always @(posedge clk) begin
    if (rst_n && in_valid) tq.push_back(cyc);
    if (rst_n && out_valid) begin
    checks++;
    e = eq.pop_front();
    t_in = tq.pop_front();
    if (out_beat !== e.b || cyc - t_in != 2) begin
      failures++;
      if (failures < 10) $display("got %h exp %h lat %0d", out_beat, e.b, cyc - t_in);
    end
    end
  end

  task automatic frame(int Wd, int H, bit ap);
    beat_t b;
    int p;
    for (int r = 0; r < H; r++)
      for (int j = 0; j < Wd; j++) begin
        b.sof = (r == 0 && j == 0);
        b.eol = (j == Wd - 1);
        b.eof = (r == H - 1 && j == Wd - 1);
        for (int k = 0; k < NPIX; k++) b.px[k] = PIX_W'($urandom);
        in_valid <= 1;
        in_beat  <= b;
        apply    <= ap;
        e.b = b;
        if (ap)
          for (int k = 0; k < NPIX; k++) if (j * NPIX + k < int'(coef_cols)) begin
            p = gain(int'(b.px[k]), ck[j * NPIX + k]);
            if (p == 1023 && b.px[k] != 1023) sat_seen++;
            e.b.px[k] = PIX_W'(p);
          end
        eq.push_back(e);
        @(posedge clk);
        if ($urandom_range(0, 4) == 0) begin
          in_valid <= 0;
          @(posedge clk);
        end
      end
    in_valid <= 0;
    repeat (4) @(posedge clk);
  endtask

  initial begin
    in_valid = 0; in_beat = '0; apply = 0; coef_we = 0; coef_col = 0; coef_data = 0;
    coef_cols = (CAW+1)'(MAX_W);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < MAX_W; c++) begin
      ck[c] = ($urandom_range(0, 9) == 0) ? $urandom_range(0, 65535) : $urandom_range(12000, 20000);
      coef_we   <= 1;
      coef_col  <= CAW'(c);
      coef_data <= COEF_W'(ck[c]);
      @(posedge clk);
    end
    coef_we <= 0;
    @(posedge clk);
    frame(160, 6, 1);
    frame(5, 4, 0);
    frame(3, 5, 1);
    frame(1, 3, 1);
    coef_cols = (CAW+1)'(20);   // only 20 columns measured
    frame(5, 3, 1);
    checks++;
    if (sat_seen == 0) begin
      failures++;
      $display("saturation never exercised");
    end
    checks++;
    if (eq.size() != 0) begin
      failures++;
      $display("%0d beats missing", eq.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
