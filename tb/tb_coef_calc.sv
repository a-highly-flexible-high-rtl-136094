// tb_coef_calc: serves column sums from a model memory (data one clock
// after the address), starts the calculation for several widths and sum
// profiles (random, column gain stripes on a ramp, flat, all zero), and
// checks each written coefficient against the reference equations, that
// every column is written exactly once, and that done comes 2*ncols + 56
// clocks after start.
module tb_coef_calc;
  import nc_pkg::*;
  import nc_ref_pkg::*;
  localparam int MAX_W = 1280, MAX_H = 1024, SW = 20, CAW = 11;

  logic clk = 0, rst_n = 0, start, busy, done, coef_we;
  logic [CAW:0] ncols;
  logic [CAW-1:0] sum_col, coef_col;
  logic [SW-1:0] sum_data;
  logic [COEF_W-1:0] coef_data;
  int checks = 0, failures = 0;
  longint cyc = 0, t_start;
  line_t sums, expd, part;
  int got[MAX_W], wcount[MAX_W];

  coef_calc #(.MAX_W(MAX_W), .MAX_H(MAX_H)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) sum_data <= SW'(sums[sum_col]);
  always @(posedge clk) if (coef_we) begin
    got[coef_col] = int'(coef_data);
    wcount[coef_col]++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int n, int kind);
    sums = new[MAX_W];
    foreach (sums[c]) sums[c] = 0;
    for (int c = 0; c < n; c++)
      case (kind)
        0: sums[c] = $urandom_range(0, (1 << SW) - 1);
        1: sums[c] = (200 + c / 4) * 512 * (($urandom_range(0, 1) == 1) ? 105 : 95) / 100;
        2: sums[c] = 300000;
        default: sums[c] = 0;
      endcase
    part = new[n](sums);
    expd = coefs(part, 1'b1);
    foreach (wcount[c]) wcount[c] = 0;
    @(posedge clk);
    start <= 1;
    ncols <= (CAW+1)'(n);
    @(posedge clk);
    t_start = cyc - 1;
    start <= 0;
    while (!done) @(posedge clk);
    checks++;
    if (cyc - 1 - t_start != 2 * n + 56) begin
      failures++;
      $display("n=%0d calc took %0d clocks, expected %0d", n, cyc - 1 - t_start, 2 * n + 56);
    end
    @(posedge clk);
    for (int c = 0; c < n; c++) begin
      checks++;
      if (wcount[c] != 1 || got[c] != expd[c]) begin
        failures++;
        if (failures < 10) $display("n=%0d col %0d got %0d exp %0d writes %0d", n, c, got[c], expd[c], wcount[c]);
      end
    end
  endtask

  initial begin
    start = 0; ncols = 0;
    sums = new[MAX_W];
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(64, 0);
    run(64, 1);
    run(24, 2);
    run(16, 3);
    run(8, 0);
    run(1280, 1);
    run(1280, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
