// tb_lp_fir: applies random windows (and a step and a constant) to the
// 16th order FIR and checks the registered output against the triangular
// tap sum 1,2,...,9,...,2,1, two clocks later (and not one).
module tb_lp_fir;
  localparam int ORDER = 16, SW = 20, OW = 27;
  logic clk = 0, rst_n = 0, in_valid, out_valid;
  logic [ORDER:0][SW-1:0] win;
  logic [OW-1:0] y;
  int checks = 0, failures = 0;
  longint expd;

  lp_fir #(.ORDER(ORDER), .SW(SW), .OW(OW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; win = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      in_valid = 1;
      expd = 0;
      for (int m = 0; m <= ORDER; m++) begin
        case (i)
          0: win[m] = '1;
          1: win[m] = (m >= 8) ? SW'(1000) : '0;
          default: win[m] = SW'($urandom);
        endcase
        expd += longint'(win[m]) * (9 - ((m > 8) ? m - 8 : 8 - m));
      end
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (out_valid) begin
        failures++;
        $display("output one clock early");
      end
      @(negedge clk);
      if (!out_valid || y !== OW'(expd)) begin
        failures++;
        if (failures < 10) $display("y %0d exp %0d valid %0d", y, expd, out_valid);
      end
      if (i == 0 && expd != 81 * 64'((1 << SW) - 1)) begin
        failures++;
        $display("dc gain wrong");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
