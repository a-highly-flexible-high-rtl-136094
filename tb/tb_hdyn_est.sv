// tb_hdyn_est: checks the horizontal dynamics estimate
// |s(i+2) + 2 s(i+1) - 2 s(i-1) - s(i-2)| for random, rising, falling and
// flat neighbourhoods, one clock after the inputs.
module tb_hdyn_est;
  localparam int SW = 20, DHW = 22;
  logic clk = 0, rst_n = 0, in_valid, out_valid;
  logic [3:0][SW-1:0] s;
  logic [DHW-1:0] dh;
  int checks = 0, failures = 0;
  longint d;

  hdyn_est #(.SW(SW), .DHW(DHW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; s = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      in_valid = 1;
      for (int k = 0; k < 4; k++)
        case (i % 4)
          0: s[k] = SW'($urandom);
          1: s[k] = SW'((k + (k > 1 ? 1 : 0)) * 1000);
          2: s[k] = SW'((4 - k - (k > 1 ? 1 : 0)) * 200000);
          default: s[k] = SW'(777);
        endcase
      d = longint'(s[3]) + 2 * longint'(s[2]) - 2 * longint'(s[1]) - longint'(s[0]);
      if (d < 0) d = -d;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid || dh !== DHW'(d)) begin
        failures++;
        if (failures < 10) $display("dh %0d exp %0d", dh, d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
