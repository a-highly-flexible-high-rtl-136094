// tb_pipe_div: feeds one random division per clock (including quotients
// near and over the limit and division by zero) and checks every quotient,
// the saturation flag, the tag and the latency of QW+1 clocks.
module tb_pipe_div;
  localparam int NW = 41, DW = 27, QW = 16, TW = 12;
  logic clk = 0, rst_n = 0, in_valid, out_valid, sat;
  logic [NW-1:0] num;
  logic [DW-1:0] den;
  logic [TW-1:0] in_tag, out_tag;
  logic [QW-1:0] q;
  int checks = 0, failures = 0;
  longint cyc = 0;

  typedef struct { longint q; bit sat; int tag; longint t; } exp_t;
  exp_t eq[$];
  exp_t e;
  longint n, d;

  pipe_div #(.NW(NW), .DW(DW), .QW(QW), .TW(TW)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (in_valid) begin
      n = longint'(num);
      d = longint'(den);
      e.sat = (d == 0) || (n / d > 65535);
      e.q   = e.sat ? 65535 : n / d;
      e.tag = int'(in_tag);
      e.t   = cyc;
      eq.push_back(e);
    end
    if (out_valid) begin
      e = eq.pop_front();
      checks++;
      if (q !== QW'(e.q) || sat !== e.sat || out_tag !== TW'(e.tag) || cyc - e.t != QW + 1) begin
        failures++;
        if (failures < 10) $display("q %0d/%0d sat %0d/%0d lat %0d", q, e.q, sat, e.sat, cyc - e.t);
      end
    end
  end

  initial begin
    in_valid = 0; num = 0; den = 0; in_tag = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 7) != 0);
      den = DW'({$urandom, $urandom} >> $urandom_range(0, 60));
      case ($urandom_range(0, 3))
        0: num = NW'(longint'(den) * $urandom_range(0, 65535) + $urandom_range(0, 3));
        1: num = NW'(longint'(den) * 65536 - $urandom_range(0, 1));
        2: begin den = 0; num = NW'($urandom); end
        default: num = NW'({$urandom, $urandom} >> $urandom_range(23, 60));
      endcase
      in_tag = TW'($urandom);
    end
    @(negedge clk) in_valid = 0;
    repeat (QW + 4) @(posedge clk);
    checks++;
    if (eq.size() != 0) begin
      failures++;
      $display("%0d results missing", eq.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
