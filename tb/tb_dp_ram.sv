// tb_dp_ram: checks the dual-port memory against an array model: random
// writes and reads, data one clock after the read address, and old data
// returned when the same address is written in the same clock.
module tb_dp_ram;
  localparam int DEPTH = 160, WIDTH = 20;
  logic clk = 0, we;
  logic [7:0] waddr, raddr;
  logic [WIDTH-1:0] wdata, rdata;
  int checks = 0, failures = 0;
  logic [WIDTH-1:0] model [DEPTH];
  logic [WIDTH-1:0] expd;

  dp_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1;
    for (int a = 0; a < DEPTH; a++) begin
      waddr = 8'(a);
      wdata = WIDTH'($urandom);
      model[a] = wdata;
      raddr = 0;
      @(posedge clk);
      #1;
    end
    for (int i = 0; i < 4000; i++) begin
      we    = $urandom_range(0, 1);
      waddr = 8'($urandom_range(0, DEPTH - 1));
      raddr = ($urandom_range(0, 3) == 0) ? waddr : 8'($urandom_range(0, DEPTH - 1));
      wdata = WIDTH'($urandom);
      expd  = model[raddr];
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1;
      checks++;
      if (rdata !== expd) begin
        failures++;
        if (failures < 10) $display("read %0d got %h exp %h", raddr, rdata, expd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
