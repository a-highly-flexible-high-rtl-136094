// dp_ram: local dual-port memory with one write port and one read port.
//
// Simple dual-port RAM as an FPGA block RAM provides it: a write of wdata
// to waddr when we is high, and a registered read, rdata holding the word
// at raddr one clock after raddr was presented. A read of the address
// written in the same clock returns the old word (read-before-write). The
// contents are not reset; users write before they read.
module dp_ram #(
  parameter int unsigned DEPTH = 160,
  parameter int unsigned WIDTH = 20
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
