// lp_fir: low-pass FIR of order ORDER over the column sum array.
//
// Forms the reference column sum of the centre column of a window of
// ORDER+1 neighbouring column sums: y = sum_m h(m) * win[m]. The taps are a
// triangle, h(m) = ORDER/2 + 1 - |m - ORDER/2| (1, 2, ..., 9, ..., 2, 1 for
// order 16), whose DC gain is (ORDER/2 + 1)^2 = 81; the output is left
// unnormalised and the gain is removed later by scaling the divisor. The
// sum is split into two pipeline stages (the two halves of the window, then
// their total), so out_valid follows in_valid by two clocks.
//
// The order (16) is from the source design; the tap values are this
// design's choice, since the source gives none.
module lp_fir #(
  parameter int unsigned ORDER = 16,
  parameter int unsigned SW    = 20,               // column sum width
  parameter int unsigned OW    = SW + 7            // output width
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic [ORDER:0][SW-1:0] win,   // win[ORDER/2] is the centre column
  output logic                   out_valid,
  output logic [OW-1:0]          y
);
  localparam int unsigned HALF = ORDER / 2;

  function automatic int unsigned tap(int unsigned m);
    return HALF + 1 - ((m > HALF) ? m - HALF : HALF - m);
  endfunction

  logic [OW-1:0] acc_lo, acc_hi, part_lo, part_hi;
  logic          v1;
  always_comb begin
    acc_lo = '0;
    acc_hi = '0;
    for (int unsigned m = 0; m <= ORDER; m++)
      if (m <= HALF) acc_lo = acc_lo + OW'(win[m]) * OW'(tap(m));
      else           acc_hi = acc_hi + OW'(win[m]) * OW'(tap(m));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      part_lo   <= '0;
      part_hi   <= '0;
      out_valid <= 1'b0;
      y         <= '0;
    end else begin
      v1        <= in_valid;
      part_lo   <= acc_lo;
      part_hi   <= acc_hi;
      out_valid <= v1;
      y         <= part_lo + part_hi;
    end
  end
endmodule
