// hdyn_est: horizontal dynamic estimator for one column.
//
// Estimates how strongly the image changes horizontally around column i
// from the column sums s(i-2) .. s(i+2):
//   dh(i) = | s(i+2) + 2 s(i+1) - 2 s(i-1) - s(i-2) |
// which is twice the estimate of the source design,
// |0.5 s(i+2) + s(i+1) - s(i-1) - 0.5 s(i-2)|. The factor two keeps the
// arithmetic integer and cancels when dh is divided by its maximum over the
// line. The centre column's own sum does not enter. The result is
// registered: out_valid follows in_valid by one clock.
module hdyn_est #(
  parameter int unsigned SW = 20,          // column sum width
  parameter int unsigned DHW = SW + 2      // output width
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic [3:0][SW-1:0] s,            // s(i-2), s(i-1), s(i+1), s(i+2)
  output logic               out_valid,
  output logic [DHW-1:0]     dh
);
  logic signed [SW+3:0] d;
  always_comb
    d = $signed({4'b0, s[3]}) + ($signed({4'b0, s[2]}) <<< 1)
      - ($signed({4'b0, s[1]}) <<< 1) - $signed({4'b0, s[0]});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      dh        <= '0;
    end else begin
      out_valid <= in_valid;
      dh        <= DHW'((d < 0) ? -d : d);
    end
  end
endmodule
