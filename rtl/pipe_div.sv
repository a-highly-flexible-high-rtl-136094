// pipe_div: pipelined unsigned divider, one division accepted per clock.
//
// Computes q = floor(num / den), limited to QW bits: a quotient that does
// not fit, and division by zero, give all ones (sat is then high). It is a
// restoring divider unrolled into one pipeline stage per quotient bit, so a
// result leaves QW+1 clocks after its operands entered. A tag travels with
// each division so that the user can route the result. There is no stall:
// in_valid may be high every clock.
//
// The source design only states which quotients are needed (c = sum_ref /
// sum and Dh / Dh_max); the restoring structure is this design's choice.
module pipe_div #(
  parameter int unsigned NW = 41,   // numerator width
  parameter int unsigned DW = 27,   // denominator width
  parameter int unsigned QW = 16,   // quotient width
  parameter int unsigned TW = 8     // tag width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [NW-1:0] num,
  input  logic [DW-1:0] den,
  input  logic [TW-1:0] in_tag,
  output logic          out_valid,
  output logic [QW-1:0] q,
  output logic          sat,
  output logic [TW-1:0] out_tag
);
  localparam int unsigned RW = ((NW > DW + QW) ? NW : DW + QW) + 1;

  logic          v_r   [QW+1];
  logic [RW-1:0] rem_r [QW+1];
  logic [DW-1:0] den_r [QW+1];
  logic [QW-1:0] q_r   [QW+1];
  logic          sat_r [QW+1];
  logic [TW-1:0] tag_r [QW+1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s <= QW; s++) v_r[s] <= 1'b0;
    end else begin
      v_r[0] <= in_valid;
      for (int s = 1; s <= QW; s++) v_r[s] <= v_r[s-1];
    end
  end

  always_ff @(posedge clk) begin
    rem_r[0] <= RW'(num);
    den_r[0] <= den;
    q_r[0]   <= '0;
    sat_r[0] <= (den == '0) || (RW'(num) >= (RW'(den) << QW));
    tag_r[0] <= in_tag;
    for (int s = 1; s <= QW; s++) begin
      // stage s decides quotient bit QW-s
      if (rem_r[s-1] >= (RW'(den_r[s-1]) << (QW - s))) begin
        rem_r[s] <= rem_r[s-1] - (RW'(den_r[s-1]) << (QW - s));
        q_r[s]   <= q_r[s-1] | (QW'(1) << (QW - s));
      end else begin
        rem_r[s] <= rem_r[s-1];
        q_r[s]   <= q_r[s-1];
      end
      den_r[s] <= den_r[s-1];
      sat_r[s] <= sat_r[s-1];
      tag_r[s] <= tag_r[s-1];
    end
  end

  assign out_valid = v_r[QW];
  assign sat       = sat_r[QW];
  assign q         = sat_r[QW] ? '1 : q_r[QW];
  assign out_tag   = tag_r[QW];
endmodule
