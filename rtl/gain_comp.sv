// gain_comp: per-pixel column gain compensation.
//
// Holds one compensation coefficient per column in local dual-port memory
// (NPIX lanes, lane k holding columns 8j+k at address j) and multiplies the
// eight pixels of each beat by their columns' coefficients in eight
// parallel fixed-point multipliers:
//   out = min(round(px * ck / 2^COEF_F), 2^PIX_W - 1)
// The coefficient is read when the beat arrives and the product is
// registered, so out_valid follows in_valid by two clocks. When apply is
// low (sampled with the sof beat, held for the frame) beats pass with the
// same latency, unchanged, and so do columns at or beyond coef_cols (a
// frame wider than the one measured). The write port (coef_we/coef_col/
// coef_data) loads one coefficient per clock and must not run while a frame
// that applies coefficients is passing.
//
// From the source design: a parallel fixed-point multiplier applying one
// coefficient per column. Formats, rounding and saturation are this
// design's choices.
module gain_comp
  import nc_pkg::*;
#(
  parameter int unsigned MAX_W = 1280,
  parameter int unsigned CAW   = $clog2(MAX_W)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              apply,
  input  beat_t             in_beat,
  input  logic              in_valid,
  output beat_t             out_beat,
  output logic              out_valid,
  input  logic              coef_we,
  input  logic [CAW-1:0]    coef_col,
  input  logic [COEF_W-1:0] coef_data,
  input  logic [CAW:0]      coef_cols    // columns that have a coefficient
);
  localparam int unsigned WORDS = MAX_W / NPIX;
  localparam int unsigned AW    = (WORDS > 1) ? $clog2(WORDS) : 1;
  localparam int unsigned LB    = $clog2(NPIX);
  localparam int unsigned PW    = PIX_W + COEF_W;

  logic [AW-1:0] col;
  logic          frame_apply;
  wire  [AW-1:0] cur_col = in_beat.sof ? '0 : col;
  wire           cur_apply = in_beat.sof ? apply : frame_apply;

  logic [NPIX-1:0][COEF_W-1:0] coef;
  for (genvar k = 0; k < NPIX; k++) begin : g_lane
    dp_ram #(.DEPTH(WORDS), .WIDTH(COEF_W)) u_ram (
      .clk   (clk),
      .we    (coef_we && LB'(coef_col) == LB'(k)),
      .waddr (AW'(coef_col >> LB)),
      .wdata (coef_data),
      .raddr (cur_col),
      .rdata (coef[k])
    );
  end

  beat_t b1;
  logic  v1, ap1;
  logic [AW-1:0] col1;

  // eight parallel multipliers, round to nearest, saturate
  logic [NPIX-1:0][PW-1:0]    prod;
  logic [NPIX-1:0][PIX_W-1:0] comp;
  always_comb
    for (int k = 0; k < NPIX; k++) begin
      prod[k] = (PW'(b1.px[k]) * PW'(coef[k]) + (PW'(1) << (COEF_F - 1))) >> COEF_F;
      if ((CAW+1)'(col1) * (CAW+1)'(NPIX) + (CAW+1)'(k) >= coef_cols)
        comp[k] = b1.px[k];                        // column not measured
      else
        comp[k] = (prod[k] > PW'({PIX_W{1'b1}})) ? '1 : PIX_W'(prod[k]);
    end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col         <= '0;
      frame_apply <= 1'b0;
      b1          <= '0;
      v1          <= 1'b0;
      ap1         <= 1'b0;
      col1        <= '0;
      out_beat    <= '0;
      out_valid   <= 1'b0;
    end else begin
      v1  <= in_valid;
      b1  <= in_beat;
      ap1 <= cur_apply;
      col1 <= cur_col;
      if (in_valid) begin
        col <= in_beat.eol ? '0 : cur_col + AW'(1);
        if (in_beat.sof) frame_apply <= apply;
      end
      out_valid <= v1;
      out_beat  <= b1;
      if (ap1) out_beat.px <= comp;
    end
  end
endmodule
