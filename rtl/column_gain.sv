// column_gain: column gain error compensation stage.
//
// Column-parallel readout gives every column its own gain error, which
// shows as vertical stripes. This stage measures the error from the column
// sums of one frame and corrects the following frame, since the frame
// itself cannot be buffered:
//   * colsum_accum adds up each column of an enabled frame as it passes;
//   * after the frame's eof, coef_calc turns the sums into one coefficient
//     per column (reference sum by low-pass filtering, ratio to the actual
//     sum, attenuated where the image has strong horizontal dynamics) and
//     writes it into the coefficient memory of gain_comp;
//   * gain_comp multiplies every pixel of the next frame by its column's
//     coefficient.
// busy is high from a frame's sof until its coefficients are written; the
// caller must not send the next sof while busy (that wait is the stage's
// frame-rate limit: busy falls 2*width + 57 clocks after the eof beat
// of an enabled frame, width in pixels).
// coef_valid is high once coefficients exist; it is cleared by a frame that
// passes with the stage disabled, and the first enabled frame after that
// is measured but passes uncorrected. Columns of a frame wider than the
// measured one pass uncorrected.
//
// Interface: beat_t stream in and out, valid only; out_valid follows
// in_valid by two clocks. enable is sampled with the sof beat. The
// two-frame schedule and the invalidation rule are this design's choices.
module column_gain
  import nc_pkg::*;
#(
  parameter int unsigned MAX_W     = 1280,
  parameter int unsigned MAX_H     = 1024,
  parameter int unsigned ORDER     = 16,
  parameter bit          DYN_ATTEN = 1'b1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  enable,
  input  beat_t in_beat,
  input  logic  in_valid,
  output beat_t out_beat,
  output logic  out_valid,
  output logic  busy,
  output logic  coef_valid,
  output logic  calc_busy
);
  localparam int unsigned SW    = PIX_W + $clog2(MAX_H);
  localparam int unsigned CAW   = $clog2(MAX_W);

  logic           frame_en, in_frame, first_line;
  logic [CAW:0]   ncols, coef_cols;
  logic [1:0]     start_sr;
  logic           calc_done;
  logic [CAW-1:0] sum_col;
  logic [SW-1:0]  sum_data;
  logic           coef_we;
  logic [CAW-1:0] coef_col;
  logic [COEF_W-1:0] coef_data;

  wire cur_en = in_beat.sof ? enable : frame_en;
  wire acc_v  = in_valid && cur_en;

  colsum_accum #(.MAX_W(MAX_W), .MAX_H(MAX_H), .SW(SW), .CAW(CAW)) u_sums (
    .clk, .rst_n, .in_beat, .in_valid(acc_v), .rd_col(sum_col), .rd_data(sum_data));

  coef_calc #(.MAX_W(MAX_W), .MAX_H(MAX_H), .ORDER(ORDER), .DYN_ATTEN(DYN_ATTEN),
              .SW(SW), .CAW(CAW)) u_calc (
    .clk, .rst_n, .start(start_sr[1]), .ncols, .busy(calc_busy), .done(calc_done),
    .sum_col, .sum_data, .coef_we, .coef_col, .coef_data);

  gain_comp #(.MAX_W(MAX_W), .CAW(CAW)) u_gain (
    .clk, .rst_n, .apply(enable && coef_valid), .in_beat, .in_valid,
    .out_beat, .out_valid, .coef_we, .coef_col, .coef_data, .coef_cols);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame_en   <= 1'b0;
      in_frame   <= 1'b0;
      first_line <= 1'b0;
      ncols      <= '0;
      start_sr   <= '0;
      coef_valid <= 1'b0;
      coef_cols  <= '0;
    end else begin
      start_sr <= {start_sr[0], 1'b0};
      if (in_valid) begin
        if (in_beat.sof) begin
          frame_en   <= enable;
          in_frame   <= 1'b1;
          first_line <= 1'b1;
          ncols      <= (CAW+1)'(NPIX);
          if (!enable) coef_valid <= 1'b0;
        end else if (first_line) begin
          ncols <= ncols + (CAW+1)'(NPIX);
        end
        if (in_beat.eol) first_line <= 1'b0;
        if (in_beat.eof) begin
          in_frame    <= 1'b0;
          start_sr[0] <= cur_en;
        end
      end
      if (calc_done) begin
        coef_valid <= 1'b1;
        coef_cols  <= ncols;
      end
    end
  end

  assign busy = in_frame || (start_sr != '0) || calc_busy;

  // the coefficient calculation may not overlap a frame
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
    !(in_valid && (calc_busy || start_sr != '0)));
endmodule
