// noise_cancel: real-time noise cancelling block of a high-speed camera.
//
// Sits directly in the pixel path between sensor acquisition and the
// frame buffer and processes eight 10-bit pixels per clock (1.6 Gpixel/s
// at 200 MHz) without external memory. Two independently enabled stages:
//   1. pyramid_filter: 3x3 pyramidal smoothing against uncorrelated noise;
//   2. column_gain: column gain error compensation, with coefficients
//      measured on one frame and applied to the next.
// The top also holds back the sof beat of a new frame until both stages
// are idle, so the coefficient calculation after each frame delays the
// next one (the frame-rate cost of the column gain stage). Within a frame
// in_ready drops for one clock per line and for the filter's last-line
// flush.
//
// Interface: beat_t stream in (valid/ready) and out (valid only); filt_en
// and cg_en are sampled with each sof beat. Latency is one line plus a few
// clocks with the filter on, three clocks with it off.
module noise_cancel
  import nc_pkg::*;
#(
  parameter int unsigned MAX_W     = 1280,
  parameter int unsigned MAX_H     = 1024,
  parameter int unsigned ORDER     = 16,
  parameter bit          DYN_ATTEN = 1'b1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  filt_en,
  input  logic  cg_en,
  input  beat_t in_beat,
  input  logic  in_valid,
  output logic  in_ready,
  output beat_t out_beat,
  output logic  out_valid,
  output logic  coef_valid,
  output logic  busy
);
  beat_t f_beat;
  logic  f_in_ready, f_valid, f_busy, cg_busy;
  logic  cg_en_q;

  // a new frame waits until the previous one has left both stages
  wire hold_sof = in_beat.sof && (f_busy || cg_busy);
  assign in_ready = f_in_ready && !hold_sof;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                                 cg_en_q <= 1'b0;
    else if (in_valid && in_ready && in_beat.sof) cg_en_q <= cg_en;

  pyramid_filter #(.MAX_W(MAX_W)) u_filter (
    .clk, .rst_n, .enable(filt_en), .in_beat, .in_valid(in_valid && !hold_sof),
    .in_ready(f_in_ready), .out_beat(f_beat), .out_valid(f_valid), .busy(f_busy));

  column_gain #(.MAX_W(MAX_W), .MAX_H(MAX_H), .ORDER(ORDER), .DYN_ATTEN(DYN_ATTEN)) u_cg (
    .clk, .rst_n, .enable(cg_en_q), .in_beat(f_beat), .in_valid(f_valid),
    .out_beat, .out_valid, .busy(cg_busy), .coef_valid, .calc_busy());

  assign busy = f_busy || cg_busy;
endmodule
