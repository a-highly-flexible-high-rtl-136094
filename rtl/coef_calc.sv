// coef_calc: calculates the column gain compensation coefficients.
//
// Started after a frame's column sums s(i) are complete, it runs two passes
// over the ncols columns, one column per clock, and writes one coefficient
// per column through coef_we/coef_col/coef_data.
//
// Pass 1 streams the column sums (edge columns replicated) through a
// window of ORDER+1 sums. For each centre column it forms the low-pass
// reference sum (lp_fir) and the horizontal dynamics dh(i) (hdyn_est),
// then, in a pipelined divider, the raw coefficient
//   c(i) = s_ref(i) / s(i)            (1.0 where s(i) = 0)
// in unsigned Q2.14. c(i) and dh(i) are stored in two local memories and
// the largest dh is tracked.
//
// Pass 2 reads c(i) and dh(i) back, divides dh(i) by the maximum, and
// blends the raw coefficient towards 1.0:
//   ck(i) = 1 + w(i) * (c(i) - 1)
// With DYN_ATTEN = 1 (default) w(i) = 1 - dh(i)/dh_max, so correction is
// attenuated where the image changes strongly along the line; with
// DYN_ATTEN = 0 w(i) = dh(i)/dh_max.
//
// Timing: start is a one-clock pulse while idle; busy stays high until the
// last coefficient is written, and done pulses with that write,
// 2*ncols + 56 clocks after start. ncols must be at least 1.
//
// From the source design: equations for c, the dynamics estimate and the
// attenuated coefficient, a 16th order FIR and the local memories. The
// FIR taps, the fixed-point formats, edge replication, the zero-sum rule
// and the two-pass schedule are this design's choices.
module coef_calc
  import nc_pkg::*;
#(
  parameter int unsigned MAX_W     = 1280,
  parameter int unsigned MAX_H     = 1024,
  parameter int unsigned ORDER     = 16,
  parameter bit          DYN_ATTEN = 1'b1,
  parameter int unsigned SW        = PIX_W + $clog2(MAX_H),
  parameter int unsigned CAW       = $clog2(MAX_W)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [CAW:0]      ncols,
  output logic              busy,
  output logic              done,
  // column sum read port (data one clock after address)
  output logic [CAW-1:0]    sum_col,
  input  logic [SW-1:0]     sum_data,
  // coefficient write port
  output logic              coef_we,
  output logic [CAW-1:0]    coef_col,
  output logic [COEF_W-1:0] coef_data
);
  localparam int unsigned HALF  = ORDER / 2;
  localparam int unsigned FW    = SW + 7;        // FIR output width
  localparam int unsigned GAIN  = (HALF + 1) * (HALF + 1);
  localparam int unsigned DHW   = SW + 2;
  localparam int unsigned NW    = FW + COEF_F;   // divider numerator
  localparam int unsigned DW    = FW;            // divider denominator
  localparam int unsigned PLW   = (DHW > COEF_W) ? DHW : COEF_W;  // tag payload
  localparam int unsigned TW    = CAW + 1 + PLW;
  localparam logic [COEF_W-1:0] ONE = COEF_ONE;

  typedef enum logic [1:0] {IDLE, PASS1, PASS2} state_t;
  state_t state;

  logic [CAW:0]   n;            // latched ncols
  logic [CAW+1:0] feed;         // pass 1: sums issued; pass 2: columns issued
  logic [CAW:0]   wr_cnt;       // results written in the current pass

  // ---------------- pass 1: window of column sums ----------------
  logic                  rd1_v;
  logic [ORDER:0][SW-1:0] win;
  logic [CAW+1:0]        pushed;
  logic                  win_v;
  logic [CAW-1:0]        win_col;

  wire feeding1 = (state == PASS1) && (feed < (CAW+2)'(n) + (CAW+2)'(ORDER));

  // column index feed - HALF, clamped to 0 .. n-1
  always_comb begin
    if (feed < (CAW+2)'(HALF))                 sum_col = '0;
    else if (feed - (CAW+2)'(HALF) >= (CAW+2)'(n)) sum_col = CAW'(n - 1);
    else                                       sum_col = CAW'(feed - (CAW+2)'(HALF));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd1_v   <= 1'b0;
      win     <= '0;
      pushed  <= '0;
      win_v   <= 1'b0;
      win_col <= '0;
    end else begin
      rd1_v <= feeding1;
      win_v <= 1'b0;
      if (state == IDLE) pushed <= '0;
      if (rd1_v) begin
        win    <= {sum_data, win[ORDER:1]};   // newest column enters at the top
        pushed <= pushed + 1'b1;
        if (pushed >= (CAW+2)'(ORDER)) begin
          win_v   <= 1'b1;
          win_col <= CAW'(pushed - (CAW+2)'(ORDER));
        end
      end
    end
  end

  // FIR and dynamics estimate on the window
  logic          fir_v;
  logic [FW-1:0] fir_y;
  logic [DHW-1:0] dh_y;
  logic [SW-1:0] ctr_q;
  logic [CAW-1:0] col_q;

  lp_fir #(.ORDER(ORDER), .SW(SW), .OW(FW)) u_fir (
    .clk, .rst_n, .in_valid(win_v), .win(win), .out_valid(fir_v), .y(fir_y));

  hdyn_est #(.SW(SW), .DHW(DHW)) u_dh (
    .clk, .rst_n, .in_valid(win_v), .s({win[HALF+2:HALF+1], win[HALF-1:HALF-2]}), .out_valid(), .dh(dh_y));

  // align the centre sum, column and dh with the two-stage FIR
  logic [SW-1:0]  ctr_d;
  logic [CAW-1:0] col_d;
  logic [DHW-1:0] dh_d;
  always_ff @(posedge clk) begin
    ctr_d <= win[HALF];
    col_d <= win_col;
    ctr_q <= ctr_d;
    col_q <= col_d;
    dh_d  <= dh_y;
  end

  // ---------------- pass 2: read back c and dh ----------------
  logic [CAW-1:0]    p2_col, p2_col_q;
  logic              p2_rd_v;
  logic [COEF_W-1:0] c_rd;
  logic [DHW-1:0]    dh_rd;
  logic [DHW-1:0]    dh_max;

  wire feeding2 = (state == PASS2) && (feed < (CAW+2)'(n));
  assign p2_col = CAW'(feed);

  // ---------------- shared divider ----------------
  logic          div_in_v, div_out_v;
  logic [NW-1:0] div_num;
  logic [DW-1:0] div_den;
  logic [TW-1:0] div_in_tag, div_out_tag;
  logic [COEF_W-1:0] div_q;

  always_comb begin
    if (state == PASS2) begin
      div_in_v   = p2_rd_v;
      div_num    = NW'(dh_rd) << COEF_F;
      div_den    = DW'(dh_max);
      div_in_tag = {p2_col_q, (dh_max == '0), PLW'(c_rd)};
    end else begin
      div_in_v   = fir_v;
      div_num    = NW'(fir_y) << COEF_F;
      div_den    = DW'(ctr_q) * DW'(GAIN);
      div_in_tag = {col_q, (ctr_q == '0), PLW'(dh_d)};
    end
  end

  pipe_div #(.NW(NW), .DW(DW), .QW(COEF_W), .TW(TW)) u_div (
    .clk, .rst_n,
    .in_valid(div_in_v), .num(div_num), .den(div_den), .in_tag(div_in_tag),
    .out_valid(div_out_v), .q(div_q), .sat(), .out_tag(div_out_tag));

  wire [CAW-1:0] r_col  = div_out_tag[TW-1 -: CAW];
  wire           r_zero = div_out_tag[TW-1-CAW];

  // pass 1 results
  wire [COEF_W-1:0] c_new  = r_zero ? ONE : div_q;
  wire [DHW-1:0]    dh_new = DHW'(div_out_tag);
  wire              w1     = (state == PASS1) && div_out_v;

  dp_ram #(.DEPTH(MAX_W), .WIDTH(COEF_W)) u_cmem (
    .clk, .we(w1), .waddr(r_col), .wdata(c_new), .raddr(p2_col), .rdata(c_rd));
  dp_ram #(.DEPTH(MAX_W), .WIDTH(DHW)) u_dhmem (
    .clk, .we(w1), .waddr(r_col), .wdata(dh_new), .raddr(p2_col), .rdata(dh_rd));

  // pass 2 results: ck = 1 + w * (c - 1)
  logic [COEF_W-1:0]       c_old, ratio, wgt;
  logic signed [COEF_W+1:0] diff;
  logic signed [2*COEF_W+2:0] prod;
  logic signed [COEF_W+2:0] ck;
  always_comb begin
    c_old = COEF_W'(div_out_tag);
    ratio = r_zero ? '0 : ((div_q > ONE) ? ONE : div_q);
    wgt   = DYN_ATTEN ? ONE - ratio : ratio;
    diff  = $signed({2'b0, c_old}) - $signed({2'b0, ONE});
    prod  = diff * $signed({3'b0, wgt});
    ck    = $signed({3'b0, ONE}) + (COEF_W+3)'(prod >>> COEF_F);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= IDLE;
      n         <= '0;
      feed      <= '0;
      wr_cnt    <= '0;
      dh_max    <= '0;
      p2_rd_v   <= 1'b0;
      p2_col_q  <= '0;
      done      <= 1'b0;
      coef_we   <= 1'b0;
      coef_col  <= '0;
      coef_data <= '0;
    end else begin
      done     <= 1'b0;
      coef_we  <= 1'b0;
      p2_rd_v  <= feeding2;
      p2_col_q <= p2_col;
      case (state)
        IDLE: if (start) begin
          state  <= PASS1;
          n      <= ncols;
          feed   <= '0;
          wr_cnt <= '0;
          dh_max <= '0;
        end
        PASS1: begin
          if (feeding1) feed <= feed + 1'b1;
          if (div_out_v) begin
            if (dh_new > dh_max) dh_max <= dh_new;
            wr_cnt <= wr_cnt + 1'b1;
            if (wr_cnt + 1'b1 == n) begin
              state  <= PASS2;
              feed   <= '0;
              wr_cnt <= '0;
            end
          end
        end
        PASS2: begin
          if (feeding2) feed <= feed + 1'b1;
          if (div_out_v) begin
            coef_we   <= 1'b1;
            coef_col  <= r_col;
            coef_data <= (ck < 0) ? '0 : COEF_W'(ck);
            wr_cnt    <= wr_cnt + 1'b1;
            if (wr_cnt + 1'b1 == n) begin
              state <= IDLE;
              done  <= 1'b1;
            end
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign busy = (state != IDLE);
endmodule
