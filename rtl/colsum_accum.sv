// colsum_accum: column sums of a frame in local dual-port memory.
//
// While a frame streams past (eight pixels per clock), adds every pixel to
// the running sum of its column. The sums live in NPIX memory lanes, lane k
// holding columns 8j+k at address j, so one beat updates eight sums at once
// with a read-modify-write: the read is issued when the beat arrives and
// the sum is written back one clock later. The first line of a frame
// writes the pixel values instead of adding them, so no clearing pass is
// needed between frames. When the same word is updated on two consecutive
// clocks (a one-word line) the just-written sum is forwarded.
//
// The second port serves the coefficient calculation: rd_col selects one
// column and rd_data holds its sum one clock later. Reads through this
// port must not overlap accumulation (the stream has priority).
//
// From the source design: column sums kept in local dual-port memory, eight
// columns per clock. Lane organisation, forwarding and first-line overwrite
// are this design's choices.
module colsum_accum
  import nc_pkg::*;
#(
  parameter int unsigned MAX_W = 1280,
  parameter int unsigned MAX_H = 1024,
  parameter int unsigned SW    = PIX_W + $clog2(MAX_H),
  parameter int unsigned CAW   = $clog2(MAX_W)        // column address width
) (
  input  logic           clk,
  input  logic           rst_n,
  input  beat_t          in_beat,
  input  logic           in_valid,      // beat to accumulate
  input  logic [CAW-1:0] rd_col,
  output logic [SW-1:0]  rd_data
);
  localparam int unsigned WORDS = MAX_W / NPIX;
  localparam int unsigned AW    = (WORDS > 1) ? $clog2(WORDS) : 1;
  localparam int unsigned LB    = $clog2(NPIX);

  typedef logic [NPIX-1:0][SW-1:0] sums_t;

  logic [AW-1:0] col;           // word index of the incoming beat
  logic          first_row;

  // stage 1: read data back, add, write
  logic                        v1, first1;
  logic [AW-1:0]               a1;
  logic [NPIX-1:0][PIX_W-1:0]  px1;
  // last write, for forwarding
  logic                        wv2;
  logic [AW-1:0]               a2;
  sums_t                       wd2;

  sums_t         rdata, old, wdata;
  logic [AW-1:0] raddr;
  logic [LB-1:0] rd_lane_q;

  wire [AW-1:0] cur_col = in_beat.sof ? '0 : col;
  assign raddr = in_valid ? cur_col : AW'(rd_col >> LB);

  for (genvar k = 0; k < NPIX; k++) begin : g_lane
    dp_ram #(.DEPTH(WORDS), .WIDTH(SW)) u_ram (
      .clk   (clk),
      .we    (v1),
      .waddr (a1),
      .wdata (wdata[k]),
      .raddr (raddr),
      .rdata (rdata[k])
    );
  end

  always_comb begin
    old = (wv2 && a2 == a1) ? wd2 : rdata;
    for (int k = 0; k < NPIX; k++)
      wdata[k] = first1 ? SW'(px1[k]) : old[k] + SW'(px1[k]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col       <= '0;
      first_row <= 1'b1;
      v1        <= 1'b0;
      first1    <= 1'b0;
      a1        <= '0;
      px1       <= '0;
      wv2       <= 1'b0;
      a2        <= '0;
      wd2       <= '0;
      rd_lane_q <= '0;
    end else begin
      v1     <= in_valid;
      a1     <= cur_col;
      px1    <= in_beat.px;
      first1 <= in_beat.sof || first_row;
      wv2    <= v1;
      a2     <= a1;
      wd2    <= wdata;
      rd_lane_q <= LB'(rd_col);
      if (in_valid) begin
        if (in_beat.eol) begin
          col       <= '0;
          first_row <= in_beat.eof;
        end else begin
          col       <= cur_col + AW'(1);
          first_row <= in_beat.sof || first_row;
        end
      end
    end
  end

  assign rd_data = rdata[rd_lane_q];
endmodule
