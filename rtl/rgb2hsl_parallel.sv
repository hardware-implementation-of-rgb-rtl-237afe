// RGB-to-HSL converter, parallel architecture.
//
// The whole conversion of one pixel is a single combinational cone between the
// input pins and one output register, so a result appears one clock after its
// pixel is presented and a new pixel can be taken on every clock. The
// one-clock latency and the one-pixel-per-clock rate follow the thesis this
// design is based on; the arithmetic below is the standard HSL definition written in
// integers, and its rounding is this design's own:
//
//   mx = max(R,G,B), mn = min(R,G,B), d = mx - mn, sum = mx + mn, F = 2**CHAN_W-1
//   L  = floor(sum / 2)
//   S  = 0 if d == 0, else floor(F*d / sum)       when sum <= F
//                          floor(F*d / (2F - sum)) when sum >  F
//   H  = 0 if d == 0, else floor((base*d + 60*(x - y)) / d) with
//        mx == R : x-y = G-B, base = 0 (or 360 when G < B)
//        mx == G : x-y = B-R, base = 120
//        mx == B : x-y = R-G, base = 240
//   Ties for the maximum resolve R, then G, then B.
//
// Interface: in_valid/in_pix are sampled on the rising clock edge; out_valid
// and out_pix hold the result from that edge until the next one. rst_n is an
// asynchronous, active-low reset that clears the output register.
module rgb2hsl_parallel
  import hsl_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  rgb_t in_pix,
  output logic out_valid,
  output hsl_t out_pix
);

  localparam int unsigned F = (1 << CHAN_W) - 1;
  // Widths of the hue dividend (< 360*F) and saturation dividend (<= F*F).
  localparam int unsigned HNUM_W = HUE_W + CHAN_W;
  localparam int unsigned SNUM_W = 2 * CHAN_W;

  logic [CHAN_W-1:0] mx, mn, d;
  logic [CHAN_W:0]   sum, sden;
  max_sel_e          sel;
  logic [HNUM_W-1:0] hnum;
  logic [SNUM_W-1:0] snum;
  logic [HUE_W-1:0]  hq;
  logic [CHAN_W-1:0] sq;
  hsl_t              res;

  always_comb begin
    // Maximum, minimum and which channel is largest.
    if (in_pix.r >= in_pix.g && in_pix.r >= in_pix.b) begin
      sel = MAX_R;
      mx  = in_pix.r;
    end else if (in_pix.g >= in_pix.b) begin
      sel = MAX_G;
      mx  = in_pix.g;
    end else begin
      sel = MAX_B;
      mx  = in_pix.b;
    end
    mn = in_pix.r;
    if (in_pix.g < mn) mn = in_pix.g;
    if (in_pix.b < mn) mn = in_pix.b;

    d   = mx - mn;
    sum = {1'b0, mx} + {1'b0, mn};

    // Hue dividend, kept non-negative by the sector base.
    unique case (sel)
      MAX_R:
        if (in_pix.g >= in_pix.b)
          hnum = HNUM_W'(HUE_SECTOR) * HNUM_W'(in_pix.g - in_pix.b);
        else
          hnum = HNUM_W'(HUE_FULL) * HNUM_W'(d) - HNUM_W'(HUE_SECTOR) * HNUM_W'(in_pix.b - in_pix.g);
      MAX_G:
        hnum = HNUM_W'(2 * HUE_SECTOR) * HNUM_W'(d)
             + HNUM_W'(HUE_SECTOR) * HNUM_W'(in_pix.b) - HNUM_W'(HUE_SECTOR) * HNUM_W'(in_pix.r);
      default:
        hnum = HNUM_W'(4 * HUE_SECTOR) * HNUM_W'(d)
             + HNUM_W'(HUE_SECTOR) * HNUM_W'(in_pix.r) - HNUM_W'(HUE_SECTOR) * HNUM_W'(in_pix.g);
    endcase

    // Saturation divisor depends on which half of the lightness range we are in.
    sden = (sum <= (CHAN_W+1)'(F)) ? sum : (CHAN_W+1)'(2 * F) - sum;
    snum = SNUM_W'(F) * SNUM_W'(d);

    if (d == '0) begin
      hq = '0;
      sq = '0;
    end else begin
      // Quotients are below 360 and at most F by construction.
      hq = HUE_W'(hnum / HNUM_W'(d));
      sq = CHAN_W'(snum / SNUM_W'(sden));
    end

    res.h = hq;
    res.s = sq;
    res.l = sum[CHAN_W:1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_pix   <= '0;
    end else begin
      out_valid <= in_valid;
      out_pix   <= res;
    end
  end

endmodule
