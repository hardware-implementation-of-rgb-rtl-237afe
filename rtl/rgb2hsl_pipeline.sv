// RGB-to-HSL converter, pipelined architecture.
//
// The conversion is cut into STAGES register stages (7 by default, the stage
// count of the thesis this design is based on), so one pixel enters and one result leaves on every
// clock, each result STAGES clocks after its pixel. It computes exactly the
// same integers as rgb2hsl_parallel (see there for the formulas). The way the
// work is split between stages is this design's own:
//
//   stage 1          maximum, minimum, which channel is largest, and the
//                    magnitude and sign of the hue difference x - y
//   stage 2          d = max - min, sum = max + min, L = sum/2, the hue and
//                    saturation dividends and the saturation divisor
//   stages 3..S-1    two restoring dividers (hue: HUE_W quotient bits,
//                    saturation: CHAN_W quotient bits), their bit steps
//                    spread evenly over the STAGES-3 stages
//   stage S          H and S forced to 0 for grey pixels (d == 0), output
//
// Interface: in_valid/in_pix are sampled on the rising clock edge; out_valid
// marks a result on out_pix. Invalid input slots travel through as bubbles,
// and nothing stalls. rst_n is an asynchronous, active-low reset that clears
// every stage's valid bit and data.
module rgb2hsl_pipeline
  import hsl_pkg::*;
#(
  parameter int unsigned STAGES = 7
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  rgb_t in_pix,
  output logic out_valid,
  output hsl_t out_pix
);

  localparam int unsigned F        = (1 << CHAN_W) - 1;
  localparam int unsigned DIV_ST   = STAGES - 3;
  localparam int unsigned HNUM_W   = HUE_W + CHAN_W;
  localparam int unsigned SNUM_W   = 2 * CHAN_W;
  // Width wide enough to hold a divisor shifted by its largest step.
  localparam int unsigned HCMP_W   = HNUM_W + HUE_W;
  localparam int unsigned SCMP_W   = SNUM_W + CHAN_W + 1;

  // Stage 1 result.
  typedef struct packed {
    logic              valid;
    max_sel_e          sel;
    logic [CHAN_W-1:0] mx;
    logic [CHAN_W-1:0] mn;
    logic              hneg;   // x - y < 0 (only used when R is the maximum)
    logic [CHAN_W-1:0] hmag;   // |x - y|
  } st1_t;

  // State carried through the divider stages.
  typedef struct packed {
    logic              valid;
    logic              grey;   // d == 0
    logic [CHAN_W-1:0] l;
    logic [CHAN_W-1:0] hdiv;   // hue divisor d
    logic [CHAN_W:0]   sdiv;   // saturation divisor
    logic [HNUM_W-1:0] hrem;   // hue partial remainder
    logic [SNUM_W-1:0] srem;   // saturation partial remainder
    logic [HUE_W-1:0]  hq;     // hue quotient bits found so far
    logic [CHAN_W-1:0] sq;     // saturation quotient bits found so far
  } div_t;

  // ---------------------------------------------------------------- stage 1
  st1_t s1_d, s1_q;

  always_comb begin
    logic [CHAN_W-1:0] x, y;
    s1_d.valid = in_valid;
    if (in_pix.r >= in_pix.g && in_pix.r >= in_pix.b) begin
      s1_d.sel = MAX_R;
      s1_d.mx  = in_pix.r;
      x = in_pix.g;
      y = in_pix.b;
    end else if (in_pix.g >= in_pix.b) begin
      s1_d.sel = MAX_G;
      s1_d.mx  = in_pix.g;
      x = in_pix.b;
      y = in_pix.r;
    end else begin
      s1_d.sel = MAX_B;
      s1_d.mx  = in_pix.b;
      x = in_pix.r;
      y = in_pix.g;
    end
    s1_d.mn = in_pix.r;
    if (in_pix.g < s1_d.mn) s1_d.mn = in_pix.g;
    if (in_pix.b < s1_d.mn) s1_d.mn = in_pix.b;
    s1_d.hneg = (x < y);
    s1_d.hmag = (x < y) ? (y - x) : (x - y);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s1_q <= '0;
    else        s1_q <= s1_d;
  end

  // ---------------------------------------------------------------- stage 2
  div_t s2_d;
  div_t dv_q [DIV_ST+1];   // dv_q[0] is stage 2's register, dv_q[k] divider stage k

  always_comb begin
    logic [CHAN_W-1:0] d;
    logic [CHAN_W:0]   sum;
    logic [HNUM_W-1:0] base, six;
    d    = s1_q.mx - s1_q.mn;
    sum  = {1'b0, s1_q.mx} + {1'b0, s1_q.mn};
    six  = HNUM_W'(HUE_SECTOR) * HNUM_W'(s1_q.hmag);
    unique case (s1_q.sel)
      MAX_R:   base = s1_q.hneg ? HNUM_W'(HUE_FULL) * HNUM_W'(d) : '0;
      MAX_G:   base = HNUM_W'(2 * HUE_SECTOR) * HNUM_W'(d);
      default: base = HNUM_W'(4 * HUE_SECTOR) * HNUM_W'(d);
    endcase
    s2_d.valid = s1_q.valid;
    s2_d.grey  = (d == '0);
    s2_d.l     = sum[CHAN_W:1];
    s2_d.hdiv  = d;
    s2_d.sdiv  = (sum <= (CHAN_W+1)'(F)) ? sum : (CHAN_W+1)'(2 * F) - sum;
    s2_d.hrem  = s1_q.hneg ? base - six : base + six;
    s2_d.srem  = SNUM_W'(F) * SNUM_W'(d);
    s2_d.hq    = '0;
    s2_d.sq    = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dv_q[0] <= '0;
    else        dv_q[0] <= s2_d;
  end

  // ---------------------------------------------------- divider stages 3..S-1
  // Bit step j (0 = most significant quotient bit) of a Q-bit quotient is done
  // in divider stage (j*DIV_ST)/Q + 1.
  for (genvar k = 1; k <= DIV_ST; k++) begin : g_div
    div_t nxt;

    always_comb begin
      logic [HCMP_W-1:0] htrial;
      logic [SCMP_W-1:0] strial;
      nxt = dv_q[k-1];
      for (int j = 0; j < HUE_W; j++) begin
        if ((j * DIV_ST) / HUE_W == k - 1) begin
          htrial = HCMP_W'(nxt.hdiv) << (HUE_W - 1 - j);
          if (HCMP_W'(nxt.hrem) >= htrial) begin
            nxt.hrem = nxt.hrem - HNUM_W'(htrial);
            nxt.hq[HUE_W-1-j] = 1'b1;
          end
        end
      end
      for (int j = 0; j < CHAN_W; j++) begin
        if ((j * DIV_ST) / CHAN_W == k - 1) begin
          strial = SCMP_W'(nxt.sdiv) << (CHAN_W - 1 - j);
          if (SCMP_W'(nxt.srem) >= strial) begin
            nxt.srem = nxt.srem - SNUM_W'(strial);
            nxt.sq[CHAN_W-1-j] = 1'b1;
          end
        end
      end
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) dv_q[k] <= '0;
      else        dv_q[k] <= nxt;
    end
  end

  // --------------------------------------------------------- final stage S
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_pix   <= '0;
    end else begin
      out_valid <= dv_q[DIV_ST].valid;
      out_pix.h <= dv_q[DIV_ST].grey ? '0 : dv_q[DIV_ST].hq;
      out_pix.s <= dv_q[DIV_ST].grey ? '0 : dv_q[DIV_ST].sq;
      out_pix.l <= dv_q[DIV_ST].l;
    end
  end

  // Every quotient bit must belong to some divider stage.
  initial begin
    assert (STAGES >= 4)
      else $fatal(1, "rgb2hsl_pipeline needs at least 4 stages");
  end

endmodule
