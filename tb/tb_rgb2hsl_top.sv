// End-to-end testbench for rgb2hsl_top at its default parameters.
//
// Streams a frame-like sequence of pixels into the core: a 64x48 synthetic
// image (colour ramps, grey bars and random pixels) sent line by line with
// blanking gaps between lines, then random traffic. Both converter outputs are
// checked against the reference model, for value, for their latency (1 clock
// for the parallel path, 7 for the pipelined one) and against each other.
// It also counts how often each case of the conversion was exercised (grey
// pixel, each channel as maximum, the hue wrap below 360 degrees, each
// saturation half, idle slots, back-to-back pixels) and counts a failure for
// any case that never happened.
module tb_rgb2hsl_top;
  import hsl_pkg::*;
  import hsl_ref_pkg::*;

  localparam int PAR_LAT  = 1;
  localparam int PIPE_LAT = 7;
  localparam int W = 64;
  localparam int H = 48;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  logic in_valid = 1'b0;
  rgb_t in_pix = '0;
  logic par_valid, pipe_valid;
  hsl_t par_pix, pipe_pix;

  int checks = 0;
  int failures = 0;
  int cycle = 0;

  // Case counters.
  int n_grey = 0, n_max_r = 0, n_max_g = 0, n_max_b = 0, n_wrap = 0;
  int n_s_low = 0, n_s_high = 0, n_bubble = 0, n_b2b = 0, n_agree = 0;
  logic last_valid = 1'b0;

  rgb2hsl_top dut (.*);

  always #5 clk = ~clk;

  hsl_t par_q[$], pipe_q[$];
  int   par_t[$], pipe_t[$];

  always @(posedge clk) cycle <= cycle + 1;

  task automatic check_path(input string name, input logic v, input hsl_t got,
                            ref hsl_t q[$], ref int t[$]);
    if (t.size() > 0 && t[0] == cycle) begin
      hsl_t e;
      e = q.pop_front();
      void'(t.pop_front());
      checks++;
      if (!v || got !== e) begin
        failures++;
        $display("FAIL %s cycle %0d: valid=%0b got %0d/%0d/%0d exp %0d/%0d/%0d",
                 name, cycle, v, got.h, got.s, got.l, e.h, e.s, e.l);
      end
    end else if (v) begin
      checks++;
      failures++;
      $display("FAIL %s cycle %0d: result without a pixel", name, cycle);
    end
  endtask

  // The two paths must agree: the pipelined result equals the parallel one
  // from PIPE_LAT - PAR_LAT clocks before.
  hsl_t par_hist[PIPE_LAT];
  logic par_vhist[PIPE_LAT];

  always @(posedge clk) begin
    #1;
    if (rst_n) begin
      check_path("parallel", par_valid, par_pix, par_q, par_t);
      check_path("pipeline", pipe_valid, pipe_pix, pipe_q, pipe_t);
      if (pipe_valid) begin
        checks++;
        if (!par_vhist[PIPE_LAT-PAR_LAT-1] || par_hist[PIPE_LAT-PAR_LAT-1] !== pipe_pix) begin
          failures++;
          $display("FAIL cycle %0d: the two converters disagree", cycle);
        end else n_agree++;
      end
    end
    for (int i = PIPE_LAT - 1; i > 0; i--) begin
      par_hist[i]  = par_hist[i-1];
      par_vhist[i] = par_vhist[i-1];
    end
    par_hist[0]  = par_pix;
    par_vhist[0] = par_valid && rst_n;
  end

  task automatic send(input int r, input int g, input int b);
    int mx, mn;
    @(negedge clk);
    in_valid = 1'b1;
    in_pix   = '{r: 8'(r), g: 8'(g), b: 8'(b)};
    par_q.push_back(hsl_t'(ref_hsl(r, g, b)));
    par_t.push_back(cycle + PAR_LAT);
    pipe_q.push_back(hsl_t'(ref_hsl(r, g, b)));
    pipe_t.push_back(cycle + PIPE_LAT);
    if (last_valid) n_b2b++;
    last_valid = 1'b1;
    mx = r; if (g > mx) mx = g; if (b > mx) mx = b;
    mn = r; if (g < mn) mn = g; if (b < mn) mn = b;
    if (mx == mn) n_grey++;
    else begin
      if (r == mx) begin
        n_max_r++;
        if (g < b) n_wrap++;
      end else if (g == mx) n_max_g++;
      else n_max_b++;
      if (mx + mn <= 255) n_s_low++;
      else n_s_high++;
    end
  endtask

  task automatic idle();
    @(negedge clk);
    in_valid = 1'b0;
    in_pix   = '{r: 8'($urandom), g: 8'($urandom), b: 8'($urandom)};
    last_valid = 1'b0;
    n_bubble++;
  endtask

  task automatic need(input string what, input int n);
    checks++;
    $display("case %-22s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL case never exercised: %s", what);
    end
  endtask

  initial begin
    for (int i = 0; i < PIPE_LAT; i++) begin
      par_hist[i]  = '0;
      par_vhist[i] = 1'b0;
    end
    #1 rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // A synthetic image, one line at a time, with horizontal blanking.
    for (int y = 0; y < H; y++) begin
      for (int x = 0; x < W; x++) begin
        case (y % 4)
          0: send(x * 4, y * 5, 255 - x * 4);                 // colour ramp
          1: send((x / 8) * 32, (x / 8) * 32, (x / 8) * 32);  // grey bars
          2: send(255 - y * 5, x * 4, (x * y) % 256);          // second ramp
          default: send($urandom_range(255), $urandom_range(255), $urandom_range(255));
        endcase
      end
      repeat (8) idle();
    end
    for (int i = 0; i < 5000; i++) begin
      if ($urandom_range(4) == 0) idle();
      else send($urandom_range(255), $urandom_range(255), $urandom_range(255));
    end
    idle();
    repeat (PIPE_LAT + 2) @(negedge clk);
    if (par_q.size() != 0 || pipe_q.size() != 0) begin
      failures++;
      $display("FAIL results never appeared: %0d parallel, %0d pipelined",
               par_q.size(), pipe_q.size());
    end
    need("grey pixel", n_grey);
    need("red maximum", n_max_r);
    need("green maximum", n_max_g);
    need("blue maximum", n_max_b);
    need("hue wrap below 360", n_wrap);
    need("saturation lower half", n_s_low);
    need("saturation upper half", n_s_high);
    need("idle slot", n_bubble);
    need("back-to-back pixels", n_b2b);
    need("paths agree", n_agree);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
