// Accuracy sweep over the whole 24-bit RGB cube through rgb2hsl_top.
//
// Every one of the 2**24 colours is sent once, back to back, one per clock.
// Each result of both converters is compared with the integer reference
// model, and the testbench reports how many results match exactly and how
// many lie within one unit in every component (hue wrapping at 360). The
// design is meant to be exact, so any mismatch counts as a failure; the
// tolerance figure is printed for comparison with approximate converters.
module tb_rgb2hsl_accuracy;
  import hsl_pkg::*;
  import hsl_ref_pkg::*;

  localparam int PAR_LAT  = 1;
  localparam int PIPE_LAT = 7;
  localparam int N = 1 << 24;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  logic in_valid = 1'b0;
  rgb_t in_pix = '0;
  logic par_valid, pipe_valid;
  hsl_t par_pix, pipe_pix;

  int checks = 0;
  int failures = 0;
  int exact_par = 0, exact_pipe = 0, near_par = 0, near_pipe = 0;
  int n_par = 0, n_pipe = 0;
  logic done = 1'b0;

  rgb2hsl_top dut (.*);

  always #5 clk = ~clk;

  // Pixels sent, by the clock they were sent in.
  rgb_t sent [PIPE_LAT+1];
  logic sent_v [PIPE_LAT+1];

  function automatic int absdiff(int a, int b);
    return (a > b) ? a - b : b - a;
  endfunction

  function automatic bit near(hsl_t a, hsl_t e);
    int dh;
    dh = absdiff(int'(a.h), int'(e.h));
    if (dh > 180) dh = 360 - dh;
    return dh <= 1 && absdiff(int'(a.s), int'(e.s)) <= 1 && absdiff(int'(a.l), int'(e.l)) <= 1;
  endfunction

  task automatic judge(input string name, input logic v, input hsl_t got, input rgb_t p,
                       input logic pv, ref int n, ref int ex, ref int nr);
    hsl_t e;
    checks++;
    if (v !== pv) begin
      failures++;
      $display("FAIL %s: valid %0b where %0b was due", name, v, pv);
      return;
    end
    if (!v) return;
    e = hsl_t'(ref_hsl(int'(p.r), int'(p.g), int'(p.b)));
    n++;
    if (got === e) ex++;
    else begin
      failures++;
      if (failures < 10)
        $display("FAIL %s (%0d,%0d,%0d): got %0d/%0d/%0d exp %0d/%0d/%0d", name,
                 p.r, p.g, p.b, got.h, got.s, got.l, e.h, e.s, e.l);
    end
    if (near(got, e)) nr++;
  endtask

  always @(posedge clk) begin
    // sent[k] is the pixel sampled k clocks before this edge's outputs settle.
    for (int k = PIPE_LAT; k > 0; k--) begin
      sent[k]   = sent[k-1];
      sent_v[k] = sent_v[k-1];
    end
    sent[0]   = in_pix;
    sent_v[0] = in_valid && rst_n;
    #1;
    if (rst_n) begin
      judge("parallel", par_valid, par_pix, sent[PAR_LAT-1], sent_v[PAR_LAT-1],
            n_par, exact_par, near_par);
      judge("pipeline", pipe_valid, pipe_pix, sent[PIPE_LAT-1], sent_v[PIPE_LAT-1],
            n_pipe, exact_pipe, near_pipe);
    end
  end

  initial begin
    for (int k = 0; k <= PIPE_LAT; k++) begin
      sent[k]   = '0;
      sent_v[k] = 1'b0;
    end
    #1 rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      in_valid = 1'b1;
      in_pix   = rgb_t'(i);
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (PIPE_LAT + 2) @(negedge clk);
    checks++;
    if (n_par != N || n_pipe != N) begin
      failures++;
      $display("FAIL results seen: %0d parallel, %0d pipelined, of %0d", n_par, n_pipe, N);
    end
    $display("parallel: %0d of %0d exact, %0d within one unit", exact_par, n_par, near_par);
    $display("pipeline: %0d of %0d exact, %0d within one unit", exact_pipe, n_pipe, near_pipe);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
