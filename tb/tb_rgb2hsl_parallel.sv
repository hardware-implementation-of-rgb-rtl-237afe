// Self-checking testbench for rgb2hsl_parallel.
//
// Applies hand-worked pixels (primaries, secondaries, greys, the hue wrap just
// below 360, both saturation halves), a sweep over a coarse RGB grid and
// random pixels with random gaps in in_valid. Every result is compared with
// the reference model, and its timing is checked: a result must appear exactly
// one clock after its pixel, and no result may appear without one.
module tb_rgb2hsl_parallel;
  import hsl_pkg::*;
  import hsl_ref_pkg::*;

  localparam int LAT = 1;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  logic in_valid = 1'b0;
  rgb_t in_pix = '0;
  logic out_valid;
  hsl_t out_pix;

  int checks = 0;
  int failures = 0;
  int cycle = 0;

  rgb2hsl_parallel dut (.*);

  always #5 clk = ~clk;

  // Expected results, with the cycle they must appear in.
  hsl_t exp_q[$];
  int   exp_t[$];

  always @(posedge clk) begin
    cycle <= cycle + 1;
  end

  // Compare just after every rising edge.
  always @(posedge clk) begin
    #1;
    if (rst_n) begin
      if (exp_t.size() > 0 && exp_t[0] == cycle) begin
        hsl_t e;
        e = exp_q.pop_front();
        void'(exp_t.pop_front());
        checks++;
        if (!out_valid || out_pix !== e) begin
          failures++;
          $display("FAIL cycle %0d: valid=%0b got h=%0d s=%0d l=%0d exp h=%0d s=%0d l=%0d",
                   cycle, out_valid, out_pix.h, out_pix.s, out_pix.l, e.h, e.s, e.l);
        end
      end else if (out_valid) begin
        checks++;
        failures++;
        $display("FAIL cycle %0d: result without a pixel", cycle);
      end
    end
  end

  // Drive one pixel for one clock (changes at the falling edge).
  task automatic send(input int r, input int g, input int b);
    @(negedge clk);
    in_valid = 1'b1;
    in_pix   = '{r: 8'(r), g: 8'(g), b: 8'(b)};
    exp_q.push_back(hsl_t'(ref_hsl(r, g, b)));
    exp_t.push_back(cycle + LAT);
  endtask

  task automatic idle();
    @(negedge clk);
    in_valid = 1'b0;
    in_pix   = '{r: 8'($urandom), g: 8'($urandom), b: 8'($urandom)};
  endtask

  // A hand-worked value, checked against the expectation written here.
  task automatic known(input int r, input int g, input int b,
                       input int h, input int s, input int l);
    logic [24:0] m;
    m = ref_hsl(r, g, b);
    checks++;
    if (m !== {9'(h), 8'(s), 8'(l)}) begin
      failures++;
      $display("FAIL model (%0d,%0d,%0d): %0d %0d %0d", r, g, b, m[24:16], m[15:8], m[7:0]);
    end
    send(r, g, b);
  endtask

  initial begin
    #1 rst_n = 1'b0;   // a falling edge, so the asynchronous reset acts
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    known(255,   0,   0,   0, 255, 127);
    known(  0, 255,   0, 120, 255, 127);
    known(  0,   0, 255, 240, 255, 127);
    known(255, 255,   0,  60, 255, 127);
    known(  0, 255, 255, 180, 255, 127);
    known(255,   0, 255, 300, 255, 127);
    known(255, 255, 255,   0,   0, 255);
    known(128, 128, 128,   0,   0, 128);
    known(  0,   0,   0,   0,   0,   0);
    known(200, 100,  50,  20, 153, 125);
    known( 50, 100, 200, 220, 153, 125);
    known(255, 128, 128,   0, 255, 191);
    known( 10,  20,  30, 210, 127,  20);
    known(255,   0,   1, 359, 255, 127);
    idle();
    for (int r = 0; r < 256; r += 17)
      for (int g = 0; g < 256; g += 17)
        for (int b = 0; b < 256; b += 17)
          send(r, g, b);
    for (int i = 0; i < 20000; i++) begin
      if ($urandom_range(3) == 0) idle();
      else send($urandom_range(255), $urandom_range(255), $urandom_range(255));
    end
    idle();
    repeat (LAT + 2) @(negedge clk);
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d results never appeared", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
