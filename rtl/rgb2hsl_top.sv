// RGB-to-HSL conversion core: both converter architectures side by side.
//
// One RGB pixel stream, as it would come from a camera front end, feeds the
// parallel converter (result one clock later) and the pipelined converter
// (result PIPE_STAGES clocks later) at once, so the two can be compared pixel
// for pixel; both take one pixel per clock. Their results leave on separate
// ports, towards a display, a serial link or an image store. Those board-level
// parts (camera decoder, VGA output, RS-232 link, SD-card store) are not part
// of this RTL; their connections are the ports below.
//
// Interface: in_valid/in_pix are sampled on the rising clock edge.
// par_valid/par_pix follow one clock later, pipe_valid/pipe_pix PIPE_STAGES
// clocks later. rst_n is an asynchronous, active-low reset.
module rgb2hsl_top
  import hsl_pkg::*;
#(
  parameter int unsigned PIPE_STAGES = 7
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  rgb_t in_pix,
  output logic par_valid,
  output hsl_t par_pix,
  output logic pipe_valid,
  output hsl_t pipe_pix
);

  rgb2hsl_parallel u_parallel (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .in_pix    (in_pix),
    .out_valid (par_valid),
    .out_pix   (par_pix)
  );

  rgb2hsl_pipeline #(
    .STAGES (PIPE_STAGES)
  ) u_pipeline (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .in_pix    (in_pix),
    .out_valid (pipe_valid),
    .out_pix   (pipe_pix)
  );

endmodule
