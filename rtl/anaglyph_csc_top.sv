// anaglyph_csc_top: stereo pair in, red-cyan anaglyph and its YCbCr
// conversion out.
//
// Two pixel streams, one per camera, enter on valid/ready ports. The
// composer pairs them and forms the anaglyph pixel (red from the left
// view, green and blue from the right view); the converter then turns
// that pixel into Y, Cb and Cr with the standard-definition weights.
// Both the anaglyph RGB pixel and its YCbCr values leave together on one
// output stream, so the anaglyph image and its three converted planes can
// be viewed side by side. Anaglyph composition followed by colour-space
// conversion is the chain the design describes; the streaming handshake
// and the pairing of the two inputs are this design's own choices.
//
// Interface: l_*, r_* input streams and out_* output stream, all
// valid/ready; a transfer happens where valid && ready. Plain ports only.
// Timing: 4 cycles from a pair being accepted to its result on the
// output (1 in the composer, 3 in the converter), one pixel per clock.
// Backpressure on out_ready reaches both inputs within the same cycle.
// Reset: synchronous, active low.
module anaglyph_csc_top
  import csc_pkg::*;
#(
  parameter int unsigned FRAC_W = 14   // fraction bits of the coefficients
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   l_valid,
  output logic   l_ready,
  input  rgb_t   l_rgb,
  input  logic   r_valid,
  output logic   r_ready,
  input  rgb_t   r_rgb,
  output logic   out_valid,
  input  logic   out_ready,
  output rgb_t   out_rgb,
  output ycbcr_t out_ycbcr
);

  logic ana_valid;
  logic ana_ready;
  rgb_t ana_rgb;

  anaglyph_compose u_compose (
    .clk      (clk),
    .rst_n    (rst_n),
    .l_valid  (l_valid),
    .l_ready  (l_ready),
    .l_rgb    (l_rgb),
    .r_valid  (r_valid),
    .r_ready  (r_ready),
    .r_rgb    (r_rgb),
    .out_valid(ana_valid),
    .out_ready(ana_ready),
    .out_rgb  (ana_rgb)
  );

  ycbcr_csc #(.FRAC_W(FRAC_W)) u_csc (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (ana_valid),
    .in_ready (ana_ready),
    .in_rgb   (ana_rgb),
    .out_valid(out_valid),
    .out_ready(out_ready),
    .out_ycbcr(out_ycbcr),
    .out_rgb  (out_rgb)
  );

endmodule
