// anaglyph_compose: pairs the left-eye and right-eye pixel streams and
// builds one red-cyan anaglyph pixel from each pair.
//
// A red-cyan anaglyph takes its red channel from the left image and its
// green and blue channels from the right image; seen through red/cyan
// glasses, each eye then receives only its own view. That channel
// selection follows the design description. The pairing is this design's
// own choice: the two cameras' streams arrive on separate valid/ready
// ports, and the n-th left pixel is combined with the n-th right pixel.
// A pair is taken only when both sides are valid, so either stream may
// run ahead or pause and the two stay in step (a stream join).
//
// Interface: l_* and r_* are input streams, out_* the anaglyph stream;
// a transfer happens on a clock edge where valid && ready.
// Timing: one registered stage, latency 1 cycle, one pair per clock.
// l_ready is high only when r_valid is (and the reverse), so neither side
// is consumed alone. Reset: synchronous, active low; clears out_valid.
module anaglyph_compose
  import csc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic l_valid,
  output logic l_ready,
  input  rgb_t l_rgb,
  input  logic r_valid,
  output logic r_ready,
  input  rgb_t r_rgb,
  output logic out_valid,
  input  logic out_ready,
  output rgb_t out_rgb
);

  logic can_load;
  logic fire;

  assign can_load = !out_valid || out_ready;
  assign fire     = can_load && l_valid && r_valid;
  assign l_ready  = can_load && r_valid;
  assign r_ready  = can_load && l_valid;

  always_ff @(posedge clk) begin
    if (!rst_n)
      out_valid <= 1'b0;
    else if (can_load)
      out_valid <= fire;
  end

  always_ff @(posedge clk) begin
    if (fire)
      out_rgb <= '{r: l_rgb.r, g: r_rgb.g, b: r_rgb.b};
  end

  // The two inputs are always consumed together
  assert property (@(posedge clk) disable iff (!rst_n)
    (l_valid && l_ready) == (r_valid && r_ready))
    else $error("anaglyph_compose: one side consumed without the other");

  assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_rgb))
    else $error("anaglyph_compose: output changed while stalled");

endmodule
