// ycbcr_csc: RGB to YCbCr colour-space converter, one pixel per clock.
//
// Each output channel is a weighted sum of R, G and B plus a fixed offset:
//   Y  =  0.299 R + 0.587 G + 0.114 B +  16
//   Cb = -0.169 R - 0.331 G + 0.500 B + 128
//   Cr =  0.500 R - 0.419 G - 0.081 B + 128
// The coefficients and offsets are those of the conversion equations the
// design is built on. How they are realised is this design's choice: the
// coefficients become signed fixed-point constants with FRAC_W fraction
// bits (csc_pkg::fix_coef), and a three-stage pipeline computes
//   stage 1  the nine products  coefficient x channel
//   stage 2  the three sums, with the offset and a rounding half-LSB added
//   stage 3  the shift back to integer and a clamp to 0..255
// The result is round-half-up of the fixed-point sum, saturated to 8 bits
// (white gives Y = 271 before the clamp, pure red and pure blue give
// Cr and Cb = 255.5).
//
// Interface: valid/ready streams on both sides. in_rgb is accepted when
// in_valid && in_ready; out_ycbcr is presented with out_valid and held
// until out_ready. out_rgb carries the input pixel alongside its
// conversion, so both can be displayed together.
// Reset: synchronous, active low; it clears the valid bits only.
// Timing: latency 3 clock cycles from acceptance to out_valid, throughput
// one pixel per clock. The pipeline stalls as a whole: when the output is
// held, no stage moves and in_ready is low.
module ycbcr_csc
  import csc_pkg::*;
#(
  parameter int unsigned FRAC_W = 14   // fraction bits of the coefficients
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  output logic   in_ready,
  input  rgb_t   in_rgb,
  output logic   out_valid,
  input  logic   out_ready,
  output ycbcr_t out_ycbcr,
  output rgb_t   out_rgb
);

  localparam int unsigned COEF_W = FRAC_W + 2;             // |coef| < 1, sign
  localparam int unsigned PROD_W = COEF_W + PIX_W + 1;
  localparam int unsigned SUM_W  = PROD_W + 3;

  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic signed [PROD_W-1:0] prod_t;
  typedef logic signed [SUM_W-1:0]  sum_t;

  function automatic coef_t coef(logic [1:0] o, logic [1:0] i);
    return coef_t'(fix_coef(K_MILLI[o][i], FRAC_W));
  endfunction

  function automatic sum_t bias(logic [1:0] o);
    return (sum_t'(OFFSET[o]) <<< FRAC_W) + (sum_t'(1) <<< (FRAC_W - 1));
  endfunction

  // Pipeline valid bits and global advance
  logic [2:0] v;
  logic       adv;

  assign adv       = !v[2] || out_ready;
  assign in_ready  = adv;
  assign out_valid = v[2];

  // Stage 1: products
  prod_t prod_d [3][3];
  prod_t prod_q [3][3];
  pix_t  chan   [3];
  rgb_t  rgb1, rgb2, rgb3;

  assign chan[0] = in_rgb.r;
  assign chan[1] = in_rgb.g;
  assign chan[2] = in_rgb.b;

  always_comb begin
    for (int o = 0; o < 3; o++)
      for (int i = 0; i < 3; i++)
        prod_d[o][i] = prod_t'(coef(2'(o), 2'(i))) * prod_t'({1'b0, chan[i]});
  end

  // Stage 2: sums with offset and rounding
  sum_t sum_d [3];
  sum_t sum_q [3];

  always_comb begin
    for (int o = 0; o < 3; o++)
      sum_d[o] = sum_t'(prod_q[o][0]) + sum_t'(prod_q[o][1])
               + sum_t'(prod_q[o][2]) + bias(2'(o));
  end

  // Stage 3: back to integer, clamp to the pixel range
  pix_t res_d [3];
  pix_t res_q [3];

  always_comb begin
    sum_t ipart;
    for (int o = 0; o < 3; o++) begin
      ipart = sum_q[o] >>> FRAC_W;
      if (ipart < 0)
        res_d[o] = '0;
      else if (ipart > sum_t'(PIX_MAX))
        res_d[o] = pix_t'(PIX_MAX);
      else
        res_d[o] = pix_t'(ipart);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v <= '0;
    end else if (adv) begin
      v <= {v[1:0], in_valid};
    end
  end

  always_ff @(posedge clk) begin
    if (adv) begin
      prod_q <= prod_d;
      rgb1   <= in_rgb;
      sum_q  <= sum_d;
      rgb2   <= rgb1;
      res_q  <= res_d;
      rgb3   <= rgb2;
    end
  end

  assign out_ycbcr = '{y: res_q[0], cb: res_q[1], cr: res_q[2]};
  assign out_rgb   = rgb3;

  // A presented result stays put until it is taken
  assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_ycbcr) && $stable(out_rgb))
    else $error("ycbcr_csc: output changed while stalled");

endmodule
