// anaglyph_csc_top_tb: end-to-end test of the stereo-to-anaglyph-to-YCbCr
// chain, top level at its default parameters.
//
// The bench generates a 320 x 240 stereo pair: the left view is a grid of
// 16 x 16 tiles cycling through black, white, the primaries, the
// secondaries, grey and colour gradients; the right view is the same
// scene shifted 4 pixels to the left, as a second camera beside the first
// would see it. Both views are streamed in raster order on their own
// ports with independent random gaps, while the output side applies
// random backpressure. For every output pixel the bench checks
//   out_rgb   = {left.r, right.g, right.b} of the same pixel position
//   out_ycbcr = the conversion equations evaluated in real arithmetic,
//               rounded and clamped (off-by-one accepted only within
//               0.025 of a rounding boundary)
// It also checks the 4-cycle latency and one-pixel-per-clock rate on a
// short burst before the frame, and requires that each mechanism occurred
// at least once: left stream waiting for the right, right waiting for the
// left, output backpressure, and clamping of Y, Cb and Cr at 255.
module anaglyph_csc_top_tb;
  import csc_pkg::*;

  localparam int W = 320;
  localparam int H = 240;
  localparam int SHIFT = 4;
  localparam int BURST = 16;

  logic   clk = 1'b0;
  logic   rst_n;
  logic   l_valid, l_ready;
  rgb_t   l_rgb;
  logic   r_valid, r_ready;
  rgb_t   r_rgb;
  logic   out_valid, out_ready;
  rgb_t   out_rgb;
  ycbcr_t out_ycbcr;

  int checks = 0;
  int failures = 0;
  int cycle = 0;

  anaglyph_csc_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- scene ---------------------------------------------------------
  function automatic rgb_t scene(int x, int y);
    int tile;
    tile = ((x >> 4) + (y >> 4) * 3) % 10;
    case (tile)
      0: return '{r: 8'd0,   g: 8'd0,   b: 8'd0};
      1: return '{r: 8'd255, g: 8'd255, b: 8'd255};
      2: return '{r: 8'd255, g: 8'd0,   b: 8'd0};
      3: return '{r: 8'd0,   g: 8'd255, b: 8'd0};
      4: return '{r: 8'd0,   g: 8'd0,   b: 8'd255};
      5: return '{r: 8'd255, g: 8'd255, b: 8'd0};
      6: return '{r: 8'd0,   g: 8'd255, b: 8'd255};
      7: return '{r: 8'd128, g: 8'd128, b: 8'd128};
      8: return '{r: 8'((x * 7 + y * 3) & 255), g: 8'((x * 5) & 255), b: 8'((y * 11) & 255)};
      default: return rgb_t'($urandom);
    endcase
  endfunction

  rgb_t left_img  [H][W];
  rgb_t right_img [H][W];

  // ---- reference ------------------------------------------------------
  function automatic real model(int o, int r, int g, int b);
    case (o)
      0:       return  0.299 * r + 0.587 * g + 0.114 * b + 16.0;
      1:       return -0.169 * r - 0.331 * g + 0.500 * b + 128.0;
      default: return  0.500 * r - 0.419 * g - 0.081 * b + 128.0;
    endcase
  endfunction

  int clamped [3] = '{0, 0, 0};

  task automatic check_pixel(rgb_t lp, rgb_t rp, rgb_t got_rgb, ycbcr_t got);
    rgb_t ana;
    int   gv [3];
    real  x;
    real  frac;
    int   e;
    ana = '{r: lp.r, g: rp.g, b: rp.b};
    checks++;
    if (got_rgb != ana) begin
      failures++;
      if (failures < 10) $display("anaglyph pixel %h expected %h", got_rgb, ana);
    end
    gv[0] = int'(got.y); gv[1] = int'(got.cb); gv[2] = int'(got.cr);
    for (int o = 0; o < 3; o++) begin
      x = model(o, int'(ana.r), int'(ana.g), int'(ana.b));
      e = $rtoi($floor(x + 0.5));
      if (e > 255) begin e = 255; clamped[o]++; end
      if (e < 0) e = 0;
      frac = x - $floor(x);
      checks++;
      if (gv[o] != e &&
          !((gv[o] - e == 1 || e - gv[o] == 1) && frac > 0.475 && frac < 0.525)) begin
        failures++;
        if (failures < 10)
          $display("channel %0d of %h: got %0d expected %0d (%f)", o, ana, gv[o], e, x);
      end
    end
  endtask

  // ---- monitors -------------------------------------------------------
  rgb_t lq [$];
  rgb_t rq [$];
  int   n_l = 0, n_r = 0, n_out = 0;
  int   left_waited = 0, right_waited = 0, out_stalled = 0;
  bit   l_took = 1'b0, r_took = 1'b0;

  always @(posedge clk) begin
    l_took <= l_valid && l_ready;
    r_took <= r_valid && r_ready;
    if (rst_n) begin
      if (l_valid && l_ready) begin lq.push_back(l_rgb); n_l++; end
      if (r_valid && r_ready) begin rq.push_back(r_rgb); n_r++; end
      if (l_valid && !r_valid) left_waited++;
      if (r_valid && !l_valid) right_waited++;
      if (out_valid && !out_ready) out_stalled++;
      if (out_valid && out_ready) begin
        if (lq.size() == 0 || rq.size() == 0) begin
          checks++;
          failures++;
          $display("output with no input pair taken");
        end else
          check_pixel(lq.pop_front(), rq.pop_front(), out_rgb, out_ycbcr);
        n_out++;
      end
    end
  end

  // ---- frame drivers --------------------------------------------------
  bit run_frame = 1'b0;
  int l_idx = 0, r_idx = 0;

  always @(negedge clk) begin
    if (run_frame) begin
      if (!l_valid || l_took) begin
        if (l_took) l_idx++;
        l_valid = (l_idx < W * H) && ($urandom_range(99) < 75);
        if (l_idx < W * H) l_rgb = left_img[l_idx / W][l_idx % W];
      end
      if (!r_valid || r_took) begin
        if (r_took) r_idx++;
        r_valid = (r_idx < W * H) && ($urandom_range(99) < 75);
        if (r_idx < W * H) r_rgb = right_img[r_idx / W][r_idx % W];
      end
      out_ready = ($urandom_range(99) < 85);
    end
  end

  initial begin
    int t0;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        left_img[y][x] = scene(x, y);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        right_img[y][x] = (x + SHIFT < W) ? left_img[y][x + SHIFT] : left_img[y][W - 1];

    rst_n     = 1'b0;
    l_valid   = 1'b0;
    r_valid   = 1'b0;
    l_rgb     = '0;
    r_rgb     = '0;
    out_ready = 1'b1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // Latency and rate: BURST pairs back to back, first presented at
    // cycle t0, first result presented at t0 + 4, last taken by t0 + BURST + 4
    @(negedge clk);
    t0 = cycle;
    for (int i = 0; i < BURST; i++) begin
      if (i != 0) @(negedge clk);
      l_valid = 1'b1; l_rgb = rgb_t'($urandom);
      r_valid = 1'b1; r_rgb = rgb_t'($urandom);
      #1;
      checks++;
      if (!l_ready || !r_ready) begin
        failures++;
        $display("inputs stalled with output always ready");
      end
      if (i == 3) begin
        checks++;
        if (out_valid) begin
          failures++;
          $display("result presented before 4 cycles");
        end
      end
    end
    @(negedge clk);
    l_valid = 1'b0;
    r_valid = 1'b0;
    checks++;
    if (!out_valid) begin
      failures++;
      $display("no result presented after 4 cycles");
    end
    while (n_out < BURST) @(negedge clk);
    checks++;
    if (cycle - t0 != BURST + 4) begin
      failures++;
      $display("%0d pairs took %0d cycles, expected %0d", BURST, cycle - t0, BURST + 4);
    end

    // One full stereo frame
    run_frame = 1'b1;
    while (n_out < BURST + W * H) @(negedge clk);
    run_frame = 1'b0;
    l_valid = 1'b0;
    r_valid = 1'b0;
    repeat (8) @(negedge clk);

    checks++;
    if (n_l != BURST + W * H || n_r != BURST + W * H || n_out != BURST + W * H) begin
      failures++;
      $display("counts: left %0d right %0d out %0d", n_l, n_r, n_out);
    end

    $display("left waited %0d, right waited %0d, output stalled %0d cycles",
             left_waited, right_waited, out_stalled);
    $display("clamped at 255: Y %0d, Cb %0d, Cr %0d", clamped[0], clamped[1], clamped[2]);
    checks++;
    if (left_waited == 0 || right_waited == 0 || out_stalled == 0 ||
        clamped[0] == 0 || clamped[1] == 0 || clamped[2] == 0) begin
      failures++;
      $display("a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
