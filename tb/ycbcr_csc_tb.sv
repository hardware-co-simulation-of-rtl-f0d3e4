// ycbcr_csc_tb: self-checking test of the RGB-to-YCbCr converter.
//
// The expected values come from a real-number model of the conversion
// equations written out here (coefficients typed in as decimals, round to
// nearest, clamp to 0..255), not from the package constants the design
// uses. Because the design quantises the coefficients to 14 fraction bits,
// a difference of one is accepted only where the exact result lies within
// 0.025 of a rounding boundary.
// Phases: (1) latency of a single pixel must be 3 cycles; (2) a burst of
// back-to-back pixels must come out one per clock; (3) corner colours
// (black, white, primaries, greys) and (4) random pixels with random input
// gaps and random output backpressure, checked in order via a queue.
module ycbcr_csc_tb;
  import csc_pkg::*;

  logic   clk = 1'b0;
  logic   rst_n;
  logic   in_valid;
  logic   in_ready;
  rgb_t   in_rgb;
  logic   out_valid;
  logic   out_ready;
  ycbcr_t out_ycbcr;
  rgb_t   out_rgb;

  int checks = 0;
  int failures = 0;
  int cycle = 0;

  ycbcr_csc dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real model(int o, int r, int g, int b);
    case (o)
      0:       return  0.299 * r + 0.587 * g + 0.114 * b + 16.0;
      1:       return -0.169 * r - 0.331 * g + 0.500 * b + 128.0;
      default: return  0.500 * r - 0.419 * g - 0.081 * b + 128.0;
    endcase
  endfunction

  function automatic int clamp_round(real x);
    int v;
    v = $rtoi($floor(x + 0.5));
    if (v < 0) v = 0;
    if (v > 255) v = 255;
    return v;
  endfunction

  task automatic check_one(rgb_t px, ycbcr_t got);
    int gv [3];
    real x;
    int e;
    real frac;
    gv[0] = int'(got.y); gv[1] = int'(got.cb); gv[2] = int'(got.cr);
    for (int o = 0; o < 3; o++) begin
      x = model(o, int'(px.r), int'(px.g), int'(px.b));
      e = clamp_round(x);
      frac = x - $floor(x);
      checks++;
      if (gv[o] != e &&
          !((gv[o] - e == 1 || e - gv[o] == 1) &&
            frac > 0.475 && frac < 0.525)) begin
        failures++;
        $display("MISMATCH ch%0d rgb=%0d,%0d,%0d got %0d expected %0d (%f)",
                 o, px.r, px.g, px.b, gv[o], e, x);
      end
    end
  endtask

  // Scoreboard
  rgb_t sent [$];
  int   n_out = 0;

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      rgb_t px;
      px = sent.pop_front();
      check_one(px, out_ycbcr);
      checks++;
      if (out_rgb != px) begin
        failures++;
        $display("out_rgb does not match the converted pixel");
      end
      n_out++;
    end
  end

  // Inputs are driven on the falling edge and transfers happen on the
  // rising edge, so the driver sees settled handshake signals.
  task automatic send(rgb_t px, int gap_pct, int stall_pct);
    while ($urandom_range(99) < gap_pct) begin
      @(negedge clk);
      in_valid  = 1'b0;
      out_ready = ($urandom_range(99) >= stall_pct);
    end
    @(negedge clk);
    in_valid  = 1'b1;
    in_rgb    = px;
    out_ready = ($urandom_range(99) >= stall_pct);
    #1;
    while (!in_ready) begin
      @(negedge clk);
      out_ready = ($urandom_range(99) >= stall_pct);
      #1;
    end
    sent.push_back(px);
  endtask

  task automatic drain();
    @(negedge clk);
    in_valid  = 1'b0;
    out_ready = 1'b1;
    while (sent.size() != 0) @(negedge clk);
  endtask

  initial begin
    int t0;
    int n0;
    rgb_t corner [10];
    rst_n     = 1'b0;
    in_valid  = 1'b0;
    in_rgb    = '0;
    out_ready = 1'b1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // (1) latency: a pixel presented at cycle t0 is presented on the
    // output at cycle t0 + 3
    @(negedge clk);
    in_valid = 1'b1;
    in_rgb   = '{r: 8'd10, g: 8'd20, b: 8'd30};
    sent.push_back(in_rgb);
    t0 = cycle;
    @(negedge clk);
    in_valid = 1'b0;
    while (!out_valid) @(negedge clk);
    checks++;
    if (cycle - t0 != 3) begin
      failures++;
      $display("latency %0d cycles, expected 3", cycle - t0);
    end
    drain();

    // (2) throughput: 64 back-to-back pixels, all taken by cycle t0 + 67
    n0 = n_out;
    @(negedge clk);
    t0 = cycle;
    for (int i = 0; i < 64; i++) begin
      if (i != 0) @(negedge clk);
      in_valid = 1'b1;
      in_rgb   = rgb_t'($urandom);
      #1;
      checks++;
      if (!in_ready) begin
        failures++;
        $display("in_ready low with output always ready");
      end
      sent.push_back(in_rgb);
    end
    @(negedge clk);
    in_valid = 1'b0;
    while (n_out - n0 < 64) @(negedge clk);
    checks++;
    if (cycle - t0 != 64 + 3) begin
      failures++;
      $display("64 pixels took %0d cycles, expected 67", cycle - t0);
    end
    drain();

    // (3) corner colours
    corner[0] = '{r: 8'd0,   g: 8'd0,   b: 8'd0};
    corner[1] = '{r: 8'd255, g: 8'd255, b: 8'd255};
    corner[2] = '{r: 8'd255, g: 8'd0,   b: 8'd0};
    corner[3] = '{r: 8'd0,   g: 8'd255, b: 8'd0};
    corner[4] = '{r: 8'd0,   g: 8'd0,   b: 8'd255};
    corner[5] = '{r: 8'd128, g: 8'd128, b: 8'd128};
    corner[6] = '{r: 8'd255, g: 8'd255, b: 8'd0};
    corner[7] = '{r: 8'd0,   g: 8'd255, b: 8'd255};
    corner[8] = '{r: 8'd255, g: 8'd0,   b: 8'd255};
    corner[9] = '{r: 8'd1,   g: 8'd2,   b: 8'd3};
    for (int i = 0; i < 10; i++) send(corner[i], 0, 0);
    drain();

    // (4) random pixels with gaps and backpressure
    for (int i = 0; i < 5000; i++)
      send(rgb_t'($urandom), 30, 30);
    drain();

    checks++;
    if (n_out != 1 + 64 + 10 + 5000) begin
      failures++;
      $display("received %0d results", n_out);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
