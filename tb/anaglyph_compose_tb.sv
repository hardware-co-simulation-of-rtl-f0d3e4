// anaglyph_compose_tb: self-checking test of the stereo pairing and
// red-cyan composition.
//
// Every pixel taken from the left and right streams is logged in its own
// queue; each output must equal {left.r, right.g, right.b} of the next
// unused pair. Phases: (1) latency 1 cycle for one pair; (2) 32 pairs
// back to back with no stall take 32 cycles; (3) 4000 pixels per side
// with independent random gaps on the two inputs and random output
// backpressure. The test also requires that the left stream waited on
// the right one, the right on the left, and the output stalled, at least
// once each, and that no pixel is lost or duplicated.
module anaglyph_compose_tb;
  import csc_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  logic l_valid, l_ready;
  rgb_t l_rgb;
  logic r_valid, r_ready;
  rgb_t r_rgb;
  logic out_valid, out_ready;
  rgb_t out_rgb;

  int checks = 0;
  int failures = 0;
  int cycle = 0;

  anaglyph_compose dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  rgb_t lq [$];
  rgb_t rq [$];
  int   n_out = 0;
  int   n_l = 0;
  int   n_r = 0;
  int   left_waited = 0;
  int   right_waited = 0;
  int   out_stalled = 0;

  bit l_took = 1'b0;
  bit r_took = 1'b0;

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
        rgb_t lp, rp, exp;
        checks++;
        if (lq.size() == 0 || rq.size() == 0) begin
          failures++;
          $display("output with no pair taken");
        end else begin
          lp = lq.pop_front();
          rp = rq.pop_front();
          exp = '{r: lp.r, g: rp.g, b: rp.b};
          if (out_rgb != exp) begin
            failures++;
            $display("MISMATCH got %h expected %h", out_rgb, exp);
          end
        end
        n_out++;
      end
    end
  end

  // Random-traffic driver, active while run_random is set. Drives on the
  // falling edge; a presented pixel is held until taken.
  bit run_random = 1'b0;
  int l_left = 0;
  int r_left = 0;

  always @(negedge clk) begin
    if (run_random) begin
      // Was the presented pixel taken at the last rising edge? Then it is
      // gone; decide about the next one.
      if (!l_valid || l_took) begin
        if (l_took) l_left--;
        l_valid = (l_left > 0) && ($urandom_range(99) < 60);
        l_rgb   = rgb_t'($urandom);
      end
      if (!r_valid || r_took) begin
        if (r_took) r_left--;
        r_valid = (r_left > 0) && ($urandom_range(99) < 60);
        r_rgb   = rgb_t'($urandom);
      end
      out_ready = ($urandom_range(99) < 70);
    end
  end

  initial begin
    int t0;
    rst_n     = 1'b0;
    l_valid   = 1'b0;
    r_valid   = 1'b0;
    l_rgb     = '0;
    r_rgb     = '0;
    out_ready = 1'b1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // (1) latency of one pair
    @(negedge clk);
    l_valid = 1'b1; l_rgb = '{r: 8'hA1, g: 8'hA2, b: 8'hA3};
    r_valid = 1'b1; r_rgb = '{r: 8'hB1, g: 8'hB2, b: 8'hB3};
    t0 = cycle;
    @(negedge clk);
    l_valid = 1'b0;
    r_valid = 1'b0;
    while (!out_valid) @(negedge clk);
    checks++;
    if (cycle - t0 != 1 || out_rgb != rgb_t'(24'hA1B2B3)) begin
      failures++;
      $display("single pair: latency %0d, pixel %h", cycle - t0, out_rgb);
    end
    @(negedge clk);

    // (2) 32 pairs back to back, all taken by cycle t0 + 33
    t0 = cycle;
    for (int i = 0; i < 32; i++) begin
      if (i != 0) @(negedge clk);
      l_valid = 1'b1; l_rgb = rgb_t'($urandom);
      r_valid = 1'b1; r_rgb = rgb_t'($urandom);
      #1;
      checks++;
      if (!l_ready || !r_ready) begin
        failures++;
        $display("input stalled with output always ready");
      end
    end
    @(negedge clk);
    l_valid = 1'b0;
    r_valid = 1'b0;
    while (n_out < 33) @(negedge clk);
    checks++;
    if (cycle - t0 != 33) begin
      failures++;
      $display("32 pairs took %0d cycles, expected 33", cycle - t0);
    end

    // (3) random traffic
    l_left = 4000;
    r_left = 4000;
    run_random = 1'b1;
    while (n_out < 33 + 4000) @(negedge clk);
    run_random = 1'b0;
    repeat (5) @(negedge clk);

    checks++;
    if (n_l != 4033 || n_r != 4033 || n_out != 4033 || lq.size() != 0 || rq.size() != 0) begin
      failures++;
      $display("counts: left %0d right %0d out %0d", n_l, n_r, n_out);
    end
    checks++;
    if (left_waited == 0 || right_waited == 0 || out_stalled == 0) begin
      failures++;
      $display("a stall case never happened");
    end
    $display("left waited %0d, right waited %0d, output stalled %0d cycles",
             left_waited, right_waited, out_stalled);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
