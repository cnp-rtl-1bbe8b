// tb_nonlin: self-checking test of the piecewise-linear squashing function.
// Loads an 8-segment approximation of 1.7159*tanh(2x/3) (odd-symmetric,
// slopes 2^-m + 2^-n, flat tails), then checks the output for every 16th
// Q8.8 input and all breakpoints against the segment formula evaluated here,
// and that it stays within 0.1 of the real function on [-4, 4]. Then loads
// random tables with jumps between segments and checks the inputs at and
// next to every breakpoint.
module tb_nonlin;
  import cnp_pkg::*;

  logic clk = 0;
  logic tw_en = 0;
  logic [2:0] tw_addr;
  logic [31:0] tw_data;
  sample_t x, y;

  int checks = 0, failures = 0;
  // segment table: breakpoint (Q8.8), m, n (6 = term off), offset b (Q2.8)
  int bl [8] = '{-32768, -768, -384, -128, 0, 128, 384, 768};
  int bm [8] = '{6, 2, 1, 0, 0, 1, 2, 6};
  int bn [8] = '{6, 6, 2, 3, 3, 2, 6, 6};
  int bb [8] = '{0, 0, 0, 0, 0, 0, 0, 0};

  nonlin #(.NSEG(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int seg_of(int xv);
    int s = 0;
    for (int i = 1; i < 8; i++) if (xv >= bl[i]) s = i;
    return s;
  endfunction

  function automatic int g_ref(int xv);
    int s = seg_of(xv), r;
    r = bb[s];
    if (bm[s] <= 5) r += xv >>> bm[s];
    if (bn[s] <= 5) r += xv >>> bn[s];
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return r;
  endfunction

  initial begin
    real err, worst;
    // offsets chosen so the segments join: continuity at each breakpoint
    // b_i = g_(i-1)(l_i) - a_i*l_i, computed outward from zero
    bb[3] = 0; bb[4] = 0;
    for (int i = 5; i < 8; i++) begin
      automatic int prev = bb[i-1] + ((bm[i-1] <= 5) ? (bl[i] >>> bm[i-1]) : 0) + ((bn[i-1] <= 5) ? (bl[i] >>> bn[i-1]) : 0);
      automatic int here = ((bm[i] <= 5) ? (bl[i] >>> bm[i]) : 0) + ((bn[i] <= 5) ? (bl[i] >>> bn[i]) : 0);
      bb[i] = prev - here;
      bb[7-i] = -bb[i];
    end
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      tw_en = 1; tw_addr = 3'(i);
      tw_data = {16'(bl[i]), 3'(bm[i]), 3'(bn[i]), 10'(bb[i])};
    end
    @(negedge clk); tw_en = 0;
    worst = 0;
    for (int xv = -32768; xv < 32768; xv += 16) begin
      x = sample_t'(xv); #1;
      checks++;
      if (int'(y) != g_ref(xv)) begin
        failures++;
        if (failures < 10) $display("FAIL x=%0d got %0d exp %0d", xv, y, g_ref(xv));
      end
      if (xv >= -1024 && xv <= 1024) begin
        err = $itor(y) / 256.0 - 1.7159 * $tanh(2.0 / 3.0 * $itor(xv) / 256.0);
        if (err < 0) err = -err;
        if (err > worst) worst = err;
      end
      @(negedge clk);
    end
    for (int i = 1; i < 8; i++) begin
      x = sample_t'(bl[i]); #1;
      checks++;
      if (int'(y) != g_ref(bl[i])) begin failures++; $display("FAIL at breakpoint %0d", i); end
      @(negedge clk);
    end
    // random table with jumps at the breakpoints: the segment chosen exactly
    // at and next to each breakpoint must be the one the rule gives
    for (int t = 0; t < 20; t++) begin
      bl[0] = -32768;
      for (int i = 1; i < 8; i++) bl[i] = bl[i-1] + $urandom_range(1, 8000);
      for (int i = 0; i < 8; i++) begin
        bm[i] = $urandom_range(0, 7); bn[i] = $urandom_range(0, 7); bb[i] = $urandom_range(0, 1023) - 512;
        @(negedge clk);
        tw_en = 1; tw_addr = 3'(i);
        tw_data = {16'(bl[i]), 3'(bm[i]), 3'(bn[i]), 10'(bb[i])};
      end
      @(negedge clk); tw_en = 0;
      for (int i = 1; i < 8; i++)
        for (int d = -1; d <= 1; d++) begin
          automatic int xv = bl[i] + d;
          if (xv > 32767) continue;
          x = sample_t'(xv); #1;
          checks++;
          if (int'(y) != g_ref(xv)) begin
            failures++;
            if (failures < 10) $display("FAIL x=%0d got %0d exp %0d", xv, y, g_ref(xv));
          end
          @(negedge clk);
        end
    end
    checks++;
    if (worst > 0.1) begin failures++; $display("FAIL approximation error %f", worst); end
    $display("max |g - 1.7159 tanh(2x/3)| on [-4,4] = %f", worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
