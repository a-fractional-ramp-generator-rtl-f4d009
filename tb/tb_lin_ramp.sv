// Testbench of lin_ramp: runs ramps with random start, slope (both signs) and
// length, and checks every output value against f_start + k * slope computed
// independently, the ramp duration in clocks and the held end value.
module tb_lin_ramp;
  import frac_pkg::*;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic             start = 1'b0;
  fword_t           f_start;
  slope_t           slope;
  logic [LEN_W-1:0] len;
  fword_t           f_out;
  logic             busy, done;
  int               checks = 0, failures = 0;

  lin_ramp dut (.clk, .rst_n, .start, .f_start, .slope, .len, .f_out, .busy, .done);

  always #5 clk = ~clk;

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    f_start = '0; slope = '0; len = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 12; t++) begin
      longint fs, sl, exp_f;
      int     n, busy_clocks;
      fs = longint'($urandom_range(8, 28)) <<< FRAC_W;
      // Slope in units of 2^-(FRAC_W+16): from sub-LSB to large, both signs
      sl = longint'($urandom_range(1, 1 << 20)) * ((t % 3 == 0) ? 1 : (t % 3 == 1) ? 4096 : -7);
      n  = $urandom_range(1, 300);
      @(posedge clk); #1;
      f_start = fword_t'(fs); slope = slope_t'(sl); len = LEN_W'(n);
      start = 1'b1;
      @(posedge clk); #1;
      start = 1'b0;
      busy_clocks = 0;
      for (int k = 0; k <= n + 3; k++) begin
        // Value after k steps; floor of the exact value at FRAC_W fraction bits
        int kk;
        kk = (k < n) ? k : n;
        exp_f = ((fs <<< 16) + kk * sl) >>> 16;
        checks++;
        if (longint'(f_out) != exp_f) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d k=%0d f=%0d exp=%0d", t, k, longint'(f_out), exp_f);
        end
        if (busy) busy_clocks++;
        if (done) begin
          checks++;
          if (k != n) begin failures++; $display("FAIL done at %0d, len %0d", k, n); end
        end
        @(posedge clk); #1;
      end
      checks++;
      if (busy_clocks != n) begin
        failures++; $display("FAIL busy %0d clocks, len %0d", busy_clocks, n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
