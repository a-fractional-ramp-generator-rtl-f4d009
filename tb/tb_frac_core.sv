// Testbench of frac_core: compares the core cycle by cycle with the
// reference model of the block diagram, and checks the published behaviour:
// for a constant input the mean of Nf equals the input divided by K1, the
// output spans at most 5 neighbouring integers (deviation 4), and the
// N = 20.05 case of the published example sequence stays within 18..22.
module tb_frac_core;
  import frac_pkg::*;
  import frac_ref_pkg::*;

  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  cword_t x_in;
  nint_t  p_off;
  nint_t  nf_out, n_out;
  int     checks = 0, failures = 0;
  FracRef ref_m;

  frac_core dut (.clk, .rst_n, .x_in, .p_off, .nf_out, .n_out);

  always #5 clk = ~clk;

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Apply x for n clocks, compare with the reference, collect statistics
  task automatic run(input longint x, input int p, input int n,
                     output longint sum_n, output int mn, output int mx);
    longint e;
    sum_n = 0; mn = 1000; mx = -1000;
    for (int i = 0; i < n; i++) begin
      x_in  = cword_t'(x);
      p_off = nint_t'(p);
      e = ref_m.step_core(x, p);
      @(posedge clk);
      #1;
      checks++;
      if (longint'(n_out) != e || longint'(nf_out) != e - p) begin
        failures++;
        if (failures < 10) $display("FAIL i=%0d n=%0d exp=%0d", i, n_out, e);
      end
      sum_n += longint'(n_out);
      if (i > 200) begin
        if (n_out < mn) mn = n_out;
        if (n_out > mx) mx = n_out;
      end
    end
  endtask

  // x that gives a mean Nf of f: x = K1 * f
  function automatic longint x_for(real f);
    return longint'(f * 3.0 / 16.0 * (2.0 ** CORE_FRAC_W));
  endfunction

  initial begin
    longint s;
    int     mn, mx;
    real    mean;
    ref_m = new(CORE_FRAC_W, K1_NUM, K2_NUM);
    x_in = '0; p_off = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // Published example: mean 20.05 as fraction 0.05 plus offset P = 20
    run(x_for(0.05), 20, 400, s, mn, mx);     // settle
    run(x_for(0.05), 20, 40000, s, mn, mx);
    mean = real'(s) / 40000.0;
    checks++;
    if (mean < 20.049 || mean > 20.051) begin
      failures++; $display("FAIL mean %f", mean);
    end
    checks++;
    if (mn < 18 || mx > 22 || mx - mn > 4) begin
      failures++; $display("FAIL range %0d..%0d", mn, mx);
    end
    $display("N = 20.05: mean %f range %0d..%0d", mean, mn, mx);

    // Other fractions, including a negative one
    for (int k = 0; k < 4; k++) begin
      real fr;
      fr = (k == 0) ? 0.5 : (k == 1) ? 0.3333 : (k == 2) ? -0.71 : 0.999;
      run(x_for(fr), 14, 400, s, mn, mx);
      run(x_for(fr), 14, 20000, s, mn, mx);
      mean = real'(s) / 20000.0;
      checks++;
      if (mean < 14.0 + fr - 0.002 || mean > 14.0 + fr + 0.002 || mx - mn > 4) begin
        failures++; $display("FAIL f=%f mean %f range %0d..%0d", fr, mean, mn, mx);
      end
    end

    // Latency: after reset, a step of the input moves N after two clocks
    rst_n = 1'b0; ref_m.reset();
    x_in = '0; p_off = '0;
    @(posedge clk); #1;
    #1 rst_n = 1'b1;
    x_in = cword_t'(longint'(3) <<< CORE_FRAC_W);   // mean Nf = 16
    @(posedge clk); #1;
    checks++;
    if (n_out != 0) begin failures++; $display("FAIL latency 1: %0d", n_out); end
    @(posedge clk); #1;
    checks++;
    if (n_out == 0) begin failures++; $display("FAIL latency 2: still 0"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
