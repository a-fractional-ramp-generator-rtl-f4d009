// Testbench of prog_divider: a new random N in 8..28 is applied right after
// every output pulse (as the fractional logic does); the distance to the
// pulse after the next one must equal that N.
module tb_prog_divider;
  import frac_pkg::*;
  logic           clk_in = 1'b0, rst_n = 1'b0, div_out;
  logic [N_W-1:0] n_in;
  int             checks = 0, failures = 0;
  int             t = 0, last_pulse = -1, n_hist [$];

  prog_divider dut (.clk_in, .rst_n, .n_in, .div_out);

  always #1 clk_in = ~clk_in;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk_in) begin
    #0.1;
    t++;
    if (rst_n && div_out) begin
      // The pulse just seen started a period of the N applied at the last pulse
      if (n_hist.size() >= 2) begin
        checks++;
        if (t - last_pulse != n_hist[0]) begin
          failures++;
          $display("FAIL interval %0d exp %0d", t - last_pulse, n_hist[0]);
        end
        void'(n_hist.pop_front());
      end
      last_pulse = t;
      n_in = N_W'($urandom_range(8, 28));
      n_hist.push_back(int'(n_in));
    end
  end

  initial begin
    n_in = N_W'(20);
    n_hist.push_back(20);
    repeat (3) @(posedge clk_in);
    #0.5 rst_n = 1'b1;
    repeat (20000) @(posedge clk_in);
    checks++;
    if (checks < 500) begin failures++; $display("FAIL too few pulses"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
