// Testbench of prescaler: the output must rise exactly every 8 input clocks
// and be high for 4 of them.
module tb_prescaler;
  logic clk_in = 1'b0, rst_n = 1'b0, clk_out;
  int   checks = 0, failures = 0;
  int   t = 0, last_rise = -1, high = 0;
  logic prev = 1'b0;

  prescaler dut (.clk_in, .rst_n, .clk_out);

  always #1 clk_in = ~clk_in;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk_in) begin
    #0.1;
    t++;
    if (rst_n) begin
      if (clk_out) high++;
      if (clk_out && !prev) begin
        if (last_rise >= 0) begin
          checks++;
          if (t - last_rise != 8 || high != 4 + 1 && high != 4) begin
            failures++;
            $display("FAIL period %0d high %0d", t - last_rise, high);
          end
          high = 1;
        end else high = 1;
        last_rise = t;
      end
      prev = clk_out;
    end
  end

  initial begin
    repeat (3) @(posedge clk_in);
    #0.5 rst_n = 1'b1;
    repeat (800) @(posedge clk_in);
    #0.5;
    checks++;
    if (checks < 90) begin failures++; $display("FAIL too few periods"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
