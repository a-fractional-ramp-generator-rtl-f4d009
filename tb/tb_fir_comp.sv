// Testbench of fir_comp: drives random and step inputs and compares each
// output with the taps obtained by expanding V(z) in the reference model,
// one clock after the input (registered output).
module tb_fir_comp;
  import frac_pkg::*;
  import frac_ref_pkg::*;

  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  fword_t f_in;
  cword_t y_out;
  int     checks = 0, failures = 0;
  FracRef ref_m;
  longint hist [4];

  fir_comp dut (.clk, .rst_n, .f_in, .y_out);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint exp_y;
    ref_m = new(CORE_FRAC_W, K1_NUM, K2_NUM);
    // The taps must be 1, -2, 27/16, -1/2 and sum to K1
    checks++;
    if (ref_m.h16[0] != 16 || ref_m.h16[1] != -32 || ref_m.h16[2] != 27 || ref_m.h16[3] != -8) begin
      failures++;
      $display("FAIL taps %0d %0d %0d %0d", ref_m.h16[0], ref_m.h16[1], ref_m.h16[2], ref_m.h16[3]);
    end
    for (int i = 0; i < 4; i++) hist[i] = 0;
    f_in = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      // Steps for the first 200 clocks, then random values within +-64
      if (n < 100)      f_in = fword_t'(longint'(20) <<< FRAC_W);
      else if (n < 200) f_in = fword_t'(-(longint'(7) <<< FRAC_W) + 12345);
      else              f_in = fword_t'({$urandom(), $urandom()} % (longint'(128) <<< FRAC_W))
                               - fword_t'(longint'(64) <<< FRAC_W);
      hist[3] = hist[2]; hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = longint'(f_in);
      exp_y = ref_m.h16[0] * hist[0] + ref_m.h16[1] * hist[1]
            + ref_m.h16[2] * hist[2] + ref_m.h16[3] * hist[3];
      @(posedge clk);
      #1;
      checks++;
      if (longint'(y_out) != exp_y) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d y=%0d exp=%0d", n, longint'(y_out), exp_y);
      end
    end
    // DC gain: after a long constant input the output is K1 * F
    f_in = fword_t'(longint'(16) <<< FRAC_W);
    repeat (5) @(posedge clk);
    #1;
    checks++;
    if (longint'(y_out) != (longint'(3) <<< CORE_FRAC_W)) begin
      failures++;
      $display("FAIL DC gain y=%0d", longint'(y_out));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
