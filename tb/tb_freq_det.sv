// Testbench of freq_det: R at a fixed period, V at equal, longer and shorter
// periods. In lock both lock-detect outputs and all control lines must stay
// low; with V slower LD2 and the "up" lines must come, with V faster LD1 and
// the "down" lines; LD1 and LD2 are never high together; after the VCO has
// caught up the slipped cycles the detector releases.
module tb_freq_det;
  import frac_pkg::*;
  logic     clk = 1'b0, rst_n = 1'b0, r = 1'b0, v = 1'b0;
  logic     ld1, ld2;
  pd_ctrl_t ctrl;
  int       checks = 0, failures = 0;
  int       tv = 100;              // V period, changed by the test
  int       n_ld1 = 0, n_ld2 = 0, n_lock_bad = 0;
  bit       locked_phase = 1'b0;

  freq_det dut (.clk, .rst_n, .r, .v, .ld1, .ld2, .ctrl);

  always #1 clk = ~clk;

  initial forever begin r = 1'b1; #6; r = 1'b0; #94; end
  initial begin #50; forever begin v = 1'b1; #6; v = 1'b0; #(tv - 6); end end

  always @(posedge clk) begin
    if (rst_n) begin
      if (ld1) n_ld1++;
      if (ld2) n_ld2++;
      checks++;
      if (ld1 && ld2) begin failures++; $display("FAIL both LDs"); end
      if (ctrl.set_r != ld2 || ctrl.clr_v != ld2 || ctrl.clr_r != ld1 || ctrl.set_v != ld1) begin
        failures++; $display("FAIL control lines %b ld %b%b", ctrl, ld1, ld2);
      end
      if (locked_phase && (ld1 || ld2 || ctrl != '0)) n_lock_bad++;
    end
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Release reset between a V and an R pulse, so the follower starts in phase
    #60 rst_n = 1'b1;
    // Lock: equal periods, V in the middle of the R period
    #200 locked_phase = 1'b1;
    #20000 locked_phase = 1'b0;
    checks++;
    if (n_lock_bad != 0 || n_ld1 != 0 || n_ld2 != 0) begin
      failures++; $display("FAIL active in lock: %0d", n_lock_bad);
    end
    // V slower
    tv = 130;
    #20000;
    checks++;
    if (n_ld2 == 0 || n_ld1 != 0 || !ld2) begin failures++; $display("FAIL slow V: ld2 %0d ld1 %0d", n_ld2, n_ld1); end
    // V faster: count comes back, through lock to LD1
    tv = 70;
    n_ld2 = 0;
    #20000;
    checks++;
    if (n_ld1 == 0 || !ld1) begin failures++; $display("FAIL fast V: ld1 %0d", n_ld1); end
    // Catch up: slightly slower V until the count returns, then equal periods
    tv = 110;
    begin
      int quiet = 0;
      while (quiet < 40) begin
        #10;
        quiet = ld1 ? 0 : quiet + 1;
      end
    end
    tv = 100;
    #3000;
    n_ld1 = 0; n_ld2 = 0;
    #10000;
    checks++;
    if (n_ld1 != 0 || n_ld2 != 0) begin failures++; $display("FAIL no release %0d %0d", n_ld1, n_ld2); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
