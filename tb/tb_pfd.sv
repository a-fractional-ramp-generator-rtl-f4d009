// Testbench of pfd: in lock (equal frequencies, V at half a period behind R)
// the lock detects stay low and q_r, q_v are each high half the time; with
// the divided VCO too slow LD2 must come and the phase detector must be held
// at its "up" extreme (q_r high, q_v low); with it too fast LD1 and "down".
module tb_pfd;
  logic clk_fd = 1'b0, rst_n = 1'b0, r = 1'b0, v = 1'b0;
  logic q_r, qn_r, q_v, qn_v, ld1, ld2;
  int   checks = 0, failures = 0;
  int   tv = 200;
  int   hr = 0, hv = 0, samples = 0, n_ld1 = 0, n_ld2 = 0, forced_bad = 0;

  pfd dut (.clk_fd, .rst_n, .r, .v, .q_r, .qn_r, .q_v, .qn_v, .ld1, .ld2);

  always #1 clk_fd = ~clk_fd;
  initial forever begin r = 1'b1; #6; r = 1'b0; #194; end
  initial begin #100; forever begin v = 1'b1; #6; v = 1'b0; #(tv - 6); end end

  always @(negedge clk_fd) if (rst_n) begin
    samples++;
    if (q_r) hr++;
    if (q_v) hv++;
    if (ld1) n_ld1++;
    if (ld2) n_ld2++;
    if (ld2 && !(q_r && !q_v)) forced_bad++;
    if (ld1 && !(!q_r && q_v)) forced_bad++;
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #150 rst_n = 1'b1;
    #1050;
    hr = 0; hv = 0; samples = 0;
    #20000;
    checks++;
    if (n_ld1 != 0 || n_ld2 != 0) begin failures++; $display("FAIL LD in lock"); end
    checks++;
    if (hr < samples * 45 / 100 || hr > samples * 55 / 100 ||
        hv < samples * 45 / 100 || hv > samples * 55 / 100) begin
      failures++; $display("FAIL lock duty q_r %0d q_v %0d of %0d", hr, hv, samples);
    end
    tv = 260;
    #20000;
    checks++;
    if (n_ld2 == 0 || n_ld1 != 0) begin failures++; $display("FAIL slow: ld2 %0d ld1 %0d", n_ld2, n_ld1); end
    tv = 150;
    #40000;
    checks++;
    if (n_ld1 == 0) begin failures++; $display("FAIL fast: no ld1"); end
    checks++;
    if (forced_bad != 0) begin failures++; $display("FAIL PD not forced %0d", forced_bad); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
