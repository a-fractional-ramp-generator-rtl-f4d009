// Testbench of phase_det: drives pulse trains R and V of equal frequency with
// a set phase lag and measures the mean of the flip-flop outputs, which must
// be phi/2pi for q_r and 1 - phi/2pi for q_v (so the balanced sum is linear
// in phi). Then checks that each control line forces its flip-flop.
module tb_phase_det;
  import frac_pkg::*;
  logic     rst_n = 1'b0, r = 1'b0, v = 1'b0;
  pd_ctrl_t ctrl;
  logic     q_r, qn_r, q_v, qn_v;
  int       checks = 0, failures = 0;

  localparam int T = 200;   // period in time units
  localparam int W = 4;     // pulse width

  phase_det dut (.rst_n, .r, .v, .ctrl, .q_r, .qn_r, .q_v, .qn_v);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Run n periods with V lagging R by lag time units; return high times
  task automatic run(input int lag, input int n, output int hr, output int hv);
    hr = 0; hv = 0;
    for (int p = 0; p < n; p++) begin
      for (int s = 0; s < T; s++) begin
        r = (s < W);
        v = (s >= lag && s < lag + W) || (lag + W > T && s < lag + W - T);
        #1;
        if (q_r) hr++;
        if (q_v) hv++;
        if (qn_r != ~q_r || qn_v != ~q_v) begin
          checks++; failures++;
          $display("FAIL complementary outputs");
        end
      end
    end
  endtask

  initial begin
    int hr, hv;
    ctrl = '0;
    #5 rst_n = 1'b1;
    for (int lag = 20; lag <= 180; lag += 20) begin
      run(lag, 2, hr, hv);     // settle
      run(lag, 10, hr, hv);
      checks++;
      // q_r high from R edge to V edge: lag per period; q_v the rest
      if (hr != 10 * lag || hv != 10 * (T - lag)) begin
        failures++;
        $display("FAIL lag %0d: q_r high %0d (exp %0d), q_v high %0d (exp %0d)",
                 lag, hr, 10 * lag, hv, 10 * (T - lag));
      end
    end
    // Control lines
    ctrl.set_r = 1'b1; ctrl.clr_v = 1'b1;
    run(100, 3, hr, hv);
    checks++;
    if (hr != 3 * T || hv != 0) begin failures++; $display("FAIL force up %0d %0d", hr, hv); end
    ctrl = '0; ctrl.clr_r = 1'b1; ctrl.set_v = 1'b1;
    run(100, 3, hr, hv);
    checks++;
    if (hr != 0 || hv != 3 * T) begin failures++; $display("FAIL force down %0d %0d", hr, hv); end
    ctrl = '0;
    run(100, 2, hr, hv);
    run(100, 4, hr, hv);
    checks++;
    if (hr != 400 || hv != 400) begin failures++; $display("FAIL release %0d %0d", hr, hv); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
