// End-to-end testbench of dual_ramp_top at its default parameters.
//
// The reference is a pulse train whose period is 8 * 20.05 nominal channel-0
// VCO periods. Channel 0's VCO (10 GHz nominal in simulation time) is tuned
// by a behavioural model of the balanced stage, loop filter and VCO, so it
// pulls in and locks; channel 1's VCO runs open-loop about 2 % too slow. Checks:
//  - channel 0's N sequence in static mode equals the reference model;
//  - every divider period equals 8 * N VCO periods for the N loaded;
//  - mean N of the static phase is 20.05; channel 0 pulls in (LD1 while
//    the divider races after reset) and then stays free of LD with q_r high
//    about half the time; channel 1 (too slow) raises LD2, PD forced up;
//  - a start on the master starts both linear ramps (the slave via Sync)
//    within a few clocks, and the mean N over the ramp is that of the ramp;
//  - a flash ramp on the slave, started through Sync, reads all samples and
//    ends on the last one.
// Each mechanism is counted; one that never happened counts as a failure.
module tb_dual_ramp_top;
  import frac_pkg::*;
  import frac_ref_pkg::*;

  localparam realtime TV0  = 0.100ns;            // VCO periods
  localparam realtime TV1  = 0.102ns;
  localparam realtime TREF = 8 * 20.05 * TV0;    // 16.04 ns
  localparam int      FL_LEN = 40;

  logic                    rst_n = 1'b1;
  logic [1:0]              vco_clk = '0;
  logic                    ref_pulse = 1'b0, clk_fd = 1'b0;
  chan_cfg_t               cfg [2];
  logic                    start = 1'b0;
  logic [1:0][FLASH_AW-1:0] flash_addr;
  logic [1:0]              flash_rd;
  fword_t                  flash_data [2];
  logic [1:0]              div_out, ramp_busy, ramp_done;
  nint_t                   n_out [2];
  fword_t                  f_sel [2];
  logic [1:0]              q_r, qn_r, q_v, qn_v, ld1, ld2;

  int checks = 0, failures = 0;

  dual_ramp_top dut (.rst_n, .vco_clk, .ref_pulse, .clk_fd, .cfg, .start,
    .flash_addr, .flash_rd, .flash_data, .div_out, .n_out, .f_sel,
    .ramp_busy, .ramp_done, .q_r, .qn_r, .q_v, .qn_v, .ld1, .ld2);

  // Flash memories of the two channels (only the low address bits are used)
  flash_model #(.AW(8)) mem0 (.clk(div_out[0]), .addr(flash_addr[0][7:0]),
                              .rd(flash_rd[0]), .data(flash_data[0]));
  flash_model #(.AW(8)) mem1 (.clk(div_out[1]), .addr(flash_addr[1][7:0]),
                              .rd(flash_rd[1]), .data(flash_data[1]));

  // Behavioural loop of channel 0: the balanced PD output (q_r - q_v),
  // averaged over each reference period and low-pass filtered, tunes the VCO
  // by up to +-KV of its free-running frequency. Channel 1 runs open-loop.
  localparam real KV = 0.05, ALPHA = 0.1;
  real     vtune = 0.0, pd_acc = 0.0;
  int      pd_n = 0;
  realtime tv0_now = TV0;
  always @(negedge clk_fd) if (rst_n) begin
    pd_acc += real'(q_r[0]) - real'(q_v[0]);
    pd_n++;
  end
  always @(posedge ref_pulse) begin
    if (pd_n > 0) vtune += ALPHA * (pd_acc / pd_n - vtune);
    pd_acc = 0.0; pd_n = 0;
    tv0_now = TV0 / (1.0 + KV * vtune);
  end
  always #(tv0_now / 2) vco_clk[0] = ~vco_clk[0];
  always #(TV1 / 2) vco_clk[1] = ~vco_clk[1];
  always #0.25ns clk_fd = ~clk_fd;

  // Mechanism counters
  int m_static_exact = 0, m_div_period = 0, m_n_change = 0, m_lock = 0;
  int m_ld1 = 0, m_ld2 = 0, m_forced = 0, m_sync_start = 0;
  int m_lin_ramp = 0, m_flash_ramp = 0;

  // ---------------------------------------------------------------- reference
  bit ref_on = 0;
  initial begin
    wait (ref_on);
    @(posedge div_out[0]);
    #(TREF / 2);
    forever begin
      ref_pulse = 1'b1; #2ns; ref_pulse = 1'b0; #(TREF - 2ns);
    end
  end

  // ------------------------------------------- channel 0 against the model
  FracRef ref_m;
  bit     model_on = 1;
  always @(posedge div_out[0]) if (rst_n && model_on) begin
    longint e;
    e = ref_m.step(longint'(cfg[0].f_start), longint'(cfg[0].p_off));
    @(negedge div_out[0]);
    checks++;
    if (longint'(n_out[0]) != e) begin
      failures++;
      if (failures < 10) $display("FAIL ch0 N %0d exp %0d at %0t", n_out[0], e, $time);
    end else m_static_exact++;
  end

  // -------------------------------------------------- divider period checks
  for (genvar i = 0; i < 2; i++) begin : g_mon
    int      nq [$];
    int      vco_cycles = 0;
    longint  sum_n = 0, sum_f = 0;
    int      cnt_n = 0;
    always @(posedge vco_clk[i]) vco_cycles++;
    always @(negedge div_out[i]) if (rst_n) begin
      nq.push_back(int'(n_out[i]));
      sum_n += longint'(n_out[i]);
      sum_f += longint'(f_sel[i]) >>> (FRAC_W - 16);
      cnt_n++;
    end
    // A divider period, in VCO cycles, is 8 N for the N loaded at its start
    always @(posedge div_out[i]) if (rst_n) begin
      if (nq.size() >= 2) begin
        int n;
        n = nq.pop_front();
        if (n >= 8) begin
          checks++;
          if (vco_cycles != 8 * n) begin
            failures++;
            if (failures < 10) $display("FAIL ch%0d period %0d VCO cycles, exp 8 x %0d", i, vco_cycles, n);
          end else m_div_period++;
        end
        if (n != nq[0]) m_n_change++;
      end
      vco_cycles = 0;
    end
  end

  // ------------------------------------------------------- PFD observation
  int ch0_ld = 0, ch0_samples = 0, ch0_qr = 0, watch_lock = 0;
  always @(negedge clk_fd) if (rst_n) begin
    for (int i = 0; i < 2; i++) begin
      if (ld1[i] || ld2[i]) begin
        checks++;
        if (ld1[i] && ld2[i]) begin failures++; $display("FAIL both LDs ch%0d", i); end
        else if (ld1[i] && !(q_v[i] && !q_r[i])) begin failures++; $display("FAIL ch%0d not forced down", i); end
        else if (ld2[i] && !(q_r[i] && !q_v[i])) begin failures++; $display("FAIL ch%0d not forced up", i); end
        else m_forced++;
      end
    end
    if (watch_lock) begin
      ch0_samples++;
      if (q_r[0]) ch0_qr++;
      if (ld1[0] || ld2[0]) ch0_ld++;
    end
  end
  always @(posedge ld1[1]) if (rst_n) m_ld1++;
  always @(posedge ld1[0]) if (rst_n) m_ld1++;
  always @(posedge ld2[0]) if (rst_n) m_ld2++;
  always @(posedge ld2[1]) if (rst_n) m_ld2++;

  // ---------------------------------------------------------------- watchdog
  initial begin
    #200us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fword_t to_f(real x);
    return fword_t'(longint'(x * (2.0 ** FRAC_W)));
  endfunction

  // -------------------------------------------------------------- sequence
  initial begin
    realtime t0, t1;
    real     mean;
    ref_m = new(CORE_FRAC_W, K1_NUM, K2_NUM);
    mem0.fill(20.0, 0.0, 0.0, 256);
    mem1.fill(19.5, 0.02, 0.004, 256);
    for (int i = 0; i < 2; i++) begin
      cfg[i]         = '0;
      cfg[i].mode    = MODE_STATIC;
      cfg[i].f_start = to_f(20.05);
      cfg[i].slope   = slope_t'(longint'(0.0002 * (2.0 ** (FRAC_W + SLOPE_EXT))));
      cfg[i].len     = LEN_W'(1000);
      cfg[i].p_off   = '0;
    end
    // Asynchronous reset: the divided clocks stand still while it is held
    #0.5ns rst_n = 1'b0;
    #3ns rst_n = 1'b1;

    // Static phase
    repeat (100) @(posedge div_out[0]);
    ref_on = 1;
    repeat (1500) @(posedge div_out[0]);
    g_mon[0].sum_n = 0; g_mon[0].cnt_n = 0;
    watch_lock = 1;
    repeat (2000) @(posedge div_out[0]);
    watch_lock = 0;
    mean = real'(g_mon[0].sum_n) / real'(g_mon[0].cnt_n);
    checks++;
    if (mean < 20.049 || mean > 20.051) begin failures++; $display("FAIL static mean %f", mean); end
    checks++;
    if (ch0_ld != 0 || ch0_qr < ch0_samples * 4 / 10 || ch0_qr > ch0_samples * 6 / 10) begin
      failures++; $display("FAIL ch0 lock: ld %0d q_r %0d of %0d", ch0_ld, ch0_qr, ch0_samples);
    end else m_lock++;

    // Linear ramps, master started, slave by Sync
    model_on = 0;
    @(posedge div_out[0]); #0.2ns;
    cfg[0].mode = MODE_LINEAR;
    cfg[1].mode = MODE_LINEAR;
    start = 1'b1;
    @(posedge div_out[0]); #0.2ns;
    start = 1'b0;
    t0 = $time;
    g_mon[0].sum_n = 0; g_mon[0].sum_f = 0; g_mon[0].cnt_n = 0;
    fork
      @(posedge ramp_busy[1]);
      #(50 * TREF);
    join_any
    disable fork;
    t1 = $time;
    checks++;
    if (t1 - t0 > 5 * TREF) begin failures++; $display("FAIL slave started %0t late", t1 - t0); end
    else m_sync_start++;
    fork
      wait (ramp_busy == 2'b00);
      #(2000 * TREF);
    join_any
    disable fork;
    checks++;
    // Mean N over the ramp equals the mean of F (20.05 + 0.0002 * 500), less
    // the 3-clock latency; F ends at 20.05 + 0.0002 * 1000
    mean = real'(g_mon[0].sum_n) / real'(g_mon[0].cnt_n);
    begin
      real mean_f;
      mean_f = real'(g_mon[0].sum_f) / (2.0 ** 16) / real'(g_mon[0].cnt_n);
      if (mean < mean_f - 0.01 || mean > mean_f + 0.005 || mean_f < 20.14 || mean_f > 20.16 ||
          f_sel[0] != to_f(20.05) + fword_t'(longint'(1000) * (longint'(cfg[0].slope) >>> SLOPE_EXT))
                      && f_sel[0] != to_f(20.05) + fword_t'((longint'(1000) * longint'(cfg[0].slope)) >>> SLOPE_EXT)) begin
        failures++; $display("FAIL ramp mean N %f mean F %f", mean, mean_f);
      end else m_lin_ramp++;
      $display("linear ramp: mean N %f, mean F %f", mean, mean_f);
    end

    // Flash ramp on the slave, started through Sync
    @(posedge div_out[0]); #0.2ns;
    cfg[0].mode = MODE_STATIC;
    cfg[1].mode = MODE_FLASH;
    cfg[1].len  = LEN_W'(FL_LEN);
    mem1.reads  = 0;
    start = 1'b1;
    @(posedge div_out[0]); #0.2ns;
    start = 1'b0;
    fork
      @(posedge ramp_done[1]);
      #(500 * TREF);
    join_any
    disable fork;
    repeat (4) @(posedge div_out[1]);
    checks++;
    if (mem1.reads != FL_LEN || f_sel[1] != mem1.mem[FL_LEN - 1]) begin
      failures++; $display("FAIL flash: %0d reads, end %0d", mem1.reads, f_sel[1]);
    end else m_flash_ramp++;
    repeat (200) @(posedge div_out[1]);

    $display("mechanisms: static_exact=%0d div_period=%0d n_change=%0d lock=%0d ld1=%0d ld2=%0d forced=%0d sync_start=%0d lin_ramp=%0d flash_ramp=%0d",
             m_static_exact, m_div_period, m_n_change, m_lock, m_ld1, m_ld2, m_forced,
             m_sync_start, m_lin_ramp, m_flash_ramp);
    begin
      int m [10];
      m = '{m_static_exact, m_div_period, m_n_change, m_lock, m_ld1, m_ld2, m_forced,
            m_sync_start, m_lin_ramp, m_flash_ramp};
      for (int k = 0; k < 10; k++) begin
        checks++;
        if (m[k] == 0) begin failures++; $display("FAIL mechanism %0d never happened", k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
