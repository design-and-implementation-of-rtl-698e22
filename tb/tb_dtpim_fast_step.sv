// tb_dtpim_fast_step: the simulator with a 512-cycle (10.24 us, 97.7 kHz)
// step instead of the default 2048 cycles, the fastest power-of-two step
// that the 420-cycle program pass fits in. It backs the published remark
// that the simulation can run at up to 100 kHz.
//
// 50 Hz, modulation index 0.275, no load, 4000 steps. Checks as in the
// full-size test: each record against a double-precision forward-Euler
// step from the previous one (now with Tm = 10.24 us), the torque, the
// phase voltages against leg duty cycles counted over 512-cycle windows,
// one record per 10.24 us, a fixed program pass below 512 cycles, and no
// step overrun (the output stream keeps up: 48 bytes take 384 ns at
// 125 MHz).
module tb_dtpim_fast_step;
  import dtpim_pkg::*;

  // machine data used for the reference (15 kW dual three-phase machine)
  localparam real RS = 0.62, RR = 0.63, LS = 0.2062, LR = 0.2033, LM = 0.0666;
  localparam real JI = 0.27, BI = 0.012, PP = 3.0, VDC = 585.0;
  localparam int  STEP_LOG2 = 9;
  localparam int  STEP = 2 ** STEP_LOG2;
  localparam real TM = STEP * 20e-9;
  localparam real C1 = LS * LR - LM * LM;
  localparam real C2 = LR / C1, C3 = LM / C1, C4 = LS / C1;
  localparam int  STEPS_RUN = 4000;     // no-load start-up steps checked

  logic        clk_pwm = 1'b0, clk_sim = 1'b0, clk_eth = 1'b0, rst_n = 1'b0;
  logic [31:0] pwm_freq_inc = 32'd19791209;      // 50 Hz
  logic [15:0] pwm_mod_index = 16'd9011;         // 0.275
  logic        pwm_ext_sel = 1'b0;
  logic [5:0]  pwm_ext_in = '0;
  word_t       load_torque = '0;
  logic [5:0]  pwm_out;
  logic [7:0]  m_axis_tdata;
  logic        m_axis_tvalid, m_axis_tlast;
  logic        m_axis_tready = 1'b1;
  logic        step_overrun;

  dtpim_simulator #(.STEP_LOG2(STEP_LOG2)) dut (.*);

  always #5 clk_pwm = ~clk_pwm;
  always #10 clk_sim = ~clk_sim;
  always #4 clk_eth = ~clk_eth;

  int checks = 0, failures = 0;
  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  initial begin
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- leg duty cycles seen by the simulator, counted per step ------------
  int   cnt [6], duty_hist [$][6];
  real  tl_hist [$];
  logic [5:0] pins_d1, pins_d2;
  always @(posedge clk_sim) begin
    logic [5:0] pins;
    pins = pwm_ext_sel ? pwm_ext_in : pwm_out;
    if (dut.step_tick) begin
      int d [6];
      for (int k = 0; k < 6; k++) begin
        d[k] = cnt[k] + int'(pins_d2[k]);
        cnt[k] = 0;
      end
      duty_hist.push_back(d);
      tl_hist.push_back(f32_to_real(load_torque));
    end else begin
      for (int k = 0; k < 6; k++) cnt[k] += int'(pins_d2[k]);
    end
    pins_d2 <= pins_d1;
    pins_d1 <= pins;
  end

  // ---- mechanism counters -----------------------------------------------
  int n_overrun = 0, n_wait = 0;
  always @(posedge clk_sim) begin
    if (rst_n && dut.step_tick && dut.u_cu.state != 3'd4) n_overrun++;
    if (dut.step_tick && dut.u_cu.state == 3'd4) n_wait++;
  end

  // ---- processor cycles per step (program pass without stalls) -----------
  int busy = 0, busy_min = 1 << 30, busy_max = 0;
  bit stalled = 1'b0, first_tick = 1'b1;
  always @(posedge clk_sim) begin
    if (dut.step_tick) begin
      if (!stalled && !first_tick && busy > 0) begin
        if (busy < busy_min) busy_min = busy;
        if (busy > busy_max) busy_max = busy;
      end
      first_tick = 1'b0;
      busy = 0;
      stalled = 1'b0;
    end else if (dut.u_cu.state != 3'd4) begin
      busy++;
    end
    if (dut.u_cu.out_full) stalled = 1'b1;
  end

  // ---- record reception ---------------------------------------------------
  word_t  rec [12];
  real    prev [12];
  int     nbytes = 0, nrec = 0;
  bit     have_prev = 1'b0;
  time    t_last [$];
  word_t  cur;
  real    tl_prev;
  bit     overrun_seen = 1'b0;
  real    te_sum = 0.0;
  always @(posedge clk_sim) if (rst_n && step_overrun) overrun_seen <= 1'b1;
  real    worst_rel = 0.0;
  int     n_vcheck = 0;

  function automatic real fabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic real rd(word_t w);
    return f32_to_real(w);
  endfunction

  function automatic bit close(real got, real exp_v, real scale);
    real e;
    e = got - exp_v;
    if (e < 0) e = -e;
    if (scale < 1e-6) scale = 1e-6;
    return e <= 1e-5 * scale;
  endfunction

  always @(posedge clk_eth) begin
    if (rst_n && m_axis_tvalid && m_axis_tready) begin
      cur = {cur[23:0], m_axis_tdata};
      nbytes++;
      if (nbytes % 4 == 0) rec[(nbytes / 4 - 1) % 12] = cur;
      check("tlast only on byte 48", m_axis_tlast == (nbytes % 48 == 0));
      if (nbytes % 48 == 0) begin
        real x [12];
        for (int i = 0; i < 12; i++) x[i] = rd(rec[i]);
        t_last.push_back($time);
        process_record(x);
        nrec++;
      end
    end
  end

  task automatic process_record(real x[12]);
    real ua, ub, w, n1, n2, n3, n4, nw, s1, s2, s3, s4, sw, te;
    // torque of this record from its own state
    te = 1.5 * PP * LM * (x[1] * x[2] - x[0] * x[3]);
    check("torque", close(x[5], te, 1.5 * PP * LM * (fabs(x[1] * x[2]) + fabs(x[0] * x[3]))));
    // phase voltages: each three-phase set sums to zero
    check("set 1 voltages sum to 0", close(x[6] + x[7] + x[8], 0.0, 400.0));
    check("set 2 voltages sum to 0", close(x[9] + x[10] + x[11], 0.0, 400.0));
    if (have_prev) begin
      ua = (prev[6] - 0.5 * (prev[7] + prev[8]) + 0.8660254037844386 * (prev[9] - prev[10])) / 3.0;
      ub = (0.8660254037844386 * (prev[7] - prev[8]) + 0.5 * (prev[9] + prev[10]) - prev[11]) / 3.0;
      w  = prev[4];
      n1 = (1 - TM*C2*RS)*prev[0] + TM*C3*LM*w*prev[1] + TM*C3*RR*prev[2] + TM*C3*LR*w*prev[3] + TM*C2*ua;
      n2 = -TM*C3*LM*w*prev[0] + (1 - TM*C2*RS)*prev[1] - TM*C3*LR*w*prev[2] + TM*C3*RR*prev[3] + TM*C2*ub;
      n3 = TM*C3*RS*prev[0] - TM*C4*LM*w*prev[1] + (1 - TM*C4*RR)*prev[2] - TM*C4*LR*w*prev[3] - TM*C3*ua;
      n4 = TM*C4*LM*w*prev[0] + TM*C3*RS*prev[1] + TM*C4*LR*w*prev[2] + (1 - TM*C4*RR)*prev[3] - TM*C3*ub;
      // record n was computed from the inputs latched at sampling instant n
      tl_prev = tl_hist[nrec - 1];
      nw = (1 - TM*BI/JI)*w + TM*PP/(2*JI)*(prev[5] - tl_prev);
      s1 = fabs(prev[0]) + fabs(TM*C3*LM*w*prev[1]) + fabs(TM*C3*RR*prev[2]) + fabs(TM*C3*LR*w*prev[3]) + fabs(TM*C2*ua);
      s2 = fabs(prev[1]) + fabs(TM*C3*LM*w*prev[0]) + fabs(TM*C3*LR*w*prev[2]) + fabs(TM*C3*RR*prev[3]) + fabs(TM*C2*ub);
      s3 = fabs(prev[2]) + fabs(TM*C3*RS*prev[0]) + fabs(TM*C4*LM*w*prev[1]) + fabs(TM*C4*LR*w*prev[3]) + fabs(TM*C3*ua);
      s4 = fabs(prev[3]) + fabs(TM*C4*LM*w*prev[0]) + fabs(TM*C3*RS*prev[1]) + fabs(TM*C4*LR*w*prev[2]) + fabs(TM*C3*ub);
      sw = fabs(w) + fabs(TM*PP/(2*JI)*prev[5]) + fabs(TM*PP/(2*JI)*tl_prev);
      check("i_s_alpha", close(x[0], n1, s1));
      check("i_s_beta",  close(x[1], n2, s2));
      check("i_r_alpha", close(x[2], n3, s3));
      check("i_r_beta",  close(x[3], n4, s4));
      check("speed",     close(x[4], nw, sw));
      if (!close(x[0], n1, s1) && failures < 20)
        $display("  rec %0d: i_s_alpha %g exp %g", nrec, x[0], n1);
    end
    // phase voltages against the duty cycles of the step they were read in
    // (until a step overruns: a lost sampling instant breaks the pairing;
    // the first window opens during reset, so record 0 is not compared)
    if (!overrun_seen && nrec > 0) begin
      int d [6];
      real v [6];
      d = duty_hist[nrec];
      v[0] = VDC / 3.0 * (2.0 * d[0] - d[1] - d[2]) / real'(STEP);
      v[1] = VDC / 3.0 * (2.0 * d[1] - d[2] - d[0]) / real'(STEP);
      v[2] = VDC / 3.0 * (2.0 * d[2] - d[0] - d[1]) / real'(STEP);
      v[3] = VDC / 3.0 * (2.0 * d[3] - d[4] - d[5]) / real'(STEP);
      v[4] = VDC / 3.0 * (2.0 * d[4] - d[5] - d[3]) / real'(STEP);
      v[5] = VDC / 3.0 * (2.0 * d[5] - d[3] - d[4]) / real'(STEP);
      for (int k = 0; k < 6; k++)
        check($sformatf("phase voltage %0d", k), fabs(x[6 + k] - v[k]) < 1.0);
      n_vcheck++;
    end
    te_sum += x[5];
    prev = x;
    have_prev = 1'b1;
  endtask

  task automatic wait_records(int n);
    int target;
    target = nrec + n;
    wait (nrec >= target);
  endtask

  initial begin
    real t0, t1, w_end;
    repeat (5) @(posedge clk_sim);
    rst_n = 1'b1;

    // ---- no-load start-up, 50 Hz, m = 0.275 ---------------------------------
    wait_records(2);
    t0 = real'(t_last[t_last.size() - 1]);
    wait_records(STEPS_RUN);
    t1 = real'(t_last[t_last.size() - 1]);
    check("one record per 10.24 us", fabs((t1 - t0) / STEPS_RUN - TM * 1e9) < 1.0);
    check("no overrun in normal operation", !step_overrun);
    w_end = prev[4];
    $display("after %0d steps (%0.3f s): speed %g rad/s (electrical), torque %g N m, i_s = (%0.3f, %0.3f) A",
             nrec, nrec * TM, w_end, prev[5], prev[0], prev[1]);
    // with the published machine data the standstill torque is a few mN m:
    // the machine starts to turn forward, slowly
    check("motoring torque", te_sum > 0.0);
    check("machine starts forward", w_end > 0.0);

    check("WAIT released by the sampling instant", n_wait > STEPS_RUN);
    check("no overrun at the short step", n_overrun == 0 && !step_overrun);
    check("voltages checked against the pins", n_vcheck > STEPS_RUN);
    check("program pass takes a fixed number of cycles", busy_min == busy_max);
    check("program pass fits in the step", busy_max < STEP);
    $display("program pass: %0d of %0d cycles", busy_max, STEP);
    $display("records %0d, wait %0d, overrun %0d", nrec, n_wait, n_overrun);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
