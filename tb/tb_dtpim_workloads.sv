// tb_dtpim_workloads: the two operating-point changes of the published
// evaluation, run on the complete simulator at its default sizes.
//
//   1. 40 Hz, modulation index 0.275 (the operating point before both steps)
//   2. modulation index stepped to 0.481 at 40 Hz
//   3. frequency stepped from 40 Hz to 50 Hz
//
// The published runs last several seconds; each phase here is shortened to
// 1500 settling steps plus a 100 ms analysis window (2441 steps), which holds
// exactly four periods at 40 Hz and five at 50 Hz, so the two frequencies are
// orthogonal over it. Over each window the testbench takes the discrete
// Fourier component of the stator current i_s_alpha and of the phase voltage
// v_a (both from the records on the output stream) at 40 Hz and at 50 Hz.
// Checks, worked out from the modulation law rather than from the RTL:
//  - v_a fundamental = m * Vdc / 2 (sine-triangle modulation, linear range);
//  - the current follows the applied frequency (the other bin is small);
//  - with the rotor close to standstill the machine is linear, so the
//    current amplitude scales with the modulation index: ratio 0.481/0.275.
module tb_dtpim_workloads;
  import dtpim_pkg::*;

  localparam real VDC  = 585.0;
  localparam real TM   = 40.96e-6;
  localparam real PI   = 3.14159265358979;
  localparam int  SETTLE = 1500;
  localparam int  WIN    = 2441;                 // 100 ms of 40.96 us steps

  localparam logic [31:0] INC_40 = 32'd15832967;  // 40 Hz * 92.16 us * 2^32
  localparam logic [31:0] INC_50 = 32'd19791209;  // 50 Hz
  localparam logic [15:0] M_0275 = 16'd9011;      // 0.275 * 2^15
  localparam logic [15:0] M_0481 = 16'd15761;     // 0.481 * 2^15

  logic        clk_pwm = 1'b0, clk_sim = 1'b0, clk_eth = 1'b0, rst_n = 1'b0;
  logic [31:0] pwm_freq_inc = INC_40;
  logic [15:0] pwm_mod_index = M_0275;
  logic        pwm_ext_sel = 1'b0;
  logic [5:0]  pwm_ext_in = '0;
  word_t       load_torque = '0;
  logic [5:0]  pwm_out;
  logic [7:0]  m_axis_tdata;
  logic        m_axis_tvalid, m_axis_tlast;
  logic        m_axis_tready = 1'b1;
  logic        step_overrun;

  dtpim_simulator dut (.*);

  always #5 clk_pwm = ~clk_pwm;
  always #10 clk_sim = ~clk_sim;
  always #4 clk_eth = ~clk_eth;

  int checks = 0, failures = 0;
  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  initial begin
    #700ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real fabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // ---- record reception: keep i_s_alpha and v_a of every step ------------
  real   isa [$], va [$];
  word_t rec [12];
  word_t cur;
  int    nbytes = 0;
  always @(posedge clk_eth) begin
    if (rst_n && m_axis_tvalid && m_axis_tready) begin
      cur = {cur[23:0], m_axis_tdata};
      nbytes++;
      if (nbytes % 4 == 0) rec[(nbytes / 4 - 1) % 12] = cur;
      if (nbytes % 48 == 0) begin
        isa.push_back(f32_to_real(rec[0]));
        va.push_back(f32_to_real(rec[6]));
      end
    end
  end

  task automatic wait_records(int n);
    int target;
    target = isa.size() + n;
    wait (isa.size() >= target);
  endtask

  // amplitude of the component at f_hz over the last WIN samples of s
  function automatic real bin(ref real s [$], real f_hz);
    real re, im, ph;
    int  base;
    re = 0.0;
    im = 0.0;
    base = s.size() - WIN;
    for (int k = 0; k < WIN; k++) begin
      ph = 2.0 * PI * f_hz * TM * k;
      re += s[base + k] * $cos(ph);
      im += s[base + k] * $sin(ph);
    end
    return 2.0 / WIN * $sqrt(re * re + im * im);
  endfunction

  task automatic measure(string name, real f_hz, real m, output real ia);
    real i40, i50, v_on, v_off, f_off;
    wait_records(SETTLE + WIN);
    f_off = (f_hz == 40.0) ? 50.0 : 40.0;
    ia    = bin(isa, f_hz);
    i50   = bin(isa, f_off);
    v_on  = bin(va, f_hz);
    v_off = bin(va, f_off);
    $display("%s: i_s_alpha %0.3f A at %0.0f Hz (%0.4f A at %0.0f Hz), v_a %0.2f V (expected %0.2f V)",
             name, ia, f_hz, i50, f_off, v_on, m * VDC / 2.0);
    check({name, ": v_a fundamental = m Vdc / 2"}, fabs(v_on - m * VDC / 2.0) < 0.02 * m * VDC / 2.0);
    check({name, ": no voltage at the other frequency"}, v_off < 0.01 * v_on);
    check({name, ": current at the applied frequency"}, i50 < 0.05 * ia);
    check({name, ": current present"}, ia > 0.1);
  endtask

  int n_mstep = 0, n_fstep = 0;

  initial begin
    real a1, a2, a3;
    repeat (5) @(posedge clk_sim);
    rst_n = 1'b1;

    measure("40 Hz, m = 0.275", 40.0, 0.275, a1);

    pwm_mod_index = M_0481;              // modulation index step
    n_mstep++;
    measure("40 Hz, m = 0.481", 40.0, 0.481, a2);
    $display("current ratio after the index step: %0.4f (index ratio %0.4f)", a2 / a1, 0.481 / 0.275);
    check("current scales with the modulation index",
          fabs(a2 / a1 - 0.481 / 0.275) < 0.03 * 0.481 / 0.275);

    pwm_freq_inc = INC_50;               // frequency step
    n_fstep++;
    measure("50 Hz, m = 0.481", 50.0, 0.481, a3);

    check("real time kept (no overrun)", !step_overrun);
    check("index step applied", n_mstep == 1);
    check("frequency step applied", n_fstep == 1);
    $display("records %0d, final speed %g rad/s", isa.size(), f32_to_real(rec[4]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
