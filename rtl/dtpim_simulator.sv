// dtpim_simulator: real-time simulator of a dual three-phase induction
// machine drive (six-phase machine, two-level 12-pulse voltage-source
// converter, sine-triangle PWM).
//
// Structure (the published block diagram): a Harvard processor whose
// control unit runs, from the program memory addressed by the program
// counter, the machine model loop of dtpim_program_pkg; operands come from
// the two-read-port data memory, sums and products are done by the
// floating-point processing unit; the input module turns the six PWM
// signals into leg duty cycles; the output module streams the state vector,
// speed, torque and phase voltages of every step to the Ethernet MAC.
// The PWM generator models the converter's modulator inside the device;
// pwm_ext_sel = 1 instead simulates the switching signals on pwm_ext_in
// (a controller under test in hardware-in-the-loop use).
//
// Clocks, from the board PLL (outside this module): clk_pwm 100 MHz (PWM
// generator), clk_sim 50 MHz (processor), clk_eth 125 MHz (output stream).
// One simulation step is 2^STEP_LOG2 clk_sim cycles, by default 2048 =
// 40.96 us, the published step; the model constants in the data memory are
// computed for the chosen step. One pass of the program takes 420 cycles,
// so STEP_LOG2 = 9 (10.24 us, 97.7 kHz) still keeps real time, in line with
// the published remark that the simulation can run at up to 100 kHz. Each
// step ends with a 12-word (48-byte) record on m_axis_*: i_s_alpha,
// i_s_beta, i_r_alpha, i_r_beta, electrical rotor speed, torque, and the
// phase voltages v_a..v_f, all IEEE-754 single, most significant byte
// first, tlast on the record's last byte. pwm_ext_in is synchronised inside
// the input module; pwm_ext_sel and load_torque are quasi-static settings.
// step_overrun is a sticky flag: the program did not finish a step in time.
// The PWM generator's period_start strobe is left open here: the processor
// samples on its own step timer; tying the step to the carrier is not
// part of the published description.
module dtpim_simulator
  import dtpim_pkg::*;
#(
  parameter int unsigned STEP_LOG2    = 11,    // 2^11 = 2048 cycles = 40.96 us
  parameter int unsigned CARRIER_HALF = 4608   // 92.16 us carrier at 100 MHz
) (
  input  logic        clk_pwm,
  input  logic        clk_sim,
  input  logic        clk_eth,
  input  logic        rst_n,
  input  logic [31:0] pwm_freq_inc,
  input  logic [15:0] pwm_mod_index,
  input  logic        pwm_ext_sel,
  input  logic [5:0]  pwm_ext_in,
  input  word_t       load_torque,
  output logic [5:0]  pwm_out,
  output logic [7:0]  m_axis_tdata,
  output logic        m_axis_tvalid,
  output logic        m_axis_tlast,
  input  logic        m_axis_tready,
  output logic        step_overrun
);
  logic rst_pwm, rst_sim, rst_eth;

  reset_sync u_rst_pwm (.clk(clk_pwm), .rst_n(rst_n), .rst(rst_pwm));
  reset_sync u_rst_sim (.clk(clk_sim), .rst_n(rst_n), .rst(rst_sim));
  reset_sync u_rst_eth (.clk(clk_eth), .rst_n(rst_n), .rst(rst_eth));

  // ---- converter modulator --------------------------------------------------
  pwm_generator #(.CARRIER_HALF(CARRIER_HALF)) u_pwm (
    .clk(clk_pwm), .rst(rst_pwm), .freq_inc(pwm_freq_inc),
    .mod_index(pwm_mod_index), .pwm(pwm_out), .period_start()
  );

  logic [5:0] pwm_sel;
  assign pwm_sel = pwm_ext_sel ? pwm_ext_in : pwm_out;

  // ---- processor ------------------------------------------------------------
  logic   pc_inc, pc_load;
  addr_t  pc, pc_load_value;
  logic [INSTR_W-1:0] pm_q;
  addr_t  dm_ra, dm_rb, dm_wa;
  word_t  dm_qa, dm_qb, dm_wd;
  logic   dm_we;
  logic   pu_start, pu_done;
  pu_op_t pu_op;
  word_t  pu_a, pu_b, pu_result;
  addr_t  in_ch;
  word_t  in_data;
  logic   step_tick;
  logic   out_valid, out_last, out_full;
  word_t  out_data;

  program_counter #(.ADDR_W(ADDR_W)) u_pc (
    .clk(clk_sim), .rst(rst_sim), .inc(pc_inc), .load(pc_load),
    .load_value(pc_load_value), .pc(pc)
  );

  program_memory #(.DEPTH_P(DEPTH), .WIDTH(INSTR_W)) u_pmem (
    .clk(clk_sim), .addr(pc), .instr(pm_q)
  );

  data_memory #(
    .DEPTH_W(DEPTH), .WIDTH(DATA_W), .INIT_MODEL(1'b1),
    .STEP_S(real'(2 ** STEP_LOG2) * dtpim_program_pkg::T_CLK_SIM)
  ) u_dmem (
    .clk(clk_sim), .ra_addr(dm_ra), .ra_data(dm_qa), .rb_addr(dm_rb),
    .rb_data(dm_qb), .we(dm_we), .wa(dm_wa), .wd(dm_wd)
  );

  processing_unit u_pu (
    .clk(clk_sim), .rst(rst_sim), .start(pu_start), .op(pu_op),
    .a(pu_a), .b(pu_b), .result(pu_result), .done(pu_done)
  );

  control_unit #(.STEP_CYCLES(2 ** STEP_LOG2)) u_cu (
    .clk(clk_sim), .rst(rst_sim),
    .pc_inc(pc_inc), .pc_load(pc_load), .pc_load_value(pc_load_value),
    .instr(instr_t'(pm_q)),
    .dm_ra(dm_ra), .dm_rb(dm_rb), .dm_qa(dm_qa), .dm_qb(dm_qb),
    .dm_we(dm_we), .dm_wa(dm_wa), .dm_wd(dm_wd),
    .pu_start(pu_start), .pu_op(pu_op), .pu_a(pu_a), .pu_b(pu_b),
    .pu_result(pu_result), .pu_done(pu_done),
    .in_ch(in_ch), .in_data(in_data), .step_tick(step_tick),
    .out_valid(out_valid), .out_data(out_data), .out_last(out_last),
    .out_full(out_full), .step_overrun(step_overrun)
  );

  input_module #(.WINDOW_LOG2(STEP_LOG2)) u_in (
    .clk(clk_sim), .rst(rst_sim), .pwm_in(pwm_sel), .step_tick(step_tick),
    .load_torque(load_torque), .ch(in_ch), .data(in_data)
  );

  output_module u_out (
    .clk_sim(clk_sim), .rst_sim(rst_sim), .wr_valid(out_valid),
    .wr_data(out_data), .wr_last(out_last), .wr_full(out_full),
    .clk_eth(clk_eth), .rst_eth(rst_eth),
    .m_axis_tdata(m_axis_tdata), .m_axis_tvalid(m_axis_tvalid),
    .m_axis_tlast(m_axis_tlast), .m_axis_tready(m_axis_tready)
  );
endmodule
