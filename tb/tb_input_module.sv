// tb_input_module: drives six PWM signals with known high times over
// successive 2048-cycle windows and checks that after each step_tick the
// module returns d = high_cycles / 2048 as IEEE-754 single for channels
// 0..5, the load torque latched at the tick on channel 6, and 0 elsewhere.
// The reference counts the driven values delayed by the two-flop
// synchroniser.
module tb_input_module;
  import dtpim_pkg::*;

  localparam int W = 2048;

  logic       clk = 1'b0, rst = 1'b1;
  logic [5:0] pwm_in = '0;
  logic       step_tick = 1'b0;
  word_t      load_torque = '0;
  addr_t      ch = '0;
  word_t      data;
  int         checks = 0, failures = 0;

  input_module dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: count what the module sees (two cycles late)
  logic [5:0] d1 = '0, d2 = '0;
  int ref_cnt [6];
  int ref_duty [6];
  word_t ref_tl = '0;
  always @(posedge clk) begin
    if (rst) begin
      d1 <= '0; d2 <= '0;
      foreach (ref_cnt[k]) begin ref_cnt[k] = 0; ref_duty[k] = 0; end
    end else begin
      for (int k = 0; k < 6; k++) begin
        if (step_tick) begin
          ref_duty[k] = ref_cnt[k] + int'(d2[k]);
          ref_cnt[k]  = 0;
        end else begin
          ref_cnt[k]  = ref_cnt[k] + int'(d2[k]);
        end
      end
      if (step_tick) ref_tl = load_torque;
      d1 <= pwm_in;
      d2 <= d1;
    end
  end

  task automatic check(string what, word_t got, word_t exp_v);
    checks++;
    if (got !== exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h exp %h", what, got, exp_v);
    end
  endtask

  initial begin
    int high [6];
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    for (int w = 0; w < 6; w++) begin
      // per channel: high for the first high[k] cycles of the window
      for (int k = 0; k < 6; k++) begin
        case (w)
          0: high[k] = 0;
          1: high[k] = W;
          default: high[k] = int'($urandom % (W + 1));
        endcase
      end
      load_torque = real_to_f32(real'(w) * 1.25 - 2.0);
      for (int c = 0; c < W; c++) begin
        for (int k = 0; k < 6; k++) pwm_in[k] = (c < high[k]);
        step_tick = (c == W - 1);
        @(negedge clk);
      end
      step_tick = 1'b0;
      // read back the window just closed
      for (int k = 0; k < 9; k++) begin
        ch = addr_t'(k);
        #1;
        if (k < 6)       check($sformatf("duty ch%0d", k), data, real_to_f32(real'(ref_duty[k]) / W));
        else if (k == 6) check("load torque", data, ref_tl);
        else             check("unused channel", data, '0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
