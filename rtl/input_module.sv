// input_module: turns the six PWM switching signals into floating-point
// leg duty cycles for the processing unit.
//
// Each switching function S_a..S_f (bit 0 = a ... bit 5 = f) is brought
// into the simulator clock domain by a two-flop synchroniser and its high
// cycles are counted over one simulation step. At step_tick the counts are
// latched and the counters restart, so the program reads, for the step just
// ended, d_x = (high cycles) / 2^WINDOW_LOG2 as an exact IEEE-754 single.
// The load torque word is latched at the same instant. The document says
// only that the module converts the binary PWM signals into floating-point
// values; averaging over the step (the leg's mean switching state, which is
// what a 40.96 us model step can resolve of a 92.16 us carrier) is this
// design's choice.
// Interface: ch selects the word on data: 0..5 duty of legs a..f,
// 6 load torque, others 0. data is combinational from ch and the latches.
module input_module
  import dtpim_pkg::*;
#(
  parameter int unsigned WINDOW_LOG2 = 11   // step of 2^11 = 2048 clocks
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [5:0] pwm_in,
  input  logic       step_tick,
  input  word_t      load_torque,
  input  addr_t      ch,
  output word_t      data
);
  localparam int unsigned CW = WINDOW_LOG2 + 1;

  logic [5:0]    sync1, sync2;
  logic [CW-1:0] cnt  [6];
  logic [CW-1:0] duty [6];
  word_t         tl_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync1 <= '0;
      sync2 <= '0;
      tl_q  <= '0;
      for (int k = 0; k < 6; k++) begin
        cnt[k]  <= '0;
        duty[k] <= '0;
      end
    end else begin
      sync1 <= pwm_in;
      sync2 <= sync1;
      if (step_tick) tl_q <= load_torque;
      for (int k = 0; k < 6; k++) begin
        if (step_tick) begin
          duty[k] <= cnt[k] + CW'(sync2[k]);
          cnt[k]  <= '0;
        end else begin
          cnt[k]  <= cnt[k] + CW'(sync2[k]);
        end
      end
    end
  end

  always_comb begin
    data = '0;
    if (ch == IN_CH_TL) data = tl_q;
    else if (ch < addr_t'(6)) data = uint_to_f32(24'(duty[ch[2:0]]), int'(WINDOW_LOG2));
  end
endmodule
