// pwm_generator: sine-triangle PWM for the six legs of the dual
// three-phase two-level voltage-source converter.
//
// Runs on the 100 MHz PWM generator clock. A symmetric triangular carrier
// counts 0..CARRIER_HALF..0 over 2*CARRIER_HALF = 9216 cycles (92.16 us,
// the published carrier period; the published 19.99 ms sine period is 217
// such periods). A 32-bit phase accumulator advances by freq_inc at the
// start of each carrier period (f = freq_inc / 2^32 / 92.16 us; 50 Hz is
// 19791209). During the period a CORDIC computes the sine of each leg's
// phase, leg x lagging by its winding axis angle: a 0, b 120, c 240 degrees
// for the first set, d 30, e 150, f 270 degrees for the second (the 30
// degree shift of the asymmetrical machine). The references
//   ref_x = CARRIER_HALF/2 * (1 + m * sin(phase - gamma_x)),
// with m = mod_index (unsigned Q1.15), take effect at the next period
// start (regular symmetric sampling, one period late). S_x = carrier < ref_x,
// so the leg's duty cycle over a period is ref_x / CARRIER_HALF.
// Carrier period and sine frequency follow the published timing; the
// carrier shape, sampling scheme and leg phase order are this design's
// choice. Outputs: pwm[0..5] = S_a..S_f, period_start pulses on the last
// cycle of each carrier period (the new references apply from the next).
module pwm_generator #(
  parameter int unsigned CARRIER_HALF = 4608
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] freq_inc,
  input  logic [15:0] mod_index,
  output logic [5:0]  pwm,
  output logic        period_start
);
  localparam int CW = $clog2(2 * CARRIER_HALF);
  localparam logic signed [63:0] HALF_REF = 64'(CARRIER_HALF / 2);
  // leg axis angles, 2^32 = 360 degrees: a, b, c, d, e, f
  localparam logic [31:0] GAMMA [6] = '{
    32'd0, 32'd1431655765, 32'd2863311531,
    32'd357913941, 32'd1789569707, 32'd3221225472};

  logic [CW-1:0]  t;
  logic [CW-1:0]  carrier;
  logic [31:0]    phase;
  logic [CW-1:0]  ref_act [6];
  logic [CW-1:0]  ref_sh  [6];
  logic [2:0]     leg;
  logic           running, cs_start, cs_done;
  logic signed [15:0] cs_sin;
  logic signed [63:0] prod, refv;

  assign period_start = (t == CW'(2 * CARRIER_HALF - 1));
  assign carrier = (t < CW'(CARRIER_HALF)) ? t : CW'(2 * CARRIER_HALF) - t;

  cordic_sin u_sin (
    .clk(clk), .rst(rst), .start(cs_start),
    .angle(phase - GAMMA[leg]), .done(cs_done), .sin(cs_sin)
  );

  // reference for the sine that just finished
  always_comb begin
    prod = 64'(signed'({1'b0, mod_index})) * 64'(cs_sin);          // Q2.30
    refv = HALF_REF + ((HALF_REF * prod) >>> 30);
    if (refv < 0) refv = 0;
    if (refv > 2 * HALF_REF) refv = 2 * HALF_REF;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      t        <= '0;
      phase    <= '0;
      leg      <= '0;
      running  <= 1'b0;
      cs_start <= 1'b0;
      for (int k = 0; k < 6; k++) begin
        ref_act[k] <= CW'(CARRIER_HALF / 2);
        ref_sh[k]  <= CW'(CARRIER_HALF / 2);
      end
    end else begin
      t        <= (t == CW'(2 * CARRIER_HALF - 1)) ? '0 : t + 1'b1;
      cs_start <= 1'b0;
      if (period_start) begin
        for (int k = 0; k < 6; k++) ref_act[k] <= ref_sh[k];
        phase    <= phase + freq_inc;
        leg      <= '0;
        running  <= 1'b1;
        cs_start <= 1'b1;
      end else if (running && cs_done) begin
        ref_sh[leg] <= CW'(refv);
        if (leg == 3'd5) begin
          running <= 1'b0;
        end else begin
          leg      <= leg + 1'b1;
          cs_start <= 1'b1;
        end
      end
    end
  end

  always_comb begin
    for (int k = 0; k < 6; k++) pwm[k] = (carrier < ref_act[k]);
  end
endmodule
