// cordic_sin: iterative CORDIC sine for the PWM generator.
//
// angle is a 32-bit phase, 2^32 = one turn. The angle is first folded into
// [-90, +90] degrees (sin(180 - a) = sin(a)), then 16 rotation-mode CORDIC
// iterations, one per clock, turn the pre-scaled vector (K * 2^22, 0) by
// it; y ends as sin * 2^22 and is returned as signed Q1.15. Accuracy is
// about 2 LSB of Q1.15. Timing: start for one cycle; done pulses 17 cycles
// later with sin valid (held until the next start). Part of this design's
// own sine reference; the document gives only the 50 Hz sine.
module cordic_sin (
  input  logic               clk,
  input  logic               rst,
  input  logic               start,
  input  logic [31:0]        angle,
  output logic               done,
  output logic signed [15:0] sin
);
  localparam int ITER = 16;
  // atan(2^-i) in units of 2^-32 turn
  localparam logic [31:0] ATAN [ITER] = '{
    32'd536870912, 32'd316933406, 32'd167458907, 32'd85004756,
    32'd42667331,  32'd21354465,  32'd10679838,  32'd5340245,
    32'd2670163,   32'd1335087,   32'd667544,    32'd333772,
    32'd166886,    32'd83443,     32'd41722,     32'd20861};
  localparam logic signed [25:0] X0 = 26'sd2547003;   // K * 2^22

  logic signed [25:0] x, y;
  logic signed [32:0] z, a_fold;
  logic [4:0]         i;
  logic               busy;

  always_comb begin
    a_fold = 33'(signed'(angle));
    if (a_fold > 33'sd1073741824)        a_fold = 33'sd2147483648 - a_fold;
    else if (a_fold < -33'sd1073741824)  a_fold = -33'sd2147483648 - a_fold;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      x <= '0; y <= '0; z <= '0; i <= '0;
      busy <= 1'b0; done <= 1'b0; sin <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        x <= X0; y <= '0; z <= a_fold; i <= '0; busy <= 1'b1;
      end else if (busy) begin
        if (z >= 0) begin
          x <= x - (y >>> i);
          y <= y + (x >>> i);
          z <= z - 33'(ATAN[i[3:0]]);
        end else begin
          x <= x + (y >>> i);
          y <= y - (x >>> i);
          z <= z + 33'(ATAN[i[3:0]]);
        end
        i <= i + 1'b1;
        if (i == 5'(ITER - 1)) busy <= 1'b0;
      end else if (i == 5'(ITER)) begin
        // y = sin * 2^22 -> Q1.15 with saturation
        if ((y >>> 7) > 26'sd32767)       sin <= 16'sd32767;
        else if ((y >>> 7) < -26'sd32767) sin <= -16'sd32767;
        else                              sin <= 16'(y >>> 7);
        done <= 1'b1;
        i    <= '0;
      end
    end
  end
endmodule
