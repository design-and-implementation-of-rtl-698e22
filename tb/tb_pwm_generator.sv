// tb_pwm_generator: checks the carrier period (9216 cycles = 92.16 us at
// 100 MHz) and, period by period, the high time of each of the six legs
// against 2*ref - 1 with ref = H/2 (1 + m sin(theta - gamma_x)) computed
// with $sin, theta advancing by freq_inc each period and the leg angles
// a 0, b 120, c 240, d 30, e 150, f 270 degrees. Run at full and at the
// published 0.275 modulation index, with a fast phase step so that many
// angles are covered.
module tb_pwm_generator;
  localparam int H = 4608;
  localparam real PI = 3.14159265358979;

  logic        clk = 1'b0, rst = 1'b1;
  logic [31:0] freq_inc = 32'd1589137899;   // 0.37 turn per period
  logic [15:0] mod_index = 16'd32768;
  logic [5:0]  pwm;
  logic        period_start;
  int          checks = 0, failures = 0;

  pwm_generator dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real gamma_deg [6] = '{0.0, 120.0, 240.0, 30.0, 150.0, 270.0};
  int  high [6];
  int  period = 0, len = 0;
  real worst = 0.0;

  always @(posedge clk) begin
    if (!rst) begin
      len++;
      for (int k = 0; k < 6; k++) high[k] += int'(pwm[k]);
      if (period_start) begin
        if (period >= 1) begin
          checks++;
          if (len != 2 * H) begin
            failures++;
            $display("FAIL period length %0d", len);
          end
        end
        if (period >= 2 && period != 12 && period != 13) begin
          // references of this period come from phase (period - 1) * inc
          real theta, m, r, e;
          int  ex;
          theta = 2.0 * PI * real'(32'((period - 1) * freq_inc)) / 4294967296.0;
          m = real'(mod_index) / 32768.0;
          for (int k = 0; k < 6; k++) begin
            r  = H / 2.0 * (1.0 + m * $sin(theta - gamma_deg[k] * PI / 180.0));
            ex = int'(2.0 * r) - 1;
            e  = real'(high[k] - ex);
            if (e < 0) e = -e;
            if (e > worst) worst = e;
            checks++;
            if (e > 4.0) begin
              failures++;
              if (failures < 10) $display("FAIL period %0d leg %0d high %0d exp %0d", period, k, high[k], ex);
            end
          end
        end
        period++;
        len = 0;
        foreach (high[k]) high[k] = 0;
      end
    end
  end

  initial begin
    foreach (high[k]) high[k] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    wait (period == 12);
    // published modulation index 0.275 (Q1.15 9011); periods 12 and 13 see
    // the changeover and are not checked
    @(negedge clk);
    mod_index = 16'd9011;
    wait (period == 24);
    $display("worst high-time error %0.1f cycles", worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
