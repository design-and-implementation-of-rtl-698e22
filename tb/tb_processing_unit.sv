// tb_processing_unit: checks the floating-point add, subtract, multiply
// and pass operations bit-exactly against IEEE-754 round-to-nearest results
// computed with double precision arithmetic (exact for the operand ranges
// used), and checks the one-cycle latency.
module tb_processing_unit;
  import dtpim_pkg::*;

  logic   clk = 1'b0;
  logic   rst = 1'b1;
  logic   start = 1'b0;
  pu_op_t op = PU_ADD;
  word_t  a = '0, b = '0, result;
  logic   done;
  int     checks = 0, failures = 0;

  processing_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t rand_f32(int emin, int emax);
    word_t f;
    f[31]    = 1'($urandom);
    f[30:23] = 8'(emin + int'($urandom % (emax - emin + 1)));
    f[22:0]  = 23'($urandom);
    return f;
  endfunction

  function automatic word_t expect_of(pu_op_t o, word_t x, word_t y);
    case (o)
      PU_ADD:  return real_to_f32(f32_to_real(x) + f32_to_real(y));
      PU_SUB:  return real_to_f32(f32_to_real(x) - f32_to_real(y));
      PU_MUL:  return real_to_f32(f32_to_real(x) * f32_to_real(y));
      default: return x;
    endcase
  endfunction

  task automatic run(pu_op_t o, word_t x, word_t y);
    word_t exp_r;
    @(negedge clk);
    op = o; a = x; b = y; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    exp_r = expect_of(o, x, y);
    checks++;
    if (!done) begin
      failures++;
      $display("FAIL: done not one cycle after start");
    end
    checks++;
    if (result !== exp_r && !(exp_r[30:0] == 0 && result[30:0] == 0)) begin
      failures++;
      if (failures < 10)
        $display("FAIL op=%0d a=%h b=%h got %h exp %h", o, x, y, result, exp_r);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;
    // directed cases
    run(PU_ADD, real_to_f32(1.5), real_to_f32(2.25));
    run(PU_SUB, real_to_f32(1.0), real_to_f32(1.0));           // exact zero
    run(PU_SUB, real_to_f32(1.0), real_to_f32(0.99999994));    // deep cancellation
    run(PU_ADD, real_to_f32(0.0), real_to_f32(-3.75));
    run(PU_ADD, real_to_f32(7.0), real_to_f32(0.0));
    run(PU_MUL, real_to_f32(0.0), real_to_f32(5.0));
    run(PU_MUL, real_to_f32(-1.5), real_to_f32(2.0));
    run(PU_MUL, real_to_f32(1.0 / 3.0), real_to_f32(3.0));
    run(PU_ADD, real_to_f32(16777216.0), real_to_f32(1.0));    // tie to even
    run(PU_ADD, real_to_f32(16777216.0), real_to_f32(3.0));    // tie to even up
    run(PU_PASS, real_to_f32(42.0), real_to_f32(1.0));
    // random cases, exponents close enough for exact double sums
    for (int n = 0; n < 3000; n++) begin
      pu_op_t o;
      o = pu_op_t'($urandom % 3);
      run(o, rand_f32(110, 140), rand_f32(110, 140));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
