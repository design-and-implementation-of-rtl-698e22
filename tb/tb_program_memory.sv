// tb_program_memory: checks the synchronous read and that the memory holds
// the simulation loop: it starts with WAIT, reads the seven inputs, sends a
// 12-word record closed by OUTL and ends with a jump back to address 0.
module tb_program_memory;
  import dtpim_pkg::*;

  logic  clk = 1'b0;
  addr_t addr = '0;
  logic [35:0] instr;
  instr_t i;
  int    checks = 0, failures = 0;
  int    n_in, n_out, n_outl, jmp_at, n_arith;

  program_memory dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    n_in = 0; n_out = 0; n_outl = 0; jmp_at = -1; n_arith = 0;
    for (int a = 0; a < 512; a++) begin
      addr = addr_t'(a);
      @(negedge clk);
      i = instr_t'(instr);
      check("spare bits zero", i.spare == 5'd0);
      if (a == 0) check("first instruction is WAIT", i.op == OP_WAIT);
      if (a >= 1 && a <= 7) begin
        check("inputs read first", i.op == OP_IN);
        check("input channel order", i.src_a == addr_t'(a - 1));
      end
      if (jmp_at < 0) begin
        if (i.op == OP_IN) n_in++;
        if (i.op == OP_OUT) n_out++;
        if (i.op == OP_OUTL) n_outl++;
        if (i.op inside {OP_ADD, OP_SUB, OP_MUL}) n_arith++;
        if (i.op == OP_JMP) begin
          jmp_at = a;
          check("jump back to 0", i.dst == 9'd0);
        end
      end else begin
        check("NOP after the loop", i.op == OP_NOP);
      end
    end
    check("7 inputs", n_in == 7);
    check("12-word record", n_out == 11 && n_outl == 1);
    check("loop closed", jmp_at > 0);
    check("arithmetic present", n_arith > 80);
    // loop must fit the 2048-cycle step at 4 cycles per instruction
    check("loop fits the step", jmp_at * 4 < 2048);
    $display("loop length %0d instructions, %0d arithmetic", jmp_at + 1, n_arith);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
