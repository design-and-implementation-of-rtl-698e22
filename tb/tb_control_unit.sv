// tb_control_unit: runs a small program on the control unit with
// behavioural program memory, data memory, processing unit, input and
// output modules written in this testbench, and checks
//  - the results of ADD/SUB/MUL/MOV/IN in the data memory model,
//  - the words and record-end flags pushed by OUT/OUTL,
//  - JMP, and WAIT releasing exactly on the sampling instant (one loop
//    pass per STEP_CYCLES), the 4/3/2-cycle instruction timing,
//  - the stall of OUT while the output buffer is full,
//  - the sticky overrun flag when a step is too long.
// The processing unit model uses integer add/sub/mul on the raw words: the
// control unit only moves them.
module tb_control_unit;
  import dtpim_pkg::*;

  localparam int STEP = 64;

  logic   clk = 1'b0, rst = 1'b1;
  logic   pc_inc, pc_load;
  addr_t  pc_load_value;
  instr_t instr;
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
  logic   step_overrun;

  control_unit #(.STEP_CYCLES(STEP)) dut (.*);

  always #5 clk = ~clk;

  // ---- behavioural surroundings --------------------------------------------
  addr_t  pc;
  instr_t prog [512];
  word_t  dmem [512];
  int     checks = 0, failures = 0;

  always_ff @(posedge clk) begin
    if (rst) pc <= '0;
    else if (pc_load) pc <= pc_load_value;
    else if (pc_inc) pc <= pc + 1'b1;
    instr <= prog[pc];
    dm_qa <= dmem[dm_ra];
    dm_qb <= dmem[dm_rb];
    if (dm_we) dmem[dm_wa] <= dm_wd;
    pu_done <= pu_start;
    if (pu_start)
      case (pu_op)
        PU_ADD:  pu_result <= pu_a + pu_b;
        PU_SUB:  pu_result <= pu_a - pu_b;
        PU_MUL:  pu_result <= pu_a * pu_b;
        default: pu_result <= pu_a;
      endcase
  end
  assign in_data = 32'h1000 + 32'(in_ch);

  // output buffer model: records pushes, full when told
  word_t out_q[$];
  logic  last_q[$];
  logic  force_full = 1'b0;
  int    full_cycles = 0, stall_cycles = 0;
  assign out_full = force_full;
  always @(posedge clk) begin
    if (out_valid) begin
      out_q.push_back(out_data);
      last_q.push_back(out_last);
    end
    if (force_full) full_cycles++;
    if (force_full && dut.state == 3'd2 && instr.op inside {OP_OUT, OP_OUTL}) stall_cycles++;
  end

  // tick and loop-pass timing
  int tick_cycle [$];
  int wait_leave [$];
  int wait_enter [$];
  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (step_tick) tick_cycle.push_back(cyc);
    if (dut.state == 3'd4 && pc_inc) wait_leave.push_back(cyc);
    if (dut.state != 3'd4 && dut.state_n == 3'd4) wait_enter.push_back(cyc);
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int base_len;
    foreach (prog[i]) prog[i] = mk_instr(OP_NOP, 0, 0, 0);
    foreach (dmem[i]) dmem[i] = '0;
    dmem[1] = 32'd7; dmem[2] = 32'd5;
    // loop: WAIT; IN 10<-ch3; ADD 11=1+2; SUB 12=1-2; MUL 13=1*2; MOV 14=11;
    //       ADD 1 = 1 + 2 (changes each pass); OUT 11; OUTL 13; JMP 0
    prog[0] = mk_instr(OP_WAIT, 0, 0, 0);
    prog[1] = mk_instr(OP_IN, 10, 3, 0);
    prog[2] = mk_instr(OP_ADD, 11, 1, 2);
    prog[3] = mk_instr(OP_SUB, 12, 1, 2);
    prog[4] = mk_instr(OP_MUL, 13, 1, 2);
    prog[5] = mk_instr(OP_MOV, 14, 11, 0);
    prog[6] = mk_instr(OP_NOP, 0, 0, 0);
    prog[7] = mk_instr(OP_ADD, 1, 1, 2);
    prog[8] = mk_instr(OP_OUT, 0, 11, 0);
    prog[9] = mk_instr(OP_OUTL, 0, 13, 0);
    prog[10] = mk_instr(OP_JMP, 0, 0, 0);
    repeat (3) @(posedge clk);
    rst = 1'b0;

    // three passes
    for (int p = 0; p < 3; p++) begin
      int a;
      a = 7 + 5 * p;
      wait (out_q.size() == 2 * (p + 1));
      @(negedge clk);
      check("IN", dmem[10] == 32'h1003);
      check("ADD", dmem[11] == 32'(a + 5));
      check("SUB", dmem[12] == 32'(a - 5));
      check("MUL", dmem[13] == 32'(a * 5));
      check("MOV", dmem[14] == 32'(a + 5));
      check("OUT word", out_q[2 * p] == 32'(a + 5) && last_q[2 * p] == 1'b0);
      check("OUTL word", out_q[2 * p + 1] == 32'(a * 5) && last_q[2 * p + 1] == 1'b1);
    end
    // WAIT released one cycle after each sampling instant, one pass per step
    wait (wait_leave.size() >= 4);
    for (int k = 0; k < 4; k++)
      check("WAIT leaves on the tick", wait_leave[k] == tick_cycle[k] + 1);
    check("tick period", tick_cycle[1] - tick_cycle[0] == STEP);
    // pass length: WAIT exit .. next WAIT entry
    // IN 3, 3 x arith 4, MOV 3, NOP 2, ADD 4, OUT 3, OUTL 3, JMP 2, WAIT decode 2
    base_len = 3 + 12 + 3 + 2 + 4 + 3 + 3 + 2 + 2;
    check("instruction timing", wait_enter[2] - wait_leave[1] == base_len);
    check("no overrun at this length", !step_overrun);

    // stall: hold the output buffer full across an OUT
    wait (dut.state == 3'd4);
    force_full = 1'b1;
    repeat (2 * STEP + 20) @(posedge clk);
    check("OUT stalls while full", out_q.size() == 8 && stall_cycles > 10);
    check("overrun flagged", step_overrun);
    force_full = 1'b0;
    wait (out_q.size() == 10);
    check("resumes after stall", last_q[9] == 1'b1);
    $display("pass length %0d cycles, stall cycles %0d", base_len, stall_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
