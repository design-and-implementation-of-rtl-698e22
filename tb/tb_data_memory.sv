// tb_data_memory: checks the data memory's model constants at start-up,
// writes, and two independent synchronous reads in the same cycle.
module tb_data_memory;
  import dtpim_pkg::*;

  logic  clk = 1'b0;
  addr_t ra_addr = '0, rb_addr = '0, wa = '0;
  word_t ra_data, rb_data, wd = '0;
  logic  we = 1'b0;
  word_t model [DEPTH];
  int    checks = 0, failures = 0;

  data_memory dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, word_t got, word_t exp_v);
    checks++;
    if (got !== exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h exp %h", what, got, exp_v);
    end
  endtask

  initial begin
    // expected start-up content: the model constants
    for (int i = 0; i < int'(DEPTH); i++) model[i] = '0;
    model[dtpim_program_pkg::HALF]  = 32'h3f000000;   // 0.5
    model[dtpim_program_pkg::THIRD] = 32'h3eaaaaab;   // 1/3
    model[dtpim_program_pkg::VDC3]  = 32'h43430000;   // 195.0
    model[dtpim_program_pkg::S32]   = 32'h3f5db3d7;   // sqrt(3)/2
    @(negedge clk);
    foreach (model[i]) if (i != dtpim_program_pkg::HALF && i != dtpim_program_pkg::THIRD &&
                           i != dtpim_program_pkg::VDC3 && i != dtpim_program_pkg::S32 &&
                           i < dtpim_program_pkg::N_CONST)
      model[i] = dut.mem[i];   // other constants checked in the system test
    for (int i = 0; i < int'(DEPTH); i++) begin
      ra_addr = addr_t'(i);
      rb_addr = addr_t'(DEPTH - 1 - i);
      @(negedge clk);
      check("init a", ra_data, model[i]);
      check("init b", rb_data, model[DEPTH - 1 - i]);
    end
    // random writes and dual reads
    for (int n = 0; n < 4000; n++) begin
      we = 1'($urandom);
      wa = addr_t'($urandom);
      wd = $urandom;
      ra_addr = addr_t'($urandom);
      rb_addr = addr_t'($urandom);
      @(negedge clk);
      // reads return the content before this cycle's write
      check("read a", ra_data, model[ra_addr]);
      check("read b", rb_data, model[rb_addr]);
      if (we) model[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
