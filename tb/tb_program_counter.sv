// tb_program_counter: checks reset, counting, wrap at 512, load and the
// priority of load over increment against a reference counter.
module tb_program_counter;
  logic       clk = 1'b0, rst = 1'b1, inc = 1'b0, load = 1'b0;
  logic [8:0] load_value = '0, pc;
  int         model;
  int         checks = 0, failures = 0;

  program_counter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    @(negedge clk);
    checks++;
    if (pc !== 9'd0) begin failures++; $display("FAIL reset"); end
    rst   = 1'b0;
    model = 0;
    // full wrap
    inc = 1'b1;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      model = (model + 1) % 512;
      checks++;
      if (pc !== 9'(model)) begin failures++; $display("FAIL count %0d vs %0d", pc, model); end
    end
    // random mix
    for (int n = 0; n < 3000; n++) begin
      inc = 1'($urandom);
      load = ($urandom % 4) == 0;
      load_value = 9'($urandom);
      @(negedge clk);
      if (load)     model = load_value;
      else if (inc) model = (model + 1) % 512;
      checks++;
      if (pc !== 9'(model)) begin failures++; $display("FAIL pc %0d vs %0d", pc, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
