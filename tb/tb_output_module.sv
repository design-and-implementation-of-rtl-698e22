// tb_output_module: pushes records of 32-bit words from the 50 MHz side
// (respecting full) and checks on the 125 MHz side that every word arrives
// as four bytes, most significant first, in order, with tlast exactly on
// the last byte of each record. The receiver's tready is randomised so the
// buffer fills and the writer sees full (counted; the test requires it).
module tb_output_module;
  import dtpim_pkg::*;

  logic       clk_sim = 1'b0, clk_eth = 1'b0;
  logic       rst_sim = 1'b1, rst_eth = 1'b1;
  logic       wr_valid = 1'b0, wr_last = 1'b0, wr_full;
  word_t      wr_data = '0;
  logic [7:0] m_axis_tdata;
  logic       m_axis_tvalid, m_axis_tlast, m_axis_tready = 1'b0;
  int         checks = 0, failures = 0;

  output_module dut (.*);

  always #10 clk_sim = ~clk_sim;   // 50 MHz
  always #4  clk_eth = ~clk_eth;   // 125 MHz

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int RECORDS = 40;
  localparam int WORDS   = 12;
  logic [7:0] exp_bytes [$];
  logic       exp_last  [$];
  int full_seen = 0, bytes_rx = 0;
  bit slow = 1'b1;

  // writer
  initial begin
    repeat (4) @(posedge clk_sim);
    rst_sim = 1'b0;
    for (int r = 0; r < RECORDS; r++) begin
      for (int w = 0; w < WORDS; w++) begin
        word_t v;
        v = $urandom;
        @(negedge clk_sim);
        while (wr_full) begin
          full_seen++;
          wr_valid = 1'b0;
          @(negedge clk_sim);
        end
        wr_valid = 1'b1;
        wr_data  = v;
        wr_last  = (w == WORDS - 1);
        for (int b = 3; b >= 0; b--) begin
          exp_bytes.push_back(v[8*b +: 8]);
          exp_last.push_back(w == WORDS - 1 && b == 0);
        end
      end
      @(negedge clk_sim);
      wr_valid = 1'b0;
      if (r == RECORDS / 2) slow = 1'b0;
    end
  end

  // reader
  initial begin
    repeat (4) @(posedge clk_eth);
    rst_eth = 1'b0;
    forever begin
      @(negedge clk_eth);
      m_axis_tready = slow ? (($urandom % 8) == 0) : 1'b1;
    end
  end

  always @(posedge clk_eth) begin
    if (!rst_eth && m_axis_tvalid && m_axis_tready) begin
      logic [7:0] eb;
      logic       el;
      checks++;
      if (exp_bytes.size() == 0) begin
        failures++;
        $display("FAIL unexpected byte %h", m_axis_tdata);
      end else begin
        eb = exp_bytes.pop_front();
        el = exp_last.pop_front();
        if (m_axis_tdata !== eb || m_axis_tlast !== el) begin
          failures++;
          if (failures < 10)
            $display("FAIL byte %0d: got %h/%b exp %h/%b", bytes_rx, m_axis_tdata, m_axis_tlast, eb, el);
        end
      end
      bytes_rx++;
      if (bytes_rx == RECORDS * WORDS * 4) begin
        checks++;
        if (full_seen == 0) begin
          failures++;
          $display("FAIL the buffer never filled");
        end
        repeat (20) @(posedge clk_eth);
        checks++;
        if (m_axis_tvalid) begin
          failures++;
          $display("FAIL extra data");
        end
        $display("bytes %0d, writer saw full %0d cycles", bytes_rx, full_seen);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end
endmodule
