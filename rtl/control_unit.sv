// control_unit: fetches, decodes and executes the simulator's program.
//
// A multicycle controller in the published Harvard organisation: the program
// counter addresses the program memory, both operands come from the
// two-read-port data memory in one cycle, the processing unit computes, and
// the result is written back. It also holds the sampling timer: every
// STEP_CYCLES clock cycles (2048 x 20 ns = 40.96 us, the published
// simulation step) it pulses step_tick, which the input module uses to close
// its measurement window and which releases a WAIT instruction.
//
// Instruction timing (this design's own choice, no timing was published):
//   FETCH  - program memory reads the word at pc
//   DECODE - word valid; data memory reads src_a and src_b; NOP/JMP/WAIT end
//   EXEC   - operands valid; ADD/SUB/MUL start the processing unit, MOV, IN
//            and OUT complete (OUT stalls here while the output buffer is full)
//   WB     - processing unit result written to dst
// so arithmetic takes 4 cycles, MOV/IN/OUT 3, NOP/JMP 2, WAIT until the
// sampling instant. A sampling instant that arrives while the program is
// not waiting sets the sticky step_overrun flag; the pending instant then
// releases the next WAIT at once.
//
// The address fields of the instruction word and the operands read from
// the data memory are wired straight through to the memories, processing
// unit, input and output modules: the control unit is the routing point
// of the processor, and registering them would add a cycle per instruction.
// Bits [35:31] of the instruction word are spare and not decoded.
module control_unit
  import dtpim_pkg::*;
#(
  parameter int unsigned STEP_CYCLES = 2048
) (
  input  logic   clk,
  input  logic   rst,
  // program counter
  output logic   pc_inc,
  output logic   pc_load,
  output addr_t  pc_load_value,
  // program memory
  input  instr_t instr,
  // data memory
  output addr_t  dm_ra,
  output addr_t  dm_rb,
  input  word_t  dm_qa,
  input  word_t  dm_qb,
  output logic   dm_we,
  output addr_t  dm_wa,
  output word_t  dm_wd,
  // processing unit
  output logic   pu_start,
  output pu_op_t pu_op,
  output word_t  pu_a,
  output word_t  pu_b,
  input  word_t  pu_result,
  input  logic   pu_done,
  // input module
  output addr_t  in_ch,
  input  word_t  in_data,
  output logic   step_tick,
  // output module
  output logic   out_valid,
  output word_t  out_data,
  output logic   out_last,
  input  logic   out_full,
  // status
  output logic   step_overrun
);
  typedef enum logic [2:0] {S_FETCH, S_DECODE, S_EXEC, S_WB, S_WAIT} state_t;

  state_t state, state_n;
  logic [$clog2(STEP_CYCLES)-1:0] step_cnt;
  logic tick_pending;

  // ---- sampling timer -----------------------------------------------------
  assign step_tick = (step_cnt == ($clog2(STEP_CYCLES))'(STEP_CYCLES - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      step_cnt     <= '0;
      tick_pending <= 1'b0;
      step_overrun <= 1'b0;
    end else begin
      step_cnt <= step_tick ? '0 : step_cnt + 1'b1;
      if (step_tick) begin
        tick_pending <= 1'b1;
        if (state != S_WAIT) step_overrun <= 1'b1;
      end else if (state == S_WAIT && tick_pending) begin
        tick_pending <= 1'b0;
      end
    end
  end

  // ---- datapath steering ----------------------------------------------------
  assign dm_ra         = instr.src_a;
  assign dm_rb         = instr.src_b;
  assign pu_a          = dm_qa;
  assign pu_b          = dm_qb;
  assign in_ch         = instr.src_a;
  assign out_data      = dm_qa;
  assign out_last      = (instr.op == OP_OUTL);
  assign pc_load_value = instr.dst;
  assign dm_wa         = instr.dst;

  always_comb begin
    unique case (instr.op)
      OP_SUB:  pu_op = PU_SUB;
      OP_MUL:  pu_op = PU_MUL;
      OP_ADD:  pu_op = PU_ADD;
      default: pu_op = PU_PASS;
    endcase
  end

  always_comb begin
    state_n   = state;
    pc_inc    = 1'b0;
    pc_load   = 1'b0;
    dm_we     = 1'b0;
    dm_wd     = dm_qa;
    pu_start  = 1'b0;
    out_valid = 1'b0;
    unique case (state)
      S_FETCH: state_n = S_DECODE;
      S_DECODE: begin
        unique case (instr.op)
          OP_JMP: begin
            pc_load = 1'b1;
            state_n = S_FETCH;
          end
          OP_WAIT: state_n = S_WAIT;
          OP_ADD, OP_SUB, OP_MUL, OP_MOV, OP_IN, OP_OUT, OP_OUTL:
                   state_n = S_EXEC;
          default: begin            // NOP and unused codes
            pc_inc  = 1'b1;
            state_n = S_FETCH;
          end
        endcase
      end
      S_EXEC: begin
        unique case (instr.op)
          OP_ADD, OP_SUB, OP_MUL: begin
            pu_start = 1'b1;
            state_n  = S_WB;
          end
          OP_MOV: begin
            dm_we   = 1'b1;
            pc_inc  = 1'b1;
            state_n = S_FETCH;
          end
          OP_IN: begin
            dm_we   = 1'b1;
            dm_wd   = in_data;
            pc_inc  = 1'b1;
            state_n = S_FETCH;
          end
          default: begin            // OP_OUT, OP_OUTL
            if (!out_full) begin
              out_valid = 1'b1;
              pc_inc    = 1'b1;
              state_n   = S_FETCH;
            end
          end
        endcase
      end
      S_WB: begin
        if (pu_done) begin
          dm_we   = 1'b1;
          dm_wd   = pu_result;
          pc_inc  = 1'b1;
          state_n = S_FETCH;
        end
      end
      default: begin                // S_WAIT
        if (tick_pending) begin
          pc_inc  = 1'b1;
          state_n = S_FETCH;
        end
      end
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) state <= S_FETCH;
    else     state <= state_n;
  end
endmodule
