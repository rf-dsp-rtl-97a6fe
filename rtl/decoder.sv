// decoder: instruction fetch, split and issue.
//
// After start the decoder walks the instruction cache from address 0 to
// prog_len-1. Each 32-bit word is split into two 16-bit instructions, low
// half first. A LOAD instruction (opcode 11) is handed to the pre-process
// (pp_issue) and a compute instruction (MUL, ADD, SUB) to the data
// distributor, computational engine and post-process (ce_issue); a NOP
// (compute opcode with sel-reg 000) is skipped. The decoder then waits for the
// completion pulse of the unit it issued to (pp_done or post_done) before it
// issues the next instruction, so one instruction is in flight at a time and
// the decoded instruction cur stays stable while it executes. done pulses
// when the last word has completed.
//
// Splitting 32-bit words into 16-bit instructions and pacing on the
// post-process's completion signal are published; LOAD, NOP and the
// sequential execution of the two halves are this design's.
//
// Timing: fetch takes two cycles per word (address, data); issue is a
// one-cycle pulse.
module decoder
  import rfdsp_pkg::*;
#(
  parameter int IC_AW = 12
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [IC_AW-1:0] prog_len,
  output logic [IC_AW-1:0] ic_raddr,
  input  logic [31:0]      ic_rdata,
  output instr_t           cur,
  output logic             pp_issue,
  input  logic             pp_done,
  output logic             ce_issue,
  input  logic             post_done,
  output logic             busy,
  output logic             done
);
  typedef enum logic [2:0] {S_IDLE, S_FETCH, S_READ, S_DISP, S_WAIT, S_NEXT} state_e;
  state_e           st;
  logic [IC_AW-1:0] pc;
  logic [31:0]      word;
  logic             half;
  instr_t           nxt;

  assign ic_raddr = pc;
  assign busy     = (st != S_IDLE);
  assign nxt      = half ? instr_t'(word[31:16]) : instr_t'(word[15:0]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; pc <= '0; word <= '0; half <= 1'b0; cur <= '0;
      pp_issue <= 1'b0; ce_issue <= 1'b0; done <= 1'b0;
    end else begin
      pp_issue <= 1'b0;
      ce_issue <= 1'b0;
      done     <= 1'b0;
      unique case (st)
        S_IDLE:  if (start) begin
                   pc <= '0;
                   if (prog_len != '0) st <= S_FETCH;
                   else                done <= 1'b1;
                 end
        S_FETCH: st <= S_READ;          // RAM latches pc this cycle
        S_READ:  begin word <= ic_rdata; half <= 1'b0; st <= S_DISP; end
        S_DISP:  begin
                   cur <= nxt;
                   if (is_nop(nxt))          st <= S_NEXT;
                   else if (nxt.op == OP_LOAD) begin pp_issue <= 1'b1; st <= S_WAIT; end
                   else                      begin ce_issue <= 1'b1; st <= S_WAIT; end
                 end
        S_WAIT:  if ((cur.op == OP_LOAD) ? pp_done : post_done) st <= S_NEXT;
        S_NEXT:  if (!half) begin half <= 1'b1; st <= S_DISP; end
                 else if (pc + 1'b1 == prog_len) begin st <= S_IDLE; done <= 1'b1; end
                 else begin pc <= pc + 1'b1; st <= S_FETCH; end
        default: st <= S_IDLE;
      endcase
    end
  end

  // a completion pulse only arrives while an instruction is in flight
  a_done_in_wait: assert property (@(posedge clk) disable iff (!rst_n)
                                   (pp_done || post_done) |-> st == S_WAIT);
endmodule
