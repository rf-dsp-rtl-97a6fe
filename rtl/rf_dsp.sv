// rf_dsp: top level of the RF-DSP reconfigurable signal processor.
//
// One datapath serves FIR, IIR, LMS, FFT and matrix work: a row of NPE
// identical processing engines (add, subtract, multiply) behind a data
// distributor and in front of a level-selectable adder tree. A 16-bit
// instruction picks the arrays that feed the PE channels, the PE operation,
// whether and how deep the adder tree sums, and where the results go, so an
// algorithm is a short instruction sequence rather than a dedicated circuit.
//
// Flow (one instruction in flight at a time):
//   instruction cache -> decoder -> LOAD: pre-process reads packed words from
//   the data cache into the data arrays;
//   compute: data arrays -> data distributor -> PE array -> add-tree ->
//   post-process (write-back to the arrays and, with immi=1, out_* ; or the
//   FFT module back into the data cache) -> done back to the decoder.
//
// Interface: the DDR side loads the program through imem_* and the input data
// through dmem_* while the processor is idle, then pulses start with prog_len
// (number of 32-bit instruction words). Results appear on out_valid/out_data;
// done pulses when the program has finished. Single clock, active-low
// asynchronous reset.
module rf_dsp
  import rfdsp_pkg::*;
#(
  parameter int NPE      = 96,
  parameter int DW       = 16,
  parameter int AW       = 32,
  parameter int FRAC     = 8,
  parameter int IC_DEPTH = 4096,
  parameter int DC_DEPTH = 2048,
  parameter int FFT_LOG2N = 10,
  localparam int IC_AW   = $clog2(IC_DEPTH),
  localparam int DC_AW   = $clog2(DC_DEPTH)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 imem_we,
  input  logic [IC_AW-1:0]     imem_waddr,
  input  logic [31:0]          imem_wdata,
  input  logic                 dmem_we,
  input  logic [DC_AW-1:0]     dmem_waddr,
  input  logic [2*DW-1:0]      dmem_wdata,
  input  logic                 start,
  input  logic [IC_AW-1:0]     prog_len,
  output logic                 busy,
  output logic                 done,
  output logic                 out_valid,
  output logic signed [DW-1:0] out_data
);
  // instruction path
  logic [IC_AW-1:0] ic_raddr;
  logic [31:0]      ic_rdata;
  instr_t           cur, ce_ctrl;
  logic             pp_issue, pp_done, ce_issue, post_done, ce_valid;

  // data cache
  logic [DC_AW-1:0] dc_raddr, f_addr;
  logic [2*DW-1:0]  dc_rdata, f_wdata;
  logic             f_we;
  logic [1:0]       f_wmask;

  // array writes
  logic                 lo_en, hi_en, mu_we, wb_we;
  arr_e                 lo_arr, hi_arr, wb_dest;
  wmode_e               lo_mode, hi_mode;
  logic [6:0]           idx;
  logic signed [DW-1:0] lo_val, hi_val, mu;
  logic signed [DW-1:0] wb_vec [NPE];

  // arrays and channels
  logic signed [DW-1:0] w [NPE], x [NPE], m [NPE], y [NPE];
  logic signed [DW-1:0] a [NPE], b [NPE], c [NPE];
  logic signed [AW-1:0] res [NPE];

  instr_cache #(.DEPTH(IC_DEPTH)) u_icache (
    .clk, .we(imem_we), .waddr(imem_waddr), .wdata(imem_wdata),
    .raddr(ic_raddr), .rdata(ic_rdata));

  decoder #(.IC_AW(IC_AW)) u_dec (
    .clk, .rst_n, .start, .prog_len, .ic_raddr, .ic_rdata, .cur,
    .pp_issue, .pp_done, .ce_issue, .post_done, .busy, .done);

  data_cache #(.DEPTH(DC_DEPTH), .DW(DW)) u_dcache (
    .clk, .h_we(dmem_we), .h_addr(dmem_waddr), .h_wdata(dmem_wdata),
    .f_we, .f_addr, .f_wmask, .f_wdata, .raddr(dc_raddr), .rdata(dc_rdata));

  pre_process #(.NPE(NPE), .DW(DW), .DC_AW(DC_AW)) u_pre (
    .clk, .rst_n, .rptr_clr(start), .issue(pp_issue), .instr(cur),
    .dc_raddr, .dc_rdata, .lo_en, .lo_arr, .lo_mode, .hi_en, .hi_arr, .hi_mode,
    .idx, .lo_val, .hi_val, .mu_we, .done(pp_done));

  data_load #(.NPE(NPE), .DW(DW)) u_load (
    .clk, .rst_n, .lo_en, .lo_arr, .lo_mode, .hi_en, .hi_arr, .hi_mode, .idx,
    .lo_val, .hi_val, .mu_we, .wb_we, .wb_dest, .wb_vec, .w, .x, .m, .y, .mu);

  data_distributor #(.NPE(NPE), .DW(DW), .FRAC(FRAC)) u_dist (
    .ctrl(cur), .w, .x, .m, .y, .mu, .a, .b, .c);

  comp_engine #(.NPE(NPE), .DW(DW), .AW(AW), .FRAC(FRAC)) u_ce (
    .clk, .rst_n, .start(ce_issue), .ctrl(cur), .a, .b, .c,
    .valid(ce_valid), .ctrl_o(ce_ctrl), .res);

  post_process #(.NPE(NPE), .DW(DW), .AW(AW), .LOG2N(FFT_LOG2N), .DC_AW(DC_AW)) u_post (
    .clk, .rst_n, .clr(start), .valid(ce_valid), .ctrl(ce_ctrl), .res,
    .wb_we, .wb_dest, .wb_vec, .out_valid, .out_data,
    .dc_we(f_we), .dc_addr(f_addr), .dc_wmask(f_wmask), .dc_wdata(f_wdata),
    .done(post_done));
endmodule
