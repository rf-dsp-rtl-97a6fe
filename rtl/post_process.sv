// post_process: the post-process stage.
//
// Its data distributor sends each instruction's engine results either to the
// FFT module (sel-func fft or ifft), which writes them back into the data
// cache in the next round's order, or to the write-back module, which writes
// them to a data array and, at the end of an operation (immi=1), out towards
// DDR. Whichever module handled the instruction raises done, the completion
// signal that lets the decoder read the next instruction. New algorithms are
// meant to be added here as further modules behind the distributor. The
// structure is published; the selection by sel-func is this design's.
module post_process
  import rfdsp_pkg::*;
#(
  parameter int NPE   = 96,
  parameter int DW    = 16,
  parameter int AW    = 32,
  parameter int LOG2N = 10,
  parameter int DC_AW = 11
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clr,
  input  logic                 valid,
  input  instr_t               ctrl,
  input  logic signed [AW-1:0] res [NPE],
  output logic                 wb_we,
  output arr_e                 wb_dest,
  output logic signed [DW-1:0] wb_vec [NPE],
  output logic                 out_valid,
  output logic signed [DW-1:0] out_data,
  output logic                 dc_we,
  output logic [DC_AW-1:0]     dc_addr,
  output logic [1:0]           dc_wmask,
  output logic [2*DW-1:0]      dc_wdata,
  output logic                 done
);
  logic to_fft, wb_done, fft_done;

  assign to_fft = (ctrl.func == F_FFT) || (ctrl.func == F_IFFT);

  writeback #(.NPE(NPE), .DW(DW), .AW(AW)) u_wb (
    .clk, .rst_n, .start(valid && !to_fft), .ctrl, .res,
    .wb_we, .wb_dest, .wb_vec, .out_valid, .out_data, .done(wb_done));

  fft_post #(.NPE(NPE), .DW(DW), .AW(AW), .LOG2N(LOG2N), .DC_AW(DC_AW)) u_fft (
    .clk, .rst_n, .clr, .start(valid && to_fft), .ctrl, .res,
    .dc_we, .dc_addr, .dc_wmask, .dc_wdata, .done(fft_done));

  assign done = wb_done || fft_done;
endmodule
