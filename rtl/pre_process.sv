// pre_process: moves input data from the data cache into the data arrays.
//
// It executes LOAD instructions (opcode 11). Each cache word holds two 16-bit
// values: the low half goes to the first array selected by sel-reg (order x,
// mid, y) and the high half to the second. sel-func chooses how they land:
//   fir, iir, lms-w  one word; x and y arrays shift the value in at element
//                    0 (the FIR delay line), the middle array receives it in
//                    every element (d(n) for the LMS error step);
//   lms-u            one word; its low half becomes the LMS step size mu;
//   fft, ifft, matrix  N words (N = order, 0 means NPE) written element by
//                    element, e.g. real/imaginary parts or matrix rows and
//                    columns side by side;
//   sel-reg 000      N words into the Weight array, element by element.
// The cache is read sequentially from a pointer that rptr_clr sets to 0.
// The FIR shift-in, the packed two-value words and the row/column split for
// matrices are published; the LOAD encoding, the sequential pointer and the
// broadcast of d(n) are this design's.
//
// Timing: a read is issued per cycle and its word is written one cycle later,
// so an N-word LOAD takes N+1 cycles; done pulses with the last write.
module pre_process
  import rfdsp_pkg::*;
#(
  parameter int NPE   = 96,
  parameter int DW    = 16,
  parameter int DC_AW = 11
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 rptr_clr,
  input  logic                 issue,
  input  instr_t               instr,
  output logic [DC_AW-1:0]     dc_raddr,
  input  logic [2*DW-1:0]      dc_rdata,
  // array write command: low half and high half
  output logic                 lo_en,
  output arr_e                 lo_arr,
  output wmode_e               lo_mode,
  output logic                 hi_en,
  output arr_e                 hi_arr,
  output wmode_e               hi_mode,
  output logic [6:0]           idx,
  output logic signed [DW-1:0] lo_val,
  output logic signed [DW-1:0] hi_val,
  output logic                 mu_we,
  output logic                 done
);
  logic [DC_AW-1:0] rptr;
  logic [6:0]       cnt, rd_i, wr_i;
  logic             rd_act, wr_act, wr_last;
  instr_t           ins;
  arr_e             first, second;
  logic             has_first, has_second, shift_f;

  assign dc_raddr = rptr;

  always_comb begin
    first = ARR_W; second = ARR_W; has_first = 1'b1; has_second = 1'b0;
    if (ins.selreg[SR_X]) begin
      first = ARR_X;
      if (ins.selreg[SR_M])      begin second = ARR_M; has_second = 1'b1; end
      else if (ins.selreg[SR_Y]) begin second = ARR_Y; has_second = 1'b1; end
    end else if (ins.selreg[SR_M]) begin
      first = ARR_M;
      if (ins.selreg[SR_Y])      begin second = ARR_Y; has_second = 1'b1; end
    end else if (ins.selreg[SR_Y]) first = ARR_Y;
    else                           has_first = (ins.func != F_LMS_U); // Weight
    shift_f = (ins.selreg != 3'b000) &&
              (ins.func == F_FIR || ins.func == F_IIR || ins.func == F_LMS_W);
  end

  function automatic wmode_e mode_of(arr_e a, logic sh);
    if (!sh)        return WM_INDEX;
    if (a == ARR_M) return WM_BCAST;
    return WM_SHIFT;
  endfunction

  always_comb begin
    lo_arr  = first;
    hi_arr  = second;
    lo_mode = mode_of(first, shift_f);
    hi_mode = mode_of(second, shift_f);
    lo_val  = dc_rdata[DW-1:0];
    hi_val  = dc_rdata[2*DW-1:DW];
    idx     = wr_i;
    lo_en   = wr_act && has_first;
    hi_en   = wr_act && has_second;
    mu_we   = wr_act && (ins.func == F_LMS_U) && (ins.selreg == 3'b000);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rptr <= '0; cnt <= '0; rd_i <= '0; wr_i <= '0;
      rd_act <= 1'b0; wr_act <= 1'b0; wr_last <= 1'b0; ins <= '0; done <= 1'b0;
    end else begin
      done   <= 1'b0;
      wr_act <= 1'b0;
      if (rptr_clr) rptr <= '0;
      if (issue) begin
        ins    <= instr;
        rd_act <= 1'b1;
        rd_i   <= '0;
        if ((instr.selreg != 3'b000 &&
             (instr.func == F_FIR || instr.func == F_IIR || instr.func == F_LMS_W)) ||
            (instr.func == F_LMS_U && instr.selreg == 3'b000))
          cnt <= 7'd1;
        else
          cnt <= (instr.order == '0) ? 7'(NPE) : 7'(instr.order);
      end else if (rd_act) begin
        rptr    <= rptr + 1'b1;
        wr_act  <= 1'b1;
        wr_i    <= rd_i;
        wr_last <= (rd_i + 1'b1 == cnt);
        rd_i    <= rd_i + 1'b1;
        if (rd_i + 1'b1 == cnt) rd_act <= 1'b0;
      end
      if (wr_act && wr_last) done <= 1'b1;
    end
  end
endmodule
