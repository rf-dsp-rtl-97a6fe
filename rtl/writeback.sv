// writeback: the write-back module of the post-process.
//
// Takes one instruction's engine results, saturates them to DW bits and
// writes them to a data array in the cycle after start:
//   adder tree on   -> Y; every lane of group g receives the sum of group g,
//                      so a following lane-wise step sees y(n) in each lane;
//   ADD with lms-w  -> Weight (the LMS coefficient update w = w + k);
//   otherwise       -> Middle (the LMS error and update terms).
// When the instruction's immi bit is 1 the results also leave on the output
// stream, one per cycle: with the tree, one sum for fir/iir/lms (a filter
// produces one output per step) and one per group for fft/ifft/matrix;
// without it, lanes 0..N-1 (N = order, 0 means NPE). done pulses once the
// instruction is finished: the cycle after the array write, or with the last
// streamed value. Array destinations follow the published LMS walk-through;
// stream counts and saturation are this design's.
module writeback
  import rfdsp_pkg::*;
#(
  parameter int NPE = 96,
  parameter int DW  = 16,
  parameter int AW  = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  instr_t               ctrl,
  input  logic signed [AW-1:0] res [NPE],
  output logic                 wb_we,
  output arr_e                 wb_dest,
  output logic signed [DW-1:0] wb_vec [NPE],
  output logic                 out_valid,
  output logic signed [DW-1:0] out_data,
  output logic                 done
);
  localparam logic signed [AW-1:0] MAXV = AW'((1 << (DW-1)) - 1);
  localparam logic signed [AW-1:0] MINV = -AW'(1 << (DW-1));

  function automatic logic signed [DW-1:0] sat(logic signed [AW-1:0] v);
    if (v > MAXV) return DW'(MAXV);
    if (v < MINV) return DW'(MINV);
    return DW'(v);
  endfunction

  logic signed [DW-1:0] hold [NPE];  // saturated values to stream
  logic [6:0]           n_out, k;
  logic                 streaming;
  logic [2:0]           lv;
  logic [6:0]           ng;

  logic signed [DW-1:0] lane_sat [NPE];  // each lane's own result
  logic signed [DW-1:0] grp_sat  [NPE];  // the sum of the lane's group

  always_comb begin
    lv = tree_levels(ctrl.order);
    ng = 7'(NPE >> lv);
  end

  for (genvar i = 0; i < NPE; i++) begin : g_lane
    assign lane_sat[i] = sat(res[i]);
    always_comb begin
      grp_sat[i] = lane_sat[i];
      for (int l = 1; l < 8; l++)
        if (int'(lv) == l) grp_sat[i] = lane_sat[i >> l];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wb_we <= 1'b0; wb_dest <= ARR_M; out_valid <= 1'b0; out_data <= '0;
      done <= 1'b0; streaming <= 1'b0; n_out <= '0; k <= '0;
      for (int i = 0; i < NPE; i++) begin wb_vec[i] <= '0; hold[i] <= '0; end
    end else begin
      wb_we     <= 1'b0;
      done      <= 1'b0;
      out_valid <= 1'b0;
      if (start) begin
        wb_we <= 1'b1;
        if (ctrl.tree) begin
          wb_dest <= ARR_Y;
          wb_vec <= grp_sat;
          hold   <= lane_sat;
          n_out <= (ctrl.func inside {F_FIR, F_IIR, F_LMS_W, F_LMS_U}) ? 7'd1 : ng;
        end else begin
          wb_dest <= (ctrl.op == OP_ADD && ctrl.func == F_LMS_W) ? ARR_W : ARR_M;
          wb_vec <= lane_sat;
          hold   <= lane_sat;
          n_out <= (ctrl.order == '0) ? 7'(NPE) : 7'(ctrl.order);
        end
        k <= '0;
        if (ctrl.immi) streaming <= 1'b1;
        else           done      <= 1'b1;
      end else if (streaming) begin
        out_valid <= 1'b1;
        out_data  <= hold[k];
        k         <= k + 1'b1;
        if (k + 1'b1 == n_out) begin streaming <= 1'b0; done <= 1'b1; end
      end
    end
  end
endmodule
