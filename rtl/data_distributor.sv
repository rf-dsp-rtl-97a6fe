// data_distributor: routes the data arrays to the PE channels A, B and C.
//
// The instruction's sel-reg field selects data arrays in the order x, mid,
// y. The first selected array goes to channel A. The second one, or the
// Weight array when only one is selected, goes to C for MUL and to B for ADD
// and SUB. An idle channel is filled with a constant: B with 0 for MUL, C
// with the fixed-point one (1 << FRAC) for ADD and SUB, or with the LMS step
// size mu when sel-func is lms-u. This reproduces the published LMS steps
// (y = w'x; e = 2mu(d - y); k = e x; w = w + k) and the rule that idle
// channels hold 0 or 1; the general rule beyond those steps is this design's.
//
// With the adder tree on and order N, lane k of group g (g = lane >> L,
// k = lane mod 2^L, L = tree levels) reads element g*N+k of a data array and
// element k of Weight, so groups share coefficients and work on consecutive
// N-element slices (matrix rows and columns); lanes with k >= N get zeros on
// all channels. With the tree off lane i reads element i.
//
// Combinational.
module data_distributor
  import rfdsp_pkg::*;
#(
  parameter int NPE  = 96,
  parameter int DW   = 16,
  parameter int FRAC = 8
) (
  input  instr_t               ctrl,
  input  logic signed [DW-1:0] w  [NPE],
  input  logic signed [DW-1:0] x  [NPE],
  input  logic signed [DW-1:0] m  [NPE],
  input  logic signed [DW-1:0] y  [NPE],
  input  logic signed [DW-1:0] mu,
  output logic signed [DW-1:0] a  [NPE],
  output logic signed [DW-1:0] b  [NPE],
  output logic signed [DW-1:0] c  [NPE]
);
  localparam logic signed [DW-1:0] ONE = DW'(1) << FRAC;

  arr_e       first, second;
  logic       has_second;
  logic [2:0] lv;

  always_comb begin
    // pick the first and second selected array in the order x, mid, y
    first = ARR_W; second = ARR_W; has_second = 1'b0;
    if (ctrl.selreg[SR_X]) begin
      first = ARR_X;
      if (ctrl.selreg[SR_M])      begin second = ARR_M; has_second = 1'b1; end
      else if (ctrl.selreg[SR_Y]) begin second = ARR_Y; has_second = 1'b1; end
    end else if (ctrl.selreg[SR_M]) begin
      first = ARR_M;
      if (ctrl.selreg[SR_Y])      begin second = ARR_Y; has_second = 1'b1; end
    end else if (ctrl.selreg[SR_Y]) begin
      first = ARR_Y;
    end
    lv = tree_levels(ctrl.order);
  end

  function automatic logic signed [DW-1:0] pick(arr_e s, int di, int wi);
    logic signed [DW-1:0] v;
    v = '0;
    unique case (s)
      ARR_X: if (di < NPE) v = x[di];
      ARR_M: if (di < NPE) v = m[di];
      ARR_Y: if (di < NPE) v = y[di];
      ARR_W: if (wi < NPE) v = w[wi];
    endcase
    return v;
  endfunction

  for (genvar i = 0; i < NPE; i++) begin : g_lane
    logic [6:0]           gi, ki;     // group and position in group
    logic [12:0]          di;         // data array element
    logic [6:0]           wi;         // Weight element
    logic                 live;
    logic signed [DW-1:0] va, vs;

    always_comb begin
      gi = 7'(i >> lv);
      ki = 7'(i & ((1 << lv) - 1));
      if (ctrl.tree) begin
        di   = 13'(gi) * 13'(ctrl.order) + 13'(ki);
        wi   = ki;
        live = (ki < 7'(ctrl.order));
      end else begin
        di   = 13'(i);
        wi   = 7'(i);
        live = 1'b1;
      end
      va = pick(first, int'(di), int'(wi));
      vs = has_second ? pick(second, int'(di), int'(wi)) : pick(ARR_W, int'(di), int'(wi));
      a[i] = '0; b[i] = '0; c[i] = '0;
      if (live) begin
        a[i] = va;
        unique case (ctrl.op)
          OP_MUL:  begin b[i] = '0; c[i] = vs; end
          OP_SUB:  begin b[i] = vs; c[i] = (ctrl.func == F_LMS_U) ? mu : ONE; end
          default: begin b[i] = vs; c[i] = ONE; end
        endcase
      end
    end
  end
endmodule
