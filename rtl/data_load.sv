// data_load: the four data arrays of the data-load stage and the step-size
// register.
//
// Weight holds filter coefficients and FFT twiddle factors, X the input
// samples, Middle intermediate values (or a second input), Y computed
// results; each has NPE signed DW-bit elements, all visible in parallel to the
// data distributor. Two sources write them:
//   the pre-process, with up to two values per cycle (low and high half of a
//   cache word), each shifted in at element 0, written to every element, or
//   written to element idx (see wmode_e);
//   the write-back, with a whole vector into one array (wb_we, wb_dest).
// When two writes hit the same array in a cycle the write-back wins over the
// pre-process, and the high half over the low half. mu holds the
// LMS step size. Everything resets to zero. The four arrays and their roles
// are published; the write modes and reset are this design's.
module data_load
  import rfdsp_pkg::*;
#(
  parameter int NPE = 96,
  parameter int DW  = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 lo_en,
  input  arr_e                 lo_arr,
  input  wmode_e               lo_mode,
  input  logic                 hi_en,
  input  arr_e                 hi_arr,
  input  wmode_e               hi_mode,
  input  logic [6:0]           idx,
  input  logic signed [DW-1:0] lo_val,
  input  logic signed [DW-1:0] hi_val,
  input  logic                 mu_we,
  input  logic                 wb_we,
  input  arr_e                 wb_dest,
  input  logic signed [DW-1:0] wb_vec [NPE],
  output logic signed [DW-1:0] w  [NPE],
  output logic signed [DW-1:0] x  [NPE],
  output logic signed [DW-1:0] m  [NPE],
  output logic signed [DW-1:0] y  [NPE],
  output logic signed [DW-1:0] mu
);
  logic signed [DW-1:0] arr [4][NPE];

  // new value of element i under one pre-process write
  function automatic logic signed [DW-1:0] upd(wmode_e md, int i, logic [6:0] ix,
                                               logic signed [DW-1:0] val,
                                               logic signed [DW-1:0] cur,
                                               logic signed [DW-1:0] prev);
    unique case (md)
      WM_SHIFT: return (i == 0) ? val : prev;
      WM_BCAST: return val;
      default:  return (int'(ix) == i) ? val : cur;
    endcase
  endfunction

  for (genvar a = 0; a < 4; a++) begin : g_arr
    for (genvar i = 0; i < NPE; i++) begin : g_el
      logic signed [DW-1:0] prev;
      if (i == 0) begin : g_first
        assign prev = '0;
      end else begin : g_next
        assign prev = arr[a][i-1];
      end
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n)                             arr[a][i] <= '0;
        else if (wb_we && wb_dest == arr_e'(a)) arr[a][i] <= wb_vec[i];
        else if (hi_en && hi_arr == arr_e'(a))  arr[a][i] <= upd(hi_mode, i, idx, hi_val, arr[a][i], prev);
        else if (lo_en && lo_arr == arr_e'(a))  arr[a][i] <= upd(lo_mode, i, idx, lo_val, arr[a][i], prev);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     mu <= '0;
    else if (mu_we) mu <= lo_val;
  end

  always_comb
    for (int i = 0; i < NPE; i++) begin
      x[i] = arr[ARR_X][i];
      m[i] = arr[ARR_M][i];
      y[i] = arr[ARR_Y][i];
      w[i] = arr[ARR_W][i];
    end
endmodule
