// tb_data_load: drives the array write ports and compares all four arrays
// and mu with a model after every cycle: shift-in, broadcast and indexed
// writes from the pre-process, vector writes from the write-back, and a
// collision where the write-back wins.
`timescale 1ns/1ps
module tb_data_load;
  import rfdsp_pkg::*;
  localparam int NPE = 12, DW = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic lo_en = 0, hi_en = 0, mu_we = 0, wb_we = 0;
  arr_e lo_arr = ARR_X, hi_arr = ARR_M, wb_dest = ARR_Y;
  wmode_e lo_mode = WM_SHIFT, hi_mode = WM_SHIFT;
  logic [6:0] idx = 0;
  logic signed [DW-1:0] lo_val = 0, hi_val = 0, mu;
  logic signed [DW-1:0] wb_vec [NPE];
  logic signed [DW-1:0] w [NPE], x [NPE], m [NPE], y [NPE];
  int model [4][NPE];
  int mu_m = 0;
  int checks = 0, failures = 0;

  data_load #(.NPE(NPE), .DW(DW)) dut (.*);

  task automatic mput(arr_e a, wmode_e md, int ix, int v);
    case (md)
      WM_SHIFT: begin for (int i = NPE-1; i > 0; i--) model[a][i] = model[a][i-1]; model[a][0] = v; end
      WM_BCAST: for (int i = 0; i < NPE; i++) model[a][i] = v;
      default:  if (ix < NPE) model[a][ix] = v;
    endcase
  endtask
  task automatic compare();
    for (int i = 0; i < NPE; i++) begin
      checks++;
      if (x[i] != DW'(model[ARR_X][i]) || m[i] != DW'(model[ARR_M][i]) ||
          y[i] != DW'(model[ARR_Y][i]) || w[i] != DW'(model[ARR_W][i])) begin
        failures++;
        if (failures < 10) $display("FAIL element %0d", i);
      end
    end
    checks++; if (mu != DW'(mu_m)) failures++;
  endtask

  initial begin
    foreach (wb_vec[i]) wb_vec[i] = '0;
    foreach (model[a, i]) model[a][i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      lo_en = $urandom_range(0, 1); hi_en = $urandom_range(0, 1);
      lo_arr = arr_e'($urandom_range(0, 3));
      hi_arr = arr_e'((int'(lo_arr) + 1 + $urandom_range(0, 2)) % 4);
      lo_mode = wmode_e'($urandom_range(0, 2)); hi_mode = wmode_e'($urandom_range(0, 2));
      idx = 7'($urandom_range(0, NPE + 2));
      lo_val = DW'($urandom); hi_val = DW'($urandom);
      mu_we = ($urandom_range(0, 9) == 0);
      wb_we = ($urandom_range(0, 4) == 0); wb_dest = arr_e'($urandom_range(0, 3));
      foreach (wb_vec[i]) wb_vec[i] = DW'($urandom);
      if (lo_en) mput(lo_arr, lo_mode, int'(idx), lo_val);
      if (hi_en) mput(hi_arr, hi_mode, int'(idx), hi_val);
      if (wb_we) foreach (wb_vec[i]) model[wb_dest][i] = wb_vec[i];
      if (mu_we) mu_m = lo_val;
      @(posedge clk); #1;
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
