// tb_post_process: checks the post-process distributor: an FFT instruction
// must reach only the data-cache write path, other instructions only the
// array write-back and output stream, and each must produce exactly one
// done pulse.
`timescale 1ns/1ps
module tb_post_process;
  import rfdsp_pkg::*;
  localparam int NPE = 8, DW = 16, AW = 32, LOG2N = 4, DC_AW = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clr = 0, valid = 0;
  instr_t ctrl;
  logic signed [AW-1:0] res [NPE];
  logic wb_we, out_valid, dc_we, done;
  arr_e wb_dest;
  logic signed [DW-1:0] wb_vec [NPE];
  logic signed [DW-1:0] out_data;
  logic [DC_AW-1:0] dc_addr;
  logic [1:0] dc_wmask;
  logic [2*DW-1:0] dc_wdata;
  int checks = 0, failures = 0;

  post_process #(.NPE(NPE), .DW(DW), .AW(AW), .LOG2N(LOG2N), .DC_AW(DC_AW)) dut (.*);

  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask
  task automatic run(func_e f, bit immi, int n_wb, int n_out, int n_dc);
    int wbs, outs, dcs, dones;
    ctrl = '0; ctrl.op = OP_MUL; ctrl.func = f; ctrl.selreg = 3'b001; ctrl.immi = immi;
    foreach (res[i]) res[i] = i + 1;
    @(negedge clk); valid = 1; @(negedge clk); valid = 0;
    wbs = 0; outs = 0; dcs = 0; dones = 0;
    for (int t = 0; t < 30; t++) begin
      #1;
      wbs += wb_we; outs += out_valid; dcs += dc_we; dones += done;
      @(negedge clk);
    end
    chk(wbs == n_wb, $sformatf("wb %0d", wbs));
    chk(outs == n_out, $sformatf("out %0d", outs));
    chk(dcs == n_dc, $sformatf("dc %0d", dcs));
    chk(dones == 1, $sformatf("done %0d", dones));
  endtask

  initial begin
    ctrl = '0; foreach (res[i]) res[i] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    run(F_FFT,  0, 0, 0, NPE);
    run(F_IFFT, 1, 0, 0, NPE);
    run(F_FIR,  0, 1, 0, 0);
    run(F_MAT,  1, 1, NPE, 0);
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
