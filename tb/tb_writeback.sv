// tb_writeback: feeds engine results and checks the array write (target,
// group broadcast for tree results, saturation to 16 bits) and the output
// stream (count and values, immi=1 only), plus the done pulse timing.
`timescale 1ns/1ps
module tb_writeback;
  import rfdsp_pkg::*;
  localparam int NPE = 16, DW = 16, AW = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, wb_we, out_valid, done;
  instr_t ctrl;
  logic signed [AW-1:0] res [NPE];
  arr_e wb_dest;
  logic signed [DW-1:0] wb_vec [NPE];
  logic signed [DW-1:0] out_data;
  int checks = 0, failures = 0;

  writeback #(.NPE(NPE), .DW(DW), .AW(AW)) dut (.*);

  function automatic int sat(int v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : v;
  endfunction
  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  task automatic run(opcode_e op, func_e f, bit tree, int order, bit immi,
                     arr_e edest, int nout);
    int lv, got, t;
    ctrl = '0; ctrl.op = op; ctrl.func = f; ctrl.tree = tree; ctrl.order = 6'(order); ctrl.immi = immi;
    foreach (res[i]) res[i] = (i % 3 == 0) ? $urandom_range(0, 200000) - 100000 : $urandom_range(0, 2000) - 1000;
    lv = int'(tree_levels(ctrl.order));
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    #1;
    chk(wb_we && wb_dest == edest, "array target");
    for (int i = 0; i < NPE; i++)
      chk(wb_vec[i] == DW'(sat(tree ? res[i >> lv] : res[i])), $sformatf("vec %0d", i));
    got = 0; t = 0;
    while (!done && t < 100) begin
      if (out_valid) begin
        chk(out_data == DW'(sat(res[got])), "stream value");
        got++;
      end
      @(posedge clk); #1; t++;
    end
    if (out_valid) begin chk(out_data == DW'(sat(res[got])), "stream value"); got++; end
    chk(got == nout, $sformatf("stream count %0d exp %0d", got, nout));
    chk(t == ((nout == 0) ? 0 : nout), $sformatf("done after %0d", t));
  endtask

  initial begin
    ctrl = '0; foreach (res[i]) res[i] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    run(OP_MUL, F_LMS_W, 1, 5, 0, ARR_Y, 0);        // Eq1
    run(OP_SUB, F_LMS_U, 0, 5, 0, ARR_M, 0);        // Eq2
    run(OP_MUL, F_FIR,   0, 5, 0, ARR_M, 0);        // Eq3
    run(OP_ADD, F_LMS_W, 0, 5, 1, ARR_W, 5);        // Eq4, end of operation
    run(OP_MUL, F_FIR,   1, 4, 1, ARR_Y, 1);        // FIR output
    run(OP_MUL, F_MAT,   1, 3, 1, ARR_Y, NPE / 4);  // matrix: one per group
    run(OP_ADD, F_MAT,   0, 0, 1, ARR_M, NPE);      // element-wise, all lanes
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
