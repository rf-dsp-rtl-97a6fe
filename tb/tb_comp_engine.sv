// tb_comp_engine: random channel values through the engine at 96 lanes.
// Lane-wise MUL/ADD/SUB results (tree off) and grouped sums (tree on, order
// 3..63) are compared with a model, and valid must rise exactly two cycles
// after start.
`timescale 1ns/1ps
module tb_comp_engine;
  import rfdsp_pkg::*;
  localparam int NPE = 96, DW = 16, AW = 32, FRAC = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, valid;
  instr_t ctrl, ctrl_o;
  logic signed [DW-1:0] a [NPE], b [NPE], c [NPE];
  logic signed [AW-1:0] res [NPE];
  int checks = 0, failures = 0;

  comp_engine #(.NPE(NPE), .DW(DW), .AW(AW), .FRAC(FRAC)) dut (.*);

  function automatic int pem(opcode_e op, int x, int y, int z);
    longint p;
    if (op == OP_ADD) return x + y;
    p = (longint'(x) - y) * z;
    return int'(p >>> FRAC);
  endfunction

  initial begin
    ctrl = '0;
    foreach (a[i]) begin a[i] = 0; b[i] = 0; c[i] = 0; end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 60; n++) begin
      int r [NPE];
      int lv, t;
      @(negedge clk);
      ctrl = '0;
      ctrl.op = opcode_e'($urandom_range(0, 2));
      ctrl.tree = n[0];
      ctrl.order = 6'($urandom_range(3, 63));
      foreach (a[i]) begin a[i] = DW'($urandom); b[i] = DW'($urandom); c[i] = DW'($urandom); end
      foreach (r[i]) r[i] = pem(ctrl.op, a[i], b[i], c[i]);
      lv = int'(tree_levels(ctrl.order));
      start = 1; @(negedge clk); start = 0;
      foreach (a[i]) begin a[i] = 0; b[i] = 0; c[i] = 0; end  // must not matter any more
      t = 1;
      while (!valid && t < 10) begin @(posedge clk); #1; t++; end
      checks++; if (t != 2) begin failures++; $display("FAIL latency %0d", t); end
      for (int g = 0; g < NPE; g++) begin
        int e;
        if (!ctrl.tree) e = r[g];
        else begin
          e = 0;
          if (g < (128 >> lv))
            for (int k = 0; k < (1 << lv); k++) if (g * (1 << lv) + k < NPE) e += r[g * (1 << lv) + k];
        end
        checks++;
        if (res[g] != AW'(e)) begin
          failures++; if (failures < 10) $display("FAIL n=%0d lane %0d got %0d exp %0d", n, g, res[g], e);
        end
      end
      checks++; if (ctrl_o != ctrl) failures++;
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
