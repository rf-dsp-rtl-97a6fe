// tb_data_distributor: fills the four arrays with distinct random values and
// checks the channel values lane by lane for the four LMS steps, a matrix
// step with the tree (group slices g*N+k, shared weights, zeroed lanes
// k >= N) and an element-wise add of two arrays.
`timescale 1ns/1ps
module tb_data_distributor;
  import rfdsp_pkg::*;
  localparam int NPE = 16, DW = 16, FRAC = 8;
  localparam int ONE = 1 << FRAC;
  instr_t ctrl;
  logic signed [DW-1:0] w [NPE], x [NPE], m [NPE], y [NPE], mu;
  logic signed [DW-1:0] a [NPE], b [NPE], c [NPE];
  int checks = 0, failures = 0;

  data_distributor #(.NPE(NPE), .DW(DW), .FRAC(FRAC)) dut (.*);

  function automatic instr_t mk(opcode_e op, logic [2:0] sr, func_e f, bit tree, int order);
    instr_t i;
    i = '0; i.op = op; i.selreg = sr; i.func = f; i.tree = tree; i.order = 6'(order);
    return i;
  endfunction
  task automatic expect3(int l, int ea, int eb, int ec, string what);
    checks++;
    if (a[l] != DW'(ea) || b[l] != DW'(eb) || c[l] != DW'(ec)) begin
      failures++;
      if (failures < 10) $display("FAIL %s lane %0d: %0d %0d %0d exp %0d %0d %0d", what, l, a[l], b[l], c[l], ea, eb, ec);
    end
  endtask

  initial begin
    for (int i = 0; i < NPE; i++) begin
      w[i] = DW'(1000 + i); x[i] = DW'(2000 + i); m[i] = DW'(3000 + i); y[i] = DW'(4000 + i);
    end
    mu = 16'sd16;
    // Eq1: mul x, tree, N=5 -> groups of 8: lane (g,k) A = x[g*5+k], C = w[k]
    ctrl = mk(OP_MUL, 3'b001, F_LMS_W, 1, 5); #1;
    for (int l = 0; l < NPE; l++) begin
      int g, k;
      g = l / 8; k = l % 8;
      if (k < 5) expect3(l, x[g*5+k], 0, w[k], "eq1");
      else       expect3(l, 0, 0, 0, "eq1 pad");
    end
    // Eq2: sub y,mid lms-u -> A=mid, B=y, C=mu
    ctrl = mk(OP_SUB, 3'b110, F_LMS_U, 0, 5); #1;
    for (int l = 0; l < NPE; l++) expect3(l, m[l], y[l], mu, "eq2");
    // Eq3: mul x,mid -> A=x, B=0, C=mid
    ctrl = mk(OP_MUL, 3'b011, F_FIR, 0, 5); #1;
    for (int l = 0; l < NPE; l++) expect3(l, x[l], 0, m[l], "eq3");
    // Eq4: add mid lms-w -> A=mid, B=w, C=1
    ctrl = mk(OP_ADD, 3'b010, F_LMS_W, 0, 5); #1;
    for (int l = 0; l < NPE; l++) expect3(l, m[l], w[l], ONE, "eq4");
    // matrix: mul x,mid tree N=3 -> groups of 4, A = x[g*3+k], C = m[g*3+k]
    ctrl = mk(OP_MUL, 3'b011, F_MAT, 1, 3); #1;
    for (int l = 0; l < NPE; l++) begin
      int g, k;
      g = l / 4; k = l % 4;
      if (k < 3) expect3(l, x[g*3+k], 0, m[g*3+k], "mat");
      else       expect3(l, 0, 0, 0, "mat pad");
    end
    // sub of x and y with C = 1.0
    ctrl = mk(OP_SUB, 3'b101, F_FIR, 0, 0); #1;
    for (int l = 0; l < NPE; l++) expect3(l, x[l], y[l], ONE, "sub x,y");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
