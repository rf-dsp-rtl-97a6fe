// tb_pe: checks the processing engine against an arithmetic model.
// Random operands for each operation: ADD must give A+B, MUL and SUB
// (A-B)*C shifted right by FRAC, including the channel fills the data
// distributor uses (B=0 for a product, C=1.0 for a difference).
`timescale 1ns/1ps
module tb_pe;
  import rfdsp_pkg::*;
  localparam int DW = 16, AW = 32, FRAC = 8;
  opcode_e op;
  logic signed [DW-1:0] a, b, c;
  logic signed [AW-1:0] r;
  int checks = 0, failures = 0;

  pe #(.DW(DW), .AW(AW), .FRAC(FRAC)) dut (.*);

  function automatic int model(opcode_e o, int x, int y, int z);
    longint p;
    if (o == OP_ADD) return x + y;
    p = (longint'(x) - y) * z;
    return int'(p >>> FRAC);
  endfunction

  initial begin
    for (int n = 0; n < 3000; n++) begin
      op = (n % 3 == 0) ? OP_ADD : (n % 3 == 1) ? OP_MUL : OP_SUB;
      a = DW'($urandom); b = DW'($urandom); c = DW'($urandom);
      if (n % 7 == 0) b = '0;
      if (n % 11 == 0) c = 16'sd256;
      #1;
      checks++;
      if (r !== AW'(model(op, a, b, c))) begin
        failures++;
        if (failures < 10) $display("FAIL op=%0d a=%0d b=%0d c=%0d r=%0d exp=%0d", op, a, b, c, r, model(op, a, b, c));
      end
    end
    // directed: 2.0 * 1.5 = 3.0, 5.0 - 2.0 = 3.0 (C = 1.0)
    op = OP_MUL; a = 16'sd512; b = 0; c = 16'sd384; #1; checks++; if (r != 768) failures++;
    op = OP_SUB; a = 16'sd1280; b = 16'sd512; c = 16'sd256; #1; checks++; if (r != 768) failures++;
    op = OP_ADD; a = -16'sd5; b = 16'sd3; c = 16'sd0; #1; checks++; if (r != -2) failures++;
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
