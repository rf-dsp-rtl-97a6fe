// tb_add_tree: checks the selective add-tree at the default 96 lanes.
// For every level count 1..7 and random lane values, dout[g] must be the sum
// of lanes g*2^L .. g*2^L+2^L-1 (lanes past 96 count as zero) and the other
// outputs zero; with en=0 the lanes pass through unchanged.
`timescale 1ns/1ps
module tb_add_tree;
  localparam int NPE = 96, AW = 32;
  logic en;
  logic [2:0] levels;
  logic signed [AW-1:0] din [NPE], dout [NPE];
  int checks = 0, failures = 0;

  add_tree #(.NPE(NPE), .AW(AW)) dut (.*);

  initial begin
    for (int rep = 0; rep < 20; rep++) begin
      for (int i = 0; i < NPE; i++) din[i] = $urandom_range(0, 200000) - 100000;
      en = 0; levels = 3'($urandom); #1;
      for (int i = 0; i < NPE; i++) begin
        checks++; if (dout[i] != din[i]) failures++;
      end
      for (int L = 1; L <= 7; L++) begin
        en = 1; levels = 3'(L); #1;
        for (int g = 0; g < NPE; g++) begin
          longint s; s = 0;
          if (g < (128 >> L))
            for (int k = 0; k < (1 << L); k++)
              if (g * (1 << L) + k < NPE) s += din[g * (1 << L) + k];
          checks++;
          if (dout[g] != AW'(s)) begin
            failures++;
            if (failures < 10) $display("FAIL L=%0d g=%0d got %0d exp %0d", L, g, dout[g], s);
          end
        end
      end
    end
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
