// tb_fft_post: two FFT result instructions of 16-point size (LOG2N=4, 8
// lanes): round 0 must write each result to the left-rotated index, the
// last round to the index itself, in the half chosen by sel-reg, one per
// cycle, with the running index continuing across instructions.
`timescale 1ns/1ps
module tb_fft_post;
  import rfdsp_pkg::*;
  localparam int NPE = 8, DW = 16, AW = 32, LOG2N = 4, DC_AW = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clr = 0, start = 0, dc_we, done;
  instr_t ctrl;
  logic signed [AW-1:0] res [NPE];
  logic [DC_AW-1:0] dc_addr;
  logic [1:0] dc_wmask;
  logic [2*DW-1:0] dc_wdata;
  int checks = 0, failures = 0;

  fft_post #(.NPE(NPE), .DW(DW), .AW(AW), .LOG2N(LOG2N), .DC_AW(DC_AW)) dut (.*);

  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  task automatic run(int round, logic [2:0] sr, int base);
    int got, t;
    ctrl = '0; ctrl.op = OP_MUL; ctrl.func = F_FFT; ctrl.selreg = sr; ctrl.order = 6'(round);
    foreach (res[i]) res[i] = $urandom_range(0, 60000) - 30000;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    got = 0; t = 0;
    while (t < 40) begin
      @(posedge clk); #1; t++;
      if (dc_we) begin
        int idx, ea;
        idx = (base + got) % 16;
        ea = (round < LOG2N - 1) ? (((idx << 1) | (idx >> 3)) & 15) : idx;
        chk(int'(dc_addr) == ea, $sformatf("addr %0d exp %0d", dc_addr, ea));
        chk(dc_wmask == {sr[1], sr[0]}, "half select");
        chk(dc_wdata[DW-1:0] == DW'(res[got]), "data");
        got++;
      end
      if (done) break;
    end
    chk(got == NPE, "count");
    chk(t == NPE, $sformatf("duration %0d", t));
  endtask

  initial begin
    ctrl = '0; foreach (res[i]) res[i] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    run(0, 3'b001, 0);
    run(0, 3'b010, 8);
    run(3, 3'b001, 0);
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
