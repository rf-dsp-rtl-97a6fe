// tb_instr_cache: writes random words to random addresses of the
// instruction cache, then reads every written address back and checks the
// word arrives one cycle after its address.
`timescale 1ns/1ps
module tb_instr_cache;
  localparam int DEPTH = 4096, AWID = 12;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we = 0;
  logic [AWID-1:0] waddr = 0, raddr = 0;
  logic [31:0] wdata = 0, rdata;
  logic [31:0] ref_mem [DEPTH];
  bit          written [DEPTH];
  int checks = 0, failures = 0;

  instr_cache #(.DEPTH(DEPTH)) dut (.*);

  initial begin
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      we = 1; waddr = AWID'($urandom); wdata = $urandom;
      ref_mem[waddr] = wdata; written[waddr] = 1;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < DEPTH; i++) if (written[i]) begin
      raddr = AWID'(i);
      @(posedge clk); #1;
      checks++;
      if (rdata !== ref_mem[i]) begin failures++; $display("FAIL addr %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
