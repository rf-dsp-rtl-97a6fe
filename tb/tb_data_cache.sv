// tb_data_cache: random whole-word writes from the DDR port and half-word
// writes from the FFT port (which wins a same-cycle collision), checked
// against a model by reading every address back with one cycle of latency.
`timescale 1ns/1ps
module tb_data_cache;
  localparam int DEPTH = 2048, DW = 16, AWID = 11;
  logic clk = 0;
  always #5 clk = ~clk;
  logic h_we = 0, f_we = 0;
  logic [AWID-1:0] h_addr = 0, f_addr = 0, raddr = 0;
  logic [2*DW-1:0] h_wdata = 0, f_wdata = 0, rdata;
  logic [1:0] f_wmask = 0;
  logic [2*DW-1:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  data_cache #(.DEPTH(DEPTH), .DW(DW)) dut (.*);

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); h_we = 1; h_addr = AWID'(i); h_wdata = $urandom; ref_mem[i] = h_wdata;
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      h_we = $urandom_range(0, 1); h_addr = AWID'($urandom); h_wdata = $urandom;
      f_we = $urandom_range(0, 1); f_addr = AWID'($urandom_range(0, 15)); f_wdata = $urandom;
      f_wmask = 2'($urandom);
      if (f_we) begin
        if (f_wmask[0]) ref_mem[f_addr][DW-1:0] = f_wdata[DW-1:0];
        if (f_wmask[1]) ref_mem[f_addr][2*DW-1:DW] = f_wdata[2*DW-1:DW];
      end else if (h_we) ref_mem[h_addr] = h_wdata;
    end
    @(negedge clk); h_we = 0; f_we = 0;
    for (int i = 0; i < DEPTH; i++) begin
      raddr = AWID'(i);
      @(posedge clk); #1;
      checks++;
      if (rdata !== ref_mem[i]) begin
        failures++;
        if (failures < 10) $display("FAIL addr %0d got %h exp %h", i, rdata, ref_mem[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
