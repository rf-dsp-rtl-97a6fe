// fft_post: the FFT module of the post-process.
//
// An FFT runs as several rounds, and each round needs the previous round's
// results in a different order. For each result of an FFT instruction this
// module generates the data-cache address where the next round expects it,
// and writes it there. The round number comes from the instruction's order
// field. A running index counts results over the FFT (modulo 2^LOG2N, cleared
// by clr); for every round but the last the address is the index rotated
// left by one bit (the perfect shuffle of a constant-geometry radix-2 FFT);
// in the last round it is the index itself. sel-reg x writes the value to the
// low (real) half of the word, mid to the high (imaginary) half. Lanes
// 0..NPE-1 are written, one per cycle, and done pulses with the last write.
// That this module computes per-round addresses and sends the data back to
// the data cache is published; the permutation itself is this design's.
module fft_post
  import rfdsp_pkg::*;
#(
  parameter int NPE   = 96,
  parameter int DW    = 16,
  parameter int AW    = 32,
  parameter int LOG2N = 10,
  parameter int DC_AW = 11
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clr,
  input  logic                 start,
  input  instr_t               ctrl,
  input  logic signed [AW-1:0] res [NPE],
  output logic                 dc_we,
  output logic [DC_AW-1:0]     dc_addr,
  output logic [1:0]           dc_wmask,
  output logic [2*DW-1:0]      dc_wdata,
  output logic                 done
);
  logic signed [DW-1:0] hold [NPE];
  logic [LOG2N-1:0]     idx;
  logic [6:0]           k;
  logic                 act, last_round;
  logic [1:0]           mask;

  function automatic logic [LOG2N-1:0] rotl1(logic [LOG2N-1:0] v);
    return {v[LOG2N-2:0], v[LOG2N-1]};
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx <= '0; k <= '0; act <= 1'b0; last_round <= 1'b0; mask <= '0;
      dc_we <= 1'b0; dc_addr <= '0; dc_wmask <= '0; dc_wdata <= '0; done <= 1'b0;
      for (int i = 0; i < NPE; i++) hold[i] <= '0;
    end else begin
      dc_we <= 1'b0;
      done  <= 1'b0;
      if (clr) idx <= '0;
      if (start) begin
        for (int i = 0; i < NPE; i++) hold[i] <= DW'(res[i]);
        act        <= 1'b1;
        k          <= '0;
        last_round <= (int'(ctrl.order) >= LOG2N - 1);
        mask       <= {ctrl.selreg[SR_M], ctrl.selreg[SR_X]};
      end else if (act) begin
        dc_we    <= 1'b1;
        dc_addr  <= DC_AW'(last_round ? idx : rotl1(idx));
        dc_wmask <= mask;
        dc_wdata <= {hold[k], hold[k]};
        idx      <= idx + 1'b1;
        k        <= k + 1'b1;
        if (int'(k) == NPE - 1) begin act <= 1'b0; done <= 1'b1; end
      end
    end
  end
endmodule
