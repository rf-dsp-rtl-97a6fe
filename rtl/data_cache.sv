// data_cache: the data cache inside the pre-process.
//
// A synchronous RAM of DEPTH 32-bit words. Each word packs two 16-bit values
// (for example real and imaginary part, or x(n) and d(n)) so that one read
// yields both operands an algorithm step needs. Two write ports: the DDR side
// (h_*) writes whole words; the FFT post-process module (f_*) writes the
// halves selected by f_wmask (bit 0 low half, bit 1 high half) and has
// priority when both write in the same cycle. One read port with one cycle of
// latency serves the pre-process. The packed-word format and the FFT write
// path are published; sizes, priority and latency are this design's.
module data_cache #(
  parameter int DEPTH = 2048,
  parameter int DW    = 16,
  parameter int AWID  = $clog2(DEPTH)
) (
  input  logic            clk,
  input  logic            h_we,
  input  logic [AWID-1:0] h_addr,
  input  logic [2*DW-1:0] h_wdata,
  input  logic            f_we,
  input  logic [AWID-1:0] f_addr,
  input  logic [1:0]      f_wmask,
  input  logic [2*DW-1:0] f_wdata,
  input  logic [AWID-1:0] raddr,
  output logic [2*DW-1:0] rdata
);
  logic [DW-1:0] lo [DEPTH];
  logic [DW-1:0] hi [DEPTH];

  always_ff @(posedge clk) begin
    if (f_we) begin
      if (f_wmask[0]) lo[f_addr] <= f_wdata[DW-1:0];
      if (f_wmask[1]) hi[f_addr] <= f_wdata[2*DW-1:DW];
    end else if (h_we) begin
      lo[h_addr] <= h_wdata[DW-1:0];
      hi[h_addr] <= h_wdata[2*DW-1:DW];
    end
    rdata <= {hi[raddr], lo[raddr]};
  end
endmodule
