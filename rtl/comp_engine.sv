// comp_engine: the computational engine, NPE parallel PEs and the selective
// add-tree.
//
// start presents one set of channel values (a, b, c from the data
// distributor) with the decoded instruction ctrl. Stage 1 registers the NPE
// PE outputs; stage 2 registers the add-tree output, so valid rises two
// cycles after start with res holding either the lane results (tree off) or
// one sum per group of 2^L lanes at res[g] (tree on, L = ceil(log2(order))).
// The parallelism equals the number of PEs, as published; the two-stage
// pipeline is this design's choice.
module comp_engine
  import rfdsp_pkg::*;
#(
  parameter int NPE  = 96,
  parameter int DW   = 16,
  parameter int AW   = 32,
  parameter int FRAC = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  instr_t               ctrl,
  input  logic signed [DW-1:0] a   [NPE],
  input  logic signed [DW-1:0] b   [NPE],
  input  logic signed [DW-1:0] c   [NPE],
  output logic                 valid,
  output instr_t               ctrl_o,
  output logic signed [AW-1:0] res [NPE]
);
  logic signed [AW-1:0] pe_r [NPE];
  logic signed [AW-1:0] pe_q [NPE];
  logic signed [AW-1:0] tr   [NPE];
  logic                 v1;
  instr_t               ctrl1;

  for (genvar i = 0; i < NPE; i++) begin : g_pe
    pe #(.DW(DW), .AW(AW), .FRAC(FRAC)) u_pe (
      .op(ctrl.op), .a(a[i]), .b(b[i]), .c(c[i]), .r(pe_r[i]));
  end

  add_tree #(.NPE(NPE), .AW(AW)) u_tree (
    .en(ctrl1.tree), .levels(tree_levels(ctrl1.order)), .din(pe_q), .dout(tr));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; valid <= 1'b0; ctrl1 <= '0; ctrl_o <= '0;
      for (int i = 0; i < NPE; i++) begin pe_q[i] <= '0; res[i] <= '0; end
    end else begin
      v1    <= start;
      valid <= v1;
      if (start) begin
        ctrl1 <= ctrl;
        for (int i = 0; i < NPE; i++) pe_q[i] <= pe_r[i];
      end
      if (v1) begin
        ctrl_o <= ctrl1;
        for (int i = 0; i < NPE; i++) res[i] <= tr[i];
      end
    end
  end
endmodule
