// add_tree: the selective add-tree behind the PE array.
//
// A binary tree of adders over the NPE lane values (padded with zeros to a
// power of two). Each level halves the number of values; a selector behind
// every level decides whether that level is the output. With en=1 and
// levels=L the result holds one sum per group of 2^L consecutive lanes,
// group g at dout[g]; the other elements are zero. With en=0 the lane values
// pass straight through, so one instance serves summing (filters, matrix
// rows) and lane-wise operations. Example: 8 lanes summed as one group of 8
// (L=3) or as two groups of 4 (L=2) use the same adders; only the output
// level differs. The level-selectable tree is the published idea; the zero
// padding and wrap-around AW-bit sums are this design's choice.
//
// Combinational; the computational engine registers dout.
module add_tree #(
  parameter int NPE = 96,
  parameter int AW  = 32
) (
  input  logic                 en,
  input  logic [2:0]           levels,
  input  logic signed [AW-1:0] din  [NPE],
  output logic signed [AW-1:0] dout [NPE]
);
  localparam int NL = (NPE <= 1) ? 1 : $clog2(NPE);
  localparam int NP = 1 << NL;

  // g_level[k].s[i]: sum of lanes i*2^k .. i*2^k+2^k-1
  for (genvar k = 0; k <= NL; k++) begin : g_level
    logic signed [AW-1:0] s [NP >> k];
    for (genvar i = 0; i < (NP >> k); i++) begin : g_node
      if (k == 0) begin : g_in
        if (i < NPE) begin : g_lane
          assign s[i] = din[i];
        end else begin : g_pad
          assign s[i] = '0;
        end
      end else begin : g_add
        assign s[i] = g_level[k-1].s[2*i] + g_level[k-1].s[2*i+1];
      end
    end
  end

  // output selector of each lane: the level chosen by the instruction
  for (genvar i = 0; i < NPE; i++) begin : g_out
    logic signed [AW-1:0] cand [NL+1];
    for (genvar k = 1; k <= NL; k++) begin : g_cand
      if (i < (NP >> k)) begin : g_tap
        assign cand[k] = g_level[k].s[i];
      end else begin : g_none
        assign cand[k] = '0;
      end
    end
    assign cand[0] = din[i];
    always_comb begin
      dout[i] = din[i];
      if (en) begin
        dout[i] = '0;
        for (int k = 1; k <= NL; k++)
          if (int'(levels) == k) dout[i] = cand[k];
      end
    end
  end
endmodule
