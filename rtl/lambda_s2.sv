// lambda_s2: second stage of the turbo Lambda unit ("PMAX*").
//
// Six max* operations and one subtraction: the four stage-one results for
// u = 0 (s1[0..3]) and the four for u = 1 (s1[4..7]) are each reduced by a
// tree of three max*, and the LLR is max*(u=0) - max*(u=1), i.e.
// log P(u=0)/P(u=1). Each max* is max(a,b) + g(|a-b|) with the double-sided
// table, in modulo-2^10 arithmetic. The operation count follows the
// architecture; the tree shape and the sign convention are this design's.
// Timing: one cycle; llr loads when en is high.
module lambda_s2
  import udec_pkg::*;
(
  input  logic clk,
  input  logic en,
  input  sm_t  s1  [NLANE],
  output sm_t  llr
);
  // stage a: four max* on the inputs; stage b: two max* on their results
  sm_t        a_d [4], a_o [4], b_d [2], b_o [2];
  logic [1:0] a_g [4], b_g [2];

  for (genvar k = 0; k < 4; k++) begin : g_stage_a
    assign a_d[k] = s1[2*k] - s1[2*k+1];
    g_lut #(.IW(SMW), .DOUBLE_SIDED(1'b1)) u_dlut (.idx(a_d[k]), .g(a_g[k]));
    assign a_o[k] = (a_d[k][SMW-1] ? s1[2*k+1] : s1[2*k]) + SMW'(a_g[k]);
  end

  for (genvar k = 0; k < 2; k++) begin : g_stage_b
    assign b_d[k] = a_o[2*k] - a_o[2*k+1];
    g_lut #(.IW(SMW), .DOUBLE_SIDED(1'b1)) u_dlut (.idx(b_d[k]), .g(b_g[k]));
    assign b_o[k] = (b_d[k][SMW-1] ? a_o[2*k+1] : a_o[2*k]) + SMW'(b_g[k]);
  end

  always_ff @(posedge clk)
    if (en) llr <= b_o[0] - b_o[1];
endmodule
