// facs: flexible add-compare-select kernel shared by LDPC and turbo decoding.
//
// Two adders form X+Y and V+W. In turbo mode (ldpc = 0) the unit is a log-MAP
// ACS: the difference of the two sums picks the larger one and, through the
// double-sided table, gives the correction, Z = max*(X+Y, V+W). In LDPC mode
// (ldpc = 1) the caller drives X = V = |a|, Y = |b|, W = -|b|; the sum feeds
// the single-sided table, the difference feeds the double-sided table and
// selects the smaller input, and Z = min(|a|,|b|) + g(|a|+|b|) - g(||a|-|b||),
// the magnitude of the check-node function f(a,b). Signs are handled by the
// owner of the unit.
//
// Structure (two adders, LUT, DLUT, a subtractor between them, a DLUT after
// it, two select muxes, a mode mux, a final adder and an output register)
// follows the architecture. Own choices: turbo arithmetic wraps modulo
// 2^XW (modulo normalisation of the state metrics, so the compare is the sign
// of the wrapped difference); the LDPC sums carry one extra bit so |a|+|b|
// cannot wrap; the LDPC result is clamped at zero.
//
// Timing: one cycle, the output register loads when en is high. No reset; the
// owner initialises metrics through its own input mux.
module facs #(
  parameter int unsigned XW = 10,
  parameter int unsigned YW = 8
) (
  input  logic                 clk,
  input  logic                 en,
  input  logic                 ldpc,
  input  logic signed [XW-1:0] x,
  input  logic signed [YW-1:0] y,
  input  logic signed [XW-1:0] v,
  input  logic signed [YW-1:0] w,
  output logic signed [XW-1:0] z
);
  logic signed [XW:0]   s_top, s_bot;      // one guard bit for LDPC sums
  logic signed [XW-1:0] t_top, t_bot, diff; // wrapped turbo sums
  logic [1:0]           g_top, g_bot, g_diff;
  logic signed [XW+1:0] ldpc_z;
  logic signed [XW-1:0] sel_max, sel_min, z_d;

  always_comb begin
    s_top = (XW+1)'(x) + (XW+1)'(y);
    s_bot = (XW+1)'(v) + (XW+1)'(w);
    t_top = s_top[XW-1:0];
    t_bot = s_bot[XW-1:0];
    diff  = t_top - t_bot;
  end

  g_lut #(.IW(XW+1), .DOUBLE_SIDED(1'b0)) u_lut   (.idx(s_top), .g(g_top));
  g_lut #(.IW(XW+1), .DOUBLE_SIDED(1'b1)) u_dlut  (.idx(s_bot), .g(g_bot));
  g_lut #(.IW(XW),   .DOUBLE_SIDED(1'b1)) u_dlut2 (.idx(diff),  .g(g_diff));

  always_comb begin
    // turbo: the sign of the difference selects the larger sum
    sel_max = diff[XW-1] ? t_bot : t_top;
    // LDPC: the sign of |a|-|b| selects the smaller magnitude
    sel_min = s_bot[XW] ? x : XW'(y);
    ldpc_z  = (XW+2)'(sel_min) + (XW+2)'($signed({1'b0, g_top}))
            - (XW+2)'($signed({1'b0, g_bot}));
    if (ldpc)
      z_d = ldpc_z[XW+1] ? '0 : ldpc_z[XW-1:0];
    else
      z_d = sel_max + XW'(g_diff);
  end

  always_ff @(posedge clk)
    if (en) z <= z_d;
endmodule
