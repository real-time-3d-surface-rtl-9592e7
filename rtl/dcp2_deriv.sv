// dcp2_deriv: centred derivative approximations of the type-2 curvature
// processor, for the eight pixels of a window's centre block.
//
// With Z the unsigned 10.3 range samples and rnd() rounding to the nearest
// representable value (ties upward):
//   Zu  = rnd((Z[v,u+1] - Z[v,u-1]) / 2)
//   Zv  = rnd((Z[v+1,u] - Z[v-1,u]) / 2)
//   Zuu = rnd((Z[v,u+2] - 2 Z[v,u] + Z[v,u-2]) / 4)
//   Zvv = rnd((Z[v+2,u] - 2 Z[v,u] + Z[v-2,u]) / 4)
//   Zvu = rnd((Z[v+1,u+1] - Z[v+1,u-1] - Z[v-1,u+1] + Z[v-1,u-1]) / 4)
// The published formulas for Zuu and Zvv subtract the outer sample
// (Z[v,u-2], Z[v-2,u]); that would not be a second difference (a flat
// surface would not give zero), so here it is added, as in the usual
// central second difference with a step of two samples.
// The divisions drop low bits, which by itself is a floor; rounding adds
// back the highest dropped bit. ROUND = 0 removes that adder (plain floor).
// All five come from the same window at once; the second derivatives do not
// depend on the first ones. Results keep the 3 fraction bits of Z.
//
// Timing: one window per clock, derivatives registered one clock later.
module dcp2_deriv
  import dcp_pkg::*;
#(
  parameter bit ROUND = 1'b1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  logic [4:0][11:0][RW-1:0]   win,     // [row v-2 .. v+2][col u-2 .. u+9]
  output logic                       out_valid,
  output grad_t [LANES-1:0]          grad
);

  localparam int unsigned SW = RW + 3;   // headroom for sums of four samples

  function automatic logic signed [SW-1:0] s(input logic [RW-1:0] z);
    return SW'($signed({1'b0, z}));
  endfunction

  // divide by 2^n, floor, optionally adding the highest dropped bit
  function automatic deriv_t div2n(input logic signed [SW-1:0] x, input int n);
    logic signed [SW-1:0] q;
    q = x >>> n;
    if (ROUND) q = q + SW'(x[n-1]);
    return DW'(q);
  endfunction

  always_ff @(posedge clk) begin
    if (in_valid) begin
      for (int k = 0; k < LANES; k++) begin
        automatic int c = k + 2;
        grad[k].zx  <= div2n(s(win[2][c+1]) - s(win[2][c-1]), 1);
        grad[k].zy  <= div2n(s(win[3][c]) - s(win[1][c]), 1);
        grad[k].zxx <= div2n(s(win[2][c+2]) - 2 * s(win[2][c]) + s(win[2][c-2]), 2);
        grad[k].zyy <= div2n(s(win[4][c]) - 2 * s(win[2][c]) + s(win[0][c]), 2);
        grad[k].zxy <= div2n(s(win[3][c+1]) - s(win[3][c-1]) - s(win[1][c+1]) + s(win[1][c-1]), 2);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

endmodule
