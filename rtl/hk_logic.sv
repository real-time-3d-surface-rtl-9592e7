// hk_logic: sign of mean (H) and Gaussian (K) curvature for one pixel.
//
// From the five partial derivatives Zx, Zy, Zxx, Zyy, Zxy it forms
//   E = 1 + Zx^2, F = Zx*Zy, G = 1 + Zy^2, e = Zxx, f = Zxy, g = Zyy,
//   norm = Zx^2 + Zy^2 + 1
// and, instead of dividing, compares numerators with threshold-scaled
// denominators:
//   Pk = e*g - f^2,            Bk = norm * (E*G - F^2)
//   Ph = 2*f*F - e*G - g*E,    Bh = 2 * (E*G - F^2) * sqrt(norm)
//   K' = 0 if |Pk| < Tk*|Bk|, else sign(Pk)*sign(Bk)   (same for H' with Th)
// so that H and K themselves are never computed. sqrt(norm) comes from the
// piecewise-linear root (sqrt_pwl). Signs are 2-bit two's complement
// (00 zero, 01 positive, 11 negative).
//
// Formats: derivatives are signed DW-bit with 3 fraction bits; thresholds
// are unsigned TW-bit with TF fraction bits (8.6 in DCP1, 12.11 in DCP2).
// norm enters the root as unsigned 22.6, saturated if it would not fit.
// All other products are kept at full width, which is this design's choice;
// the published hardware truncates some of them to save resources.
//
// Timing: fully pipelined, one pixel per clock, signs LATENCY = 7 clocks
// after in_valid. Thresholds are sampled when the comparison is made, so
// they may change while the processor runs.
module hk_logic
  import dcp_pkg::*;
#(
  parameter int unsigned TW = 12,   // threshold word length
  parameter int unsigned TF = 11    // threshold fraction length
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  grad_t           grad,
  input  logic [TW-1:0]   th,
  input  logic [TW-1:0]   tk,
  output logic            out_valid,
  output sign2_t          sign_h,
  output sign2_t          sign_k
);

  localparam int unsigned LATENCY = 7;
  localparam int P2 = 2*DW;            // square / product of two derivatives
  localparam int NW = 2*DW + 2;        // E, G, norm
  localparam int QW = 4*DW + 5;        // E*G - F^2
  localparam int PHW = 3*DW + 7;       // Ph
  localparam int BKW = 6*DW + 9;       // Bk
  localparam int BHW = 4*DW + 18;      // Bh
  localparam int KW = TW + BKW + 2;    // K comparison width
  localparam int HW = TW + BHW + 2;    // H comparison width

  function automatic sign2_t sgn(input logic neg, input logic zero);
    return zero ? SIGN_ZERO : (neg ? SIGN_NEG : SIGN_POS);
  endfunction

  function automatic sign2_t sgn_mul(input sign2_t a, input sign2_t b);
    if (a == SIGN_ZERO || b == SIGN_ZERO) return SIGN_ZERO;
    return (a == b) ? SIGN_POS : SIGN_NEG;
  endfunction

  logic [LATENCY:1] v;

  // ---- stage 1: squares and products of the derivatives
  logic signed [P2-1:0] zx2, zy2, ff1, eg1, fsq1;
  logic signed [NW-1:0] e_big1, g_big1, norm1;
  logic signed [DW-1:0] e1, f1, g1;
  always_ff @(posedge clk) begin
    zx2  <= P2'(grad.zx) * P2'(grad.zx);
    zy2  <= P2'(grad.zy) * P2'(grad.zy);
    ff1  <= P2'(grad.zx) * P2'(grad.zy);
    eg1  <= P2'(grad.zxx) * P2'(grad.zyy);
    fsq1 <= P2'(grad.zxy) * P2'(grad.zxy);
    e1   <= grad.zxx;
    f1   <= grad.zxy;
    g1   <= grad.zyy;
  end
  always_comb begin
    e_big1 = NW'(zx2) + NW'(64);                 // 1.0 with 6 fraction bits
    g_big1 = NW'(zy2) + NW'(64);
    norm1  = NW'(zx2) + NW'(zy2) + NW'(64);
  end

  // square root of norm, 22.6 in, 11.3 out, 3 clocks
  logic [21:0] norm_sq_in;
  logic [10:0] root;
  logic        root_valid;
  always_comb norm_sq_in = (norm1 > NW'(22'h3FFFFF)) ? 22'h3FFFFF : norm1[21:0];

  sqrt_pwl u_sqrt (
    .clk, .rst_n,
    .in_valid (v[1]),
    .x        (norm_sq_in),
    .out_valid(root_valid),
    .y        (root)
  );

  // ---- stage 2: E*G - F^2 (12 frac), Pk (6 frac), Ph (9 frac)
  logic signed [QW-1:0]  q2;
  logic signed [NW-1:0]  pk2, norm2;
  logic signed [PHW-1:0] ph2;
  always_ff @(posedge clk) begin
    q2    <= QW'(e_big1) * QW'(g_big1) - QW'(ff1) * QW'(ff1);
    pk2   <= NW'(eg1) - NW'(fsq1);
    ph2   <= PHW'(2) * PHW'(f1) * PHW'(ff1) - PHW'(e1) * PHW'(g_big1) - PHW'(g1) * PHW'(e_big1);
    norm2 <= norm1;
  end

  // ---- stage 3: Bk = norm * (E*G - F^2) (18 frac)
  logic signed [BKW-1:0] bk3;
  logic signed [QW-1:0]  q3;
  logic signed [NW-1:0]  pk3;
  logic signed [PHW-1:0] ph3;
  always_ff @(posedge clk) begin
    bk3 <= BKW'(norm2) * BKW'(q2);
    q3  <= q2;
    pk3 <= pk2;
    ph3 <= ph2;
  end

  // ---- stage 4: wait for the root (it arrives with stage 4)
  logic signed [BKW-1:0] bk4;
  logic signed [QW-1:0]  q4;
  logic signed [NW-1:0]  pk4;
  logic signed [PHW-1:0] ph4;
  always_ff @(posedge clk) begin
    bk4 <= bk3;
    q4  <= q3;
    pk4 <= pk3;
    ph4 <= ph3;
  end

  // ---- stage 5: Bh = 2 * (E*G - F^2) * sqrt(norm) (15 frac), Tk*|Bk|
  logic signed [BHW-1:0] bh5;
  logic signed [KW-1:0]  tkbk5, pk5;
  sign2_t                sbk5;
  logic signed [PHW-1:0] ph5;
  logic signed [BKW-1:0] bk_abs4;
  always_comb bk_abs4 = bk4[BKW-1] ? -bk4 : bk4;
  always_ff @(posedge clk) begin
    bh5   <= BHW'(2) * BHW'(q4) * BHW'($signed({1'b0, root}));
    tkbk5 <= KW'($signed({1'b0, tk})) * KW'(bk_abs4);
    pk5   <= KW'(pk4) <<< (TF + 12);
    sbk5  <= sgn(bk4[BKW-1], bk4 == '0);
    ph5   <= ph4;
  end

  // ---- stage 6: K' decision, Th*|Bh|
  logic signed [HW-1:0]  thbh6, ph6;
  sign2_t                sbh6, sk6;
  logic signed [KW-1:0]  pk_abs5;
  logic signed [BHW-1:0] bh_abs5;
  always_comb begin
    pk_abs5 = pk5[KW-1] ? -pk5 : pk5;
    bh_abs5 = bh5[BHW-1] ? -bh5 : bh5;
  end
  always_ff @(posedge clk) begin
    sk6   <= (pk_abs5 < tkbk5) ? SIGN_ZERO : sgn_mul(sgn(pk5[KW-1], pk5 == '0), sbk5);
    thbh6 <= HW'($signed({1'b0, th})) * HW'(bh_abs5);
    ph6   <= HW'(ph5) <<< (TF + 6);
    sbh6  <= sgn(bh5[BHW-1], bh5 == '0);
  end

  // ---- stage 7: H' decision
  logic signed [HW-1:0] ph_abs6;
  always_comb ph_abs6 = ph6[HW-1] ? -ph6 : ph6;
  always_ff @(posedge clk) begin
    sign_h <= (ph_abs6 < thbh6) ? SIGN_ZERO : sgn_mul(sgn(ph6[HW-1], ph6 == '0), sbh6);
    sign_k <= sk6;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v <= '0;
    else        v <= {v[LATENCY-1:1], in_valid};
  end
  assign out_valid = v[LATENCY];

  // the root must line up with stage 4
  assert property (@(posedge clk) disable iff (!rst_n) v[4] |-> root_valid);

endmodule
