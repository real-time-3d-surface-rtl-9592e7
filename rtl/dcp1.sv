// dcp1: digital curvature processor, type 1 (causal differences).
//
// Classifies every pixel of a streamed range map by the signs of its mean
// (H) and Gaussian (K) curvature, and at the same time produces the next
// scale level of the map for the next processor of a scale-space pipeline.
//
// Derivatives use one-sided (backward) differences, so nothing from the
// future is needed and a vector's classification leaves the processor a few
// clocks after the vector arrives, with no row delay:
//   Zu  = Z[v,u]  - Z[v,u-1]     Zv  = Z[v,u]  - Z[v-1,u]
//   Zuu = Zu[v,u] - Zu[v,u-1]    Zvv = Zv[v,u] - Zv[v-1,u]
//   Zvu = Zv[v,u] - Zv[v,u-1]
// (x = u and y = v: unit sample spacing.) The row differences (Du, Duu, Dvu)
// keep one sample of the previous vector; the column differences (Dv, Dvv)
// keep one row in a block memory, and the scale-space kernel shares the Dv
// memory. Eight HK logic units then classify the eight pixels in parallel.
// The left and top borders, where a neighbour is missing, read that
// neighbour as zero; their results are not meaningful.
//
// Interfaces: source handshake (read_cmd, src_addr, read_done, r_vec) as
// described in dcp_ctrl; classification output through out_writer
// (wr_cmd, wr_addr, wr_data, wr_done), one 32-bit word per pixel with the
// sign of H in bits 9:8 and the sign of K in bits 1:0; next-scale output
// through scale_port, which answers the next processor's read_cmd.
// Thresholds are unsigned 8.6 and may change at any time.
//
// Timing: one vector per VEC_PERIOD clocks (22 by default, the published
// per-vector figure). The classification of a vector is queued for writing
// 12 clocks after read_done.
module dcp1
  import dcp_pkg::*;
#(
  parameter int unsigned ROWS       = 128,
  parameter int unsigned COLS       = 128,
  parameter int unsigned VEC_PERIOD = 22,
  parameter int unsigned TW         = 8,
  parameter int unsigned TF         = 6
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [TW-1:0]   th,
  input  logic [TW-1:0]   tk,
  input  logic            ss_enable,     // produce the next scale level
  input  logic [31:0]     src_base,
  input  logic [31:0]     dst_base,
  // range vector source
  output logic            read_cmd,
  output logic [31:0]     src_addr,
  input  logic            read_done,
  input  rvec_t           r_vec,
  // classification output
  output logic            wr_cmd,
  output logic [31:0]     wr_addr,
  output cvec_t           wr_data,
  input  logic            wr_done,
  // next-scale output, served like a range map generator
  input  logic            ss_read_cmd,
  output logic            ss_read_done,
  output rvec_t           ss_r_vec,
  // status
  output logic            busy,
  output logic            frame_done,
  output logic [15:0]     stall_count
);

  localparam int unsigned ROW_VECS = COLS / LANES;
  localparam int unsigned CW       = $clog2(ROW_VECS);
  localparam int unsigned RWID     = $clog2(ROWS);
  localparam int unsigned IW       = $clog2(ROWS * ROW_VECS);
  localparam int unsigned HK_LAT   = 7;
  localparam int unsigned DEPTH    = 2 + 2 + HK_LAT;   // vec_valid to classification

  // ---------------- controller
  logic             vec_valid, last_vec, ready, drained;
  rvec_t            vec;
  logic [RWID-1:0]  row;
  logic [CW-1:0]    col;
  logic [IW-1:0]    idx;
  logic [$clog2(5)-1:0] out_free;
  logic [$clog2(3)-1:0] ss_free;
  logic             out_idle;
  logic [DEPTH:1]   inflight;

  dcp_ctrl #(.ROWS(ROWS), .COLS(COLS), .VEC_PERIOD(VEC_PERIOD)) u_ctrl (
    .clk, .rst_n, .start, .src_base,
    .read_cmd, .src_addr, .read_done, .r_vec,
    .ready, .drained,
    .vec_valid, .vec, .row, .col, .idx, .last_vec,
    .busy, .frame_done, .stall_count
  );

  assign ready   = (inflight == '0) && (out_free >= 2) && (ss_free >= 1);
  assign drained = out_idle;

  // ---------------- first differences: Zu (row), Zv (column) + scale space
  logic [LANES-1:0][RW-1:0]       z_in;
  always_comb for (int k = 0; k < LANES; k++) z_in[k] = vec[k].z;

  logic                            zu_valid, zv_valid;
  logic signed [LANES-1:0][RW:0]   zu, zv;
  logic                            ss_valid;
  rvec_t                           ss_vec;

  du_logic #(.LANES(LANES), .IN_W(RW), .IN_SIGNED(1'b0)) u_du (
    .clk, .rst_n, .in_valid(vec_valid), .first_col(col == '0),
    .in_vec(z_in), .out_valid(zu_valid), .out_vec(zu)
  );

  dv_scale_logic #(.ROW_VECS(ROW_VECS)) u_dv (
    .clk, .rst_n, .in_valid(vec_valid), .first_row(row == '0), .odd_row(row[0]),
    .col, .in_vec(vec), .zv_valid, .zv, .ss_valid, .ss_vec
  );

  // row/column flags travel with the data
  logic [1:0] fc_d, fr_d;
  logic [CW-1:0] col_d1, col_d2;
  logic [IW-1:0] idx_d [DEPTH];
  always_ff @(posedge clk) begin
    fc_d   <= {fc_d[0], col == '0};
    fr_d   <= {fr_d[0], row == '0};
    col_d1 <= col;
    col_d2 <= col_d1;
    idx_d[0] <= idx;
    for (int i = 1; i < DEPTH; i++) idx_d[i] <= idx_d[i-1];
  end

  // ---------------- second differences: Zuu, Zvv, Zvu
  logic                              zuu_valid, zvv_valid, zvu_valid;
  logic signed [LANES-1:0][RW+1:0]   zuu, zvv, zvu;

  du_logic #(.LANES(LANES), .IN_W(RW+1), .IN_SIGNED(1'b1)) u_duu (
    .clk, .rst_n, .in_valid(zu_valid), .first_col(fc_d[1]),
    .in_vec(zu), .out_valid(zuu_valid), .out_vec(zuu)
  );

  dv_logic #(.LANES(LANES), .IN_W(RW+1), .IN_SIGNED(1'b1), .ROW_VECS(ROW_VECS)) u_dvv (
    .clk, .rst_n, .in_valid(zv_valid), .first_row(fr_d[1]), .col(col_d2),
    .in_vec(zv), .out_valid(zvv_valid), .out_vec(zvv)
  );

  du_logic #(.LANES(LANES), .IN_W(RW+1), .IN_SIGNED(1'b1)) u_dvu (
    .clk, .rst_n, .in_valid(zv_valid), .first_col(fc_d[1]),
    .in_vec(zv), .out_valid(zvu_valid), .out_vec(zvu)
  );

  // first derivatives delayed to line up with the second ones
  logic signed [LANES-1:0][RW:0] zu_d1, zu_d2, zv_d1, zv_d2;
  always_ff @(posedge clk) begin
    zu_d1 <= zu;  zu_d2 <= zu_d1;
    zv_d1 <= zv;  zv_d2 <= zv_d1;
  end

  // ---------------- eight HK logic units
  logic [LANES-1:0] hk_valid;
  sign2_t [LANES-1:0] sh, sk;
  cvec_t cls;

  for (genvar k = 0; k < LANES; k++) begin : g_hk
    grad_t g;
    always_comb begin
      g.zx = DW'($signed(zu_d2[k]));
      g.zy = DW'($signed(zv_d2[k]));
      g.zxx = DW'($signed(zuu[k]));
      g.zyy = DW'($signed(zvv[k]));
      g.zxy = DW'($signed(zvu[k]));
    end
    hk_logic #(.TW(TW), .TF(TF)) u_hk (
      .clk, .rst_n, .in_valid(zuu_valid), .grad(g), .th, .tk,
      .out_valid(hk_valid[k]), .sign_h(sh[k]), .sign_k(sk[k])
    );
    assign cls[k] = make_class(sh[k], sk[k]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) inflight <= '0;
    else        inflight <= {inflight[DEPTH-1:1], vec_valid};
  end

  // ---------------- outputs
  out_writer #(.W($bits(cvec_t)), .IW(IW), .DEPTH(4)) u_out (
    .clk, .rst_n,
    .push(hk_valid[0]), .din(cls), .din_idx(idx_d[DEPTH-1]),
    .free(out_free), .idle(out_idle),
    .dst_base, .wr_cmd, .wr_addr, .wr_data, .wr_done
  );

  scale_port #(.DEPTH(2)) u_ssp (
    .clk, .rst_n, .enable(ss_enable),
    .push(ss_valid), .din(ss_vec), .free(ss_free),
    .read_cmd(ss_read_cmd), .read_done(ss_read_done), .r_vec(ss_r_vec)
  );

  assert property (@(posedge clk) disable iff (!rst_n) zuu_valid == zvv_valid && zvv_valid == zvu_valid);
  assert property (@(posedge clk) disable iff (!rst_n) hk_valid[0] |-> inflight[DEPTH]);

endmodule
