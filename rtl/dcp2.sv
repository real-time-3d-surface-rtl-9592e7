// dcp2: digital curvature processor, type 2 (centred differences).
//
// Same job as the type-1 processor -- classify each pixel of a streamed
// range map by the signs of H and K, and produce the next scale level --
// but with centred, rounded derivative approximations that use samples up
// to two rows and two columns on each side of the pixel. They are far less
// noisy than one-sided differences, at the price of more memory and of a
// delay: the results for row v-2 are produced while row v streams in, so
// the first results need five rows of input, and the first and last two
// rows and columns of the map get no meaningful result (the last two rows
// get none at all).
//
// Structure: dcp_ctrl fetches vectors; dcp2_window keeps the four previous
// rows in a block memory and builds a 5 x 12 window for each centre block;
// dcp2_deriv forms Zu, Zv, Zuu, Zvv, Zvu at once; eight HK logic units
// classify the eight pixels; out_writer writes the classification vector
// of row v-2 to dst_base + 32 * ((v-2) * COLS/8 + block). The scale-space
// kernel is separate from the derivative logic and reads the previous row
// from the same block memory; it adds no delay beyond one row.
//
// Interfaces are those of dcp1; thresholds are unsigned 12.11.
//
// Timing: one vector per VEC_PERIOD clocks (32 by default, the published
// per-vector figure). A classification vector is queued for writing
// 11 clocks after the read_done of the vector that completes its window
// (12 clocks for the last block of a row).
module dcp2
  import dcp_pkg::*;
#(
  parameter int unsigned ROWS       = 128,
  parameter int unsigned COLS       = 128,
  parameter int unsigned VEC_PERIOD = 32,
  parameter int unsigned TW         = 12,
  parameter int unsigned TF         = 11,
  parameter bit          ROUND      = 1'b1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [TW-1:0]   th,
  input  logic [TW-1:0]   tk,
  input  logic            ss_enable,
  input  logic [31:0]     src_base,
  input  logic [31:0]     dst_base,
  output logic            read_cmd,
  output logic [31:0]     src_addr,
  input  logic            read_done,
  input  rvec_t           r_vec,
  output logic            wr_cmd,
  output logic [31:0]     wr_addr,
  output cvec_t           wr_data,
  input  logic            wr_done,
  input  logic            ss_read_cmd,
  output logic            ss_read_done,
  output rvec_t           ss_r_vec,
  output logic            busy,
  output logic            frame_done,
  output logic [15:0]     stall_count
);

  localparam int unsigned ROW_VECS = COLS / LANES;
  localparam int unsigned CW       = $clog2(ROW_VECS);
  localparam int unsigned RWID     = $clog2(ROWS);
  localparam int unsigned IW       = $clog2(ROWS * ROW_VECS);
  localparam int unsigned HK_LAT   = 7;
  localparam int unsigned DEPTH    = 3 + 1 + HK_LAT;    // vec_valid to last classification

  logic             vec_valid, last_vec, ready, drained, out_idle;
  rvec_t            vec;
  logic [RWID-1:0]  row;
  logic [CW-1:0]    col;
  logic [IW-1:0]    idx;
  logic [$clog2(5)-1:0] out_free;
  logic [$clog2(3)-1:0] ss_free;
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

  // ---------------- window
  logic                        win_valid;
  logic [4:0][11:0][RW-1:0]    win;
  logic [RWID-1:0]             win_row;
  logic [CW-1:0]               win_col;
  logic                        ssi_valid, ssi_odd_row, ssi_odd_col;
  rvec_t                       ssi_cur, ssi_prev;

  dcp2_window #(.ROWS(ROWS), .ROW_VECS(ROW_VECS)) u_win (
    .clk, .rst_n, .in_valid(vec_valid), .row, .col, .in_vec(vec),
    .win_valid, .win, .win_row, .win_col,
    .ss_in_valid(ssi_valid), .ss_odd_row(ssi_odd_row), .ss_odd_col(ssi_odd_col),
    .ss_cur(ssi_cur), .ss_prev(ssi_prev)
  );

  // ---------------- derivatives
  logic             d_valid;
  grad_t [LANES-1:0] grad;
  logic [IW-1:0]    widx, didx;

  always_comb widx = IW'(win_row) * IW'(ROW_VECS) + IW'(win_col);

  dcp2_deriv #(.ROUND(ROUND)) u_der (
    .clk, .rst_n, .in_valid(win_valid), .win, .out_valid(d_valid), .grad
  );

  always_ff @(posedge clk) if (win_valid) didx <= widx;

  // index travels alongside the HK pipeline
  logic [IW-1:0] idx_d [HK_LAT];
  always_ff @(posedge clk) begin
    idx_d[0] <= didx;
    for (int i = 1; i < HK_LAT; i++) idx_d[i] <= idx_d[i-1];
  end

  // ---------------- eight HK logic units
  logic [LANES-1:0]   hk_valid;
  sign2_t [LANES-1:0] sh, sk;
  cvec_t              cls;

  for (genvar k = 0; k < LANES; k++) begin : g_hk
    hk_logic #(.TW(TW), .TF(TF)) u_hk (
      .clk, .rst_n, .in_valid(d_valid), .grad(grad[k]), .th, .tk,
      .out_valid(hk_valid[k]), .sign_h(sh[k]), .sign_k(sk[k])
    );
    assign cls[k] = make_class(sh[k], sk[k]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) inflight <= '0;
    else        inflight <= {inflight[DEPTH-1:1], vec_valid};
  end

  // ---------------- scale space (separate from the derivative logic)
  logic  ss_valid;
  rvec_t ss_vec;

  scale_space_gen u_ss (
    .clk, .rst_n, .in_valid(ssi_valid), .odd_row(ssi_odd_row), .odd_col(ssi_odd_col),
    .cur_row(ssi_cur), .prev_row(ssi_prev), .out_valid(ss_valid), .out_vec(ss_vec)
  );

  // ---------------- outputs
  out_writer #(.W($bits(cvec_t)), .IW(IW), .DEPTH(4)) u_out (
    .clk, .rst_n,
    .push(hk_valid[0]), .din(cls), .din_idx(idx_d[HK_LAT-1]),
    .free(out_free), .idle(out_idle),
    .dst_base, .wr_cmd, .wr_addr, .wr_data, .wr_done
  );

  scale_port #(.DEPTH(2)) u_ssp (
    .clk, .rst_n, .enable(ss_enable),
    .push(ss_valid), .din(ss_vec), .free(ss_free),
    .read_cmd(ss_read_cmd), .read_done(ss_read_done), .r_vec(ss_r_vec)
  );

endmodule
