// dcp_top: scale-space curvature analysis pipelines built from both
// processor types.
//
// Each pipeline is a chain of NUM_SCALES processors. Processor s analyses
// scale level s of the range map (ROWS >> s by COLS >> s samples) and at
// the same time builds level s+1, which it hands to processor s+1 over the
// same read_cmd/read_done handshake that processor 0 uses towards the
// range map generator or RAM controller. All levels are therefore analysed
// concurrently, each processor a little behind the one before it, instead
// of first building every level and then analysing them.
//
// Two independent pipelines stand side by side: one of type-1 processors
// (causal differences, 8.6 thresholds, 22 clocks per vector) and one of
// type-2 processors (centred, rounded differences, 12.11 thresholds, 32
// clocks per vector). They share clock, reset, start and the scale count
// but nothing else; each brings out its own source port for level 0 and
// one classification write port per level.
//
// ss_count (1 .. NUM_SCALES) selects at start how many levels are analysed:
// processors at or above it stay idle, and the last active one does not
// produce a further level. Thresholds may change at any time.
module dcp_top
  import dcp_pkg::*;
#(
  parameter int unsigned ROWS       = 128,
  parameter int unsigned COLS       = 128,
  parameter int unsigned NUM_SCALES = 3,
  parameter int unsigned P1         = 22,   // type-1 clocks per vector
  parameter int unsigned P2         = 32    // type-2 clocks per vector
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  logic [2:0]                 ss_count,
  // ---- type-1 pipeline
  input  logic [7:0]                 t1_th,
  input  logic [7:0]                 t1_tk,
  input  logic [31:0]                t1_src_base,
  input  logic [31:0]                t1_dst_base [NUM_SCALES],
  output logic                       t1_read_cmd,
  output logic [31:0]                t1_src_addr,
  input  logic                       t1_read_done,
  input  rvec_t                      t1_r_vec,
  output logic [NUM_SCALES-1:0]      t1_wr_cmd,
  output logic [31:0]                t1_wr_addr [NUM_SCALES],
  output cvec_t                      t1_wr_data [NUM_SCALES],
  input  logic [NUM_SCALES-1:0]      t1_wr_done,
  output logic [NUM_SCALES-1:0]      t1_frame_done,
  output logic [NUM_SCALES-1:0]      t1_busy,
  output logic [15:0]                t1_stall_count [NUM_SCALES],
  // ---- type-2 pipeline
  input  logic [11:0]                t2_th,
  input  logic [11:0]                t2_tk,
  input  logic [31:0]                t2_src_base,
  input  logic [31:0]                t2_dst_base [NUM_SCALES],
  output logic                       t2_read_cmd,
  output logic [31:0]                t2_src_addr,
  input  logic                       t2_read_done,
  input  rvec_t                      t2_r_vec,
  output logic [NUM_SCALES-1:0]      t2_wr_cmd,
  output logic [31:0]                t2_wr_addr [NUM_SCALES],
  output cvec_t                      t2_wr_data [NUM_SCALES],
  input  logic [NUM_SCALES-1:0]      t2_wr_done,
  output logic [NUM_SCALES-1:0]      t2_frame_done,
  output logic [NUM_SCALES-1:0]      t2_busy,
  output logic [15:0]                t2_stall_count [NUM_SCALES]
);

  // links between consecutive levels
  logic  t1_rc [NUM_SCALES+1], t1_rd [NUM_SCALES+1];
  rvec_t t1_rv [NUM_SCALES+1];
  logic  t2_rc [NUM_SCALES+1], t2_rd [NUM_SCALES+1];
  rvec_t t2_rv [NUM_SCALES+1];
  logic [31:0] t1_sa [NUM_SCALES], t2_sa [NUM_SCALES];

  assign t1_rd[0] = t1_read_done;
  assign t1_rv[0] = t1_r_vec;
  assign t2_rd[0] = t2_read_done;
  assign t2_rv[0] = t2_r_vec;
  assign t1_read_cmd = t1_rc[0];
  assign t2_read_cmd = t2_rc[0];
  assign t1_src_addr = t1_sa[0];
  assign t2_src_addr = t2_sa[0];
  assign t1_rc[NUM_SCALES] = 1'b0;
  assign t2_rc[NUM_SCALES] = 1'b0;

  for (genvar s = 0; s < NUM_SCALES; s++) begin : g_level
    logic run, more;
    assign run  = start && (32'(ss_count) > s);
    assign more = (32'(ss_count) > s + 1) && (s + 1 < NUM_SCALES);

    dcp1 #(.ROWS(ROWS >> s), .COLS(COLS >> s), .VEC_PERIOD(P1)) u_dcp1 (
      .clk, .rst_n, .start(run), .th(t1_th), .tk(t1_tk), .ss_enable(more),
      .src_base(t1_src_base), .dst_base(t1_dst_base[s]),
      .read_cmd(t1_rc[s]), .src_addr(t1_sa[s]), .read_done(t1_rd[s]), .r_vec(t1_rv[s]),
      .wr_cmd(t1_wr_cmd[s]), .wr_addr(t1_wr_addr[s]), .wr_data(t1_wr_data[s]), .wr_done(t1_wr_done[s]),
      .ss_read_cmd(t1_rc[s+1]), .ss_read_done(t1_rd[s+1]), .ss_r_vec(t1_rv[s+1]),
      .busy(t1_busy[s]), .frame_done(t1_frame_done[s]), .stall_count(t1_stall_count[s])
    );

    dcp2 #(.ROWS(ROWS >> s), .COLS(COLS >> s), .VEC_PERIOD(P2)) u_dcp2 (
      .clk, .rst_n, .start(run), .th(t2_th), .tk(t2_tk), .ss_enable(more),
      .src_base(t2_src_base), .dst_base(t2_dst_base[s]),
      .read_cmd(t2_rc[s]), .src_addr(t2_sa[s]), .read_done(t2_rd[s]), .r_vec(t2_rv[s]),
      .wr_cmd(t2_wr_cmd[s]), .wr_addr(t2_wr_addr[s]), .wr_data(t2_wr_data[s]), .wr_done(t2_wr_done[s]),
      .ss_read_cmd(t2_rc[s+1]), .ss_read_done(t2_rd[s+1]), .ss_r_vec(t2_rv[s+1]),
      .busy(t2_busy[s]), .frame_done(t2_frame_done[s]), .stall_count(t2_stall_count[s])
    );
  end

endmodule
