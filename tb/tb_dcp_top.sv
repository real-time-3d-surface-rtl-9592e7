// tb_dcp_top: end-to-end test of both scale-space pipelines on a 16 x 64 map.
//
// A model range map generator feeds level 0 of each pipeline; every
// classification word of every level is checked against a model that
// builds the scale levels with the 2x2 kernel and classifies each pixel
// from backward (type 1) or rounded centred (type 2) differences.
// Frames:
//   1: all levels, fast write acknowledge, fast source;
//   2: all levels, slow random acknowledge and source - stalls expected;
//   3: one level only (scale count 1), wr_done tied high (stream mode);
//   4: two levels, stream mode.
// It counts how often each mechanism happened and fails if one never did:
// stalls, vectors passed between levels, scale-count changes, end-of-row
// flushes of the type-2 window, frame_done pulses and stream-mode writes.
module tb_dcp_top;
  import dcp_pkg::*;
  import tb_ref_pkg::*;
  localparam int ROWS = 16, COLS = 64, NS = 3;
  localparam int P1 = 22, P2 = 32;
  localparam real TH = 0.03, TK = 0.0005;

  logic clk = 0, rst_n = 0, start = 0;
  logic [2:0] ss_count = 3'd3;
  logic [7:0]  t1_th = 8'(int'(TH * 64)),    t1_tk = 8'(int'(TK * 64 + 0.5));
  logic [11:0] t2_th = 12'(int'(TH * 2048)), t2_tk = 12'(int'(TK * 2048 + 0.5));
  logic [31:0] src_base [2];
  logic [31:0] t1_dst_base [NS], t2_dst_base [NS];
  logic t1_read_cmd, t2_read_cmd, t1_read_done = 0, t2_read_done = 0;
  logic [31:0] t1_src_addr, t2_src_addr;
  rvec_t t1_r_vec = '0, t2_r_vec = '0;
  logic [NS-1:0] t1_wr_cmd, t2_wr_cmd, t1_wr_done, t2_wr_done, t1_ack = '0, t2_ack = '0;
  logic [31:0] t1_wr_addr [NS], t2_wr_addr [NS];
  cvec_t t1_wr_data [NS], t2_wr_data [NS];
  logic [NS-1:0] t1_frame_done, t2_frame_done, t1_busy, t2_busy;
  logic [15:0] t1_stall_count [NS], t2_stall_count [NS];
  logic stream = 0;
  int checks = 0, failures = 0, cyc = 0, skipped = 0, mode = 1;

  assign t1_wr_done = stream ? '1 : t1_ack;
  assign t2_wr_done = stream ? '1 : t2_ack;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  dcp_top #(.ROWS(16), .COLS(64)) dut (
    .clk, .rst_n, .start, .ss_count,
    .t1_th, .t1_tk, .t1_src_base(src_base[0]), .t1_dst_base,
    .t1_read_cmd, .t1_src_addr, .t1_read_done, .t1_r_vec,
    .t1_wr_cmd, .t1_wr_addr, .t1_wr_data, .t1_wr_done,
    .t1_frame_done, .t1_busy, .t1_stall_count,
    .t2_th, .t2_tk, .t2_src_base(src_base[1]), .t2_dst_base,
    .t2_read_cmd, .t2_src_addr, .t2_read_done, .t2_r_vec,
    .t2_wr_cmd, .t2_wr_addr, .t2_wr_data, .t2_wr_done,
    .t2_frame_done, .t2_busy, .t2_stall_count);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL at clock %0d: %s", cyc, msg);
    end
  endtask

  // ---------------- scale levels of the map
  range_word_t m0 [ROWS][COLS];
  int lz [NS][ROWS][COLS];          // Z of level s, raw 10.3
  function automatic int rows_of(int s); return ROWS >> s; endfunction
  function automatic int cols_of(int s); return COLS >> s; endfunction

  function automatic void build_levels();
    logic vld [NS][ROWS][COLS];
    for (int v = 0; v < ROWS; v++)
      for (int u = 0; u < COLS; u++) begin
        lz[0][v][u] = m0[v][u].z;
        vld[0][v][u] = m0[v][u].valid;
      end
    for (int s = 1; s < NS; s++)
      for (int v = 0; v < rows_of(s); v++)
        for (int u = 0; u < cols_of(s); u++)
          lz[s][v][u] = (lz[s-1][2*v][2*u] + lz[s-1][2*v][2*u+1] +
                         lz[s-1][2*v+1][2*u] + lz[s-1][2*v+1][2*u+1]) / 4;
  endfunction

  function automatic int zat(int s, int v, int u);
    if (v < 0 || u < 0 || v >= rows_of(s) || u >= cols_of(s)) return 0;
    return lz[s][v][u];
  endfunction

  function automatic int rnd(real x);
    return int'($floor(x + 0.5));
  endfunction

  function automatic void deriv(input int typ, s, v, u, output int g [5]);
    if (typ == 0) begin
      int zu0, zu1, zv0, zv1, zvup;
      zu0 = zat(s, v, u) - zat(s, v, u - 1);
      zu1 = (u > 0) ? zat(s, v, u - 1) - zat(s, v, u - 2) : 0;
      zv0 = zat(s, v, u) - zat(s, v - 1, u);
      zvup = (v > 0) ? zat(s, v - 1, u) - zat(s, v - 2, u) : 0;
      zv1 = (u > 0) ? zat(s, v, u - 1) - zat(s, v - 1, u - 1) : 0;
      g[0] = zu0; g[1] = zv0; g[2] = zu0 - zu1; g[3] = zv0 - zvup; g[4] = zv0 - zv1;
    end else begin
      g[0] = rnd((zat(s, v, u + 1) - zat(s, v, u - 1)) / 2.0);
      g[1] = rnd((zat(s, v + 1, u) - zat(s, v - 1, u)) / 2.0);
      g[2] = rnd((zat(s, v, u + 2) - 2.0 * zat(s, v, u) + zat(s, v, u - 2)) / 4.0);
      g[3] = rnd((zat(s, v + 2, u) - 2.0 * zat(s, v, u) + zat(s, v - 2, u)) / 4.0);
      g[4] = rnd((zat(s, v + 1, u + 1) - zat(s, v + 1, u - 1) - zat(s, v - 1, u + 1) + zat(s, v - 1, u - 1)) / 4.0);
    end
  endfunction

  // ---------------- mechanism counters
  int n_out [2][NS];
  int n_stream = 0, n_flush = 0, n_chain = 0, n_fdone = 0, n_switch = 0;
  int seen [4][4];

  task automatic take(input int typ, s, input logic [31:0] addr, input cvec_t data,
                      input logic [31:0] base);
    int rowv, v, j;
    rowv = cols_of(s) / LANES;
    check(addr == base + 32 * n_out[typ][s],
          $sformatf("type %0d level %0d: address %h, output %0d", typ + 1, s, addr, n_out[typ][s]));
    v = n_out[typ][s] / rowv;
    j = n_out[typ][s] % rowv;
    for (int k = 0; k < LANES; k++) begin
      logic [1:0] sh, sk;
      bit amb;
      int g [5];
      deriv(typ, s, v, j * LANES + k, g);
      if (typ == 0)
        classify(g[0], g[1], g[2], g[3], g[4], real'(t1_th) / 64.0, real'(t1_tk) / 64.0, sh, sk, amb);
      else
        classify(g[0], g[1], g[2], g[3], g[4], real'(t2_th) / 2048.0, real'(t2_tk) / 2048.0, sh, sk, amb);
      if (amb) skipped++;
      else begin
        check(data[k] == make_class(sh, sk),
              $sformatf("type %0d level %0d row %0d col %0d: got %h expected h=%b k=%b",
                        typ + 1, s, v, j * LANES + k, data[k], sh, sk));
        seen[sh][sk]++;
      end
    end
    if (stream) n_stream++;
    if (s > 0) n_chain++;
    if (typ == 1 && j == rowv - 1) n_flush++;
    n_out[typ][s]++;
  endtask

  for (genvar s = 0; s < NS; s++) begin : g_sink
    initial begin
      wait (rst_n);
      forever begin
        @(posedge clk);
        if (t1_wr_cmd[s]) begin
          take(0, s, t1_wr_addr[s], t1_wr_data[s], t1_dst_base[s]);
          if (!stream) begin
            if (mode == 2) repeat ($urandom_range(0, 50)) @(posedge clk);
            @(negedge clk);
            t1_ack[s] = 1'b1;
            @(negedge clk);
            t1_ack[s] = 1'b0;
          end
        end
      end
    end
    initial begin
      wait (rst_n);
      forever begin
        @(posedge clk);
        if (t2_wr_cmd[s]) begin
          take(1, s, t2_wr_addr[s], t2_wr_data[s], t2_dst_base[s]);
          if (!stream) begin
            if (mode == 2) repeat ($urandom_range(0, 50)) @(posedge clk);
            @(negedge clk);
            t2_ack[s] = 1'b1;
            @(negedge clk);
            t2_ack[s] = 1'b0;
          end
        end
      end
    end
    always @(posedge clk) begin
      if (rst_n && t1_frame_done[s]) n_fdone++;
      if (rst_n && t2_frame_done[s]) n_fdone++;
    end
  end

  // ---------------- level-0 sources
  int n_cmd [2];
  initial begin
    wait (rst_n);
    forever begin
      @(posedge clk);
      if (t1_read_cmd) begin
        int i;
        i = int'(t1_src_addr - src_base[0]) / 32;
        check(t1_src_addr == src_base[0] + 32 * n_cmd[0], "type 1 source address");
        n_cmd[0]++;
        if (mode == 2) repeat ($urandom_range(0, 8)) @(posedge clk);
        @(negedge clk);
        for (int k = 0; k < LANES; k++) t1_r_vec[k] = m0[i / (COLS / LANES)][(i % (COLS / LANES)) * LANES + k];
        t1_read_done = 1;
        @(negedge clk);
        t1_read_done = 0;
      end
    end
  end
  initial begin
    wait (rst_n);
    forever begin
      @(posedge clk);
      if (t2_read_cmd) begin
        int i;
        i = int'(t2_src_addr - src_base[1]) / 32;
        check(t2_src_addr == src_base[1] + 32 * n_cmd[1], "type 2 source address");
        n_cmd[1]++;
        if (mode == 2) repeat ($urandom_range(0, 8)) @(posedge clk);
        @(negedge clk);
        for (int k = 0; k < LANES; k++) t2_r_vec[k] = m0[i / (COLS / LANES)][(i % (COLS / LANES)) * LANES + k];
        t2_read_done = 1;
        @(negedge clk);
        t2_read_done = 0;
      end
    end
  end

  task automatic run_frame(input int md, input int scales);
    int t0, fd0;
    logic [NS-1:0] done1, done2, act;
    mode = md;
    if (scales != int'(ss_count)) n_switch++;
    for (int v = 0; v < ROWS; v++)
      for (int u = 0; u < COLS; u++) begin
        int z;
        z = map_z(v, u, ROWS, COLS) + ((md == 2) ? int'($urandom_range(0, 30)) - 15 : 0);
        if (z < 0) z = 0;
        if (z > 1023) z = 1023;
        m0[v][u].empty = 1'b0;
        m0[v][u].valid = ($urandom_range(0, 15) != 0);
        m0[v][u].z = RW'(z);
        m0[v][u].y = RW'(v);
        m0[v][u].x = RW'(u);
      end
    build_levels();
    n_cmd = '{0, 0};
    for (int s = 0; s < NS; s++) n_out[0][s] = 0;
    for (int s = 0; s < NS; s++) n_out[1][s] = 0;
    fd0 = n_fdone;
    @(negedge clk);
    ss_count = 3'(scales);
    stream = (md >= 3);
    start = 1;
    t0 = cyc;
    @(negedge clk);
    start = 0;
    act = '0;
    for (int s = 0; s < NS; s++) act[s] = (s < scales);
    check(t1_busy == act && t2_busy == act, "busy levels follow the scale count");
    done1 = '0;
    done2 = '0;
    while ((done1 & act) != act || (done2 & act) != act) begin
      @(negedge clk);
      done1 |= t1_frame_done;
      done2 |= t2_frame_done;
    end
    repeat (4) @(negedge clk);
    stream = 0;
    check(n_fdone - fd0 == 2 * scales, "one frame_done per active processor");
    check(t1_busy == '0 && t2_busy == '0, "all idle after the frame");
    for (int s = 0; s < NS; s++) begin
      int r, c;
      r = rows_of(s);
      c = cols_of(s) / LANES;
      check(n_out[0][s] == ((s < scales) ? r * c : 0),
            $sformatf("type 1 level %0d: %0d outputs", s, n_out[0][s]));
      check(n_out[1][s] == ((s < scales) ? (r - 2) * c : 0),
            $sformatf("type 2 level %0d: %0d outputs", s, n_out[1][s]));
    end
    $display("frame %0d (%0d levels): %0d clocks", md, scales, cyc - t0);
    // level 0 of the type-2 pipeline sets the frame time: one vector per P2
    // clocks; the deeper levels finish inside it
    if (md != 2)
      check(cyc - t0 >= (ROWS * COLS / LANES - 1) * P2 && cyc - t0 <= ROWS * COLS / LANES * P2 + 60,
            $sformatf("frame time %0d clocks", cyc - t0));
  endtask

  initial begin
    int stalls, classes;
    src_base = '{32'h0100_0000, 32'h0200_0000};
    for (int s = 0; s < NS; s++) begin
      t1_dst_base[s] = 32'h1000_0000 + 32'h0010_0000 * s;
      t2_dst_base[s] = 32'h2000_0000 + 32'h0010_0000 * s;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_frame(1, 3);
    run_frame(2, 3);
    run_frame(3, 1);
    run_frame(4, 2);
    stalls = 0;
    for (int s = 0; s < NS; s++) stalls += int'(t1_stall_count[s]) + int'(t2_stall_count[s]);
    classes = 0;
    for (int h = 0; h < 4; h++) for (int k = 0; k < 4; k++) if (seen[h][k] > 0) classes++;
    $display("mechanisms: stalls %0d, chained outputs %0d, scale-count changes %0d, flushes %0d, frame_done %0d, stream writes %0d",
             stalls, n_chain, n_switch, n_flush, n_fdone, n_stream);
    $display("classes %0d, skipped %0d near-threshold pixels", classes, skipped);
    check(stalls > 0, "no stall happened");
    check(n_chain > 0, "no vector passed between levels");
    check(n_switch > 0, "scale count never changed");
    check(n_flush > 0, "no end-of-row flush");
    check(n_fdone > 0, "no frame_done");
    check(n_stream > 0, "no stream-mode write");
    check(classes >= 5, "too few surface classes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
