// tb_dcp1: runs three frames of a 16 x 32 range map through the
// type-1 (backward difference) processor and checks every classification word and every
// next-scale vector against models worked out here.
//   frame 1: fast sink and reader - read commands exactly 22 clocks apart,
//            no stalls, frame time close to vectors x 22 clocks;
//   frame 2: slow, random write acknowledge and next-scale reader, noisy
//            map - stalls must be counted and results must stay right;
//   frame 3: wr_done tied high (stream mode), next scale disabled.
// The reference derivatives are the backward differences of the
// type-1 processor; H and K come from
// tb_ref_pkg::classify. Results whose |H| lies close to the threshold are
// not judged, since the hardware approximates the square root.
module tb_dcp1;
  import dcp_pkg::*;
  import tb_ref_pkg::*;
  localparam int ROWS = 16, COLS = 32, P = 22, ROWV = COLS / LANES;
  localparam int NVEC = ROWS * ROWV, NOUT = NVEC;
  localparam int NSS = (ROWS / 2) * (ROWV / 2);
  localparam real TH = 0.03, TK = 0.0005;
  localparam int TW = 8, TF = 6;

  logic clk = 0, rst_n = 0, start = 0, ss_enable = 1;
  logic [TW-1:0] th = TW'(int'(TH * (1 << TF))), tk = TW'(int'(TK * (1 << TF) + 0.5));
  logic [31:0] src_base = 32'h0010_0000, dst_base = 32'h0080_0000, src_addr, wr_addr;
  logic read_cmd, read_done = 0, wr_cmd, wr_done = 0;
  logic ss_read_cmd = 0, ss_read_done, busy, frame_done;
  rvec_t r_vec = '0, ss_r_vec;
  cvec_t wr_data;
  logic [15:0] stall_count;
  int checks = 0, failures = 0, cyc = 0, skipped = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  dcp1 #(.ROWS(ROWS), .COLS(COLS)) dut (
    .clk, .rst_n, .start, .th, .tk, .ss_enable, .src_base, .dst_base,
    .read_cmd, .src_addr, .read_done, .r_vec,
    .wr_cmd, .wr_addr, .wr_data, .wr_done,
    .ss_read_cmd, .ss_read_done, .ss_r_vec,
    .busy, .frame_done, .stall_count);

  initial begin
    repeat (60 * NVEC * P) @(posedge clk);
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

  range_word_t m [ROWS][COLS];
  int mode = 1;

  function automatic int zat(int v, int u);
    if (v < 0 || u < 0 || u >= COLS || v >= ROWS) return 0;
    return int'(m[v][u].z);
  endfunction

  // backward differences with zero outside the map
  function automatic int zu(int v, int u); return zat(v, u) - zat(v, u - 1); endfunction
  function automatic int zv(int v, int u); return zat(v, u) - zat(v - 1, u); endfunction
  function automatic void deriv(input int v, u, output int g [5]);
    g[0] = zu(v, u);
    g[1] = zv(v, u);
    g[2] = zu(v, u) - ((u > 0) ? zu(v, u - 1) : 0);
    g[3] = zv(v, u) - ((v > 0) ? zv(v - 1, u) : 0);
    g[4] = zv(v, u) - ((u > 0) ? zv(v, u - 1) : 0);
  endfunction

  // ---------------- range map source
  int last_cmd = -1, n_cmd = 0;
  initial begin
    wait (rst_n);
    forever begin
      @(posedge clk);
      if (read_cmd) begin
        int i;
        i = int'(src_addr - src_base) / 32;
        check(src_addr == src_base + 32 * n_cmd, "source address");
        if (mode == 1 && last_cmd >= 0) check(cyc - last_cmd == P, "vector period");
        if (last_cmd >= 0) check(cyc - last_cmd >= P, "vector period too short");
        last_cmd = cyc;
        n_cmd++;
        repeat ($urandom_range(0, 4)) @(posedge clk);
        @(negedge clk);
        for (int k = 0; k < LANES; k++) r_vec[k] = m[i / ROWV][(i % ROWV) * LANES + k];
        read_done = 1;
        @(negedge clk);
        read_done = 0;
      end
    end
  end

  // ---------------- classification sink
  int n_out = 0, seen [4][4];
  always @(posedge clk) begin
    if (rst_n && wr_cmd) begin
      int i, v, j;
      i = int'(wr_addr - dst_base) / 32;
      v = i / ROWV;
      j = i % ROWV;
      check(wr_addr == dst_base + 32 * n_out, "output address / order");
      for (int k = 0; k < LANES; k++) begin
        logic [1:0] sh, sk;
        bit amb;
        int g [5];
        deriv(v, j * LANES + k, g);
        classify(g[0], g[1], g[2], g[3], g[4], real'(th) / (1 << TF), real'(tk) / (1 << TF), sh, sk, amb);
        if (amb) skipped++;
        else begin
          check(wr_data[k] == make_class(sh, sk),
                $sformatf("class at row %0d col %0d: got %h expected h=%b k=%b", v, j * LANES + k, wr_data[k], sh, sk));
          seen[sh][sk]++;
        end
      end
      n_out++;
    end
  end

  initial begin
    wait (rst_n);
    forever begin
      @(posedge clk);
      if (wr_cmd && mode == 1) begin
        @(negedge clk);
        wr_done = 1;
        @(negedge clk);
        wr_done = 0;
      end else if (wr_cmd && mode == 2) begin
        repeat ($urandom_range(0, 60)) @(posedge clk);
        @(negedge clk);
        wr_done = 1;
        @(negedge clk);
        wr_done = 0;
      end
    end
  end

  // ---------------- next-scale reader
  int n_ss = 0;
  initial begin
    wait (rst_n);
    forever begin
      @(negedge clk);
      if (ss_enable && busy && n_ss < NSS) begin
        rvec_t e;
        int vv, jj;
        if (mode == 2) repeat ($urandom_range(0, 100)) @(negedge clk);
        ss_read_cmd = 1;
        @(negedge clk);
        ss_read_cmd = 0;
        while (!ss_read_done) @(negedge clk);
        vv = 2 * (n_ss / (ROWV / 2));
        jj = 2 * LANES * (n_ss % (ROWV / 2));
        for (int k = 0; k < LANES; k++) begin
          range_word_t a, b, c, d;
          a = m[vv][jj + 2*k]; b = m[vv][jj + 2*k + 1];
          c = m[vv+1][jj + 2*k]; d = m[vv+1][jj + 2*k + 1];
          e[k].empty = 1'b0;
          e[k].valid = a.valid & b.valid & c.valid & d.valid;
          e[k].z = RW'((int'(a.z) + b.z + c.z + d.z) / 4);
          e[k].y = RW'((int'(a.y) + b.y + c.y + d.y) / 4);
          e[k].x = RW'((int'(a.x) + b.x + c.x + d.x) / 4);
        end
        check(ss_r_vec == e, $sformatf("next-scale vector %0d", n_ss));
        n_ss++;
      end
    end
  end

  task automatic run_frame(input int md, input bit noisy);
    int t0, t1;
    mode = md;
    for (int v = 0; v < ROWS; v++)
      for (int u = 0; u < COLS; u++) begin
        int z;
        z = map_z(v, u, ROWS, COLS) + (noisy ? int'($urandom_range(0, 40)) - 20 : 0);
        if (z < 0) z = 0;
        if (z > 1023) z = 1023;
        m[v][u].empty = 1'b0;
        m[v][u].valid = ($urandom_range(0, 15) != 0);
        m[v][u].z = RW'(z);
        m[v][u].y = RW'(v * 8);
        m[v][u].x = RW'($urandom);
      end
    n_cmd = 0; n_out = 0; n_ss = 0; last_cmd = -1;
    @(negedge clk);
    wr_done = (md == 3);
    ss_enable = (md != 3);
    start = 1;
    t0 = cyc;
    @(negedge clk);
    start = 0;
    while (!frame_done) @(negedge clk);
    t1 = cyc;
    @(negedge clk);
    wr_done = 0;
    check(!busy, "busy after frame_done");
    check(n_cmd == NVEC, "every vector fetched once");
    check(n_out == NOUT, $sformatf("%0d output vectors, expected %0d", n_out, NOUT));
    if (md != 3) check(n_ss == NSS, $sformatf("%0d next-scale vectors, expected %0d", n_ss, NSS));
    $display("frame %0d: %0d clocks, %0d stalls", md, t1 - t0, stall_count);
    if (md == 1) begin
      check(t1 - t0 >= (NVEC - 1) * P && t1 - t0 <= NVEC * P + 40, "frame time with no stalls");
      check(stall_count == 0, "no stall in frame 1");
    end
    if (md == 3) check(t1 - t0 <= NVEC * P + 40, "frame time in stream mode");
  endtask

  initial begin
    int classes;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_frame(1, 1'b0);
    run_frame(2, 1'b1);
    check(stall_count > 0, "stalls in frame 2");
    run_frame(3, 1'b0);
    classes = 0;
    for (int h = 0; h < 4; h++) for (int k = 0; k < 4; k++) if (seen[h][k] > 0) classes++;
    check(classes >= 5, $sformatf("only %0d surface classes seen", classes));
    $display("classes %0d, skipped %0d near-threshold pixels", classes, skipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
