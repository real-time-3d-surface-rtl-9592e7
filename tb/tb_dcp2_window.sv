// tb_dcp2_window: streams a random range map through the type-2 window
// block and compares every emitted 5 x 12 window, with its row and column
// tags, against the map kept here (zero outside the map). Checks that
// windows come in raster order for rows 0 .. ROWS-3, two clocks after the
// vector that completes them (three for the end-of-row flush), and checks
// the vectors handed to the scale-space kernel.
module tb_dcp2_window;
  import dcp_pkg::*;
  localparam int ROWV = 4, ROWS = 9, COLS = ROWV * LANES;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [3:0] row = '0;
  logic [1:0] col = '0;
  rvec_t in_vec = '0, ss_cur, ss_prev;
  logic win_valid, ss_in_valid, ss_odd_row, ss_odd_col;
  logic [4:0][11:0][RW-1:0] win;
  logic [3:0] win_row;
  logic [1:0] win_col;
  int checks = 0, failures = 0, cyc = 0, n_win = 0, n_flush = 0;
  range_word_t m [ROWS][COLS];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  dcp2_window #(.ROWS(ROWS + 7), .ROW_VECS(ROWV)) dut (
    .clk, .rst_n, .in_valid, .row, .col, .in_vec, .win_valid, .win, .win_row,
    .win_col, .ss_in_valid, .ss_odd_row, .ss_odd_col, .ss_cur, .ss_prev);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [RW-1:0] zat(int v, int u);
    if (v < 0 || u < 0 || u >= COLS) return '0;
    return m[v][u].z;
  endfunction

  int t_in [ROWS][ROWV];     // clock at which each vector was driven
  int cur_v, cur_j;

  always @(posedge clk) begin
    if (rst_n && win_valid) begin
      int v, j, lat;
      logic [4:0][11:0][RW-1:0] w;
      v = n_win / ROWV;
      j = n_win % ROWV;
      for (int i = 0; i < 5; i++)
        for (int c = 0; c < 12; c++) w[i][c] = zat(v - 2 + i, j * LANES - 2 + c);
      // block j of row v is complete once block j+1 of row v+2 is in
      lat = (j == ROWV - 1) ? cyc - t_in[v+2][j] : cyc - t_in[v+2][j+1];
      if (j == ROWV - 1) n_flush++;
      checks++;
      if (win != w || win_row != 4'(v) || win_col != 2'(j) ||
          lat != ((j == ROWV - 1) ? 3 : 2)) begin
        failures++;
        $display("window %0d,%0d: tags %0d,%0d latency %0d data %s", v, j,
                 win_row, win_col, lat, (win == w) ? "ok" : "wrong");
      end
      n_win++;
    end
    if (rst_n && ss_in_valid) begin
      rvec_t p, c;
      for (int k = 0; k < LANES; k++) begin
        c[k] = m[cur_v][cur_j*LANES+k];
        p[k] = (cur_v == 0) ? '0 : m[cur_v-1][cur_j*LANES+k];
      end
      checks++;
      if (ss_cur != c || ss_prev != p || ss_odd_row != 1'(cur_v) || ss_odd_col != 1'(cur_j)) begin
        failures++;
        $display("scale-kernel inputs wrong at %0d,%0d", cur_v, cur_j);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int v = 0; v < ROWS; v++)
      for (int j = 0; j < ROWV; j++) begin
        @(negedge clk);
        in_valid = 0;
        // at least one idle clock after the last block of a row
        if (j == 0 && v > 0) @(negedge clk);
        if ($urandom_range(0, 2) == 0) @(negedge clk);
        for (int k = 0; k < LANES; k++) begin
          range_word_t w;
          w.empty = 1'b0;
          w.valid = 1'b1;
          w.z = RW'($urandom);
          w.y = RW'($urandom);
          w.x = RW'($urandom);
          m[v][j*LANES+k] = w;
          in_vec[k] = w;
        end
        row = 4'(v);
        col = 2'(j);
        t_in[v][j] = cyc;
        in_valid = 1;
        // the monitor sees this vector one clock later
        fork
          begin
            automatic int vv = v, jj = j;
            @(posedge clk);
            @(negedge clk);
            cur_v = vv;
            cur_j = jj;
          end
        join_none
      end
    @(negedge clk);
    in_valid = 0;
    repeat (6) @(posedge clk);
    checks++;
    if (n_win != (ROWS - 2) * ROWV || n_flush != ROWS - 2) begin
      failures++;
      $display("%0d windows, %0d flushes", n_win, n_flush);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
