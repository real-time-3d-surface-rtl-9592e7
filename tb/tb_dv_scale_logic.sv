// tb_dv_scale_logic: streams a random range map through the combined
// column-difference and scale-space block. Checks Zv = Z[v,u] - Z[v-1,u]
// for every vector (Z itself on the first row) and checks every next-scale
// vector against 2x2 averages of the map kept here.
module tb_dv_scale_logic;
  import dcp_pkg::*;
  localparam int ROWV = 4, ROWS = 10, COLS = ROWV * LANES;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, first_row = 0, odd_row = 0;
  logic [1:0] col = '0;
  rvec_t in_vec = '0, ss_vec;
  logic zv_valid, ss_valid;
  logic signed [LANES-1:0][RW:0] zv;
  int checks = 0, failures = 0, cyc = 0, n_ss = 0;
  range_word_t m [ROWS][COLS];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  dv_scale_logic #(.ROW_VECS(ROWV)) dut (
    .clk, .rst_n, .in_valid, .first_row, .odd_row, .col, .in_vec,
    .zv_valid, .zv, .ss_valid, .ss_vec);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic signed [LANES-1:0][RW:0] d; int t; } zexp_t;
  typedef struct { rvec_t d; int t; } sexp_t;
  zexp_t zq [$];
  sexp_t sq [$];

  always @(posedge clk) begin
    if (rst_n && zv_valid) begin
      zexp_t e;
      e = zq.pop_front();
      checks++;
      if (zv != e.d || cyc - e.t != 2) begin
        failures++;
        $display("zv got %h expected %h latency %0d", zv, e.d, cyc - e.t);
      end
    end
    if (rst_n && ss_valid) begin
      sexp_t e;
      checks++;
      n_ss++;
      if (sq.size() == 0) begin
        failures++;
        $display("unexpected scale vector");
      end else begin
        e = sq.pop_front();
        if (ss_vec != e.d || cyc - e.t != 2) begin
          failures++;
          $display("ss got %h expected %h latency %0d", ss_vec, e.d, cyc - e.t);
        end
      end
    end
  end

  function automatic logic [RW-1:0] a4(int a, b, c, d);
    return RW'((a + b + c + d) / 4);
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int v = 0; v < ROWS; v++)
      for (int j = 0; j < ROWV; j++) begin
        zexp_t ze;
        sexp_t se;
        @(negedge clk);
        in_valid = 0;
        if ($urandom_range(0, 2) == 0) @(negedge clk);
        for (int k = 0; k < LANES; k++) begin
          range_word_t w;
          w.empty = 1'b0;
          w.valid = ($urandom_range(0, 9) != 0);
          w.z = RW'($urandom);
          w.y = RW'($urandom);
          w.x = RW'($urandom);
          m[v][j*LANES+k] = w;
          in_vec[k] = w;
          ze.d[k] = (RW+1)'(int'(w.z) - ((v == 0) ? 0 : int'(m[v-1][j*LANES+k].z)));
        end
        ze.t = cyc;
        zq.push_back(ze);
        if (v % 2 == 1 && j % 2 == 1) begin
          for (int k = 0; k < LANES; k++) begin
            int u;
            range_word_t a, b, c, d;
            u = (j - 1) * LANES + 2 * k;
            a = m[v-1][u]; b = m[v-1][u+1]; c = m[v][u]; d = m[v][u+1];
            se.d[k].empty = 1'b0;
            se.d[k].valid = a.valid & b.valid & c.valid & d.valid;
            se.d[k].z = a4(a.z, b.z, c.z, d.z);
            se.d[k].y = a4(a.y, b.y, c.y, d.y);
            se.d[k].x = a4(a.x, b.x, c.x, d.x);
          end
          se.t = cyc;
          sq.push_back(se);
        end
        in_valid  = 1;
        first_row = (v == 0);
        odd_row   = 1'(v);
        col       = 2'(j);
      end
    @(negedge clk);
    in_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (zq.size() != 0 || sq.size() != 0 || n_ss != ROWS / 2 * ROWV / 2) begin
      failures++;
      $display("missing outputs: zv %0d, scale %0d, scale seen %0d", zq.size(), sq.size(), n_ss);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
