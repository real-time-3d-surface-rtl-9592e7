// tb_scale_space_gen: feeds random range vectors for even and odd rows and
// columns and checks that output vectors appear only after the odd column of
// an odd row, one clock later, holding the 2x2 averages of X, Y and Z and
// the AND of the four valid flags.
module tb_scale_space_gen;
  import dcp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, odd_row = 0, odd_col = 0, out_valid;
  rvec_t cur_row = '0, prev_row = '0, out_vec;
  int checks = 0, failures = 0, cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  scale_space_gen dut (.clk, .rst_n, .in_valid, .odd_row, .odd_col,
                       .cur_row, .prev_row, .out_valid, .out_vec);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic range_word_t rand_word();
    range_word_t w;
    w.empty = 1'($urandom_range(0, 1));
    w.valid = ($urandom_range(0, 7) != 0);
    w.z = RW'($urandom);
    w.y = RW'($urandom);
    w.x = RW'($urandom);
    return w;
  endfunction

  function automatic range_word_t avg(range_word_t a, b, c, d);
    range_word_t w;
    w.empty = 1'b0;
    w.valid = a.valid & b.valid & c.valid & d.valid;
    w.z = RW'((int'(a.z) + int'(b.z) + int'(c.z) + int'(d.z)) / 4);
    w.y = RW'((int'(a.y) + int'(b.y) + int'(c.y) + int'(d.y)) / 4);
    w.x = RW'((int'(a.x) + int'(b.x) + int'(c.x) + int'(d.x)) / 4);
    return w;
  endfunction

  typedef struct { rvec_t d; int t; } exp_t;
  exp_t q [$];
  int n_out = 0;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      checks++;
      n_out++;
      if (q.size() == 0) begin
        failures++;
        $display("unexpected output");
      end else begin
        e = q.pop_front();
        if (out_vec != e.d || cyc - e.t != 1) begin
          failures++;
          $display("got %h expected %h latency %0d", out_vec, e.d, cyc - e.t);
        end
      end
    end
  end

  initial begin
    exp_t e;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      automatic logic row_is_odd = 1'($urandom_range(0, 1));
      // an even vector and then the odd vector of the same row
      for (int c = 0; c < 2; c++) begin
        @(negedge clk);
        in_valid = 0;
        if ($urandom_range(0, 2) == 0) @(negedge clk);
        odd_col = 1'(c);
        odd_row = row_is_odd;
        for (int k = 0; k < LANES; k++) begin
          cur_row[k]  = rand_word();
          prev_row[k] = rand_word();
        end
        for (int k = 0; k < LANES / 2; k++)
          e.d[c * LANES / 2 + k] =
            avg(prev_row[2*k], prev_row[2*k+1], cur_row[2*k], cur_row[2*k+1]);
        in_valid = 1;
        if (odd_row && c == 1) begin
          e.t = cyc;
          q.push_back(e);
        end
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (q.size() != 0 || n_out < 50) begin
      failures++;
      $display("%0d outputs missing, %0d seen", q.size(), n_out);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
