// tb_dcp2_deriv: random 5 x 12 windows, including all-minimum and
// all-maximum edges, with each of the five centred derivatives computed
// here in real arithmetic and rounded to the nearest 1/8 (ties upward).
// Latency must be one clock.
module tb_dcp2_deriv;
  import dcp_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [4:0][11:0][RW-1:0] win = '0;
  grad_t [LANES-1:0] grad;
  int checks = 0, failures = 0, cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  dcp2_deriv dut (.clk, .rst_n, .in_valid, .win, .out_valid, .grad);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // rounded value in units of 1/8 of a sum given in units of 1/8
  function automatic int rnd(real x);
    return int'($floor(x + 0.5));
  endfunction

  typedef struct { grad_t [LANES-1:0] g; int t; } exp_t;
  exp_t q [$];

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      e = q.pop_front();
      checks++;
      if (grad != e.g || cyc - e.t != 1) begin
        failures++;
        $display("got %h expected %h latency %0d", grad, e.g, cyc - e.t);
      end
    end
  end

  function automatic real z(int i, int c);
    return real'(win[i][c]);
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      exp_t e;
      @(negedge clk);
      in_valid = 0;
      if ($urandom_range(0, 3) == 0) @(negedge clk);
      for (int i = 0; i < 5; i++)
        for (int c = 0; c < 12; c++)
          case (n % 4)
            0: win[i][c] = RW'($urandom);
            1: win[i][c] = $urandom_range(0, 1) ? '1 : '0;       // extremes
            2: win[i][c] = RW'(300 + $urandom_range(0, 12));      // gentle slope
            default: win[i][c] = RW'(i * 20 + c * 7 + $urandom_range(0, 3));
          endcase
      for (int k = 0; k < LANES; k++) begin
        automatic int c = k + 2;
        e.g[k].zx  = DW'(rnd((z(2, c+1) - z(2, c-1)) / 2.0));
        e.g[k].zy  = DW'(rnd((z(3, c) - z(1, c)) / 2.0));
        e.g[k].zxx = DW'(rnd((z(2, c+2) - 2.0 * z(2, c) + z(2, c-2)) / 4.0));
        e.g[k].zyy = DW'(rnd((z(4, c) - 2.0 * z(2, c) + z(0, c)) / 4.0));
        e.g[k].zxy = DW'(rnd((z(3, c+1) - z(3, c-1) - z(1, c+1) + z(1, c-1)) / 4.0));
      end
      e.t = cyc;
      q.push_back(e);
      in_valid = 1;
    end
    @(negedge clk);
    in_valid = 0;
    repeat (4) @(posedge clk);
    checks++;
    if (q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
