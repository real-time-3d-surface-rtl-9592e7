// tb_sqrt_pwl: checks the piecewise-linear square root against the exact
// root over the whole input range (table region exactly, fitted segments
// within 0.75 of the result), and checks the three-clock latency.
module tb_sqrt_pwl;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_valid;
  logic [21:0] x = '0;
  logic [10:0] y;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sqrt_pwl dut (.clk, .rst_n, .in_valid, .x, .out_valid, .y);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected value queue with issue cycle
  logic [21:0] q_x [$];
  int          q_t [$];
  int          cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    if (out_valid) begin
      real ex, got;
      logic [21:0] xi;
      int t;
      xi = q_x.pop_front();
      t  = q_t.pop_front();
      ex = $sqrt(real'(xi) / 64.0);
      got = real'(y) / 8.0;
      checks++;
      if (cyc - t != 3) begin
        failures++;
        $display("latency %0d for x=%0d", cyc - t, xi);
      end
      if (xi < 22'(64*64)) begin
        if (y != 11'($floor(ex * 8.0))) begin
          failures++;
          $display("LUT x=%0d y=%0d expected %0d", xi, y, $floor(ex * 8.0));
        end
      end else if (got - ex > 0.75 || ex - got > 0.75) begin
        failures++;
        $display("fit x=%f y=%f exact %f", real'(xi)/64.0, got, ex);
      end
    end
  end

  task automatic drive(input logic [21:0] v);
    in_valid <= 1'b1;
    x        <= v;
    q_x.push_back(v);
    q_t.push_back(cyc + 1);
    @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // every table entry
    for (int k = 0; k < 4096; k++) drive(22'(k));
    // node points and their neighbours
    for (int n = 64; n < 65536; n = n + (n < 1024 ? 32 : 512)) begin
      drive(22'(n * 64));
      drive(22'(n * 64 - 1));
    end
    drive(22'h3FFFFF);
    // random inputs
    for (int i = 0; i < 20000; i++) drive(22'($urandom_range(64*64, 22'h3FFFFF)));
    in_valid <= 1'b0;
    repeat (10) @(posedge clk);
    if (q_x.size() != 0) begin
      failures++;
      $display("%0d results missing", q_x.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
