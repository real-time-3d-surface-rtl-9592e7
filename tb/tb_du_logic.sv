// tb_du_logic: streams rows of random vectors through the row-difference
// block and compares every lane with S[u] - S[u-1] computed here, including
// the left border (difference equals the sample) and back-to-back vectors.
module tb_du_logic;
  localparam int LANES = 8, IN_W = 11, ROWV = 4;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, first_col = 0, out_valid;
  logic [LANES-1:0][IN_W-1:0] in_vec = '0;
  logic signed [LANES-1:0][IN_W:0] out_vec;
  int checks = 0, failures = 0, cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  du_logic #(.LANES(LANES), .IN_W(IN_W), .IN_SIGNED(1'b1)) dut (
    .clk, .rst_n, .in_valid, .first_col, .in_vec, .out_valid, .out_vec);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic signed [LANES-1:0][IN_W:0] d; int t; } exp_t;
  exp_t q [$];
  int prev_last;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      e = q.pop_front();
      checks++;
      if (out_vec != e.d || cyc - e.t != 2) begin
        failures++;
        $display("got %h expected %h latency %0d", out_vec, e.d, cyc - e.t);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int row = 0; row < 40; row++) begin
      for (int j = 0; j < ROWV; j++) begin
        exp_t e;
        int s [LANES];
        @(negedge clk);
        for (int k = 0; k < LANES; k++) begin
          s[k] = int'($urandom_range(0, 2047)) - 1024;
          in_vec[k] = IN_W'(s[k]);
        end
        for (int k = 0; k < LANES; k++)
          e.d[k] = (IN_W+1)'(s[k] - ((k == 0) ? ((j == 0) ? 0 : prev_last) : s[k-1]));
        prev_last = s[LANES-1];
        e.t = cyc;
        q.push_back(e);
        in_valid = 1;
        first_col = (j == 0);
        if ($urandom_range(0, 3) == 0) begin
          @(negedge clk);
          in_valid = 0;
        end
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (5) @(posedge clk);
    if (q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
