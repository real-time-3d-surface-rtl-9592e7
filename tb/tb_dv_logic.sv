// tb_dv_logic: streams a random map through the column-difference block and
// compares each lane with S[v,u] - S[v-1,u] from a copy of the map kept
// here; the first row must come out unchanged.
module tb_dv_logic;
  localparam int LANES = 8, IN_W = 11, ROWV = 4, ROWS = 12;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, first_row = 0, out_valid;
  logic [1:0] col = '0;
  logic [LANES-1:0][IN_W-1:0] in_vec = '0;
  logic signed [LANES-1:0][IN_W:0] out_vec;
  int checks = 0, failures = 0, cyc = 0;
  int m [ROWS][ROWV*LANES];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  dv_logic #(.LANES(LANES), .IN_W(IN_W), .IN_SIGNED(1'b1), .ROW_VECS(ROWV)) dut (
    .clk, .rst_n, .in_valid, .first_row, .col, .in_vec, .out_valid, .out_vec);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic signed [LANES-1:0][IN_W:0] d; int t; } exp_t;
  exp_t q [$];

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
    for (int v = 0; v < ROWS; v++)
      for (int j = 0; j < ROWV; j++) begin
        exp_t e;
        @(negedge clk);
        for (int k = 0; k < LANES; k++) begin
          m[v][j*LANES+k] = int'($urandom_range(0, 2047)) - 1024;
          in_vec[k] = IN_W'(m[v][j*LANES+k]);
          e.d[k] = (IN_W+1)'(m[v][j*LANES+k] - ((v == 0) ? 0 : m[v-1][j*LANES+k]));
        end
        e.t = cyc;
        q.push_back(e);
        in_valid = 1;
        first_row = (v == 0);
        col = 2'(j);
        if ($urandom_range(0, 2) == 0) begin
          @(negedge clk);
          in_valid = 0;
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
