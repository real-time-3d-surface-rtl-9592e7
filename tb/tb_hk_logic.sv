// tb_hk_logic: drives random and hand-picked derivative sets through one HK
// logic unit and compares the H and K signs with a floating-point
// evaluation of the curvature formulas and thresholds. Also checks the
// seven-clock latency and the table of classifications (plane, ridge,
// valley, peak, pit, saddle).
module tb_hk_logic;
  import dcp_pkg::*;
  import tb_ref_pkg::*;

  localparam int TW = 12, TF = 11;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_valid;
  grad_t grad = '0;
  logic [TW-1:0] th = '0, tk = '0;
  sign2_t sign_h, sign_k;
  int checks = 0, failures = 0, cyc = 0, skipped = 0;
  int seen_h [3], seen_k [3];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  hk_logic #(.TW(TW), .TF(TF)) dut (.clk, .rst_n, .in_valid, .grad, .th, .tk,
                                    .out_valid, .sign_h, .sign_k);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic [1:0] sh, sk; bit amb; int t; } exp_t;
  exp_t q [$];

  always @(posedge clk) begin
    if (out_valid) begin
      exp_t e;
      e = q.pop_front();
      if (cyc - e.t != 7) begin
        failures++;
        $display("latency %0d", cyc - e.t);
      end
      if (e.amb) skipped++;
      else begin
        checks++;
        if (sign_h != e.sh || sign_k != e.sk) begin
          failures++;
          $display("mismatch: got H %b K %b expected H %b K %b", sign_h, sign_k, e.sh, e.sk);
        end
        seen_h[e.sh == 2'b00 ? 0 : e.sh == 2'b01 ? 1 : 2]++;
        seen_k[e.sk == 2'b00 ? 0 : e.sk == 2'b01 ? 1 : 2]++;
      end
    end
  end

  // inputs change on the falling edge; the rising edge after it samples them
  task automatic drive(int zx, zy, zxx, zyy, zxy);
    exp_t e;
    @(negedge clk);
    classify(zx, zy, zxx, zyy, zxy, real'(th) / 2.0**TF, real'(tk) / 2.0**TF, e.sh, e.sk, e.amb);
    e.t = cyc;
    q.push_back(e);
    in_valid = 1'b1;
    grad.zx  = DW'(zx);
    grad.zy  = DW'(zy);
    grad.zxx = DW'(zxx);
    grad.zyy = DW'(zyy);
    grad.zxy = DW'(zxy);
  endtask

  task automatic idle();
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  function automatic int rnd(int lim);
    return $urandom_range(2*lim) - lim;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    th = 12'd41;  tk = 12'd20;         // about 0.02 and 0.01
    // hand-picked shapes (derivatives in units of 1/8)
    drive(0, 0, 0, 0, 0);              // plane
    drive(0, 0, 8, 0, 0);              // Zxx > 0: H < 0, K = 0: ridge side
    drive(0, 0, -8, 0, 0);             // valley
    drive(0, 0, -8, -8, 0);            // H > 0, K > 0: pit
    drive(0, 0, 8, 8, 0);              // peak
    drive(0, 0, 8, -8, 0);             // saddle, H = 0
    drive(3, -2, 8, -4, 2);
    // random sets, small and large
    for (int i = 0; i < 3000; i++) begin
      if (i % 500 == 0) begin
        idle();
        repeat (10) @(posedge clk);
        th = 12'($urandom_range(0, 400));
        tk = 12'($urandom_range(0, 400));
      end
      if (i % 3 == 0) drive(rnd(8), rnd(8), rnd(8), rnd(8), rnd(8));
      else if (i % 3 == 1) drive(rnd(60), rnd(60), rnd(40), rnd(40), rnd(40));
      else drive(rnd(1000), rnd(1000), rnd(2000), rnd(2000), rnd(2000));
      if (i % 7 == 0) idle();
    end
    idle();
    repeat (12) @(posedge clk);
    if (q.size() != 0) begin
      failures++;
      $display("%0d results missing", q.size());
    end
    for (int i = 0; i < 3; i++)
      if (seen_h[i] == 0 || seen_k[i] == 0) begin
        failures++;
        $display("sign class %0d never exercised", i);
      end
    $display("skipped %0d ambiguous cases", skipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
