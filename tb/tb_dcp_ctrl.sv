// tb_dcp_ctrl: runs three frames through the controller with a model source
// that answers each read command after a random delay.
//   frame 1: ready always high - commands must be exactly VEC_PERIOD clocks
//            apart and no stall may be counted;
//   frame 2: ready drops at random - commands at least VEC_PERIOD apart and
//            stall_count must equal the clocks a due command was held back;
//   frame 3: drained held low at the end - frame_done must wait for it.
// Every frame checks addresses, row/column/index tags, the delivered vector
// and a single frame_done pulse after the last vector.
module tb_dcp_ctrl;
  import dcp_pkg::*;
  localparam int ROWS = 4, COLS = 32, P = 6, NVEC = ROWS * COLS / 8;
  logic clk = 0, rst_n = 0, start = 0;
  logic [31:0] src_base = 32'h1000_0000, src_addr;
  logic read_cmd, read_done = 0, ready = 1, drained = 1;
  rvec_t r_vec = '0, vec;
  logic vec_valid, last_vec, busy, frame_done;
  logic [1:0] row, col;
  logic [3:0] idx;
  logic [15:0] stall_count;
  int checks = 0, failures = 0, cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  dcp_ctrl #(.ROWS(ROWS), .COLS(COLS), .VEC_PERIOD(P)) dut (
    .clk, .rst_n, .start, .src_base, .read_cmd, .src_addr, .read_done, .r_vec,
    .ready, .drained, .vec_valid, .vec, .row, .col, .idx, .last_vec, .busy,
    .frame_done, .stall_count);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at clock %0d: %s", cyc, msg);
    end
  endtask

  // model source: answers each command after 1..4 clocks (1 in frame 2, so
  // that a command is always due exactly VEC_PERIOD clocks after the last)
  int n_cmd = 0, last_cmd = -1, n_vec = 0, n_done = 0, exp_stalls = 0;
  int mode = 1;
  rvec_t sent;
  initial begin
    wait (rst_n);
    forever begin
      @(posedge clk);
      if (read_cmd) begin
        int d;
        check(src_addr == src_base + 32 * n_cmd, "source address");
        if (last_cmd >= 0) begin
          if (mode == 1) check(cyc - last_cmd == P, "command period");
          else           check(cyc - last_cmd >= P, "command period too short");
          // every clock a due command waits beyond its period is a stall
          exp_stalls += cyc - last_cmd - P;
        end
        last_cmd = cyc;
        n_cmd++;
        d = (mode == 2) ? 1 : $urandom_range(1, 4);
        repeat (d - 1) @(posedge clk);
        @(negedge clk);
        for (int k = 0; k < LANES; k++) r_vec[k] = $urandom;
        sent = r_vec;
        read_done = 1;
        @(negedge clk);
        read_done = 0;
      end
    end
  end


  always @(posedge clk) begin
    if (rst_n && vec_valid) begin
      check(vec == sent, "vector contents");
      check(idx == 4'(n_vec) && row == 2'(n_vec / 4) && col == 2'(n_vec % 4), "vector tags");
      check(last_vec == (n_vec == NVEC - 1), "last vector flag");
      n_vec++;
    end
    if (rst_n && frame_done) begin
      check(n_vec == NVEC && n_cmd == NVEC, "frame_done after all vectors");
      check(drained, "frame_done while not drained");
      n_done++;
    end
  end

  task automatic run_frame(input int m);
    mode = m;
    n_cmd = 0; n_vec = 0; last_cmd = -1;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    while (!frame_done) begin
      @(negedge clk);
      if (m == 2) ready = (n_cmd == 0) || ($urandom_range(0, 2) != 0);
      if (m == 3) drained = (n_vec < NVEC - 1) || ($urandom_range(0, 9) == 0);
    end
    ready = 1;
    drained = 1;
    @(negedge clk);
    check(!busy, "busy after frame_done");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_frame(1);
    check(stall_count == 0, "no stalls with ready high");
    run_frame(2);
    check(int'(stall_count) == exp_stalls && exp_stalls > 0, "stall count");
    run_frame(3);
    check(n_done == 3, "three frame_done pulses");
    $display("stalls %0d", stall_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
