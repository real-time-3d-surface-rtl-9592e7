// vec_fifo: small synchronous first-in first-out buffer of W-bit words.
//
// It decouples a curvature processor from the memory controller it writes
// to and from the next-scale processor it feeds. push writes din when the
// buffer is not full; pop removes the head (dout shows the head whenever
// empty is low). free counts the empty places so that a producer can stop
// before it would overflow. Pushing into a full or popping from an empty
// buffer is a protocol error that the assertions report.
//
// Timing: a pushed word can be popped the next clock; both may happen in
// the same clock.
module vec_fifo #(
  parameter int unsigned W     = 256,
  parameter int unsigned DEPTH = 4
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        push,
  input  logic [W-1:0]                din,
  input  logic                        pop,
  output logic [W-1:0]                dout,
  output logic                        empty,
  output logic                        full,
  output logic [$clog2(DEPTH+1)-1:0]  free
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH+1);

  logic [W-1:0]   mem [DEPTH];
  logic [AW-1:0]  wp, rp;
  logic [CW-1:0]  cnt;

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (push && !full) mem[wp] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp  <= '0;
      rp  <= '0;
      cnt <= '0;
    end else begin
      if (push && !full)  wp <= inc(wp);
      if (pop  && !empty) rp <= inc(rp);
      cnt <= cnt + CW'(push && !full) - CW'(pop && !empty);
    end
  end

  assign dout  = mem[rp];
  assign empty = (cnt == '0);
  assign full  = (cnt == CW'(DEPTH));
  assign free  = CW'(DEPTH) - cnt;

  assert property (@(posedge clk) disable iff (!rst_n) !(push && full));
  assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));

endmodule
