// scale_port: the next-scale output of a curvature processor, seen by the
// next processor exactly like a range map generator.
//
// Next-scale vectors wait in a small FIFO. When the consumer pulses
// read_cmd, the request is remembered; as soon as a vector is available it
// is put on r_vec and read_done is pulsed for one clock. Requests and
// vectors can arrive in either order. If enable is low the produced vectors
// are dropped (the next scale level is not being analysed).
module scale_port
  import dcp_pkg::*;
#(
  parameter int unsigned DEPTH = 2
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        enable,
  input  logic                        push,
  input  rvec_t                       din,
  output logic [$clog2(DEPTH+1)-1:0]  free,
  input  logic                        read_cmd,
  output logic                        read_done,
  output rvec_t                       r_vec
);

  rvec_t head;
  logic  empty, full, req, pop;

  vec_fifo #(.W($bits(rvec_t)), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n,
    .push(push && enable), .din,
    .pop, .dout(head),
    .empty, .full, .free
  );

  assign pop = req && !empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req       <= 1'b0;
      read_done <= 1'b0;
    end else begin
      read_done <= pop;
      if (read_cmd)  req <= 1'b1;
      else if (pop)  req <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (pop) r_vec <= head;
  end

endmodule
