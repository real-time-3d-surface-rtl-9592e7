// out_writer: output address decoder and write handshake of a curvature
// processor.
//
// Classification vectors (eight 32-bit words, 32 bytes) wait in a small
// FIFO together with their vector index. The writer takes the head, puts it
// on wr_data with wr_addr = dst_base + 32 * index and pulses wr_cmd for one
// clock; it then waits for wr_done before it issues the next write. wr_done
// may come in any clock from the one of wr_cmd onward. Tying wr_done high
// turns this into a plain stream output (one vector every two clocks at
// most).
//
// The command/done pairing mirrors the input handshake; the exact output
// signal timing is this design's choice.
module out_writer #(
  parameter int unsigned W     = 256,
  parameter int unsigned IW    = 11,    // vector index width
  parameter int unsigned DEPTH = 4
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        push,
  input  logic [W-1:0]                din,
  input  logic [IW-1:0]               din_idx,
  output logic [$clog2(DEPTH+1)-1:0]  free,
  output logic                        idle,      // nothing queued or in flight
  input  logic [31:0]                 dst_base,
  output logic                        wr_cmd,
  output logic [31:0]                 wr_addr,
  output logic [W-1:0]                wr_data,
  input  logic                        wr_done
);

  logic [W+IW-1:0] head;
  logic            empty, full, pending, pop;

  vec_fifo #(.W(W + IW), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n,
    .push, .din({din, din_idx}),
    .pop, .dout(head),
    .empty, .full, .free
  );

  assign pop = !pending && !empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending <= 1'b0;
      wr_cmd  <= 1'b0;
    end else begin
      wr_cmd <= pop;
      if (pop)          pending <= 1'b1;
      else if (wr_done) pending <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (pop) begin
      wr_data <= head[W+IW-1:IW];
      wr_addr <= dst_base + (32'(head[IW-1:0]) << 5);
    end
  end

  assign idle = empty && !pending;

  assert property (@(posedge clk) disable iff (!rst_n) !(push && full));

endmodule
