// dcp_ctrl: system controller and source address decoder of a curvature
// processor.
//
// After start it fetches the range map of one frame, ROWS x COLS samples,
// as ROWS * COLS/8 vectors in raster order. For each vector it pulses
// read_cmd for one clock with src_addr = src_base + 32 * index, then waits
// for the source (a range map generator, a RAM controller or the previous
// scale's processor) to put the vector on r_vec and pulse read_done. The
// vector is then handed to the datapath (vec_valid) together with its row,
// its column (vector index within the row) and its linear index.
//
// Read commands are issued at a fixed pace of one per VEC_PERIOD clocks so
// that the processor's output timing does not depend on its input data. A
// command is held back (a stall) while the datapath is busy or while the
// output buffers lack room for what the vector will produce (ready low).
// When the last vector has been processed and written out, frame_done
// pulses for one clock.
//
// The handshake signals and their order follow the published timing
// diagram; the pacing counter, the stall rule and the address step of 32
// bytes per vector are this design's choices.
module dcp_ctrl
  import dcp_pkg::*;
#(
  parameter int unsigned ROWS       = 128,
  parameter int unsigned COLS       = 128,
  parameter int unsigned VEC_PERIOD = 22
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  logic [31:0]                src_base,
  // source handshake
  output logic                       read_cmd,
  output logic [31:0]                src_addr,
  input  logic                       read_done,
  input  rvec_t                      r_vec,
  // datapath side
  input  logic                       ready,        // datapath idle and room downstream
  input  logic                       drained,      // all results written out
  output logic                       vec_valid,
  output rvec_t                      vec,
  output logic [$clog2(ROWS)-1:0]    row,
  output logic [$clog2(COLS/8)-1:0]  col,
  output logic [$clog2(ROWS*COLS/8)-1:0] idx,
  output logic                       last_vec,
  output logic                       busy,
  output logic                       frame_done,
  output logic [15:0]                stall_count
);

  localparam int unsigned ROW_VECS = COLS / LANES;
  localparam int unsigned NVEC     = ROWS * ROW_VECS;
  localparam int unsigned IW       = $clog2(NVEC);
  localparam int unsigned PW       = $clog2(VEC_PERIOD + 1);

  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_WAIT, S_DRAIN} state_t;
  state_t state;

  logic [IW-1:0] cnt;            // index of the vector being fetched
  logic [PW-1:0] pace;           // clocks until the next command may go out

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      cnt         <= '0;
      pace        <= '0;
      read_cmd    <= 1'b0;
      vec_valid   <= 1'b0;
      frame_done  <= 1'b0;
      last_vec    <= 1'b0;
      stall_count <= '0;
      src_addr    <= '0;
      vec         <= '0;
      idx         <= '0;
      row         <= '0;
      col         <= '0;
    end else begin
      read_cmd   <= 1'b0;
      vec_valid  <= 1'b0;
      frame_done <= 1'b0;
      if (pace != '0) pace <= pace - 1'b1;
      case (state)
        S_IDLE: begin
          if (start) begin
            cnt   <= '0;
            pace  <= '0;
            state <= S_ISSUE;
          end
        end
        S_ISSUE: begin
          if (pace <= PW'(1) && ready) begin
            read_cmd <= 1'b1;
            src_addr <= src_base + (32'(cnt) << 5);
            pace     <= PW'(VEC_PERIOD);
            state    <= S_WAIT;
          end else if (pace <= PW'(1)) begin
            stall_count <= stall_count + 1'b1;
          end
        end
        S_WAIT: begin
          if (read_done) begin
            vec_valid <= 1'b1;
            vec       <= r_vec;
            idx       <= cnt;
            row       <= cnt[IW-1 -: $clog2(ROWS)];
            col       <= ($clog2(COLS/8))'(cnt % ROW_VECS);
            last_vec  <= (cnt == IW'(NVEC - 1));
            cnt       <= cnt + 1'b1;
            state     <= (cnt == IW'(NVEC - 1)) ? S_DRAIN : S_ISSUE;
          end
        end
        S_DRAIN: begin
          if (!vec_valid && ready && drained) begin
            frame_done <= 1'b1;
            state      <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // a vector may only be delivered in answer to a command
  assert property (@(posedge clk) disable iff (!rst_n) read_done |-> state == S_WAIT);

endmodule
