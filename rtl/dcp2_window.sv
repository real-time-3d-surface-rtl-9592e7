// dcp2_window: row memory and sample window of the type-2 curvature
// processor.
//
// The centred derivatives of the type-2 processor need, for a pixel at row
// v-2, the rows v-4 .. v and the two columns on either side. This block
// keeps the four rows before the current one in a block memory of ROW_VECS
// words, each word holding the vectors of rows v-1, v-2, v-3 and v-4 at one
// column position. For every incoming vector (row v, column block j) it
// reads that word, writes back {row v, v-1, v-2, v-3} (so the oldest row
// drops out), and appends the resulting 5-row column block to a window of
// three blocks. When block j arrives, the window is complete for the centre
// block j-1 of row v-2, which is emitted as 5 rows x 12 columns of Z (the
// eight centre columns plus two on each side). The last block of a row is
// emitted one clock after it arrives, with the columns right of the map
// reading as zero; likewise columns left of the map and rows above it read
// as zero. Nothing is emitted for v < 2, and the last two rows of the map
// are never centre rows, so a frame yields ROWS-2 rows of results.
//
// It also passes the incoming vector and the previous row (v-1) to the
// scale-space kernel.
//
// Timing: a window leaves two clocks after in_valid (three for the
// end-of-row block).
module dcp2_window
  import dcp_pkg::*;
#(
  parameter int unsigned ROWS     = 128,
  parameter int unsigned ROW_VECS = 16
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic                                in_valid,
  input  logic [$clog2(ROWS)-1:0]             row,
  input  logic [$clog2(ROW_VECS)-1:0]         col,
  input  rvec_t                               in_vec,
  // 5 x 12 window of Z around the centre block (row 2 is the centre row)
  output logic                                win_valid,
  output logic [4:0][11:0][RW-1:0]            win,
  output logic [$clog2(ROWS)-1:0]             win_row,
  output logic [$clog2(ROW_VECS)-1:0]         win_col,
  // to the scale-space kernel
  output logic                                ss_in_valid,
  output logic                                ss_odd_row,
  output logic                                ss_odd_col,
  output rvec_t                               ss_cur,
  output rvec_t                               ss_prev
);

  localparam int unsigned AW  = $clog2(ROW_VECS);
  localparam int unsigned RWD = $clog2(ROWS);
  localparam logic [AW-1:0] LAST_COL = AW'(ROW_VECS - 1);

  typedef logic [4:0][LANES-1:0][RW-1:0] zblk_t;   // [row v-4 .. v][lane]

  rvec_t [0:3]    ring_mem [ROW_VECS];   // [0] = row v-1 ... [3] = row v-4
  rvec_t [0:3]    rd_q;
  rvec_t          in_r;
  logic [RWD-1:0] row_r;
  logic [AW-1:0]  col_r;
  logic           v1, flush;
  zblk_t          blk_new, blk_prev, blk_cur;
  logic [RWD-1:0] flush_row;

  always_ff @(posedge clk) begin
    if (in_valid) begin
      rd_q  <= ring_mem[col];
      in_r  <= in_vec;
      row_r <= row;
      col_r <= col;
    end
    if (v1) ring_mem[col_r] <= {in_r, rd_q[0], rd_q[1], rd_q[2]};
  end

  // incoming 5-row block; rows above the map read as zero
  always_comb begin
    for (int k = 0; k < LANES; k++) begin
      blk_new[4][k] = in_r[k].z;
      for (int i = 1; i <= 4; i++)
        blk_new[4-i][k] = (32'(row_r) >= i) ? rd_q[i-1][k].z : '0;
    end
  end

  function automatic logic [4:0][11:0][RW-1:0] make_win(zblk_t l, zblk_t c, zblk_t r);
    logic [4:0][11:0][RW-1:0] w;
    for (int i = 0; i < 5; i++) begin
      w[i][0] = l[i][LANES-2];
      w[i][1] = l[i][LANES-1];
      for (int k = 0; k < LANES; k++) w[i][k+2] = c[i][k];
      w[i][10] = r[i][0];
      w[i][11] = r[i][1];
    end
    return w;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      flush     <= 1'b0;
      win_valid <= 1'b0;
    end else begin
      v1        <= in_valid;
      flush     <= v1 && (col_r == LAST_COL) && (32'(row_r) >= 2);
      win_valid <= (v1 && (col_r != '0) && (32'(row_r) >= 2)) || flush;
    end
  end

  always_ff @(posedge clk) begin
    if (v1) begin
      if (col_r == '0) begin
        blk_prev <= '0;
        blk_cur  <= blk_new;
      end else begin
        win      <= make_win(blk_prev, blk_cur, blk_new);
        win_row  <= row_r - RWD'(2);
        win_col  <= col_r - 1'b1;
        blk_prev <= blk_cur;
        blk_cur  <= blk_new;
      end
      flush_row <= row_r - RWD'(2);
    end else if (flush) begin
      win     <= make_win(blk_prev, blk_cur, '0);
      win_row <= flush_row;
      win_col <= LAST_COL;
    end
  end

  assign ss_in_valid = v1;
  assign ss_odd_row  = row_r[0];
  assign ss_odd_col  = col_r[0];
  assign ss_cur      = in_r;
  assign ss_prev     = (row_r == '0) ? '0 : rd_q[0];

endmodule
