// dv_scale_logic: the type-1 processor's first column-difference block,
// with the scale-space generator built into it.
//
// Both jobs need the previous row, so they share one row memory: it holds
// ROW_VECS whole range vectors (X, Y, Z and flags). For each incoming vector
// the memory word of the same column is read, Zv = Z[v,u] - Z[v-1,u] is
// formed for the eight lanes, the same two rows feed the 2x2 scale kernel,
// and the incoming vector is written back in place of the old one. On the
// first row the previous row reads as zero, so Zv equals Z there.
//
// Zv is signed 11-bit with 3 fraction bits (Z is unsigned 10.3). Lane k is
// column u+k.
//
// Timing: in_valid -> zv_valid two clocks later; a completed next-scale
// vector appears two clocks after the odd input vector of an odd row.
module dv_scale_logic
  import dcp_pkg::*;
#(
  parameter int unsigned ROW_VECS = 16
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               in_valid,
  input  logic                               first_row,
  input  logic                               odd_row,
  input  logic [$clog2(ROW_VECS)-1:0]        col,
  input  rvec_t                              in_vec,
  output logic                               zv_valid,
  output logic signed [LANES-1:0][RW:0]      zv,
  output logic                               ss_valid,
  output rvec_t                              ss_vec
);

  localparam int unsigned AW = $clog2(ROW_VECS);

  rvec_t          row_mem [ROW_VECS];
  rvec_t          rd_q, prev, in_r;
  logic [AW-1:0]  col_r;
  logic           first_r, odd_r, v1;

  always_ff @(posedge clk) begin
    if (in_valid) begin
      rd_q    <= row_mem[col];
      in_r    <= in_vec;
      col_r   <= col;
      first_r <= first_row;
      odd_r   <= odd_row;
    end
    if (v1) row_mem[col_r] <= in_r;
  end

  always_comb prev = first_r ? '0 : rd_q;

  always_ff @(posedge clk) begin
    if (v1)
      for (int k = 0; k < LANES; k++)
        zv[k] <= $signed({1'b0, in_r[k].z}) - $signed({1'b0, prev[k].z});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) {v1, zv_valid} <= '0;
    else        {v1, zv_valid} <= {in_valid, v1};
  end

  scale_space_gen u_ss (
    .clk, .rst_n,
    .in_valid (v1),
    .odd_row  (odd_r),
    .odd_col  (col_r[0]),
    .cur_row  (in_r),
    .prev_row (prev),
    .out_valid(ss_valid),
    .out_vec  (ss_vec)
  );

endmodule
