// scale_space_gen: 2x2 Gaussian-pyramid kernel that builds the next scale
// level of the range map while the current level streams through.
//
//   R'[v,u] = (R[2v,2u] + R[2v,2u+1] + R[2v+1,2u] + R[2v+1,2u+1]) / 4
//
// All four kernel weights are 0.25, so the divide is done by dropping the
// two low bits of the 12-bit sum; no divider or multiplier is used. The
// kernel runs on odd rows, with the even row above it supplied from the
// caller's row memory (prev_row). One 8-sample input vector yields four
// output samples: an even input vector fills lanes 0..3 of the output and
// an odd one fills lanes 4..7 and completes the output vector. (The
// published description names bit 2 of u as the selector; with eight
// samples per vector the half changes with bit 3 of the sample column,
// which is the LSB of the vector index used here.)
//
// The kernel is applied to the X, Y and Z fields alike; the output valid
// flag is the AND of the four valid flags and the unused bit is zero.
// Averaging X and Y and combining the flags this way are this design's
// choices.
//
// Timing: the sums take one clock: out_valid rises the clock after the odd
// input vector of an odd row.
module scale_space_gen
  import dcp_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  logic   odd_row,
  input  logic   odd_col,     // LSB of the vector's column index
  input  rvec_t  cur_row,     // vector of row 2v+1
  input  rvec_t  prev_row,    // same columns of row 2v
  output logic   out_valid,
  output rvec_t  out_vec
);

  function automatic logic [RW-1:0] avg4(input logic [RW-1:0] a, b, c, d);
    logic [RW+1:0] s;
    s = (RW+2)'(a) + (RW+2)'(b) + (RW+2)'(c) + (RW+2)'(d);
    return s[RW+1:2];
  endfunction

  range_word_t [0:LANES/2-1] half_new, half_q;

  always_comb begin
    for (int k = 0; k < LANES/2; k++) begin
      half_new[k].empty = 1'b0;
      half_new[k].valid = cur_row[2*k].valid & cur_row[2*k+1].valid &
                          prev_row[2*k].valid & prev_row[2*k+1].valid;
      half_new[k].z = avg4(prev_row[2*k].z, prev_row[2*k+1].z, cur_row[2*k].z, cur_row[2*k+1].z);
      half_new[k].y = avg4(prev_row[2*k].y, prev_row[2*k+1].y, cur_row[2*k].y, cur_row[2*k+1].y);
      half_new[k].x = avg4(prev_row[2*k].x, prev_row[2*k+1].x, cur_row[2*k].x, cur_row[2*k+1].x);
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && odd_row && !odd_col) half_q <= half_new;
    if (in_valid && odd_row &&  odd_col) out_vec <= {half_q, half_new};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid && odd_row && odd_col;
  end

endmodule
