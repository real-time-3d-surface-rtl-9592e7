// dv_logic: backward difference along the column (v) direction, eight
// samples at a time, as used by the type-1 curvature processor:
//   D[v,u] = S[v,u] - S[v-1,u]
// The previous row is held in a one-row block memory of ROW_VECS vector
// words, addressed by the vector's column index. For each incoming vector
// the memory word of the same column is read (the previous row), the eight
// parallel subtractors form the differences, and the incoming vector is
// then written back in its place. On the first row the previous row reads
// as zero, so the top-border difference equals the input.
//
// Samples are IN_W bits, signed or unsigned (IN_SIGNED); outputs are signed
// IN_W+1 bits. Lane k is column u+k.
//
// Timing: in_valid -> out_valid two clocks later (synchronous memory read,
// then the subtractors' output register). Two vectors of the same column
// must be at least two clocks apart, which holds whenever a row has more
// than one vector.
module dv_logic #(
  parameter int unsigned LANES     = 8,
  parameter int unsigned IN_W      = 11,
  parameter bit          IN_SIGNED = 1'b1,
  parameter int unsigned ROW_VECS  = 16
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic                                 in_valid,
  input  logic                                 first_row,
  input  logic [$clog2(ROW_VECS)-1:0]          col,
  input  logic [LANES-1:0][IN_W-1:0]           in_vec,
  output logic                                 out_valid,
  output logic signed [LANES-1:0][IN_W:0]      out_vec
);

  localparam int unsigned AW = $clog2(ROW_VECS);

  function automatic logic signed [IN_W:0] ext(input logic [IN_W-1:0] s);
    return IN_SIGNED ? {s[IN_W-1], s} : {1'b0, s};
  endfunction

  logic [LANES*IN_W-1:0]       row_mem [ROW_VECS];
  logic [LANES*IN_W-1:0]       rd_q;
  logic [LANES-1:0][IN_W-1:0]  prev;
  logic [LANES-1:0][IN_W-1:0]  in_r;
  logic [AW-1:0]               col_r;
  logic                        first_r, v1;

  always_ff @(posedge clk) begin
    if (in_valid) begin
      rd_q    <= row_mem[col];
      in_r    <= in_vec;
      col_r   <= col;
      first_r <= first_row;
    end
    if (v1) row_mem[col_r] <= in_r;
  end

  always_comb prev = first_r ? '0 : rd_q;

  always_ff @(posedge clk) begin
    if (v1)
      for (int k = 0; k < LANES; k++)
        out_vec[k] <= ext(in_r[k]) - ext(prev[k]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) {v1, out_valid} <= '0;
    else        {v1, out_valid} <= {in_valid, v1};
  end

endmodule
