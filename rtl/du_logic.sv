// du_logic: backward difference along the row (u) direction, eight samples
// at a time, as used by the type-1 curvature processor:
//   D[u] = S[u] - S[u-1]
// Seven of the eight differences use neighbours inside the same vector; the
// first uses the last sample of the previous vector, which a register keeps.
// That register reads as zero at the start of a row (first_col), so the
// left-border difference equals the input sample.
//
// Input samples are IN_W bits, signed or unsigned (IN_SIGNED); outputs are
// signed IN_W+1 bits, so the word grows by one bit per difference stage.
// Lane k of a vector is the sample at column u+k.
//
// Timing: in_valid -> out_valid two clocks later (input register, then the
// subtractors' output register), one vector per clock at most.
module du_logic #(
  parameter int unsigned LANES     = 8,
  parameter int unsigned IN_W      = 10,
  parameter bit          IN_SIGNED = 1'b0
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic                                 in_valid,
  input  logic                                 first_col,
  input  logic [LANES-1:0][IN_W-1:0]           in_vec,
  output logic                                 out_valid,
  output logic signed [LANES-1:0][IN_W:0]      out_vec
);

  function automatic logic signed [IN_W:0] ext(input logic [IN_W-1:0] s);
    return IN_SIGNED ? {s[IN_W-1], s} : {1'b0, s};
  endfunction

  logic                        v1;
  logic [LANES-1:0][IN_W-1:0]  in_r;
  logic                        first_r;
  logic [IN_W-1:0]             last_q;     // last sample of the previous vector

  always_ff @(posedge clk) begin
    if (in_valid) begin
      in_r    <= in_vec;
      first_r <= first_col;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      out_valid <= 1'b0;
      last_q    <= '0;
    end else begin
      v1        <= in_valid;
      out_valid <= v1;
      if (v1) last_q <= in_r[LANES-1];
    end
  end

  always_ff @(posedge clk) begin
    if (v1) begin
      out_vec[0] <= ext(in_r[0]) - (first_r ? '0 : ext(last_q));
      for (int k = 1; k < LANES; k++)
        out_vec[k] <= ext(in_r[k]) - ext(in_r[k-1]);
    end
  end

endmodule
