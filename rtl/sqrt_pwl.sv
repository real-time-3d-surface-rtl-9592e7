// sqrt_pwl: fast fixed-point square root used by the HK logic for sqrt(norm).
//
// The input is unsigned 22.6 (norm = Zx^2 + Zy^2 + 1, so in [1, 65536)); the
// output is unsigned 11.3. The input range is split at 22 node points into
// 21 segments whose boundaries follow the measured input distribution:
// dense where norm is usually found (flat and gently curved surfaces), sparse
// above. On the first segment, [0, 64), a direct look-up table returns the
// exactly truncated root, because that is where flat surfaces land and where
// a straight-line fit is worst. Every other segment uses y = a*x + b with a
// and b taken from a coefficient table (unsigned 25.18). One multiplier and
// one adder do the work.
//
// Timing: fully pipelined, one input per clock, result three clocks after
// the input (in_valid -> out_valid). Clock 1 selects the segment and reads
// both tables, clock 2 multiplies, clock 3 adds and selects the LUT or the
// fit.
//
// The node points, the 22.6/11.3 formats and the 25.18 coefficient format
// are as published. The direct table for [0,64) and the three-clock latency
// are this design's choices. The coefficients themselves are not published: each pair is the continuous
// least-squares line fit of sqrt(x) over its segment, a = round(a_ls * 2^18),
// b = round(b_ls * 2^18). The result is truncated to 3 fraction bits. The
// direct table is indexed by the input with its 6 fraction bits (4096
// entries), each entry floor(8*sqrt(k/64)).
module sqrt_pwl (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [21:0] x,          // unsigned 22.6
  output logic        out_valid,
  output logic [10:0] y           // unsigned 11.3
);

  localparam int unsigned NSEG = 20;   // linear segments above the table

  // segment i covers [node(i), node(i+1)), i = 0 .. NSEG-1, node(0) = 64
  function automatic logic [15:0] node(input int unsigned i);
    case (i)
      0:  return 16'd64;     1:  return 16'd128;    2:  return 16'd192;
      3:  return 16'd256;    4:  return 16'd384;    5:  return 16'd512;
      6:  return 16'd1024;   7:  return 16'd2048;   8:  return 16'd4096;
      9:  return 16'd6144;   10: return 16'd8192;   11: return 16'd12288;
      12: return 16'd16384;  13: return 16'd20480;  14: return 16'd24576;
      15: return 16'd32768;  16: return 16'd38912;  17: return 16'd45056;
      18: return 16'd50176;  19: return 16'd55296;
      default: return 16'hFFFF;
    endcase
  endfunction

  function automatic logic [49:0] coef(input logic [4:0] i);  // {a, b}
    logic [24:0] a, b;
    case (i)
      5'd0:  begin a = 25'd13493; b = 25'd1260992;  end
      5'd1:  begin a = 25'd10394; b = 25'd1647337;  end
      5'd2:  begin a = 25'd8771;  b = 25'd1955334;  end
      5'd3:  begin a = 25'd7349;  b = 25'd2329687;  end
      5'd4:  begin a = 25'd6202;  b = 25'd2765260;  end
      5'd5:  begin a = 25'd4771;  b = 25'd3566624;  end
      5'd6:  begin a = 25'd3373;  b = 25'd5043969;  end
      5'd7:  begin a = 25'd2385;  b = 25'd7133249;  end
      5'd8:  begin a = 25'd1837;  b = 25'd9318748;  end
      5'd9:  begin a = 25'd1551;  b = 25'd11061042; end
      5'd10: begin a = 25'd1299;  b = 25'd13178699; end
      5'd11: begin a = 25'd1096;  b = 25'd15642675; end
      5'd12: begin a = 25'd966;   b = 25'd17760030; end
      5'd13: begin a = 25'd874;   b = 25'd19647231; end
      5'd14: begin a = 25'd775;   b = 25'd22122083; end
      5'd15: begin a = 25'd693;   b = 25'd24784917; end
      5'd16: begin a = 25'd640;   b = 25'd26833851; end
      5'd17: begin a = 25'd601;   b = 25'd28588240; end
      5'd18: begin a = 25'd571;   b = 25'd30088555; end
      default: begin a = 25'd534; b = 25'd32180357; end
    endcase
    return {a, b};
  endfunction

  // direct table: entry k = floor(8 * sqrt(k / 64)) = floor(sqrt(k)), k < 4096
  logic [10:0] lut [4096];
  initial begin
    for (int k = 0; k < 4096; k++) begin
      int unsigned r;
      r = 0;
      while ((r + 1) * (r + 1) <= k) r++;
      lut[k] = 11'(r);
    end
  end

  // ---- clock 1: segment selection and table reads
  logic [15:0] xint;
  logic [4:0]  seg;
  always_comb begin
    xint = x[21:6];
    seg  = 5'd0;
    for (int unsigned i = 1; i < NSEG; i++)
      if (xint >= node(i)) seg = 5'(i);
  end

  logic        v1, v2, v3;
  logic        in_lut1, in_lut2;
  logic [21:0] x1;
  logic [24:0] a1, b1, b2;
  logic [10:0] lut1, lut2;
  logic [46:0] prod2;
  logic [10:0] y_r;

  always_ff @(posedge clk) begin
    x1      <= x;
    {a1, b1} <= coef(seg);
    lut1    <= lut[x[11:0]];
    in_lut1 <= (xint < node(0));
    // clock 2: multiply
    prod2   <= x1 * a1;          // 24 fraction bits
    b2      <= b1;
    lut2    <= lut1;
    in_lut2 <= in_lut1;
  end

  // clock 3: add and select
  logic [47:0] sum3;
  always_comb sum3 = {1'b0, prod2} + {17'd0, b2, 6'd0};

  always_ff @(posedge clk) begin
    if (in_lut2)             y_r <= lut2;
    else if (|sum3[47:32])   y_r <= '1;                // saturate
    else                     y_r <= sum3[31:21];       // 3 fraction bits
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) {v1, v2, v3} <= '0;
    else        {v1, v2, v3} <= {in_valid, v1, v2};
  end

  assign out_valid = v3;
  assign y         = y_r;

endmodule
