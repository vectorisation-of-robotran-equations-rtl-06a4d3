// pe_add: the ADD processing element, a pipelined single-precision
// (IEEE-754 binary32) adder/subtractor.
//
// Each PE cycle (clock enable `ce` high) the element takes two operands and
// the operation select `sub` (0: a + b, 1: a - b) and, STAGES enabled clocks
// later, presents the rounded result on `y`. One operation can start every
// PE cycle. The default of 10 stages is the adder depth chosen for the 8-PE
// configuration (178 MHz class adder).
//
// The arithmetic is written once as a combinational function and followed by
// a STAGES-deep register chain; a synthesis tool with register retiming
// spreads the logic over the stages. Rounding is round-to-nearest-even.
// Subnormal inputs are read as zero and subnormal results are flushed to zero
// (signed), infinities and NaNs follow IEEE-754 (NaN out is the quiet NaN
// 0x7FC00000). These arithmetic details are this design's own choices; the
// reference design used a vendor floating-point core of the same function.
//
// Timing: operands sampled at an enabled edge appear on `y` after exactly
// STAGES further enabled edges have passed (y is valid in the PE cycle that
// starts STAGES cycles after the one in which the operands were presented).
module pe_add #(
  parameter int unsigned STAGES = vec_pkg::ADD_STAGES_DEF
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ce,     // PE-cycle clock enable
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        sub,
  output logic [31:0] y
);

  localparam logic [31:0] QNAN = 32'h7FC0_0000;

  // Leading-zero count of a 27-bit value (27 when zero).
  function automatic logic [4:0] lzc27(input logic [26:0] v);
    logic [4:0] n;
    n = 5'd27;
    for (int i = 0; i < 27; i++)
      if (v[i]) n = 5'(26 - i);
    return n;
  endfunction

  function automatic logic [31:0] fadd(input logic [31:0] x, input logic [31:0] z_in);
    logic        sx, sz, sbig, ssml;
    logic [7:0]  ex, ez;
    logic        x_zero, z_zero, x_inf, z_inf, x_nan, z_nan;
    logic [31:0] z, big, sml;
    logic [7:0]  d;
    logic [26:0] mb, ms, ms_sh;
    logic        sticky;
    logic [27:0] sum;
    logic [26:0] m;
    logic signed [9:0] e;
    logic [4:0]  lz;
    logic [24:0] mr;
    logic        up;

    z = z_in;
    sx = x[31];  ex = x[30:23];
    sz = z[31];  ez = z[30:23];
    x_zero = (ex == 8'd0);
    z_zero = (ez == 8'd0);
    x_inf  = (ex == 8'hFF) && (x[22:0] == 23'd0);
    z_inf  = (ez == 8'hFF) && (z[22:0] == 23'd0);
    x_nan  = (ex == 8'hFF) && (x[22:0] != 23'd0);
    z_nan  = (ez == 8'hFF) && (z[22:0] != 23'd0);

    if (x_nan || z_nan)            return QNAN;
    if (x_inf && z_inf)            return (sx == sz) ? x : QNAN;
    if (x_inf)                     return x;
    if (z_inf)                     return z;
    if (x_zero && z_zero)          return {sx & sz, 31'd0};
    if (x_zero)                    return z;
    if (z_zero)                    return {sx, ex, x[22:0]};

    // Order by magnitude so that big >= sml.
    if (x[30:0] >= z[30:0]) begin big = x; sml = z; end
    else                    begin big = z; sml = x; end
    sbig = big[31];
    ssml = sml[31];
    d  = big[30:23] - sml[30:23];
    mb = {1'b1, big[22:0], 3'b000};
    ms = {1'b1, sml[22:0], 3'b000};
    if (d >= 8'd27) begin
      ms_sh  = 27'd0;
      sticky = 1'b1;
    end else begin
      ms_sh  = ms >> d;
      sticky = |(ms & ((27'd1 << d) - 27'd1));
    end
    ms_sh[0] = ms_sh[0] | sticky;
    e = 10'(big[30:23]);

    if (sbig == ssml) begin
      sum = {1'b0, mb} + {1'b0, ms_sh};
      if (sum[27]) begin
        m = {sum[27:2], sum[1] | sum[0]};
        e = e + 10'sd1;
      end else begin
        m = sum[26:0];
      end
    end else begin
      m = mb - ms_sh;
      if (m == 27'd0) return 32'd0;
      lz = lzc27(m);
      m  = m << lz;
      e  = e - 10'(lz);
    end

    // Round to nearest, ties to even, on guard / round / sticky bits.
    up = m[2] & (m[1] | m[0] | m[3]);
    mr = {1'b0, m[26:3]} + 25'(up);
    if (mr[24]) begin
      mr = mr >> 1;
      e  = e + 10'sd1;
    end
    if (e >= 10'sd255) return {sbig, 8'hFF, 23'd0};
    if (e <= 10'sd0)   return {sbig, 31'd0};
    return {sbig, e[7:0], mr[22:0]};
  endfunction

  logic [31:0] pipe [STAGES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(STAGES); i++) pipe[i] <= '0;
    end else if (ce) begin
      pipe[0] <= fadd(a, {b[31] ^ sub, b[30:0]});
      for (int i = 1; i < int'(STAGES); i++) pipe[i] <= pipe[i-1];
    end
  end

  assign y = pipe[STAGES-1];

endmodule
