// pe_mul: the MULTI processing element, a pipelined single-precision
// (IEEE-754 binary32) multiplier.
//
// Each PE cycle (clock enable `ce` high) it takes two operands and, STAGES
// enabled clocks later, presents the rounded product on `y`; one product can
// start every PE cycle. The default of 5 stages is the multiplier depth chosen
// for the 8-PE configuration (199 MHz class multiplier).
//
// The product is written as one combinational function followed by a
// STAGES-deep register chain, to be spread over the stages by retiming.
// Rounding is round-to-nearest-even; subnormal inputs count as zero and
// subnormal results are flushed to signed zero; infinities and NaNs follow
// IEEE-754 (0 x inf and NaN inputs give the quiet NaN 0x7FC00000). These
// details are this design's own; the reference design used a vendor core.
//
// Timing: identical to pe_add - operands presented in PE cycle t give y in
// PE cycle t + STAGES.
module pe_mul #(
  parameter int unsigned STAGES = vec_pkg::MUL_STAGES_DEF
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ce,     // PE-cycle clock enable
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);

  localparam logic [31:0] QNAN = 32'h7FC0_0000;

  function automatic logic [31:0] fmul(input logic [31:0] x, input logic [31:0] z);
    logic        s;
    logic [7:0]  ex, ez;
    logic        x_zero, z_zero, x_inf, z_inf, x_nan, z_nan;
    logic [47:0] p;
    logic [22:0] mant;
    logic        g, st, up;
    logic [23:0] mr;
    logic signed [10:0] e;

    s  = x[31] ^ z[31];
    ex = x[30:23];
    ez = z[30:23];
    x_zero = (ex == 8'd0);
    z_zero = (ez == 8'd0);
    x_inf  = (ex == 8'hFF) && (x[22:0] == 23'd0);
    z_inf  = (ez == 8'hFF) && (z[22:0] == 23'd0);
    x_nan  = (ex == 8'hFF) && (x[22:0] != 23'd0);
    z_nan  = (ez == 8'hFF) && (z[22:0] != 23'd0);

    if (x_nan || z_nan)                        return QNAN;
    if ((x_inf && z_zero) || (z_inf && x_zero)) return QNAN;
    if (x_inf || z_inf)                        return {s, 8'hFF, 23'd0};
    if (x_zero || z_zero)                      return {s, 31'd0};

    p = {24'd0, 1'b1, x[22:0]} * {24'd0, 1'b1, z[22:0]};
    e = 11'(ex) + 11'(ez) - 11'sd127;
    if (p[47]) begin
      mant = p[46:24];
      g    = p[23];
      st   = |p[22:0];
      e    = e + 11'sd1;
    end else begin
      mant = p[45:23];
      g    = p[22];
      st   = |p[21:0];
    end
    up = g & (st | mant[0]);
    mr = {1'b0, mant} + 24'(up);
    if (mr[23]) e = e + 11'sd1;      // mantissa rounded up to 2.0
    if (e >= 11'sd255) return {s, 8'hFF, 23'd0};
    if (e <= 11'sd0)   return {s, 31'd0};
    return {s, e[7:0], mr[22:0]};
  endfunction

  logic [31:0] pipe [STAGES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(STAGES); i++) pipe[i] <= '0;
    end else if (ce) begin
      pipe[0] <= fmul(a, b);
      for (int i = 1; i < int'(STAGES); i++) pipe[i] <= pipe[i-1];
    end
  end

  assign y = pipe[STAGES-1];

endmodule
