// fp32_mul: single-precision (IEEE-754 binary32) floating-point multiplier,
// one pipeline stage.
//
// The field compute core multiplies each field difference by its update
// coefficient (the two "*" units of the core).  The document only says the
// core works in single precision; the insides here are this design's own:
// the 24x24-bit significand product is normalised by at most one place and
// rounded to nearest, ties to even.  Subnormal inputs and results are
// flushed to zero, infinities propagate, and any NaN or inf*0 gives the
// quiet NaN 0x7FC00000.
//
// Interface: in_valid/a/b are sampled on the rising clock edge; out_valid
// and p follow one cycle later (latency 1, one product per cycle).
module fp32_mul
  import fdtd_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  fp32_t a,
  input  fp32_t b,
  output logic  out_valid,
  output fp32_t p
);

  function automatic fp32_t mul(input fp32_t x, input fp32_t y);
    logic        s;
    logic [7:0]  ex, ey;
    logic [23:0] mx, my;
    logic [47:0] prod;
    logic [23:0] mant;
    logic        g, st, up;
    logic signed [10:0] e;
    logic [24:0] mr;
    ex = x[30:23];
    ey = y[30:23];
    s  = x[31] ^ y[31];
    mx = {1'b1, x[22:0]};
    my = {1'b1, y[22:0]};
    if ((ex == 8'hFF && x[22:0] != 0) || (ey == 8'hFF && y[22:0] != 0))
      return 32'h7FC0_0000;
    if (ex == 8'hFF || ey == 8'hFF) begin
      if (ex == 8'h00 || ey == 8'h00) return 32'h7FC0_0000;   // inf * 0
      return {s, 8'hFF, 23'd0};
    end
    if (ex == 8'h00 || ey == 8'h00) return {s, 31'd0};        // zero / FTZ
    prod = mx * my;
    e    = 11'(signed'({3'b000, ex})) + 11'(signed'({3'b000, ey})) - 11'sd127;
    if (prod[47]) begin
      mant = prod[47:24];
      g    = prod[23];
      st   = |prod[22:0];
      e    = e + 11'sd1;
    end else begin
      mant = prod[46:23];
      g    = prod[22];
      st   = |prod[21:0];
    end
    up = g & (st | mant[0]);
    mr = {1'b0, mant} + {24'd0, up};
    if (mr[24]) begin
      mr = mr >> 1;
      e  = e + 11'sd1;
    end
    if (e >= 11'sd255) return {s, 8'hFF, 23'd0};
    if (e <= 11'sd0)   return {s, 31'd0};
    return {s, e[7:0], mr[22:0]};
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      p         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) p <= mul(a, b);
    end
  end

endmodule
