// fp32_add: single-precision (IEEE-754 binary32) floating-point adder /
// subtractor, one pipeline stage.
//
// Computes a + b, or a - b when sub is set (the "-" and "+" units of the
// field compute core).  The document gives only the operation; the insides
// are this design's own: the operand of smaller magnitude is aligned with
// guard, round and sticky bits, the significands are added or subtracted,
// the result is normalised with a leading-zero count and rounded to nearest,
// ties to even.  Subnormal inputs and results are flushed to zero; an exact
// zero difference is +0; infinities propagate and inf-inf or a NaN operand
// gives the quiet NaN 0x7FC00000.
//
// Interface: in_valid/a/b/sub sampled on the rising edge; out_valid and s one
// cycle later (latency 1, one result per cycle).
module fp32_add
  import fdtd_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  logic  sub,
  input  fp32_t a,
  input  fp32_t b,
  output logic  out_valid,
  output fp32_t s
);

  function automatic logic [4:0] lzc27(input logic [26:0] v);
    lzc27 = 5'd27;
    for (int n = 0; n < 27; n++)
      if (v[n]) lzc27 = 5'(26 - n);
  endfunction

  function automatic fp32_t add(input fp32_t x, input fp32_t y0, input logic do_sub);
    fp32_t       y, big, sml;
    logic [7:0]  eb, es;
    logic [26:0] mb, ms, sh, r27;
    logic [27:0] sum;
    logic [7:0]  d;
    logic [4:0]  lz;
    logic [23:0] mant;
    logic [24:0] mr;
    logic        sgn, up, stk;
    logic signed [10:0] e;
    y = {y0[31] ^ do_sub, y0[30:0]};
    // NaN and infinity
    if ((x[30:23] == 8'hFF && x[22:0] != 0) || (y[30:23] == 8'hFF && y[22:0] != 0))
      return 32'h7FC0_0000;
    if (x[30:23] == 8'hFF && y[30:23] == 8'hFF)
      return (x[31] == y[31]) ? x : 32'h7FC0_0000;
    if (x[30:23] == 8'hFF) return x;
    if (y[30:23] == 8'hFF) return y;
    // flush subnormals to signed zero
    if (x[30:23] == 8'h00) x = {x[31], 31'd0};
    if (y[30:23] == 8'h00) y = {y[31], 31'd0};
    if (x[30:0] == 0 && y[30:0] == 0) return {x[31] & y[31], 31'd0};
    if (x[30:0] == 0) return y;
    if (y[30:0] == 0) return x;
    // order by magnitude
    if (x[30:0] >= y[30:0]) begin big = x; sml = y; end
    else                    begin big = y; sml = x; end
    eb  = big[30:23];
    es  = sml[30:23];
    sgn = big[31];
    mb  = {1'b1, big[22:0], 3'b000};
    ms  = {1'b1, sml[22:0], 3'b000};
    d   = eb - es;
    if (d >= 8'd27) begin
      sh = 27'd1;                          // only the sticky bit survives
    end else begin
      sh  = ms >> d;
      stk = 1'b0;
      for (int n = 0; n < 27; n++)
        if (n < int'(d) && ms[n]) stk = 1'b1;
      sh[0] = sh[0] | stk;
    end
    e = 11'(signed'({3'b000, eb}));
    if (big[31] == sml[31]) begin
      sum = {1'b0, mb} + {1'b0, sh};
      if (sum[27]) begin
        r27 = {sum[27:2], sum[1] | sum[0]};
        e   = e + 11'sd1;
      end else begin
        r27 = sum[26:0];
      end
    end else begin
      r27 = mb - sh;
      if (r27 == 0) return 32'h0000_0000;
      lz  = lzc27(r27);
      r27 = r27 << lz;
      e   = e - 11'(lz);
    end
    mant = r27[26:3];
    up   = r27[2] & (r27[1] | r27[0] | mant[0]);
    mr   = {1'b0, mant} + {24'd0, up};
    if (mr[24]) begin
      mr = mr >> 1;
      e  = e + 11'sd1;
    end
    if (e >= 11'sd255) return {sgn, 8'hFF, 23'd0};
    if (e <= 11'sd0)   return {sgn, 31'd0};
    return {sgn, e[7:0], mr[22:0]};
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      s         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) s <= add(a, b, sub);
    end
  end

endmodule
