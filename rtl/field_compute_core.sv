// field_compute_core: pipelined single-precision update of one field
// component,  F_new = F + C1*(a - b) - C2*(c - d).
//
// Structure as in the document's drawing of the core: five 32 x 32 operand
// FIFOs (a, b, c, d and the old field value F), two subtractors forming the
// spatial differences, two multipliers by the coefficients C1 and C2, a
// subtractor combining the two curl terms and an adder adding the old field
// value, then a 32 x 32 output FIFO.  The core starts an update as soon as
// all five operand FIFOs hold a word and the output FIFO is sure to have
// room for it; it accepts one update per clock.  Each arithmetic stage is
// one register stage (this design's choice), so a result reaches the
// output FIFO four clocks after its operands leave the operand FIFOs.
//
// The output FIFO is dual-clock: it is written in the core clock (100 MHz,
// gated off while blocks are loaded) and read by the control logic in the
// memory-port clock (200 MHz).
//
// Interface: in_valid pushes one operand set (the producer must watch
// in_count and never overfill the operand FIFOs).  c1/c2 are held constant
// during a run.  out_rd_en/out_data/out_empty form the read side of the
// output FIFO in oclk.
module field_compute_core
  import fdtd_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 32
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  core_ops_t in_ops,
  output logic [$clog2(FIFO_DEPTH+1)-1:0] in_count,
  input  fp32_t     c1,
  input  fp32_t     c2,
  input  logic      oclk,
  input  logic      orst_n,
  input  logic      out_rd_en,
  output fp32_t     out_data,
  output logic      out_empty,
  output logic      busy
);
  localparam int unsigned CW = $clog2(FIFO_DEPTH + 1);

  fp32_t       q_a, q_b, q_c, q_d, q_f;
  logic [4:0]  q_empty;
  logic [4:0]  q_full;
  logic [CW-1:0] cnt_a, cnt_b, cnt_c, cnt_d, cnt_f;
  logic        issue;

  sync_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_fa (.clk, .rst_n, .wr_en(in_valid), .wr_data(in_ops.a),
    .rd_en(issue), .rd_data(q_a), .empty(q_empty[0]), .full(q_full[0]), .count(cnt_a));
  sync_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_fb (.clk, .rst_n, .wr_en(in_valid), .wr_data(in_ops.b),
    .rd_en(issue), .rd_data(q_b), .empty(q_empty[1]), .full(q_full[1]), .count(cnt_b));
  sync_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_fc (.clk, .rst_n, .wr_en(in_valid), .wr_data(in_ops.c),
    .rd_en(issue), .rd_data(q_c), .empty(q_empty[2]), .full(q_full[2]), .count(cnt_c));
  sync_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_fd (.clk, .rst_n, .wr_en(in_valid), .wr_data(in_ops.d),
    .rd_en(issue), .rd_data(q_d), .empty(q_empty[3]), .full(q_full[3]), .count(cnt_d));
  sync_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_ff (.clk, .rst_n, .wr_en(in_valid), .wr_data(in_ops.f),
    .rd_en(issue), .rd_data(q_f), .empty(q_empty[4]), .full(q_full[4]), .count(cnt_f));

  // The five FIFOs are written together, so their levels are equal; the
  // largest is reported to be safe.
  always_comb begin
    in_count = cnt_a;
    if (cnt_b > in_count) in_count = cnt_b;
    if (cnt_c > in_count) in_count = cnt_c;
    if (cnt_d > in_count) in_count = cnt_d;
    if (cnt_f > in_count) in_count = cnt_f;
  end

  // ---- output FIFO room: results in flight must all fit ----
  logic [$clog2(FIFO_DEPTH):0] o_wr_count;
  logic                        o_full;
  logic [3:0]                  inflight;
  logic                        res_valid;
  fp32_t                       res;

  assign issue = (q_empty == 5'b0) &&
                 ((32'(o_wr_count) + 32'(inflight)) < FIFO_DEPTH);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) inflight <= '0;
    else        inflight <= inflight + (issue ? 4'd1 : 4'd0) - (res_valid ? 4'd1 : 4'd0);
  end

  // ---- stage 1: differences ----
  logic  v1, v1b;
  fp32_t d1, d2, f1;
  fp32_add u_sub_ab (.clk, .rst_n, .in_valid(issue), .sub(1'b1), .a(q_a), .b(q_b), .out_valid(v1),  .s(d1));
  fp32_add u_sub_cd (.clk, .rst_n, .in_valid(issue), .sub(1'b1), .a(q_c), .b(q_d), .out_valid(v1b), .s(d2));

  // ---- stage 2: coefficient products ----
  logic  v2, v2b;
  fp32_t m1, m2, f2;
  fp32_mul u_mul_c1 (.clk, .rst_n, .in_valid(v1), .a(c1), .b(d1), .out_valid(v2),  .p(m1));
  fp32_mul u_mul_c2 (.clk, .rst_n, .in_valid(v1), .a(c2), .b(d2), .out_valid(v2b), .p(m2));

  // ---- stage 3: curl term ----
  logic  v3;
  fp32_t t3, f3;
  fp32_add u_sub_m (.clk, .rst_n, .in_valid(v2), .sub(1'b1), .a(m1), .b(m2), .out_valid(v3), .s(t3));

  // ---- stage 4: add the old field value ----
  fp32_add u_add_f (.clk, .rst_n, .in_valid(v3), .sub(1'b0), .a(f3), .b(t3), .out_valid(res_valid), .s(res));

  // old field value travels alongside stages 1 to 3
  always_ff @(posedge clk) begin
    f1 <= q_f;
    f2 <= f1;
    f3 <= f2;
  end

  async_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_out (
    .wclk(clk), .wrst_n(rst_n), .wr_en(res_valid), .wr_data(res), .full(o_full), .wr_count(o_wr_count),
    .rclk(oclk), .rrst_n(orst_n), .rd_en(out_rd_en), .rd_data(out_data), .empty(out_empty)
  );

  assign busy = (inflight != 0) || (q_empty != 5'b11111);

  a_lockstep:   assert property (@(posedge clk) disable iff (!rst_n) (v1 == v1b) && (v2 == v2b));
  a_no_ovfl:    assert property (@(posedge clk) disable iff (!rst_n) !(res_valid && o_full));
  a_in_no_ovfl: assert property (@(posedge clk) disable iff (!rst_n) !(in_valid && (q_full != 5'b0)));

endmodule
