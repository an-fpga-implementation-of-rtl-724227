// read_logic: reads the operands of every cell of the block from the six
// dual-port BRAM banks and hands them to the three field compute cores.
//
// Updating the three components of one cell needs twelve distinct words:
// the three old values of the updated field and nine values of the other
// field (its three components at the cell, shared by two equations each,
// and six neighbours).  With six banks of two ports, the document reads
// them in two clocks: one clock feeds core I (x component) while cores II
// and III wait, the next feeds cores II and III together.  This module
// follows that schedule; which word goes on which port is this design's
// own arrangement:
//
//   clock A: target x old value (port 0); source y and z at the cell
//            (port 0) and at their neighbours along k and j (port 1);
//            source x at the cell and its j neighbour, kept for core III.
//   clock B: target y and z old values; source x and its k neighbour,
//            source z and its i neighbour (core II); source y and its i
//            neighbour (core III, with the x pair kept from clock A).
//
// In MODE_E the updated field is E (banks 0-2), the source is H (banks 3-5)
// and neighbours are at +1 (forward differences of H, as in the document's
// update equations).  In MODE_H the roles swap and neighbours are at -1
// (backward differences of E; the document gives no H equations, this is
// the standard staggered-grid counterpart).  The operands are ordered so
// that each core computes F + C1*(a-b) - C2*(c-d) with the signs of the
// curl (the minus between the two terms is the one drawn in the core).
//
// Boundary rule (this design's own; the document leaves it to the host):
// in MODE_E every cell on the last plane along i, k or j, and in MODE_H
// every cell on the first plane, is held.  Both port addresses of its
// neighbours then point at the cell itself, the differences are zero and
// the old values are written back unchanged.  Holding all three components,
// not only those whose neighbour is missing, is what lets the host overlap
// consecutive blocks by one plane: the shared plane is then updated exactly
// once, by the block that has all of its neighbours.
//
// Rate: one cell every two clocks while all cores have room (the producer
// stalls when a core's operand FIFO holds DEPTH-3 or more words).  Cells are
// visited in bank order n = (j*kpts + k)*ipts + i.  done rises after the last
// cell's operands have been pushed.  While run_en is low the counters clear.
module read_logic
  import fdtd_pkg::*;
#(
  parameter int unsigned AW         = CELL_AW,
  parameter int unsigned FIFO_DEPTH = 32
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            run_en,
  input  upd_mode_e       mode,
  input  block_geom_t     geom,
  // BRAM read ports: port 0 of every bank reads the cell, port 1 a neighbour
  output logic [AW-1:0]   p0_addr,
  output logic [AW-1:0]   p1_addr [6],
  input  fp32_t           p0_data [6],
  input  fp32_t           p1_data [6],
  // operand pushes to cores I, II, III
  input  logic [$clog2(FIFO_DEPTH+1)-1:0] core_count [NCORE],
  output logic [NCORE-1:0] core_push,
  output core_ops_t       core_ops [NCORE],
  output logic            done
);
  logic [AW-1:0] i, k, j;
  logic [AW-1:0] n;
  logic          ph_b;          // 0: clock A next, 1: clock B next
  logic          finished;
  logic          a_d, b_d;      // data of clock A / B arrives this cycle
  logic          room;
  logic [AW-1:0] s_i, s_k, s_j;
  logic          fwd;
  logic          last_i, last_k, last_j, first_i, first_k, first_j;
  logic          hold;
  logic [2:0]    src_x, src_y, src_z, tgt_x, tgt_y, tgt_z;
  logic          issue_a, issue_b;

  // strides of the bank order
  assign s_i = AW'(1);
  assign s_k = AW'(geom.ipts);
  assign s_j = AW'(geom.ipts * geom.kpts);
  assign fwd = (mode == MODE_E);

  assign last_i  = (i == AW'(geom.ipts  - 1'b1));
  assign last_k  = (k == AW'(geom.kpts  - 1'b1));
  assign last_j  = (j == AW'(geom.djpts - 1'b1));
  assign first_i = (i == '0);
  assign first_k = (k == '0);
  assign first_j = (j == '0);

  // the cell is held if it lies on a face where the update reaches outside
  assign hold = fwd ? (last_i  || last_k  || last_j)
                    : (first_i || first_k || first_j);

  assign src_x = fwd ? 3'(F_HX) : 3'(F_EX);
  assign src_y = fwd ? 3'(F_HY) : 3'(F_EY);
  assign src_z = fwd ? 3'(F_HZ) : 3'(F_EZ);
  assign tgt_x = fwd ? 3'(F_EX) : 3'(F_HX);
  assign tgt_y = fwd ? 3'(F_EY) : 3'(F_HY);
  assign tgt_z = fwd ? 3'(F_EZ) : 3'(F_HZ);

  function automatic logic [AW-1:0] nb(input logic [AW-1:0] c, input logic [AW-1:0] s,
                                       input logic f, input logic h);
    if (h) return c;
    return f ? c + s : c - s;
  endfunction

  always_comb begin
    room = 1'b1;
    for (int c = 0; c < int'(NCORE); c++)
      if (32'(core_count[c]) + 3 > FIFO_DEPTH) room = 1'b0;
  end

  assign issue_a = run_en && !finished && !ph_b && room;
  assign issue_b = run_en && ph_b;

  assign p0_addr = n;
  always_comb begin
    for (int b = 0; b < 6; b++) p1_addr[b] = n;
    if (!ph_b) begin
      p1_addr[src_x] = nb(n, s_j, fwd, hold);
      p1_addr[src_y] = nb(n, s_k, fwd, hold);
      p1_addr[src_z] = nb(n, s_j, fwd, hold);
    end else begin
      p1_addr[src_x] = nb(n, s_k, fwd, hold);
      p1_addr[src_z] = nb(n, s_i, fwd, hold);
      p1_addr[src_y] = nb(n, s_i, fwd, hold);
    end
  end

  // cell scan
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i <= '0; k <= '0; j <= '0; n <= '0;
      ph_b <= 1'b0; finished <= 1'b0;
      a_d <= 1'b0; b_d <= 1'b0;
    end else if (!run_en) begin
      i <= '0; k <= '0; j <= '0; n <= '0;
      ph_b <= 1'b0; finished <= 1'b0;
      a_d <= 1'b0; b_d <= 1'b0;
    end else begin
      a_d <= issue_a;
      b_d <= issue_b;
      if (issue_a) ph_b <= 1'b1;
      if (issue_b) begin
        ph_b <= 1'b0;
        n    <= n + 1'b1;
        if (!last_i) i <= i + 1'b1;
        else begin
          i <= '0;
          if (!last_k) k <= k + 1'b1;
          else begin
            k <= '0;
            if (!last_j) j <= j + 1'b1;
            else finished <= 1'b1;
          end
        end
      end
    end
  end

  // operand order: forward differences give (neighbour, cell),
  // backward differences give (cell, neighbour)
  function automatic logic [63:0] pair(input fp32_t c, input fp32_t nbr, input logic f);
    return f ? {nbr, c} : {c, nbr};
  endfunction

  fp32_t px0, px1;     // x-source pair kept from clock A for core III

  always_ff @(posedge clk) begin
    if (a_d) begin
      px0 <= p0_data[src_x];
      px1 <= p1_data[src_x];
    end
  end

  always_comb begin
    logic [63:0] pr_x, pr_y, pr_z, pr_k;
    pr_x = pair(p0_data[src_x], p1_data[src_x], fwd);
    pr_y = pair(p0_data[src_y], p1_data[src_y], fwd);
    pr_z = pair(p0_data[src_z], p1_data[src_z], fwd);
    pr_k = pair(px0, px1, fwd);
    core_push = {b_d, b_d, a_d};
    // core I: x component
    core_ops[0].f = p0_data[tgt_x];
    {core_ops[0].a, core_ops[0].b} = fwd ? pr_z : pr_y;
    {core_ops[0].c, core_ops[0].d} = fwd ? pr_y : pr_z;
    // core II: y component
    core_ops[1].f = p0_data[tgt_y];
    {core_ops[1].a, core_ops[1].b} = fwd ? pr_x : pr_z;
    {core_ops[1].c, core_ops[1].d} = fwd ? pr_z : pr_x;
    // core III: z component
    core_ops[2].f = p0_data[tgt_z];
    {core_ops[2].a, core_ops[2].b} = fwd ? pr_y : pr_k;
    {core_ops[2].c, core_ops[2].d} = fwd ? pr_k : pr_y;
  end

  assign done = run_en && finished && !a_d && !b_d;

  a_ab_order: assert property (@(posedge clk) disable iff (!rst_n) a_d |=> b_d);

endmodule
