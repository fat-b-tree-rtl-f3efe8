// regular_node_set: a set of cached 16-branch B+tree nodes held in SRAM tables,
// searched by one packet per cycle in a 6-stage pipeline.
//
// Each node occupies one slot and holds 16 pivot keys and 16 child addresses.
// The tables mirror the design's get_pivot_i / cal_result_i / get_child_address:
//   stage 1  exact match of the packet's va (the current node address) against the
//            node addresses of all slots (one shared address match instead of one per
//            pivot table; the outcome is the same)
//   stage 2  read the 16 pivot tables at the matched slot
//   stage 3  16 cmp64 phase-1 units (32-bit sub/xor) on query key and pivots
//   stage 4  16 cmp64 phase-2 tables give result[15:0], result[15-i] = key > pivot[i]
//   stage 5  get_child_address: the result must be a run of ones starting at bit 15;
//            m ones select child m (1..16), read from the 16*N child table
//   stage 6  the child address is written into va
// A packet without the temporary header, whose va names no cached node, whose result
// is not a run of ones from bit 15 (including all zeros), or whose chosen child entry
// is marked absent leaves unchanged ("miss"). Pivot 0 is the node's lower bound and
// unused pivots should hold all-ones, so a key never exceeds them.
//
// Interface: in_valid/in_pkt enter every cycle (no back-pressure, line rate);
// out_valid/out_pkt leave exactly 6 cycles later; out_hit marks a rewritten va.
// Control writes (W_NODE, W_PIVOT, W_CHILD) arrive on wr, already selected for this
// set, and take effect the cycle after. Reset clears the node valid bits only: each
// child entry carries its own valid bit in the child table, so the controller writes
// all 16 child entries of a node (en = 0 for an absent child) before validating it.
// Stage count, fan-out, node capacity and the thermometer result follow the design;
// the stage-by-stage split and the miss rules are this implementation's choices.
module regular_node_set
  import fatb_pkg::*;
#(
  parameter int unsigned N_NODES = 4096
) (
  input  logic     clk,
  input  logic     rst_n,
  input  ctrl_wr_t wr,
  input  logic     in_valid,
  input  pkt_t     in_pkt,
  output logic     out_valid,
  output pkt_t     out_pkt,
  output logic     out_hit
);

  localparam int unsigned SLOT_W = (N_NODES > 1) ? $clog2(N_NODES) : 1;

  // ---------------- tables ----------------
  logic [ADDR_W-1:0] node_addr [N_NODES];
  logic [N_NODES-1:0] node_vld;
  logic [KEY_W-1:0]  piv_mem   [FANOUT][N_NODES];
  logic [ADDR_W:0]   child_mem [N_NODES*FANOUT];  // {entry valid, child address}

  logic [SLOT_W-1:0] wr_slot;
  assign wr_slot = wr.index[SLOT_W-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      node_vld <= '0;
    end else if (wr.valid && wr.kind == W_NODE) begin
      node_vld[wr_slot] <= wr.en;
    end
  end

  // Table contents carry no reset (SRAM).
  always_ff @(posedge clk) begin
    if (wr.valid) begin
      case (wr.kind)
        W_NODE:  node_addr[wr_slot] <= wr.data0;
        W_PIVOT: piv_mem[wr.sub][wr_slot] <= wr.data0;
        W_CHILD: child_mem[{wr_slot, wr.sub}] <= {wr.en, wr.data0};
        default: ;
      endcase
    end
  end

  // ---------------- pipeline valid/packet registers ----------------
  logic v1, v2, v3, v4, v5, v6;
  pkt_t p1, p2, p3, p4, p5, p6;
  logic h1, h2, h3, h4, h5;  // node found (and, from stage 5, child chosen)
  logic [SLOT_W-1:0] slot1, slot2, slot3, slot4;

  // Stage 1: exact match of va against node addresses.
  logic              m_hit;
  logic [SLOT_W-1:0] m_slot;
  always_comb begin
    m_hit  = 1'b0;
    m_slot = '0;
    for (int s = int'(N_NODES) - 1; s >= 0; s--) begin
      if (node_vld[s] && node_addr[s] == in_pkt.va) begin
        m_hit  = 1'b1;
        m_slot = SLOT_W'(s);
      end
    end
  end

  // Stage 2: pivot read.
  logic [KEY_W-1:0] piv2 [FANOUT];

  // Stage 3/4: comparators (cmp64 holds the stage-3 register internally).
  logic [FANOUT-1:0] gt3;
  logic [FANOUT-1:0] result4;

  for (genvar i = 0; i < FANOUT; i++) begin : g_cmp
    cmp64 u_cmp (
      .clk  (clk),
      .key  (p2.tmp_key),
      .pivot(piv2[i]),
      .gt   (gt3[i])
    );
  end

  // Stage 5: thermometer decode of result -> child number.
  logic       thermo_ok;
  logic [4:0] ones;
  always_comb begin
    ones      = '0;
    thermo_ok = 1'b1;
    for (int b = FANOUT - 1; b >= 0; b--) begin
      if (result4[b]) begin
        if (ones != 5'(FANOUT - 1 - b)) thermo_ok = 1'b0;  // a one after a zero
        ones = ones + 5'd1;
      end
    end
    if (ones == 5'd0) thermo_ok = 1'b0;
  end

  logic [3:0]        cidx;
  assign cidx = 4'(ones - 5'd1);
  logic [ADDR_W:0]   child5;  // {entry valid, address}

  always_ff @(posedge clk) begin
    // stage 2 pivot read
    for (int i = 0; i < int'(FANOUT); i++) piv2[i] <= piv_mem[i][slot1];
    // stage 5 child read
    child5 <= child_mem[{slot4, cidx}];
    // packet and slot carry
    p1 <= in_pkt;  p2 <= p1;  p3 <= p2;  p4 <= p3;  p5 <= p4;
    slot1 <= m_slot; slot2 <= slot1; slot3 <= slot2; slot4 <= slot3;
    for (int i = 0; i < int'(FANOUT); i++) result4[FANOUT-1-i] <= gt3[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {v1, v2, v3, v4, v5, v6} <= '0;
      {h1, h2, h3, h4, h5}     <= '0;
    end else begin
      v1 <= in_valid; v2 <= v1; v3 <= v2; v4 <= v3; v5 <= v4; v6 <= v5;
      h1 <= in_valid && in_pkt.tmp_valid && m_hit;
      h2 <= h1; h3 <= h2; h4 <= h3;
      h5 <= h4 && thermo_ok;
    end
  end

  // Stage 6: rewrite va.
  logic hit6;
  always_ff @(posedge clk) begin
    p6 <= p5;
    if (h5 && child5[ADDR_W]) p6.va <= child5[ADDR_W-1:0];
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) hit6 <= 1'b0;
    else        hit6 <= h5 && child5[ADDR_W];
  end

  assign out_valid = v6;
  assign out_pkt   = p6;
  assign out_hit   = hit6 && v6;

endmodule
