// fatb_switch: the data plane of one programmable switch taking part in the
// in-network B+tree index.
//
// A switch pipeline has room for two 6-stage index units. The first unit is either
// the fat-root node (FIRST_IS_FAT_ROOT = 1) or a regular node set; the second unit,
// present when HAS_SECOND = 1, is a regular node set holding the next cached layer.
// The packet path is:
//   query_encap -> first unit -> [second unit] -> [query_decap] -> sid_forward
// query_encap attaches the temporary header to a new special RDMA-read (first hop);
// the index units rewrite va layer by layer (intermediate hops); query_decap
// (LAST_HOP = 1, the edge switch next to the servers) removes the header and fills in
// the registered rkey; sid_forward picks the egress port from the server ID.
// Combining a fat-root with a regular set, or two regular sets, in one switch follows
// the design, as does the core/aggregation/edge split; the stage order around the
// index units is this implementation's own.
//
// Interface/timing: one packet per cycle, no back-pressure. Latency from in_valid to
// out_valid: 1 + 6 + 6*HAS_SECOND + LAST_HOP + 1 cycles. Control writes on wr are
// taken when wr.sw == SW_ID; wr.unit selects the first (0) or second (1) regular node
// set. The ev_* outputs pulse once per packet in which the named mechanism acted.
module fatb_switch
  import fatb_pkg::*;
#(
  parameter logic [SW_ID_W-1:0] SW_ID             = '0,
  parameter bit                 FIRST_IS_FAT_ROOT = 1'b1,
  parameter bit                 HAS_SECOND        = 1'b1,
  parameter bit                 LAST_HOP          = 1'b0,
  parameter int unsigned        N_NODES           = 4096,
  parameter int unsigned        N_RANGES          = 1024
) (
  input  logic              clk,
  input  logic              rst_n,
  input  ctrl_wr_t          wr,
  input  logic              in_valid,
  input  pkt_t              in_pkt,
  output logic              out_valid,
  output pkt_t              out_pkt,
  output logic [PORT_W-1:0] out_port,
  output logic              out_drop,
  output logic              ev_encap,
  output logic              ev_hit_first,
  output logic              ev_hit_second,
  output logic              ev_decap
);

  // Control writes addressed to this switch, split per index unit.
  ctrl_wr_t wr_sw, wr_u0, wr_u1;
  always_comb begin
    wr_sw = wr;
    wr_sw.valid = wr.valid && wr.sw == SW_ID;
    wr_u0 = wr_sw;
    wr_u0.valid = wr_sw.valid && !wr.unit;
    wr_u1 = wr_sw;
    wr_u1.valid = wr_sw.valid && wr.unit;
  end

  // ---------------- first hop ----------------
  logic e_valid;
  pkt_t e_pkt;
  query_encap u_encap (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .in_pkt   (in_pkt),
    .out_valid(e_valid),
    .out_pkt  (e_pkt),
    .out_encap(ev_encap)
  );

  // ---------------- first index unit ----------------
  logic a_valid, a_hit;
  pkt_t a_pkt;
  if (FIRST_IS_FAT_ROOT) begin : g_first_fat
    fat_root #(.N_RANGES(N_RANGES)) u_fat_root (
      .clk      (clk),
      .rst_n    (rst_n),
      .wr       (wr_sw),
      .in_valid (e_valid),
      .in_pkt   (e_pkt),
      .out_valid(a_valid),
      .out_pkt  (a_pkt),
      .out_hit  (a_hit)
    );
  end else begin : g_first_reg
    regular_node_set #(.N_NODES(N_NODES)) u_set0 (
      .clk      (clk),
      .rst_n    (rst_n),
      .wr       (wr_u0),
      .in_valid (e_valid),
      .in_pkt   (e_pkt),
      .out_valid(a_valid),
      .out_pkt  (a_pkt),
      .out_hit  (a_hit)
    );
  end
  assign ev_hit_first = a_hit;

  // ---------------- second index unit ----------------
  logic b_valid, b_hit;
  pkt_t b_pkt;
  if (HAS_SECOND) begin : g_second
    regular_node_set #(.N_NODES(N_NODES)) u_set1 (
      .clk      (clk),
      .rst_n    (rst_n),
      .wr       (wr_u1),
      .in_valid (a_valid),
      .in_pkt   (a_pkt),
      .out_valid(b_valid),
      .out_pkt  (b_pkt),
      .out_hit  (b_hit)
    );
  end else begin : g_no_second
    assign b_valid = a_valid;
    assign b_pkt   = a_pkt;
    assign b_hit   = 1'b0;
  end
  assign ev_hit_second = b_hit;

  // ---------------- last hop ----------------
  logic d_valid;
  pkt_t d_pkt;
  if (LAST_HOP) begin : g_decap
    query_decap u_decap (
      .clk      (clk),
      .rst_n    (rst_n),
      .wr       (wr_sw),
      .in_valid (b_valid),
      .in_pkt   (b_pkt),
      .out_valid(d_valid),
      .out_pkt  (d_pkt),
      .out_decap(ev_decap)
    );
  end else begin : g_no_decap
    assign d_valid  = b_valid;
    assign d_pkt    = b_pkt;
    assign ev_decap = 1'b0;
  end

  // ---------------- forwarding ----------------
  sid_forward u_fwd (
    .clk      (clk),
    .rst_n    (rst_n),
    .wr       (wr_sw),
    .in_valid (d_valid),
    .in_pkt   (d_pkt),
    .out_valid(out_valid),
    .out_pkt  (out_pkt),
    .out_port (out_port),
    .out_drop (out_drop)
  );

endmodule
