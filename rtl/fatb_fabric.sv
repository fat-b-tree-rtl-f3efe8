// fatb_fabric: an in-network B+tree index spread over the switches of a k-ary
// FatTree. One core switch holds the fat-root node (the merged top layers of the
// B+tree); each of the k aggregation switches below it holds two layers of cached
// regular nodes for the servers of its pod; each of the k/2 edge switches of a pod
// holds the next two layers and is the last hop before its k/2 memory servers.
// For k = 4 that is 13 switches (1 + 4 + 8) and 16 memory servers, and a query
// passes the fat-root plus four cached node layers on its way down.
//
// A client's special RDMA-read enters at the core (in_valid/in_pkt). The core
// attaches the temporary header, the fat-root turns the key into a child address and
// a server ID, and each switch forwards by that ID (core -> aggregation switch of the
// server's pod -> edge switch of its rack -> server) while its node sets refine va.
// The packet leaves at srv_valid[s]/srv_pkt[s] of server s as a plain RDMA-read of
// the deepest cached node on the key's path. The choice of one core and the per-level
// placement of the index follow the design; server numbering
// (s = (pod*k/2 + rack)*k/2 + port), the ingress at the core and a downward-only
// tree are this implementation's own. The switches on the client's side of the
// network only forward and are not modelled.
//
// Interface/timing: no back-pressure, one query per cycle. Latency core in ->
// server out: 8 (core) + 14 (aggregation) + 15 (edge) = 37 cycles. Control writes on
// wr reach every switch; core is switch 0, aggregation switch i is 1+i, edge switch
// (i,j) is 1+k+i*k/2+j. A packet dropped for lack of a route pulses drop[switch].
module fatb_fabric
  import fatb_pkg::*;
#(
  parameter int unsigned K        = 4,
  parameter int unsigned N_NODES  = 4096,
  parameter int unsigned N_RANGES = 1024,
  localparam int unsigned N_AGG   = K,
  localparam int unsigned N_EDGE  = K * K / 2,
  localparam int unsigned N_SW    = 1 + N_AGG + N_EDGE,
  localparam int unsigned N_SRV   = N_EDGE * K / 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  ctrl_wr_t         wr,
  input  logic             in_valid,
  input  pkt_t             in_pkt,
  output logic             srv_valid [N_SRV],
  output pkt_t             srv_pkt   [N_SRV],
  output logic             ev_encap,
  output logic [N_SW-1:0]  ev_hit_first,
  output logic [N_SW-1:0]  ev_hit_second,
  output logic [N_EDGE-1:0] ev_decap,
  output logic [N_SW-1:0]  drop
);

  localparam int unsigned HALF = K / 2;

  logic              sw_in_valid  [N_SW];
  pkt_t              sw_in_pkt    [N_SW];
  logic              sw_out_valid [N_SW];
  pkt_t              sw_out_pkt   [N_SW];
  logic [PORT_W-1:0] sw_out_port  [N_SW];
  logic              sw_drop      [N_SW];
  logic              sw_encap     [N_SW];
  logic              sw_decap     [N_SW];

  // ---------------- core ----------------
  assign sw_in_valid[0] = in_valid;
  assign sw_in_pkt[0]   = in_pkt;

  fatb_switch #(
    .SW_ID(SW_ID_W'(0)), .FIRST_IS_FAT_ROOT(1'b1), .HAS_SECOND(1'b0), .LAST_HOP(1'b0),
    .N_NODES(N_NODES), .N_RANGES(N_RANGES)
  ) u_core (
    .clk(clk), .rst_n(rst_n), .wr(wr),
    .in_valid(sw_in_valid[0]), .in_pkt(sw_in_pkt[0]),
    .out_valid(sw_out_valid[0]), .out_pkt(sw_out_pkt[0]),
    .out_port(sw_out_port[0]), .out_drop(sw_drop[0]),
    .ev_encap(sw_encap[0]), .ev_hit_first(ev_hit_first[0]),
    .ev_hit_second(ev_hit_second[0]), .ev_decap(sw_decap[0])
  );
  assign ev_encap = sw_encap[0];

  // ---------------- aggregation ----------------
  for (genvar i = 0; i < N_AGG; i++) begin : g_agg
    localparam int unsigned S = 1 + i;
    assign sw_in_valid[S] = sw_out_valid[0] && !sw_drop[0] && sw_out_port[0] == PORT_W'(i);
    assign sw_in_pkt[S]   = sw_out_pkt[0];

    fatb_switch #(
      .SW_ID(SW_ID_W'(S)), .FIRST_IS_FAT_ROOT(1'b0), .HAS_SECOND(1'b1), .LAST_HOP(1'b0),
      .N_NODES(N_NODES), .N_RANGES(N_RANGES)
    ) u_agg (
      .clk(clk), .rst_n(rst_n), .wr(wr),
      .in_valid(sw_in_valid[S]), .in_pkt(sw_in_pkt[S]),
      .out_valid(sw_out_valid[S]), .out_pkt(sw_out_pkt[S]),
      .out_port(sw_out_port[S]), .out_drop(sw_drop[S]),
      .ev_encap(sw_encap[S]), .ev_hit_first(ev_hit_first[S]),
      .ev_hit_second(ev_hit_second[S]), .ev_decap(sw_decap[S])
    );
  end

  // ---------------- edge ----------------
  for (genvar i = 0; i < N_AGG; i++) begin : g_pod
    for (genvar j = 0; j < HALF; j++) begin : g_edge
      localparam int unsigned A = 1 + i;
      localparam int unsigned E = i * HALF + j;
      localparam int unsigned S = 1 + N_AGG + E;
      assign sw_in_valid[S] = sw_out_valid[A] && !sw_drop[A] && sw_out_port[A] == PORT_W'(j);
      assign sw_in_pkt[S]   = sw_out_pkt[A];

      fatb_switch #(
        .SW_ID(SW_ID_W'(S)), .FIRST_IS_FAT_ROOT(1'b0), .HAS_SECOND(1'b1), .LAST_HOP(1'b1),
        .N_NODES(N_NODES), .N_RANGES(N_RANGES)
      ) u_edge (
        .clk(clk), .rst_n(rst_n), .wr(wr),
        .in_valid(sw_in_valid[S]), .in_pkt(sw_in_pkt[S]),
        .out_valid(sw_out_valid[S]), .out_pkt(sw_out_pkt[S]),
        .out_port(sw_out_port[S]), .out_drop(sw_drop[S]),
        .ev_encap(sw_encap[S]), .ev_hit_first(ev_hit_first[S]),
        .ev_hit_second(ev_hit_second[S]), .ev_decap(sw_decap[S])
      );
      assign ev_decap[E] = sw_decap[S];

      for (genvar p = 0; p < HALF; p++) begin : g_srv
        assign srv_valid[E*HALF+p] = sw_out_valid[S] && !sw_drop[S] &&
                                     sw_out_port[S] == PORT_W'(p);
        assign srv_pkt[E*HALF+p]   = sw_out_pkt[S];
      end
    end
  end

  for (genvar s = 0; s < N_SW; s++) begin : g_drop
    assign drop[s] = sw_out_valid[s] && sw_drop[s];
  end

endmodule
