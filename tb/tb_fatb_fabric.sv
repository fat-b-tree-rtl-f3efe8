// tb_fatb_fabric: end-to-end test of the k = 4 FatTree index at its default sizes
// (13 switches, fat-root of 1024 ranges, 24 regular node sets of 4096 nodes).
//
// A controller model loads: forwarding tables (core: pod of a server, aggregation:
// rack, edge: port), the rkey of every server at its edge switch, a fat-root of N_R
// ranges each owned by a random server, and four cached node layers chosen layer by
// layer (every layer-1 child of the fat-root but a few; then two children of each
// cached node per layer), placed in the owning pod's aggregation switch (layers 1, 2)
// and rack's edge switch (layers 3, 4). It then streams one packet per cycle: special
// RDMA-reads with keys that follow cached paths, random keys, keys equal to pivots,
// ordinary RDMA-reads, and reads to an unrouted server. Every packet must leave at the
// right server exactly 37 cycles later as a plain RDMA-read of the node the implicit
// tree model predicts, with the server's rkey. Counts and requires: header attach,
// fat-root hit, hits in each of the four layers, a node miss, header removal,
// ordinary forwarding and a drop; the switches' event counts must match the model.
module tb_fatb_fabric;
  import fatb_pkg::*;
  import fatb_tb_pkg::*;

  localparam int K = 4, N_SRV = 16, N_SW = 13, N_EDGE = 8, LAT = 37;
  localparam int N_R = 40;       // fat-root ranges used
  localparam int N_Q = 3000;     // queries

  logic     clk = 1'b0, rst_n = 1'b0;
  ctrl_wr_t wr;
  logic     in_valid;
  pkt_t     in_pkt;
  logic     srv_valid [N_SRV];
  pkt_t     srv_pkt   [N_SRV];
  logic     ev_encap;
  logic [N_SW-1:0]   ev_hit_first, ev_hit_second, drop;
  logic [N_EDGE-1:0] ev_decap;

  fatb_fabric dut (.*);

  int     checks = 0, failures = 0;
  longint cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // observed event counts
  int o_encap = 0, o_fr = 0, o_agg0 = 0, o_agg1 = 0, o_edge0 = 0, o_edge1 = 0, o_decap = 0, o_drop = 0;
  always @(posedge clk) if (rst_n) begin
    o_encap += int'(ev_encap);
    o_fr    += int'(ev_hit_first[0]);
    for (int s = 1; s <= K; s++) begin o_agg0 += int'(ev_hit_first[s]); o_agg1 += int'(ev_hit_second[s]); end
    for (int s = K + 1; s < N_SW; s++) begin o_edge0 += int'(ev_hit_first[s]); o_edge1 += int'(ev_hit_second[s]); end
    o_decap += $countones(ev_decap);
    o_drop  += $countones(drop);
  end

  // expectations per server
  typedef struct { pkt_t p; longint t; } exp_t;
  exp_t expq [N_SRV][$];

  always @(posedge clk) if (rst_n) begin
    for (int s = 0; s < N_SRV; s++) if (srv_valid[s]) begin
      exp_t e;
      checks++;
      if (expq[s].size() == 0) begin
        failures++; $display("FAIL unexpected packet at server %0d va=%h", s, srv_pkt[s].va);
      end else begin
        e = expq[s].pop_front();
        if (srv_pkt[s] !== e.p || cyc - e.t != LAT) begin
          failures++;
          $display("FAIL srv %0d va=%h exp=%h rkey=%h exp=%h tmp=%b lat=%0d", s, srv_pkt[s].va,
                   e.p.va, srv_pkt[s].rkey, e.p.rkey, srv_pkt[s].tmp_valid, cyc - e.t);
        end
      end
    end
  end

  range_encoder enc = new();
  tree_model    tm  = new();
  logic [63:0]  r_lo [N_R+1], r_hi [N_R+1];
  int           r_sid [N_R+1];
  bit           r_cached [N_R+1];
  int           slot_cnt [N_SW][2];
  ctrl_wr_t     wq[$];
  typedef struct { int layer; logic [63:0] lo, hi; int sid; } nd_t;
  nd_t layer_nodes[$], next_nodes[$];
  int  m_fr = 0, m_hit[5], m_miss = 0, m_norm = 0, m_drop = 0;

  function automatic int edge_sw(int sid);  return 1 + K + sid / 2; endfunction
  function automatic int agg_sw(int sid);   return 1 + sid / 4;     endfunction

  task automatic load_node(nd_t n);
    int sw = (n.layer <= 2) ? agg_sw(n.sid) : edge_sw(n.sid);
    int u  = (n.layer == 1 || n.layer == 3) ? 0 : 1;
    int sl = slot_cnt[sw][u]++;
    logic [63:0] a = tm.addr(n.layer, n.lo);
    tm.cached[a] = 1'b1;
    wq.push_back(mkwr(W_NODE, sw, u, sl, 0, 1'b1, a, 64'd0));
    for (int i = 0; i < 16; i++) begin
      wq.push_back(mkwr(W_PIVOT, sw, u, sl, i, 1'b1, tree_model::pivot(n.lo, n.hi, i), 64'd0));
      wq.push_back(mkwr(W_CHILD, sw, u, sl, i, 1'b1,
                        tm.addr(n.layer + 1, tree_model::pivot(n.lo, n.hi, i)), 64'd0));
    end
  endtask

  initial begin
    pkt_t p, q;
    int   r, h, sid, c0;
    logic [63:0] key, tmp;
    nd_t  nd;
    wr = '0; in_valid = 1'b0; in_pkt = '0;
    foreach (m_hit[i]) m_hit[i] = 0;
    foreach (slot_cnt[i, j]) slot_cnt[i][j] = 0;

    // ---- fat-root ranges ----
    enc.bnd.push_back(64'd0);
    for (int j = 1; j < N_R; j++) enc.bnd.push_back({$urandom, $urandom});
    enc.bnd.sort();
    for (int j = 1; j < N_R; j++) if (enc.bnd[j] <= enc.bnd[j-1]) enc.bnd[j] = enc.bnd[j-1] + 64'h1_0000_0000;
    enc.build();
    for (int s = 0; s < 4; s++) begin
      $display("fat-root stage %0d: %0d entries", s, enc.ents[s].size());
      foreach (enc.ents[s][e])
        wq.push_back(mkwr(W_RANGE, 0, 0, e, s, 1'b1,
                          {enc.ents[s][e].res, enc.ents[s][e].hi, enc.ents[s][e].lo,
                           enc.ents[s][e].tab}, 64'(enc.ents[s][e].fin)));
    end
    for (r = 1; r <= N_R; r++) begin
      r_lo[r]  = (r == 1) ? 64'd0 : enc.bnd[r-1] - 64'd1;
      r_hi[r]  = (r == N_R) ? 64'hFFFF_FFFF_FFFF_FFFF : enc.bnd[r] - 64'd1;
      r_sid[r] = int'($urandom % N_SRV);
      wq.push_back(mkwr(W_ACTION, 0, 0, r, 0, 1'b1, tm.addr(1, r_lo[r]), 64'(r_sid[r])));
      r_cached[r] = (r % 7) != 3;
      if (r_cached[r]) layer_nodes.push_back('{layer: 1, lo: r_lo[r], hi: r_hi[r], sid: r_sid[r]});
    end
    // ---- layer-by-layer caching ----
    for (int l = 1; l <= 4; l++) begin
      next_nodes.delete();
      foreach (layer_nodes[n]) begin
        load_node(layer_nodes[n]);
        nd = layer_nodes[n];
        c0 = int'($urandom % 15);
        for (int c = c0; c <= c0 + 1; c++)
          next_nodes.push_back('{layer: l + 1, lo: tree_model::pivot(nd.lo, nd.hi, c),
                                 hi: tree_model::child_hi(nd.lo, nd.hi, c), sid: nd.sid});
      end
      if (l < 4) layer_nodes = next_nodes;
    end
    // ---- forwarding and registered RDMA status ----
    for (int s = 0; s < N_SRV; s++) begin
      wq.push_back(mkwr(W_FWD, 0, 0, s, 0, 1'b1, 64'(s / 4), 64'd0));
      wq.push_back(mkwr(W_FWD, agg_sw(s), 0, s, 0, 1'b1, 64'((s / 2) % 2), 64'd0));
      wq.push_back(mkwr(W_FWD, edge_sw(s), 0, s, 0, 1'b1, 64'(s % 2), 64'd0));
      wq.push_back(mkwr(W_RKEY, edge_sw(s), 0, s, 0, 1'b1, 64'(32'hC0DE_0000 + s), 64'd0));
    end
    $display("control writes: %0d", wq.size());

    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    foreach (wq[i]) begin wr = wq[i]; @(posedge clk); #1; end
    wr = '0;

    // ---- query stream ----
    @(negedge clk);
    for (int n = 0; n < N_Q; n++) begin
      p = '0;
      p.is_read = 1'b1;
      p.len     = 32'd1024;
      case ($urandom % 10)
        0, 1, 2, 3, 4: begin  // a key inside a cached deepest-layer node
          nd  = next_nodes[$urandom % next_nodes.size()];
          key = nd.lo + 64'd1 + ({$urandom, $urandom} % (nd.hi - nd.lo));
        end
        5: key = {$urandom, $urandom};
        6: begin
          nd  = next_nodes[$urandom % next_nodes.size()];
          key = nd.lo;                                   // on a boundary
        end
        7: begin
          r   = 1 + int'($urandom % N_R);
          key = enc.bnd[r-1];
        end
        default: key = '0;
      endcase
      if (n % 10 == 8) begin          // ordinary RDMA-read
        p.va = {$urandom, $urandom}; p.rkey = $urandom | 32'd1;
        p.dst = (n % 50 == 8) ? 8'd200 : 8'($urandom % N_SRV);
        if (p.dst == 8'd200) m_drop++;
        else begin
          m_norm++;
          expq[p.dst].push_back('{p: p, t: cyc});
        end
      end else begin                  // special RDMA-read carrying the key
        p.va = key; p.rkey = 32'd0; p.dst = 8'($urandom);
        r = enc.rid(key);
        sid = r_sid[r];
        q = p;
        m_fr++;
        q.va   = tm.walk(1, r_lo[r], r_hi[r], key, 4, h);
        for (int l = 1; l <= h; l++) m_hit[l]++;
        if (h < 4) m_miss++;
        q.dst  = 8'(sid);
        q.rkey = 32'hC0DE_0000 + 32'(sid);
        expq[sid].push_back('{p: q, t: cyc});
      end
      in_valid = 1'b1; in_pkt = p;
      @(negedge clk);
      if (n % 89 == 0) begin in_valid = 1'b0; @(negedge clk); end
    end
    in_valid = 1'b0;
    repeat (LAT + 4) @(posedge clk);

    for (int s = 0; s < N_SRV; s++) begin
      checks++;
      if (expq[s].size() != 0) begin failures++; $display("FAIL server %0d: %0d missing", s, expq[s].size()); end
    end
    $display("model: fat-root %0d, layer hits %0d/%0d/%0d/%0d, stopped early %0d, ordinary %0d, drops %0d",
             m_fr, m_hit[1], m_hit[2], m_hit[3], m_hit[4], m_miss, m_norm, m_drop);
    $display("seen:  encap %0d, fat-root %0d, agg %0d/%0d, edge %0d/%0d, decap %0d, drops %0d",
             o_encap, o_fr, o_agg0, o_agg1, o_edge0, o_edge1, o_decap, o_drop);
    checks += 8;
    if (o_encap != m_fr || o_fr != m_fr || o_decap != m_fr) begin failures++; $display("FAIL encap/fat-root/decap count"); end
    if (o_agg0 != m_hit[1] || o_agg1 != m_hit[2]) begin failures++; $display("FAIL aggregation hit count"); end
    if (o_edge0 != m_hit[3] || o_edge1 != m_hit[4]) begin failures++; $display("FAIL edge hit count"); end
    if (o_drop != m_drop) begin failures++; $display("FAIL drop count"); end
    if (m_fr == 0 || m_norm == 0 || m_drop == 0) begin failures++; $display("FAIL a packet kind never occurred"); end
    if (m_hit[4] == 0 || m_hit[1] == 0) begin failures++; $display("FAIL a layer never hit"); end
    if (m_miss == 0) begin failures++; $display("FAIL no query stopped above the last layer"); end
    if (o_decap == 0 || o_encap == 0) begin failures++; $display("FAIL header attach/removal never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
