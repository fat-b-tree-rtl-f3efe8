// tb_workload_ethernet: the FatTree setting at full table sizes.
//
// The whole k = 4 fabric (fatb_fabric at its default parameters) holds a fat-root of
// 600 ranges in the core switch and four cached layers below it of at most 3600 nodes
// each, the sizes of the evaluated large-network setting. The database has 10^8 keys
// spread evenly over the 64-bit key space and is shared by four memory servers that
// sit in one pod (servers 0..3, two per rack): range r belongs to server
// (r-1)*4/600, so pod 0's aggregation switch holds layers 1 and 2 for all of it and
// its two edge switches split layers 3 and 4 by rack. Queries follow a Zipf-like law
// with exponent 0.99 over a scrambled key order, drawn as in tb_workload_rdma; the
// index below the fat-root is the implicit 16-way tree of fatb_tb_pkg.
//
// A training stream gives node access counts; layer 1 is every fat-root child and
// each further layer takes the 3600 most accessed children of the cached nodes of the
// layer above. The queries are carried as special RDMA-reads, the one query format
// the switches implement. A measurement stream is then sent at one packet per cycle
// and every packet is checked at its server (address, rkey, destination, latency 37).
// The test prints how many queries passed 0..4 cached layers and requires the
// switches' hit counts to match the model.
module tb_workload_ethernet;
  import fatb_pkg::*;
  import fatb_tb_pkg::*;

  localparam int K = 4, N_SRV = 16, N_SW = 13, N_EDGE = 8, LAT = 37;
  localparam int N_R = 600, KMAX = 3600, N_MS = 4;
  localparam longint N_KEYS = 100000000;
  localparam int N_TRAIN = 60000, N_MEAS = 5000;

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
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int o_hit [5];
  initial foreach (o_hit[i]) o_hit[i] = 0;
  always @(posedge clk) if (rst_n) begin
    o_hit[0] += int'(ev_hit_first[0]);
    o_hit[1] += int'(ev_hit_first[1]);
    o_hit[2] += int'(ev_hit_second[1]);
    o_hit[3] += int'(ev_hit_first[5]) + int'(ev_hit_first[6]);
    o_hit[4] += int'(ev_hit_second[5]) + int'(ev_hit_second[6]);
  end

  typedef struct { pkt_t p; longint t; } exp_t;
  exp_t expq [N_SRV][$];
  always @(posedge clk) if (rst_n) begin
    for (int s = 0; s < N_SRV; s++) if (srv_valid[s]) begin
      exp_t e;
      checks++;
      if (expq[s].size() == 0) begin
        failures++; $display("FAIL unexpected packet at server %0d", s);
      end else begin
        e = expq[s].pop_front();
        if (srv_pkt[s] !== e.p || cyc - e.t != LAT) begin
          failures++;
          $display("FAIL srv %0d va=%h exp=%h lat=%0d", s, srv_pkt[s].va, e.p.va, cyc - e.t);
        end
      end
    end
  end

  range_encoder enc = new();
  tree_model    tm  = new();
  logic [63:0]  spacing;
  int           freq [logic [63:0]];
  ctrl_wr_t     wq[$];
  typedef struct { int layer; logic [63:0] lo, hi; int sid; int f; } nd_t;
  nd_t          cur[$], cand[$];
  int           n_cached [5];
  int           slot_cnt [N_SW][2];

  function automatic int edge_sw(int sid); return 1 + K + sid / 2; endfunction
  function automatic int agg_sw(int sid);  return 1 + sid / 4;     endfunction
  function automatic int sid_of(int r);    return ((r - 1) * N_MS) / N_R; endfunction

  function automatic logic [63:0] zipf_key();
    real    u, x;
    longint rank, idx;
    u = real'($urandom) / 4294967296.0;
    x = $pow(1.0 + u * ($pow(real'(N_KEYS) + 1.0, 0.01) - 1.0), 100.0);
    rank = longint'(x) - 1;
    if (rank < 0) rank = 0;
    if (rank >= N_KEYS) rank = N_KEYS - 1;
    idx = longint'((64'(rank) * 64'd2654435761) % 64'(N_KEYS));
    return 64'(idx) * spacing + spacing / 2;
  endfunction

  function automatic logic [63:0] r_lo(int r);
    return (r == 1) ? 64'd0 : enc.bnd[r-1] - 64'd1;
  endfunction
  function automatic logic [63:0] r_hi(int r);
    return (r == N_R) ? 64'hFFFF_FFFF_FFFF_FFFF : enc.bnd[r] - 64'd1;
  endfunction

  // count accesses of the nodes of layers 1..4 on a key's path
  task automatic count_path(logic [63:0] key);
    int r = enc.rid(key), m;
    logic [63:0] lo = r_lo(r), hi = r_hi(r), a, nlo, nhi;
    for (int l = 1; l <= 4; l++) begin
      a = tm.addr(l, lo);
      if (freq.exists(a)) freq[a]++; else freq[a] = 1;
      m = tree_model::ones(lo, hi, key);
      if (m == 0) return;
      nlo = tree_model::pivot(lo, hi, m - 1);
      nhi = tree_model::child_hi(lo, hi, m - 1);
      lo = nlo; hi = nhi;
    end
  endtask

  task automatic load_node(nd_t n);
    int sw = (n.layer <= 2) ? agg_sw(n.sid) : edge_sw(n.sid);
    int u  = (n.layer == 1 || n.layer == 3) ? 0 : 1;
    int sl = slot_cnt[sw][u]++;
    logic [63:0] a = tm.addr(n.layer, n.lo);
    n_cached[n.layer]++;
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
    int   h, r, sid, depth [5], max_set;
    logic [63:0] key, a;
    wr = '0; in_valid = 1'b0; in_pkt = '0;
    spacing = 64'hFFFF_FFFF_FFFF_FFFF / 64'(N_KEYS);
    foreach (depth[i]) depth[i] = 0;
    foreach (n_cached[i]) n_cached[i] = 0;
    foreach (slot_cnt[i, j]) slot_cnt[i][j] = 0;

    // fat-root: 600 equal ranges, server IDs 0..3 in key order
    for (int j = 0; j < N_R; j++) enc.bnd.push_back((64'hFFFF_FFFF_FFFF_FFFF / 64'(N_R)) * 64'(j));
    enc.build();
    for (int s = 0; s < 4; s++) begin
      $display("fat-root stage %0d: %0d entries", s, enc.ents[s].size());
      foreach (enc.ents[s][e])
        wq.push_back(mkwr(W_RANGE, 0, 0, e, s, 1'b1,
                          {enc.ents[s][e].res, enc.ents[s][e].hi, enc.ents[s][e].lo,
                           enc.ents[s][e].tab}, 64'(enc.ents[s][e].fin)));
    end
    for (r = 1; r <= N_R; r++)
      wq.push_back(mkwr(W_ACTION, 0, 0, r, 0, 1'b1, tm.addr(1, r_lo(r)), 64'(sid_of(r))));

    for (int n = 0; n < N_TRAIN; n++) count_path(zipf_key());

    // layer-by-layer caching
    for (r = 1; r <= N_R; r++)
      cur.push_back('{layer: 1, lo: r_lo(r), hi: r_hi(r), sid: sid_of(r), f: 0});
    for (int l = 1; l <= 4; l++) begin
      foreach (cur[n]) load_node(cur[n]);
      if (l == 4) break;
      cand.delete();
      foreach (cur[n])
        for (int c = 0; c < 16; c++) begin
          nd_t k;
          k.layer = l + 1;
          k.sid = cur[n].sid;
          k.lo = tree_model::pivot(cur[n].lo, cur[n].hi, c);
          k.hi = tree_model::child_hi(cur[n].lo, cur[n].hi, c);
          a = tm.addr(l + 1, k.lo);
          k.f = freq.exists(a) ? freq[a] : 0;
          if (k.f > 0) cand.push_back(k);
        end
      cand.rsort() with (item.f);
      cur.delete();
      for (int i = 0; i < cand.size() && i < KMAX; i++) cur.push_back(cand[i]);
    end
    max_set = 0;
    foreach (slot_cnt[i, j]) if (slot_cnt[i][j] > max_set) max_set = slot_cnt[i][j];
    $display("cached nodes per layer: %0d %0d %0d %0d; fullest node set %0d",
             n_cached[1], n_cached[2], n_cached[3], n_cached[4], max_set);
    checks++;
    if (max_set > 4096 || n_cached[2] > KMAX || n_cached[3] > KMAX || n_cached[4] > KMAX ||
        n_cached[4] == 0) begin
      failures++; $display("FAIL cache sizes");
    end
    for (int s = 0; s < N_MS; s++) begin
      wq.push_back(mkwr(W_FWD, 0, 0, s, 0, 1'b1, 64'(s / 4), 64'd0));
      wq.push_back(mkwr(W_FWD, agg_sw(s), 0, s, 0, 1'b1, 64'((s / 2) % 2), 64'd0));
      wq.push_back(mkwr(W_FWD, edge_sw(s), 0, s, 0, 1'b1, 64'(s % 2), 64'd0));
      wq.push_back(mkwr(W_RKEY, edge_sw(s), 0, s, 0, 1'b1, 64'(32'hBEEF_0000 + s), 64'd0));
    end
    $display("control writes: %0d", wq.size());

    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    foreach (wq[i]) begin wr = wq[i]; @(posedge clk); #1; end
    wr = '0;

    @(negedge clk);
    for (int n = 0; n < N_MEAS; n++) begin
      key = zipf_key();
      p = '0;
      p.is_read = 1'b1; p.len = 32'd1024; p.va = key; p.rkey = 32'd0;
      r = enc.rid(key);
      sid = sid_of(r);
      q = p;
      q.va = tm.walk(1, r_lo(r), r_hi(r), key, 4, h);
      depth[h]++;
      q.rkey = 32'hBEEF_0000 + 32'(sid);
      q.dst = 8'(sid);
      expq[sid].push_back('{p: q, t: cyc});
      in_valid = 1'b1; in_pkt = p;
      @(negedge clk);
    end
    in_valid = 1'b0;
    repeat (LAT + 4) @(posedge clk);
    $display("queries passing 0/1/2/3/4 cached layers: %0d %0d %0d %0d %0d of %0d",
             depth[0], depth[1], depth[2], depth[3], depth[4], N_MEAS);
    $display("switch hit counts: fat-root %0d, layers %0d/%0d/%0d/%0d",
             o_hit[0], o_hit[1], o_hit[2], o_hit[3], o_hit[4]);
    for (int s = 0; s < N_SRV; s++) begin
      checks++;
      if (expq[s].size() != 0) begin failures++; $display("FAIL server %0d: %0d missing", s, expq[s].size()); end
    end
    checks++;
    if (o_hit[0] != N_MEAS || o_hit[1] != N_MEAS - depth[0] ||
        o_hit[2] != depth[2] + depth[3] + depth[4] || o_hit[3] != depth[3] + depth[4] ||
        o_hit[4] != depth[4]) begin
      failures++; $display("FAIL hit counts differ from the model");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
