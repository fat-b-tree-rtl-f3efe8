// tb_workload_rdma: the two-switch RDMA setting at full table sizes.
//
// Switch A (number 0) holds the fat-root and the first cached layer; switch B
// (number 1) holds the second and third cached layers and is the last hop before the
// memory server. The fat-root has 600 ranges and each cached layer at most 3600
// nodes, the sizes of the evaluated default setting; the database has 2*10^6 keys,
// placed evenly over the 64-bit key space, and queries follow a Zipf-like law with
// exponent 0.99 over a scrambled key order (inverse-CDF sampling of the density
// x^-0.99, ranks mapped to keys by multiplication with an odd constant modulo the key
// count). The index below the fat-root is the implicit 16-way tree of fatb_tb_pkg.
//
// A training stream of queries gives node access counts; caching then follows the
// layer-by-layer rule: all fat-root children form layer 1, and each further layer
// takes the 3600 most accessed children of the cached nodes of the layer above. A
// separate measurement stream of queries is then sent at one packet per cycle and
// every packet is checked at the server (address, rkey, destination, latency 29).
// The test prints how many queries passed 0..3 cached layers.
module tb_workload_rdma;
  import fatb_pkg::*;
  import fatb_tb_pkg::*;

  localparam int N_R = 600, KMAX = 3600, LAT = 29;
  localparam longint N_KEYS = 2000000;
  localparam int N_TRAIN = 30000, N_MEAS = 5000;

  logic     clk = 1'b0, rst_n = 1'b0;
  ctrl_wr_t wr;
  logic     in_valid, a_valid, a_drop, b_valid, b_drop;
  pkt_t     in_pkt, a_pkt, b_pkt;
  logic [PORT_W-1:0] a_port, b_port;
  logic     a_enc, a_h0, a_h1, a_dec, b_enc, b_h0, b_h1, b_dec;

  fatb_switch #(.SW_ID(SW_ID_W'(0)), .FIRST_IS_FAT_ROOT(1'b1), .HAS_SECOND(1'b1),
                .LAST_HOP(1'b0)) u_a (
    .clk, .rst_n, .wr, .in_valid, .in_pkt, .out_valid(a_valid), .out_pkt(a_pkt),
    .out_port(a_port), .out_drop(a_drop), .ev_encap(a_enc), .ev_hit_first(a_h0),
    .ev_hit_second(a_h1), .ev_decap(a_dec));
  fatb_switch #(.SW_ID(SW_ID_W'(1)), .FIRST_IS_FAT_ROOT(1'b0), .HAS_SECOND(1'b1),
                .LAST_HOP(1'b1)) u_b (
    .clk, .rst_n, .wr, .in_valid(a_valid && !a_drop), .in_pkt(a_pkt),
    .out_valid(b_valid), .out_pkt(b_pkt), .out_port(b_port), .out_drop(b_drop),
    .ev_encap(b_enc), .ev_hit_first(b_h0), .ev_hit_second(b_h1), .ev_decap(b_dec));

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

  int o_fr = 0, o_l1 = 0, o_l2 = 0, o_l3 = 0;
  always @(posedge clk) if (rst_n) begin
    o_fr += int'(a_h0); o_l1 += int'(a_h1); o_l2 += int'(b_h0); o_l3 += int'(b_h1);
  end

  typedef struct { pkt_t p; longint t; } exp_t;
  exp_t expq[$];
  always @(posedge clk) if (rst_n && b_valid) begin
    exp_t e;
    checks++;
    if (expq.size() == 0) begin failures++; $display("FAIL unexpected packet"); end
    else begin
      e = expq.pop_front();
      if (b_pkt !== e.p || b_drop || b_port != '0 || cyc - e.t != LAT) begin
        failures++;
        $display("FAIL va=%h exp=%h lat=%0d", b_pkt.va, e.p.va, cyc - e.t);
      end
    end
  end

  range_encoder enc = new();
  tree_model    tm  = new();
  logic [63:0]  spacing;
  int           freq [logic [63:0]];
  ctrl_wr_t     wq[$];
  typedef struct { int layer; logic [63:0] lo, hi; int f; } nd_t;
  nd_t          cur[$], cand[$];
  int           n_cached [4];

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

  function automatic int range_of(logic [63:0] key);
    return enc.rid(key);
  endfunction

  function automatic logic [63:0] r_lo(int r);
    return (r == 1) ? 64'd0 : enc.bnd[r-1] - 64'd1;
  endfunction
  function automatic logic [63:0] r_hi(int r);
    return (r == N_R) ? 64'hFFFF_FFFF_FFFF_FFFF : enc.bnd[r] - 64'd1;
  endfunction

  // count accesses of the nodes of layers 1..3 on a key's path
  task automatic count_path(logic [63:0] key);
    int r = range_of(key), m;
    logic [63:0] lo = r_lo(r), hi = r_hi(r), a, nlo, nhi;
    for (int l = 1; l <= 3; l++) begin
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
    int sw = (n.layer == 1) ? 0 : 1;
    int u  = (n.layer == 2) ? 0 : 1;
    int sl = n_cached[n.layer]++;
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
    int   h, depth [4];
    logic [63:0] key, a;
    wr = '0; in_valid = 1'b0; in_pkt = '0;
    spacing = 64'hFFFF_FFFF_FFFF_FFFF / 64'(N_KEYS);
    foreach (depth[i]) depth[i] = 0;
    foreach (n_cached[i]) n_cached[i] = 0;

    // fat-root: 600 equal ranges of the key space
    for (int j = 0; j < N_R; j++) enc.bnd.push_back((64'hFFFF_FFFF_FFFF_FFFF / 64'(N_R)) * 64'(j));
    enc.build();
    for (int s = 0; s < 4; s++) begin
      $display("fat-root stage %0d: %0d entries", s, enc.ents[s].size());
      foreach (enc.ents[s][e])
        wq.push_back(mkwr(W_RANGE, 0, 0, e, s, 1'b1,
                          {enc.ents[s][e].res, enc.ents[s][e].hi, enc.ents[s][e].lo,
                           enc.ents[s][e].tab}, 64'(enc.ents[s][e].fin)));
    end
    for (int r = 1; r <= N_R; r++)
      wq.push_back(mkwr(W_ACTION, 0, 0, r, 0, 1'b1, tm.addr(1, r_lo(r)), 64'd0));

    // training stream -> access counts
    for (int n = 0; n < N_TRAIN; n++) count_path(zipf_key());

    // layer-by-layer caching
    for (int r = 1; r <= N_R; r++) cur.push_back('{layer: 1, lo: r_lo(r), hi: r_hi(r), f: 0});
    for (int l = 1; l <= 3; l++) begin
      foreach (cur[n]) load_node(cur[n]);
      if (l == 3) break;
      cand.delete();
      foreach (cur[n])
        for (int c = 0; c < 16; c++) begin
          nd_t k;
          k.layer = l + 1;
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
    $display("cached nodes per layer: %0d %0d %0d", n_cached[1], n_cached[2], n_cached[3]);
    checks++;
    if (n_cached[1] > 4096 || n_cached[2] > KMAX || n_cached[3] > KMAX || n_cached[3] == 0) begin
      failures++; $display("FAIL cache sizes");
    end
    wq.push_back(mkwr(W_FWD, 0, 0, 0, 0, 1'b1, 64'd0, 64'd0));
    wq.push_back(mkwr(W_FWD, 1, 0, 0, 0, 1'b1, 64'd0, 64'd0));
    wq.push_back(mkwr(W_RKEY, 1, 0, 0, 0, 1'b1, 64'h1234_5678, 64'd0));
    $display("control writes: %0d", wq.size());

    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    foreach (wq[i]) begin wr = wq[i]; @(posedge clk); #1; end
    wr = '0;

    @(negedge clk);
    for (int n = 0; n < N_MEAS; n++) begin
      int r;
      key = zipf_key();
      p = '0;
      p.is_read = 1'b1; p.len = 32'd256; p.va = key; p.rkey = 32'd0;
      r = range_of(key);
      q = p;
      q.va = tm.walk(1, r_lo(r), r_hi(r), key, 3, h);
      depth[h]++;
      q.rkey = 32'h1234_5678;
      q.dst = 8'd0;
      expq.push_back('{p: q, t: cyc});
      in_valid = 1'b1; in_pkt = p;
      @(negedge clk);
    end
    in_valid = 1'b0;
    repeat (LAT + 4) @(posedge clk);
    $display("queries passing 0/1/2/3 cached layers: %0d %0d %0d %0d of %0d",
             depth[0], depth[1], depth[2], depth[3], N_MEAS);
    $display("switch hit counts: fat-root %0d, layer1 %0d, layer2 %0d, layer3 %0d", o_fr, o_l1, o_l2, o_l3);
    checks += 2;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d packets missing", expq.size()); end
    if (o_fr != N_MEAS || o_l1 != depth[1] + depth[2] + depth[3] ||
        o_l2 != depth[2] + depth[3] || o_l3 != depth[3]) begin
      failures++; $display("FAIL hit counts differ from the model");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
