// tb_fatb_switch: self-checking test of one switch built as the first switch of the
// two-switch setup (fat-root followed by one regular node set), here also acting as
// last hop so that every stage of a switch is exercised: header attach, fat-root,
// regular node set, header removal with rkey restore, forwarding.
// The controller model loads a fat-root of 30 ranges (owned by servers 0..7), caches
// most layer-1 nodes in the node set, and loads ports and rkeys for servers 0..7.
// Writes addressed to another switch number carry wrong data and must be ignored.
// Each packet must leave 15 cycles after it entered, on the predicted port, with the
// predicted va, destination and rkey. Ordinary reads and an unrouted destination
// (drop) are mixed in; each mechanism must occur and match the model's count.
module tb_fatb_switch;
  import fatb_pkg::*;
  import fatb_tb_pkg::*;

  localparam int SW = 3, LAT = 15, N_R = 30, N_SRV = 8;

  logic              clk = 1'b0, rst_n = 1'b0;
  ctrl_wr_t          wr;
  logic              in_valid, out_valid, out_drop;
  pkt_t              in_pkt, out_pkt;
  logic [PORT_W-1:0] out_port;
  logic              ev_encap, ev_hit_first, ev_hit_second, ev_decap;

  fatb_switch #(.SW_ID(SW_ID_W'(SW)), .FIRST_IS_FAT_ROOT(1'b1), .HAS_SECOND(1'b1),
                .LAST_HOP(1'b1)) dut (.*);

  int     checks = 0, failures = 0;
  longint cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int o_enc = 0, o_fr = 0, o_set = 0, o_dec = 0, o_drop = 0;
  typedef struct { pkt_t p; logic [PORT_W-1:0] port; logic drop; longint t; } exp_t;
  exp_t expq[$];

  always @(posedge clk) if (rst_n) begin
    o_enc += int'(ev_encap); o_fr += int'(ev_hit_first);
    o_set += int'(ev_hit_second); o_dec += int'(ev_decap);
    if (out_valid) begin
      exp_t e;
      checks++;
      if (expq.size() == 0) begin failures++; $display("FAIL unexpected output"); end
      else begin
        e = expq.pop_front();
        if (out_drop) o_drop++;
        if (out_drop !== e.drop || cyc - e.t != LAT ||
            (!e.drop && (out_pkt !== e.p || out_port !== e.port))) begin
          failures++;
          $display("FAIL va=%h exp=%h port=%0d exp=%0d drop=%b exp=%b lat=%0d", out_pkt.va,
                   e.p.va, out_port, e.port, out_drop, e.drop, cyc - e.t);
        end
      end
    end
  end

  range_encoder enc = new();
  tree_model    tm  = new();
  logic [63:0]  r_lo [N_R+1], r_hi [N_R+1];
  int           r_sid [N_R+1];
  ctrl_wr_t     wq[$];
  int           m_fr = 0, m_set = 0, m_drop = 0, m_norm = 0, slot = 0;

  initial begin
    pkt_t p, q;
    int   r, h, sid;
    logic [63:0] key, a;
    wr = '0; in_valid = 1'b0; in_pkt = '0;
    enc.bnd.push_back(64'd0);
    for (int j = 1; j < N_R; j++) enc.bnd.push_back({$urandom, $urandom});
    enc.bnd.sort();
    for (int j = 1; j < N_R; j++) if (enc.bnd[j] <= enc.bnd[j-1]) enc.bnd[j] = enc.bnd[j-1] + 64'h1_0000_0000;
    enc.build();
    for (int s = 0; s < 4; s++)
      foreach (enc.ents[s][e]) begin
        ctrl_wr_t w;
        w = mkwr(W_RANGE, SW, 0, e, s, 1'b1,
                           {enc.ents[s][e].res, enc.ents[s][e].hi, enc.ents[s][e].lo,
                            enc.ents[s][e].tab}, 64'(enc.ents[s][e].fin));
        wq.push_back(w);
        w.sw = SW_ID_W'(SW + 1); w.data0 = ~w.data0;     // another switch's entry
        wq.push_back(w);
      end
    for (r = 1; r <= N_R; r++) begin
      r_lo[r]  = (r == 1) ? 64'd0 : enc.bnd[r-1] - 64'd1;
      r_hi[r]  = (r == N_R) ? 64'hFFFF_FFFF_FFFF_FFFF : enc.bnd[r] - 64'd1;
      r_sid[r] = int'($urandom % N_SRV);
      wq.push_back(mkwr(W_ACTION, SW, 0, r, 0, 1'b1, tm.addr(1, r_lo[r]), 64'(r_sid[r])));
      if (r % 5 != 2) begin         // cache this layer-1 node in the second unit
        a = tm.addr(1, r_lo[r]);
        tm.cached[a] = 1'b1;
        wq.push_back(mkwr(W_NODE, SW, 1, slot, 0, 1'b1, a, 64'd0));
        for (int i = 0; i < 16; i++) begin
          wq.push_back(mkwr(W_PIVOT, SW, 1, slot, i, 1'b1, tree_model::pivot(r_lo[r], r_hi[r], i), 64'd0));
          wq.push_back(mkwr(W_CHILD, SW, 1, slot, i, 1'b1,
                            tm.addr(2, tree_model::pivot(r_lo[r], r_hi[r], i)), 64'd0));
        end
        slot++;
      end
    end
    for (int s = 0; s < N_SRV; s++) begin
      wq.push_back(mkwr(W_FWD, SW, 0, s, 0, 1'b1, 64'(s % 4 + 1), 64'd0));
      wq.push_back(mkwr(W_RKEY, SW, 0, s, 0, 1'b1, 64'(32'hBEEF_0000 + s), 64'd0));
      wq.push_back(mkwr(W_RKEY, SW + 1, 0, s, 0, 1'b1, 64'd5, 64'd0));
    end

    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    foreach (wq[i]) begin wr = wq[i]; @(posedge clk); #1; end
    wr = '0;

    @(negedge clk);
    for (int n = 0; n < 2000; n++) begin
      p = '0;
      p.is_read = 1'b1;
      p.len = 32'd1024;
      r = 1 + int'($urandom % N_R);
      case ($urandom % 4)
        0: key = {$urandom, $urandom};
        1: key = enc.bnd[r-1];
        2: key = tree_model::pivot(r_lo[r], r_hi[r], int'($urandom % 16));
        default: key = r_lo[r] + 64'd1 + ({$urandom, $urandom} % (r_hi[r] - r_lo[r]));
      endcase
      if (n % 9 == 4) begin
        p.va = {$urandom, $urandom}; p.rkey = $urandom | 32'd1;
        p.dst = (n % 27 == 4) ? 8'd100 : 8'($urandom % N_SRV);
        if (p.dst == 8'd100) begin m_drop++; expq.push_back('{p: p, port: '0, drop: 1'b1, t: cyc}); end
        else begin m_norm++; expq.push_back('{p: p, port: PORT_W'(p.dst % 4 + 1), drop: 1'b0, t: cyc}); end
      end else begin
        p.va = key; p.rkey = 32'd0; p.dst = 8'($urandom);
        r = enc.rid(key);
        sid = r_sid[r];
        q = p;
        q.va = tm.walk(1, r_lo[r], r_hi[r], key, 1, h);
        m_fr++;
        m_set += h;
        q.dst = 8'(sid);
        q.rkey = 32'hBEEF_0000 + 32'(sid);
        expq.push_back('{p: q, port: PORT_W'(sid % 4 + 1), drop: 1'b0, t: cyc});
      end
      in_valid = 1'b1; in_pkt = p;
      @(negedge clk);
      if (n % 53 == 0) begin in_valid = 1'b0; @(negedge clk); end
    end
    in_valid = 1'b0;
    repeat (LAT + 4) @(posedge clk);
    $display("model: fat-root %0d set %0d ordinary %0d drops %0d", m_fr, m_set, m_norm, m_drop);
    $display("seen:  encap %0d fat-root %0d set %0d decap %0d drops %0d", o_enc, o_fr, o_set, o_dec, o_drop);
    checks += 4;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d outputs missing", expq.size()); end
    if (o_enc != m_fr || o_fr != m_fr || o_dec != m_fr) begin failures++; $display("FAIL encap/fat-root/decap count"); end
    if (o_set != m_set || m_set == 0 || m_set == m_fr) begin failures++; $display("FAIL node set hit count"); end
    if (o_drop != m_drop || m_drop == 0 || m_norm == 0) begin failures++; $display("FAIL drop/ordinary count"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
