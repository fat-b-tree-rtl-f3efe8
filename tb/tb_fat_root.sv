// tb_fat_root: self-checking test of the fat-root at full size (1024 ranges,
// 2048 entries per 16-bit stage).
// The test splits the 64-bit key space into N_R ranges: most boundaries random, and
// groups of boundaries packed into one 2^48, 2^32 or 2^16 block so that lookups need
// tables in the second, third and fourth stage. It encodes the ranges into 16-bit
// range tables with a work-list version of the per-stage construction (each 16-bit
// chunk of a table's key block is either wholly inside one range, giving a final
// entry, merged with equal neighbours, or cut by a boundary, giving a next-stage
// table), checks that every stage fits the 2*1024 entries of the DUT, loads them, and then
// streams one query per cycle. Expected child address and server ID come from a
// binary search over the boundaries; latency must be exactly 6 cycles. One range's
// action is left unloaded (miss) and some packets carry no temporary header (pass).
module tb_fat_root;
  import fatb_pkg::*;

  localparam int unsigned NR  = 1024;   // capacity of the DUT
  localparam int unsigned N_R = 600;    // ranges used (the evaluated fat-root size)
  localparam int unsigned LAT = 6;

  logic     clk = 1'b0, rst_n = 1'b0;
  ctrl_wr_t wr;
  logic     in_valid;
  pkt_t     in_pkt;
  logic     out_valid, out_hit;
  pkt_t     out_pkt;
  int       checks = 0, failures = 0;
  int       n_hit = 0, n_miss = 0, n_pass = 0;
  longint   cyc = 0;

  fat_root #(.N_RANGES(NR)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] bnd [N_R+1];     // bnd[j] = lowest key of range j (1-based), bnd[1] = 0
  logic [63:0] act_a [N_R+1];
  logic [7:0]  act_s [N_R+1];
  localparam int UNLOADED = 77;

  // entries per stage
  typedef struct { logic [15:0] tab, lo, hi, res; logic fin; } ent_t;
  ent_t ents [4][$];

  function automatic int rid(input logic [63:0] x);  // range holding x
    int lo = 1, hi = N_R, mid;
    while (lo < hi) begin
      mid = (lo + hi + 1) / 2;
      if (bnd[mid] <= x) lo = mid; else hi = mid - 1;
    end
    return lo;
  endfunction

  function automatic int next_bnd(input logic [63:0] x);  // first j with bnd[j] > x, or 0
    int r = rid(x);
    return (r < int'(N_R)) ? r + 1 : 0;
  endfunction

  typedef struct { int stage; int tab; logic [63:0] base; } work_t;

  task automatic build_tables();
    work_t wl[$];
    work_t w;
    int    next_id = N_R + 1;
    wl.push_back('{stage: 0, tab: 0, base: 64'd0});
    while (wl.size() > 0) begin
      int sh, c, nb, r1, r2, c_last;
      logic [63:0] mask, lo_x, hi_x, space_hi, d;
      w = wl.pop_front();
      sh = 48 - 16 * w.stage;
      mask = (64'd1 << sh) - 64'd1;
      space_hi = w.base | ((64'd1 << (sh + 16)) - 64'd1);
      if (w.stage == 0) space_hi = 64'hFFFF_FFFF_FFFF_FFFF;
      c = 0;
      while (c <= 65535) begin
        lo_x = w.base | (64'(c) << sh);
        hi_x = lo_x | mask;
        r1 = rid(lo_x);
        r2 = rid(hi_x);
        if (r1 == r2) begin
          nb = next_bnd(lo_x);
          if (nb == 0 || bnd[nb] > space_hi) c_last = 65535;
          else begin
            d = (bnd[nb] - w.base) >> sh;
            c_last = int'(d) - 1;
          end
          ents[w.stage].push_back('{tab: 16'(w.tab), lo: 16'(c), hi: 16'(c_last),
                                    res: 16'(r1), fin: 1'b1});
          c = c_last + 1;
        end else begin
          ents[w.stage].push_back('{tab: 16'(w.tab), lo: 16'(c), hi: 16'(c),
                                    res: 16'(next_id), fin: 1'b0});
          wl.push_back('{stage: w.stage + 1, tab: next_id, base: lo_x});
          next_id++;
          c++;
        end
      end
    end
  endtask

  task automatic write(input wr_kind_e k, input int idx, input int sub, input logic en,
                       input logic [63:0] d0, input logic [63:0] d1);
    wr = '0;
    wr.valid = 1'b1; wr.kind = k; wr.index = 16'(idx); wr.sub = 4'(sub);
    wr.en = en; wr.data0 = d0; wr.data1 = d1;
    @(posedge clk); #1;
    wr = '0;
  endtask

  typedef struct { pkt_t p; logic hit; longint t; } exp_t;
  exp_t expq[$];

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      checks++;
      if (expq.size() == 0) begin
        failures++; $display("FAIL unexpected output");
      end else begin
        e = expq.pop_front();
        if (out_pkt !== e.p || out_hit !== e.hit || cyc - e.t != LAT) begin
          failures++;
          $display("FAIL key=%h va=%h exp=%h sid=%0d exp=%0d hit=%b exp=%b lat=%0d",
                   e.p.tmp_key, out_pkt.va, e.p.va, out_pkt.tmp_sid, e.p.tmp_sid,
                   out_hit, e.hit, cyc - e.t);
        end
        if (e.hit) n_hit++;
        else if (e.p.tmp_valid) n_miss++;
        else n_pass++;
      end
    end
  end

  initial begin
    pkt_t p, q;
    int   j, r;
    logic [63:0] tmp, key;
    wr = '0; in_valid = 1'b0; in_pkt = '0;
    // boundaries: clusters inside one 2^48 / 2^32 / 2^16 block, the rest random
    bnd[1] = 64'd0;
    for (j = 2; j <= int'(N_R); j++) begin
      case (j % 10)
        0: bnd[j] = 64'h1234_0000_0000_0000 + 64'({$urandom, $urandom} % 64'h0001_0000_0000_0000);
        1: bnd[j] = 64'h5678_9ABC_0000_0000 + 64'($urandom);
        2: bnd[j] = 64'h9ABC_DEF0_1234_0000 + 64'($urandom % 65536);
        default: bnd[j] = {$urandom, $urandom};
      endcase
      if (bnd[j] == 0) bnd[j] = 64'd1;
    end
    // sort and make unique
    for (int a = 2; a <= int'(N_R); a++)
      for (int b = a; b > 2 && bnd[b-1] > bnd[b]; b--) begin
        tmp = bnd[b]; bnd[b] = bnd[b-1]; bnd[b-1] = tmp;
      end
    for (j = 2; j <= int'(N_R); j++) if (bnd[j] <= bnd[j-1]) bnd[j] = bnd[j-1] + 64'd1;
    for (j = 1; j <= int'(N_R); j++) begin
      act_a[j] = {$urandom, $urandom};
      act_s[j] = 8'($urandom % 16);
    end
    build_tables();
    for (int s = 0; s < 4; s++) begin
      $display("stage %0d: %0d entries", s, ents[s].size());
      checks++;
      if (ents[s].size() > 2 * int'(NR)) begin
        failures++; $display("FAIL stage %0d needs %0d entries", s, ents[s].size());
      end
    end

    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int s = 0; s < 4; s++)
      for (int e = 0; e < ents[s].size(); e++)
        write(W_RANGE, e, s, 1'b1,
              {ents[s][e].res, ents[s][e].hi, ents[s][e].lo, ents[s][e].tab},
              64'(ents[s][e].fin));
    for (j = 1; j <= int'(N_R); j++)
      if (j != UNLOADED) write(W_ACTION, j, 0, 1'b1, act_a[j], 64'(act_s[j]));

    @(negedge clk);
    for (int n = 0; n < 4000; n++) begin
      r = 1 + int'($urandom % N_R);
      if (n < 20) r = UNLOADED;
      case ($urandom % 5)
        0: key = bnd[r];
        1: key = bnd[r] - 64'd1;
        2: key = bnd[r] + 64'd1;
        3: key = bnd[r] + 64'($urandom % 300);
        default: key = {$urandom, $urandom};
      endcase
      p = '0;
      p.is_read = 1'b1;
      p.tmp_valid = (n % 13) != 5;
      p.tmp_key = key;
      p.va = key;
      p.len = 32'd1024;
      p.dst = 8'($urandom);
      q = p;
      r = rid(key);
      in_valid = 1'b1; in_pkt = p;
      if (p.tmp_valid && r != UNLOADED) begin
        q.va = act_a[r]; q.tmp_sid = act_s[r];
        expq.push_back('{p: q, hit: 1'b1, t: cyc});
      end else begin
        expq.push_back('{p: q, hit: 1'b0, t: cyc});
      end
      @(negedge clk);
      if (n % 101 == 0) begin in_valid = 1'b0; @(negedge clk); end
    end
    in_valid = 1'b0;
    repeat (LAT + 3) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d outputs missing", expq.size()); end
    checks++;
    if (n_hit == 0 || n_miss == 0 || n_pass == 0) begin
      failures++; $display("FAIL coverage hit=%0d miss=%0d pass=%0d", n_hit, n_miss, n_pass);
    end
    $display("hits=%0d misses=%0d passthrough=%0d", n_hit, n_miss, n_pass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
