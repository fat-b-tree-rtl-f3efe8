// fatb_tb_pkg: testbench-side stand-ins for the central controller.
//
// range_encoder turns a sorted list of 64-bit range boundaries into the entries of
// the four 16-bit range-table stages of the fat-root. A work list holds (stage, table
// id, key block); each 16-bit chunk of a block either lies wholly inside one range
// (a final entry, merged with its equal neighbours) or is cut by a boundary (an entry
// pointing to a new table of the next stage). Range ids are 1..n, table ids start at
// n+1, and table 0 is the first stage's table.
//
// tree_model is an implicit B+tree below the fat-root: a regular node on layer l that
// covers keys (lo, hi] has pivots lo + i*step (step = (hi-lo)/16, i = 0..15) and
// child i covers (pivot i, pivot i+1], the last child up to hi. Node addresses are
// handed out on first use. The model records which nodes are cached and predicts,
// by the same rule the switches apply (child m when exactly the first m pivots are
// below the key), the address a query should carry after the cached layers.
package fatb_tb_pkg;
  import fatb_pkg::*;

  typedef struct { logic [15:0] tab, lo, hi, res; logic fin; } ent_t;
  typedef struct { int stage; int tab; logic [63:0] base; } work_t;

  class range_encoder;
    logic [63:0] bnd[$];   // bnd[0] = 0 is the lowest key of range 1
    ent_t        ents[4][$];

    function int rid(logic [63:0] x);  // 1-based range holding x
      int lo = 0, hi = bnd.size() - 1, mid;
      while (lo < hi) begin
        mid = (lo + hi + 1) / 2;
        if (bnd[mid] <= x) lo = mid; else hi = mid - 1;
      end
      return lo + 1;
    endfunction

    function void build();
      work_t wl[$];
      work_t w;
      int    n = bnd.size();
      int    next_id = n + 1;
      for (int s = 0; s < 4; s++) ents[s].delete();
      wl.push_back('{stage: 0, tab: 0, base: 64'd0});
      while (wl.size() > 0) begin
        int sh, c, r1, r2, c_last;
        logic [63:0] mask, lo_x, hi_x, space_hi, d;
        w = wl.pop_front();
        sh = 48 - 16 * w.stage;
        mask = (64'd1 << sh) - 64'd1;
        space_hi = (w.stage == 0) ? 64'hFFFF_FFFF_FFFF_FFFF
                                  : (w.base | ((64'd1 << (sh + 16)) - 64'd1));
        c = 0;
        while (c <= 65535) begin
          lo_x = w.base | (64'(c) << sh);
          hi_x = lo_x | mask;
          r1 = rid(lo_x);
          r2 = rid(hi_x);
          if (r1 == r2) begin
            if (r1 >= n || bnd[r1] > space_hi) c_last = 65535;   // bnd[r1] starts range r1+1
            else begin
              d = (bnd[r1] - w.base) >> sh;
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
    endfunction
  endclass

  class tree_model;
    logic [63:0] addr_of [logic [71:0]];   // {layer, lo} -> node address
    bit          cached  [logic [63:0]];   // node address -> cached
    int          n_alloc = 0;

    function logic [63:0] addr(int layer, logic [63:0] lo);
      logic [71:0] k = {8'(layer), lo};
      if (!addr_of.exists(k)) begin
        n_alloc++;
        addr_of[k] = 64'h4000_0000_0000_0000 | (64'(layer) << 48) | (64'(n_alloc) << 12);
      end
      return addr_of[k];
    endfunction

    static function logic [63:0] pivot(logic [63:0] lo, logic [63:0] hi, int i);
      return lo + 64'(i) * ((hi - lo) / 64'd16);
    endfunction

    static function logic [63:0] child_hi(logic [63:0] lo, logic [63:0] hi, int i);
      return (i == 15) ? hi : pivot(lo, hi, i + 1);
    endfunction

    // number of pivots below key (the child number), 0 if none
    static function int ones(logic [63:0] lo, logic [63:0] hi, logic [63:0] key);
      int m = 0;
      for (int i = 0; i < 16; i++) if (key > pivot(lo, hi, i)) m++;
      return m;
    endfunction

    // Follow the key from node (layer, lo, hi) through up to 'layers' cached layers.
    // Returns the address the packet should carry; hits counts the rewrites.
    function logic [63:0] walk(int layer, logic [63:0] lo, logic [63:0] hi,
                               logic [63:0] key, int layers, output int hits);
      logic [63:0] a;
      int m;
      hits = 0;
      for (int l = 0; l < layers; l++) begin
        a = addr(layer + l, lo);
        if (!cached.exists(a)) return a;
        m = ones(lo, hi, key);
        if (m == 0) return a;
        begin
          logic [63:0] nlo = pivot(lo, hi, m - 1);
          logic [63:0] nhi = child_hi(lo, hi, m - 1);
          lo = nlo; hi = nhi;
        end
        hits++;
      end
      return addr(layer + layers, lo);
    endfunction
  endclass

  function automatic ctrl_wr_t mkwr(wr_kind_e k, int sw, int unit, int idx, int sub,
                                    logic en, logic [63:0] d0, logic [63:0] d1);
    ctrl_wr_t w = '0;
    w.valid = 1'b1; w.kind = k; w.sw = SW_ID_W'(sw); w.unit = unit[0];
    w.index = 16'(idx); w.sub = 4'(sub); w.en = en; w.data0 = d0; w.data1 = d1;
    return w;
  endfunction

endpackage
