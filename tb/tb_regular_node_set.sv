// tb_regular_node_set: self-checking test of a regular node set at full size
// (4096 slots of 16-branch nodes).
// Loads nodes with sorted pivots (some with fewer than 16 children, unused pivots
// all-ones), one node with unsorted pivots, and one node with an unloaded child
// entry, then streams one query per cycle: keys around and equal to pivots, va values
// that name no node, and packets without the temporary header. Each output is checked
// against a reference search written directly from the node rule (child m chosen when
// exactly the first m pivots are below the key) and must appear exactly 6 cycles
// after its input. Counts hits, misses and pass-throughs; each must occur.
module tb_regular_node_set;
  import fatb_pkg::*;

  localparam int unsigned N   = 4096;
  localparam int unsigned LAT = 6;
  localparam int unsigned NN  = 48;   // nodes loaded

  logic     clk = 1'b0, rst_n = 1'b0;
  ctrl_wr_t wr;
  logic     in_valid;
  pkt_t     in_pkt;
  logic     out_valid, out_hit;
  pkt_t     out_pkt;
  int       checks = 0, failures = 0;
  int       n_hit = 0, n_miss = 0, n_pass = 0;
  longint   cyc = 0;

  regular_node_set #(.N_NODES(N)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference copy of the loaded nodes
  logic [63:0] r_addr  [NN];
  int          r_slot  [NN];
  logic [63:0] r_piv   [NN][16];
  logic [63:0] r_child [NN][16];
  logic        r_cv    [NN][16];

  task automatic write(input wr_kind_e k, input int idx, input int sub,
                       input logic en, input logic [63:0] d0);
    wr = '0;
    wr.valid = 1'b1; wr.kind = k; wr.index = 16'(idx); wr.sub = 4'(sub);
    wr.en = en; wr.data0 = d0;
    @(posedge clk); #1;
    wr = '0;
  endtask

  // expected output for a packet
  function automatic pkt_t model(input pkt_t p, output logic hit);
    pkt_t q = p;
    int   ones;
    logic ok;
    hit = 1'b0;
    if (!p.tmp_valid) return q;
    for (int n = 0; n < int'(NN); n++) begin
      if (r_addr[n] == p.va) begin
        ones = 0; ok = 1'b1;
        for (int i = 0; i < 16; i++) begin
          if (p.tmp_key > r_piv[n][i]) begin
            if (ones != i) ok = 1'b0;
            ones++;
          end
        end
        if (ones == 0) ok = 1'b0;
        if (ok && r_cv[n][ones-1]) begin
          q.va = r_child[n][ones-1];
          hit = 1'b1;
        end
        return q;
      end
    end
    return q;
  endfunction

  typedef struct { pkt_t p; logic hit; longint t; } exp_t;
  exp_t expq[$];

  // output checker
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
          $display("FAIL va=%h exp=%h hit=%b exp=%b lat=%0d", out_pkt.va, e.p.va,
                   out_hit, e.hit, cyc - e.t);
        end
        if (e.hit) n_hit++;
        else if (e.p.tmp_valid) n_miss++;
        else n_pass++;
      end
    end
  end

  initial begin
    pkt_t p;
    logic h;
    int   n, nch;
    logic [63:0] base, step;
    wr = '0; in_valid = 1'b0; in_pkt = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // build nodes
    for (n = 0; n < int'(NN); n++) begin
      r_slot[n] = (n * 83 + 7) % N;
      r_addr[n] = {32'hA000_0000 + 32'(n), $urandom};
      base = {$urandom, $urandom} >> 2;
      step = 64'({$urandom} % 32'h100000) + 64'd3;
      nch  = (n % 3 == 0) ? 1 + ($urandom % 16) : 16;
      for (int i = 0; i < 16; i++) begin
        r_piv[n][i]   = (i < nch) ? base + 64'(i) * step : 64'hFFFF_FFFF_FFFF_FFFF;
        r_child[n][i] = {$urandom, $urandom};
        r_cv[n][i]    = (i < nch);
      end
      if (n == 5) r_cv[n][4] = 1'b0;                       // unloaded child entry
      if (n == 6) {r_piv[n][3], r_piv[n][9]} = {r_piv[n][9], r_piv[n][3]};  // unsorted
      write(W_NODE, r_slot[n], 0, 1'b1, r_addr[n]);
      for (int i = 0; i < 16; i++) begin
        write(W_PIVOT, r_slot[n], i, 1'b0, r_piv[n][i]);
        write(W_CHILD, r_slot[n], i, r_cv[n][i], r_child[n][i]);
      end
    end
    // stream queries, one per cycle
    @(negedge clk);
    for (int q = 0; q < 3000; q++) begin
      n = (q < 200) ? (q % 16 == 0 ? 5 : 6) : int'($urandom % NN);
      p = '0;
      p.is_read   = 1'b1;
      p.tmp_valid = ($urandom % 10) != 0;
      p.va        = ($urandom % 8 == 0) ? {$urandom, $urandom} : r_addr[n];
      case ($urandom % 4)
        0: p.tmp_key = r_piv[n][$urandom % 16];                          // equal to a pivot
        1: p.tmp_key = r_piv[n][$urandom % 16] + 64'd1;
        2: p.tmp_key = r_piv[n][0] - 64'd1;                               // below the node
        default: p.tmp_key = r_piv[n][0] + ({$urandom} % (r_piv[n][1] - r_piv[n][0] + 1) * 64'd17);
      endcase
      p.rkey = 32'd0; p.len = 32'd256; p.dst = 8'($urandom);
      in_valid = 1'b1; in_pkt = p;
      expq.push_back('{p: model(p, h), hit: h, t: cyc});
      expq[$].hit = h;
      @(negedge clk);
      if (q % 97 == 0) begin in_valid = 1'b0; @(negedge clk); end        // bubbles
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
