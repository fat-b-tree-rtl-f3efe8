// tb_query_decap: self-checking test of the last-hop header removal.
// Registers rkeys for some server IDs, then streams packets with and without the
// temporary header. A packet with the header must leave without it, addressed to the
// header's server ID, with the registered rkey (or the original rkey when none is
// registered), exactly one cycle later; other packets pass unchanged.
module tb_query_decap;
  import fatb_pkg::*;
  logic     clk = 1'b0, rst_n = 1'b0;
  ctrl_wr_t wr;
  logic     in_valid, out_valid, out_decap;
  pkt_t     in_pkt, out_pkt;
  int       checks = 0, failures = 0, n_dec = 0, n_pass = 0, n_nokey = 0;
  longint   cyc = 0;
  logic [31:0] rk [256];
  logic        rv [256];

  query_decap dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { pkt_t p; logic dec; longint t; } exp_t;
  exp_t expq[$];

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      checks++;
      if (expq.size() == 0) begin failures++; $display("FAIL unexpected output"); end
      else begin
        e = expq.pop_front();
        if (out_pkt !== e.p || out_decap !== e.dec || cyc - e.t != 1) begin
          failures++;
          $display("FAIL dst=%0d exp=%0d rkey=%h exp=%h tmp=%b", out_pkt.dst, e.p.dst,
                   out_pkt.rkey, e.p.rkey, out_pkt.tmp_valid);
        end
        if (e.dec) n_dec++; else n_pass++;
      end
    end
  end

  initial begin
    pkt_t p, q;
    wr = '0; in_valid = 1'b0; in_pkt = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int s = 0; s < 256; s++) begin
      rv[s] = (s % 4) != 3;
      rk[s] = $urandom | 32'd1;
      if (rv[s]) begin
        wr = '0; wr.valid = 1'b1; wr.kind = W_RKEY; wr.index = 16'(s); wr.en = 1'b1;
        wr.data0 = 64'(rk[s]);
        @(posedge clk); #1;
      end
    end
    wr = '0;
    @(negedge clk);
    for (int n = 0; n < 2000; n++) begin
      p = '0;
      p.is_read   = 1'b1;
      p.va        = {$urandom, $urandom};
      p.rkey      = ($urandom % 3 == 0) ? $urandom : 32'd0;
      p.len       = 32'd512;
      p.tmp_valid = ($urandom % 4) != 0;
      p.tmp_key   = p.tmp_valid ? {$urandom, $urandom} : '0;
      p.tmp_sid   = p.tmp_valid ? 8'($urandom) : '0;
      p.dst       = 8'($urandom);
      q = p;
      if (p.tmp_valid) begin
        q.tmp_valid = 1'b0; q.tmp_key = '0; q.tmp_sid = '0; q.dst = p.tmp_sid;
        if (rv[p.tmp_sid]) q.rkey = rk[p.tmp_sid];
        else n_nokey++;
      end
      in_valid = 1'b1; in_pkt = p;
      expq.push_back('{p: q, dec: p.tmp_valid, t: cyc});
      @(negedge clk);
      if (n % 41 == 0) begin in_valid = 1'b0; @(negedge clk); end
    end
    in_valid = 1'b0;
    repeat (4) @(posedge clk);
    checks++;
    if (expq.size() != 0 || n_dec == 0 || n_pass == 0 || n_nokey == 0) begin
      failures++;
      $display("FAIL left=%0d dec=%0d pass=%0d nokey=%0d", expq.size(), n_dec, n_pass, n_nokey);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
