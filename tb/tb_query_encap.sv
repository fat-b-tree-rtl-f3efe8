// tb_query_encap: self-checking test of the first-hop header attach.
// Streams random packets, one per cycle with occasional bubbles: special reads
// (rkey 0), normal reads (rkey != 0), non-read packets, and packets that already
// carry the temporary header. The expected output is computed from the rule (attach
// the header, key = va, only to a read with rkey 0 and no header) and must appear
// exactly one cycle later. Both attached and passed packets must occur.
module tb_query_encap;
  import fatb_pkg::*;
  logic   clk = 1'b0, rst_n = 1'b0;
  logic   in_valid, out_valid, out_encap;
  pkt_t   in_pkt, out_pkt;
  int     checks = 0, failures = 0, n_enc = 0, n_pass = 0;
  longint cyc = 0;

  query_encap dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { pkt_t p; logic enc; longint t; } exp_t;
  exp_t expq[$];

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      checks++;
      if (expq.size() == 0) begin failures++; $display("FAIL unexpected output"); end
      else begin
        e = expq.pop_front();
        if (out_pkt !== e.p || out_encap !== e.enc || cyc - e.t != 1) begin
          failures++;
          $display("FAIL tmp=%b exp=%b key=%h exp=%h", out_pkt.tmp_valid, e.p.tmp_valid,
                   out_pkt.tmp_key, e.p.tmp_key);
        end
        if (e.enc) n_enc++; else n_pass++;
      end
    end
  end

  initial begin
    pkt_t p, q;
    logic sp;
    in_valid = 1'b0; in_pkt = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(negedge clk);
    for (int n = 0; n < 2000; n++) begin
      p = '0;
      p.is_read   = ($urandom % 6) != 0;
      p.va        = {$urandom, $urandom};
      p.rkey      = ($urandom % 2) ? 32'd0 : $urandom | 32'd1;
      p.len       = 32'd512;
      p.tmp_valid = ($urandom % 4) == 0;
      p.tmp_key   = p.tmp_valid ? {$urandom, $urandom} : '0;
      p.tmp_sid   = p.tmp_valid ? 8'($urandom) : '0;
      p.dst       = 8'($urandom);
      sp = p.is_read && p.rkey == 0 && !p.tmp_valid;
      q = p;
      if (sp) begin q.tmp_valid = 1'b1; q.tmp_key = p.va; q.tmp_sid = '0; end
      in_valid = 1'b1; in_pkt = p;
      expq.push_back('{p: q, enc: sp, t: cyc});
      @(negedge clk);
      if (n % 37 == 0) begin in_valid = 1'b0; @(negedge clk); end
    end
    in_valid = 1'b0;
    repeat (4) @(posedge clk);
    checks++;
    if (expq.size() != 0 || n_enc == 0 || n_pass == 0) begin
      failures++; $display("FAIL left=%0d enc=%0d pass=%0d", expq.size(), n_enc, n_pass);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
