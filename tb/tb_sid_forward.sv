// tb_sid_forward: self-checking test of server-ID forwarding.
// Loads a port for most server IDs, then streams packets with and without the
// temporary header. The port must come from the header's server ID when the header is
// present and from the destination otherwise; an ID without an entry must set
// out_drop. Output one cycle after input, packet unchanged.
module tb_sid_forward;
  import fatb_pkg::*;
  logic              clk = 1'b0, rst_n = 1'b0;
  ctrl_wr_t          wr;
  logic              in_valid, out_valid, out_drop;
  pkt_t              in_pkt, out_pkt;
  logic [PORT_W-1:0] out_port;
  int                checks = 0, failures = 0, n_fwd = 0, n_drop = 0;
  longint            cyc = 0;
  logic [PORT_W-1:0] pt [256];
  logic              pv [256];

  sid_forward dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { pkt_t p; logic [PORT_W-1:0] port; logic drop; longint t; } exp_t;
  exp_t expq[$];

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      checks++;
      if (expq.size() == 0) begin failures++; $display("FAIL unexpected output"); end
      else begin
        e = expq.pop_front();
        if (out_pkt !== e.p || out_drop !== e.drop || (!e.drop && out_port !== e.port) ||
            cyc - e.t != 1) begin
          failures++;
          $display("FAIL port=%0d exp=%0d drop=%b exp=%b", out_port, e.port, out_drop, e.drop);
        end
        if (e.drop) n_drop++; else n_fwd++;
      end
    end
  end

  initial begin
    pkt_t p;
    logic [7:0] sid;
    wr = '0; in_valid = 1'b0; in_pkt = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int s = 0; s < 256; s++) begin
      pv[s] = (s % 7) != 4;
      pt[s] = PORT_W'($urandom);
      if (pv[s]) begin
        wr = '0; wr.valid = 1'b1; wr.kind = W_FWD; wr.index = 16'(s); wr.en = 1'b1;
        wr.data0 = 64'(pt[s]);
        @(posedge clk); #1;
      end
    end
    wr = '0;
    @(negedge clk);
    for (int n = 0; n < 2000; n++) begin
      p = '0;
      p.is_read   = 1'b1;
      p.va        = {$urandom, $urandom};
      p.tmp_valid = $urandom % 2;
      p.tmp_sid   = 8'($urandom);
      p.dst       = 8'($urandom);
      sid = p.tmp_valid ? p.tmp_sid : p.dst;
      in_valid = 1'b1; in_pkt = p;
      expq.push_back('{p: p, port: pt[sid], drop: !pv[sid], t: cyc});
      @(negedge clk);
      if (n % 29 == 0) begin in_valid = 1'b0; @(negedge clk); end
    end
    in_valid = 1'b0;
    repeat (4) @(posedge clk);
    checks++;
    if (expq.size() != 0 || n_fwd == 0 || n_drop == 0) begin
      failures++; $display("FAIL left=%0d fwd=%0d drop=%0d", expq.size(), n_fwd, n_drop);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
