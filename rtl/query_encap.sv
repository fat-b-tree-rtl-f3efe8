// query_encap: first-hop handling of a "special" RDMA-read that carries a B+tree
// query.
//
// A client asks for an index lookup by sending an RDMA-read whose va holds the
// 64-bit query key and whose rkey is 0. The first switch on the path that sees such
// a packet without the temporary header attaches one: the key is copied from va into
// the header and the server ID is cleared. The index stages that follow overwrite va
// with node addresses while the key stays in the header. Packets that already carry
// the header (an intermediate switch) and all other packets pass unchanged.
// Detection by rkey == 0 and keeping the key in a temporary header follow the design;
// modelling the header as fields of the parsed packet is this implementation's own.
//
// Interface/timing: one registered stage, out_* one cycle after in_*, a packet
// every cycle; out_encap marks a packet that received the header this cycle.
module query_encap
  import fatb_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  pkt_t in_pkt,
  output logic out_valid,
  output pkt_t out_pkt,
  output logic out_encap
);

  logic special;
  assign special = in_pkt.is_read && in_pkt.rkey == 32'd0 && !in_pkt.tmp_valid;

  always_ff @(posedge clk) begin
    out_pkt <= in_pkt;
    if (special) begin
      out_pkt.tmp_valid <= 1'b1;
      out_pkt.tmp_key   <= in_pkt.va;
      out_pkt.tmp_sid   <= '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_encap <= 1'b0;
    end else begin
      out_valid <= in_valid;
      out_encap <= in_valid && special;
    end
  end

endmodule
