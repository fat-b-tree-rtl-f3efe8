// query_decap: last-hop handling of an indexed query packet.
//
// The last switch before the memory servers removes the temporary header so that the
// server receives a plain RDMA-read of the node at va. The memory server ID that the
// fat-root put into the header becomes the packet's destination, and the rkey that
// the client left at 0 is replaced by the rkey registered for that server when the
// RDMA connection was set up (the "register RDMA status" step: the controller pushes
// the connection metadata to the edge switch). Packets without the header pass.
// Removing the header at the last hop and delivering the rkey to the edge switch
// follow the design; keying the registered status by server ID is this
// implementation's choice.
//
// Interface/timing: one registered stage, out_* one cycle after in_*; out_decap
// marks a packet whose header was removed. Control write W_RKEY: index = server ID,
// data0[31:0] = rkey, en = valid. A query for a server without registered status
// keeps rkey = 0. Reset clears the valid bits.
module query_decap
  import fatb_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  ctrl_wr_t wr,
  input  logic     in_valid,
  input  pkt_t     in_pkt,
  output logic     out_valid,
  output pkt_t     out_pkt,
  output logic     out_decap
);

  localparam int unsigned N_SID = 1 << SID_W;

  logic [31:0] rkey_tab [N_SID];
  logic [N_SID-1:0] rkey_vld;

  logic we;
  assign we = wr.valid && wr.kind == W_RKEY;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rkey_vld <= '0;
    end else if (we) begin
      rkey_vld[wr.index[SID_W-1:0]] <= wr.en;
    end
  end
  always_ff @(posedge clk) begin
    if (we) rkey_tab[wr.index[SID_W-1:0]] <= wr.data0[31:0];
  end

  always_ff @(posedge clk) begin
    out_pkt <= in_pkt;
    if (in_pkt.tmp_valid) begin
      out_pkt.tmp_valid <= 1'b0;
      out_pkt.tmp_key   <= '0;
      out_pkt.tmp_sid   <= '0;
      out_pkt.dst       <= in_pkt.tmp_sid;
      if (rkey_vld[in_pkt.tmp_sid]) out_pkt.rkey <= rkey_tab[in_pkt.tmp_sid];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_decap <= 1'b0;
    end else begin
      out_valid <= in_valid;
      out_decap <= in_valid && in_pkt.tmp_valid;
    end
  end

endmodule
