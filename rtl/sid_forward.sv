// sid_forward: chooses a packet's egress port from the memory server ID.
//
// A query packet that carries the temporary header is steered by the server ID the
// fat-root wrote into it; any other packet by its ordinary destination server. A
// table loaded by the controller maps each server ID to a port: at the core it names
// the aggregation switch of the server's pod, at an aggregation switch the edge
// switch of the server's rack, at an edge switch the server itself. An ID with no
// entry sets out_drop. Forwarding by server ID at each level follows the design; the
// table form and the drop rule are this implementation's own.
//
// Interface/timing: one registered stage, out_* one cycle after in_*. Control write
// W_FWD: index = server ID, data0[PORT_W-1:0] = port, en = valid. Reset clears the
// valid bits.
module sid_forward
  import fatb_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  ctrl_wr_t          wr,
  input  logic              in_valid,
  input  pkt_t              in_pkt,
  output logic              out_valid,
  output pkt_t              out_pkt,
  output logic [PORT_W-1:0] out_port,
  output logic              out_drop
);

  localparam int unsigned N_SID = 1 << SID_W;

  logic [PORT_W-1:0] port_tab [N_SID];
  logic [N_SID-1:0] port_vld;

  logic we;
  assign we = wr.valid && wr.kind == W_FWD;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      port_vld <= '0;
    end else if (we) begin
      port_vld[wr.index[SID_W-1:0]] <= wr.en;
    end
  end
  always_ff @(posedge clk) begin
    if (we) port_tab[wr.index[SID_W-1:0]] <= wr.data0[PORT_W-1:0];
  end

  logic [SID_W-1:0] sid;
  assign sid = in_pkt.tmp_valid ? in_pkt.tmp_sid : in_pkt.dst;

  always_ff @(posedge clk) begin
    out_pkt  <= in_pkt;
    out_port <= port_tab[sid];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_drop  <= 1'b0;
    end else begin
      out_valid <= in_valid;
      out_drop  <= in_valid && !port_vld[sid];
    end
  end

endmodule
