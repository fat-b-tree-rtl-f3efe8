// fat_root: the TCAM-based fat-root node. It finds which of up to N_RANGES key
// ranges holds the 64-bit query key and writes that range's child node address into
// va and its memory server ID into the temporary header.
//
// The 64-bit range match is split over four range_table_stage instances that look at
// key[63:48], key[47:32], key[31:16] and key[15:0] in turn. Stage 1 searches table 0.
// Each entry either resolves a final range or points to a table of the next stage,
// so an arbitrary set of 64-bit ranges is encoded in O(n) 16-bit entries per stage
// (at most 2n, hence N_ENT = 2*N_RANGES). A fifth stage reads the action table
// (range id -> child address, server ID); the sixth writes the packet. Range ids
// run from 1 to N_RANGES, as the table-building routine numbers them.
//
// Interface/timing: one packet per cycle, out_valid/out_pkt exactly 6 cycles after
// in_valid/in_pkt, no back-pressure. Only packets with the temporary header are
// indexed, using its key; out_hit marks a rewritten packet. A miss (no entry, or an
// unloaded action) leaves the packet unchanged. Control writes: W_RANGE (sub = stage
// 0..3) and W_ACTION (index = range id, data0 = child address, data1[SID_W-1:0] =
// server ID, en = valid). Six stages, four 16-bit stages, 1024 ranges and the server
// ID in the result follow the design; the write format and miss rule are this
// implementation's own.
module fat_root
  import fatb_pkg::*;
#(
  parameter int unsigned N_RANGES = 1024,
  parameter int unsigned N_ENT    = 2 * N_RANGES
) (
  input  logic     clk,
  input  logic     rst_n,
  input  ctrl_wr_t wr,
  input  logic     in_valid,
  input  pkt_t     in_pkt,
  output logic     out_valid,
  output pkt_t     out_pkt,
  output logic     out_hit
);

  localparam int unsigned AID_W = $clog2(N_RANGES + 1);

  // ---------------- action table ----------------
  logic [ADDR_W-1:0] act_addr [N_RANGES+1];
  logic [SID_W-1:0]  act_sid  [N_RANGES+1];
  logic [N_RANGES:0] act_vld;

  logic act_we;
  assign act_we = wr.valid && wr.kind == W_ACTION && wr.index <= 16'(N_RANGES);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      act_vld <= '0;
    end else if (act_we) begin
      act_vld[wr.index[AID_W-1:0]] <= wr.en;
    end
  end
  always_ff @(posedge clk) begin
    if (act_we) begin
      act_addr[wr.index[AID_W-1:0]] <= wr.data0;
      act_sid[wr.index[AID_W-1:0]]  <= wr.data1[SID_W-1:0];
    end
  end

  // ---------------- range stages ----------------
  range_state_t st [N_CHUNK+1];
  pkt_t         pk [N_CHUNK+1];
  logic         vv [N_CHUNK+1];

  assign st[0] = '{miss: 1'b0, final_r: 1'b0, id: '0};
  assign pk[0] = in_pkt;
  assign vv[0] = in_valid;

  for (genvar g = 0; g < N_CHUNK; g++) begin : g_stage
    range_table_stage #(.N_ENT(N_ENT), .STAGE(g)) u_stage (
      .clk   (clk),
      .rst_n (rst_n),
      .wr    (wr),
      .chunk (pk[g].tmp_key[KEY_W-1-CHUNK_W*g -: CHUNK_W]),
      .st_in (st[g]),
      .st_out(st[g+1])
    );
    always_ff @(posedge clk) pk[g+1] <= pk[g];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) vv[g+1] <= 1'b0;
      else        vv[g+1] <= vv[g];
    end
  end

  // ---------------- stage 5: action read ----------------
  logic              in_range;
  assign in_range = st[N_CHUNK].id != '0 && st[N_CHUNK].id <= RID_W'(N_RANGES);
  logic [AID_W-1:0]  aid;
  assign aid = st[N_CHUNK].id[AID_W-1:0];

  pkt_t              p5;
  logic              v5, h5;
  logic [ADDR_W-1:0] a5;
  logic [SID_W-1:0]  s5;
  always_ff @(posedge clk) begin
    p5 <= pk[N_CHUNK];
    a5 <= act_addr[aid];
    s5 <= act_sid[aid];
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v5 <= 1'b0;
      h5 <= 1'b0;
    end else begin
      v5 <= vv[N_CHUNK];
      h5 <= vv[N_CHUNK] && pk[N_CHUNK].tmp_valid && !st[N_CHUNK].miss &&
            st[N_CHUNK].final_r && in_range && act_vld[aid];
    end
  end

  // ---------------- stage 6: rewrite ----------------
  pkt_t p6;
  logic v6, h6;
  always_ff @(posedge clk) begin
    p6 <= p5;
    if (h5) begin
      p6.va      <= a5;
      p6.tmp_sid <= s5;
    end
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v6 <= 1'b0;
      h6 <= 1'b0;
    end else begin
      v6 <= v5;
      h6 <= h5;
    end
  end

  assign out_valid = v6;
  assign out_pkt   = p6;
  assign out_hit   = h6 && v6;

endmodule
