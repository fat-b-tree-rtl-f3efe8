// range_table_stage: one stage of the fat-root's 64-bit range match, a TCAM-style
// table of 16-bit range entries shared by all the small tables of that stage.
//
// Every entry holds {table id, low, high, result}. The lookup state entering the
// stage names the table to search (or already holds a final range, or a miss).
// The entry with the lowest index whose table id equals the state's id and whose
// [low, high] contains this stage's 16-bit key chunk gives the new state: either a
// final fat-root range or the id of a table in the next stage. No matching entry
// gives a miss. A state that is already final or a miss passes unchanged.
// Sharing one physical table among the logical tables of a stage, keyed by table id,
// follows the design; the lowest-index priority is this implementation's choice.
//
// Interface/timing: chunk and st_in are registered into st_out at the rising edge,
// one lookup per cycle. Writes of kind W_RANGE whose sub field equals STAGE load
// entry 'index' (layout in fatb_pkg) and take effect the next cycle; reset clears
// all entry valid bits.
module range_table_stage
  import fatb_pkg::*;
#(
  parameter int unsigned N_ENT = 2048,
  parameter int unsigned STAGE = 0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  ctrl_wr_t             wr,
  input  logic [CHUNK_W-1:0]   chunk,
  input  range_state_t         st_in,
  output range_state_t         st_out
);

  localparam int unsigned IDX_W = (N_ENT > 1) ? $clog2(N_ENT) : 1;

  logic [N_ENT-1:0]   e_vld;
  logic [RID_W-1:0]   e_tab [N_ENT];
  logic [CHUNK_W-1:0] e_lo  [N_ENT];
  logic [CHUNK_W-1:0] e_hi  [N_ENT];
  logic               e_fin [N_ENT];
  logic [RID_W-1:0]   e_res [N_ENT];

  logic we;
  assign we = wr.valid && wr.kind == W_RANGE && wr.sub == 4'(STAGE);
  logic [IDX_W-1:0] widx;
  assign widx = wr.index[IDX_W-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_vld <= '0;
    end else if (we) begin
      e_vld[widx] <= wr.en;
    end
  end

  always_ff @(posedge clk) begin
    if (we) begin
      e_tab[widx] <= wr.data0[15:0];
      e_lo[widx]  <= wr.data0[31:16];
      e_hi[widx]  <= wr.data0[47:32];
      e_res[widx] <= wr.data0[63:48];
      e_fin[widx] <= wr.data1[0];
    end
  end

  range_state_t nxt;
  always_comb begin
    nxt = st_in;
    if (!st_in.miss && !st_in.final_r) begin
      nxt.miss = 1'b1;
      for (int e = int'(N_ENT) - 1; e >= 0; e--) begin
        if (e_vld[e] && e_tab[e] == st_in.id && chunk >= e_lo[e] && chunk <= e_hi[e]) begin
          nxt.miss    = 1'b0;
          nxt.final_r = e_fin[e];
          nxt.id      = e_res[e];
        end
      end
    end
  end

  always_ff @(posedge clk) st_out <= nxt;

endmodule
