// fatb_pkg: types and constants shared by the in-network B+tree index data plane.
//
// The data plane works on parsed packet headers, one header vector per cycle
// (the "packet header vector" of a match-action pipeline). A header vector holds the
// three RDMA-read fields a sender may set (64-bit va, 32-bit rkey, 32-bit length,
// widths as the design specifies), the optional temporary header that carries the
// query key and the memory server ID between switches, and a destination server
// number that stands in for ordinary IP routing. The field set beyond va/rkey/length,
// the server-ID width and the control-write format are this design's own choices.
//
// Control-plane table writes use one struct, ctrl_wr_t, broadcast to every switch;
// a switch takes the writes whose sw field equals its own number.
package fatb_pkg;

  localparam int unsigned KEY_W  = 64;   // query key width
  localparam int unsigned ADDR_W = 64;   // B+tree node address width (RDMA va)
  localparam int unsigned SID_W  = 8;    // memory server ID width
  localparam int unsigned RID_W  = 16;   // id of a range-table or of a fat-root range
  localparam int unsigned CHUNK_W = 16;  // width of one range-matching table
  localparam int unsigned N_CHUNK = KEY_W / CHUNK_W;  // range-table stages in the fat-root
  localparam int unsigned FANOUT = 16;   // branches of a regular node
  localparam int unsigned SW_ID_W = 8;   // switch number width on the control bus
  localparam int unsigned PORT_W  = 4;   // egress port number width

  typedef struct packed {
    logic              is_read;    // RDMA-read request (RoCE opcode decoded)
    logic [ADDR_W-1:0] va;         // RETH virtual address
    logic [31:0]       rkey;       // RETH remote key
    logic [31:0]       len;        // RETH DMA length
    logic              tmp_valid;  // temporary header present
    logic [KEY_W-1:0]  tmp_key;    // query key saved by the first-hop switch
    logic [SID_W-1:0]  tmp_sid;    // memory server ID set by the fat-root
    logic [SID_W-1:0]  dst;        // destination server (ordinary routing)
  } pkt_t;

  // Control-plane table write kinds.
  typedef enum logic [2:0] {
    W_NODE   = 3'd0,  // regular node set: slot <- {valid, node address}
    W_PIVOT  = 3'd1,  // regular node set: pivot[sub] of slot
    W_CHILD  = 3'd2,  // regular node set: child address[sub] of slot
    W_RANGE  = 3'd3,  // fat-root: range-table entry of stage 'sub'
    W_ACTION = 3'd4,  // fat-root: child address and server ID of a range
    W_FWD    = 3'd5,  // server ID -> egress port
    W_RKEY   = 3'd6   // registered RDMA status: server ID -> rkey
  } wr_kind_e;

  typedef struct packed {
    logic               valid;
    wr_kind_e           kind;
    logic [SW_ID_W-1:0] sw;     // target switch
    logic               unit;   // which node set of a switch (0: first, 1: second)
    logic [15:0]        index;  // slot, entry, range id or server id
    logic [3:0]         sub;    // pivot/child number or range-table stage
    logic               en;     // entry valid bit written with the entry
    logic [63:0]        data0;
    logic [63:0]        data1;
  } ctrl_wr_t;

  // Range-table entry layout inside data0 of a W_RANGE write:
  //   [15:0] table id, [31:16] low bound, [47:32] high bound,
  //   [63:48] result id; data1[0] = result is a final range (else a next-stage table).
  typedef struct packed {
    logic               valid;
    logic [RID_W-1:0]   tab;
    logic [CHUNK_W-1:0] lo;
    logic [CHUNK_W-1:0] hi;
    logic               final_r;
    logic [RID_W-1:0]   res;
  } range_ent_t;

  // Result of a 64-bit lookup in progress through the range-table stages.
  typedef struct packed {
    logic             miss;     // no entry matched in some stage
    logic             final_r;  // id is a fat-root range, lookup finished
    logic [RID_W-1:0] id;       // current table id, or final range id
  } range_state_t;

endpackage
