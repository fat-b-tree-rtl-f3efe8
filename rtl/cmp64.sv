// cmp64: 64-bit "key > pivot" comparator built from 32-bit arithmetic units and a
// small match-action table, for data planes whose ALUs are only 32 bits wide.
//
// Phase 1 (two 32-bit units per half): sub = pivot - key and xor = pivot ^ key, done
// separately on bits [63:32] and [31:0] with no carry between halves. The six bits
// key[63], key[31], sub[63], sub[31], xor[63], xor[31] and sub[63:32] are registered.
// Phase 2 is the four-row table of the design:
//   sub[63:32] == 0, xor[31] == 0  -> result = sub[31]
//   sub[63:32] == 0, xor[31] == 1  -> result = key[31]
//   sub[63:32] != 0, xor[63] == 0  -> result = sub[63]
//   sub[63:32] != 0, xor[63] == 1  -> result = key[63]
// result is 1 when key > pivot (unsigned) and 0 otherwise, also when they are equal.
//
// Interface/timing: key and pivot are sampled at a rising clk edge; gt shows the
// result of those operands during the following cycle (one pipeline stage, a new
// pair every cycle). The split into two phases and the table follow the design; the
// register between the phases is this implementation's choice of stage boundary.
module cmp64 (
  input  logic        clk,
  input  logic [63:0] key,
  input  logic [63:0] pivot,
  output logic        gt
);

  logic [31:0] sub_hi, sub_lo, xor_hi, xor_lo;

  // Phase 1: two independent 32-bit units per half.
  always_comb begin
    sub_hi = pivot[63:32] - key[63:32];
    sub_lo = pivot[31:0]  - key[31:0];
    xor_hi = pivot[63:32] ^ key[63:32];
    xor_lo = pivot[31:0]  ^ key[31:0];
  end

  logic [31:0] r_sub_hi;
  logic        r_key63, r_key31, r_sub31, r_xor63, r_xor31;

  always_ff @(posedge clk) begin
    r_sub_hi <= sub_hi;
    r_key63  <= key[63];
    r_key31  <= key[31];
    r_sub31  <= sub_lo[31];
    r_xor63  <= xor_hi[31];
    r_xor31  <= xor_lo[31];
  end

  // Phase 2: the match-action table keyed by sub[63:32], xor[31], xor[63].
  // sub[63] of the 64-bit view is bit 31 of the high-half difference.
  always_comb begin
    if (r_sub_hi == 32'd0) begin
      gt = r_xor31 ? r_key31 : r_sub31;
    end else begin
      gt = r_xor63 ? r_key63 : r_sub_hi[31];
    end
  end

endmodule
