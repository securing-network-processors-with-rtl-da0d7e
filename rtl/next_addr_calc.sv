// next_addr_calc -- memory row of the next DFA state.
//
// The sibling states reached from one state (its "set") lie in consecutive
// rows, ordered by the hash on their incoming edge. Sets of equal size g form
// group g. The next state's row is therefore
//     base(group g) + g * offset + k
// where g is the current state's number of next states, offset is the
// current state's set index inside group g, and k is the rank of the
// matching hash. This arithmetic is the published one.
//
// The number-of-next-states field is HASH_W bits wide, as published; the way
// a full fan-out is encoded is this design's choice: a state with all
// 2**HASH_W edges stores 0, which is read as 2**HASH_W (a state with no edges
// never leads anywhere, so its count is irrelevant). Group base lookup uses
// index g-1 taken modulo 2**HASH_W, which maps that 0 to the last entry.
// The result wraps modulo 2**ADDR_W.
//
// Purely combinational; base is read from the group base register file
// through rf_idx/base in the same cycle.
module next_addr_calc #(
  parameter int unsigned HASH_W = mon_pkg::DEF_HASH_W,
  parameter int unsigned ADDR_W = mon_pkg::DEF_ADDR_W,
  parameter int unsigned OFF_W  = mon_pkg::DEF_OFF_W
) (
  input  logic [HASH_W-1:0] num_next,   // number-of-next-states field
  input  logic [OFF_W-1:0]  offset,     // offset-in-state-group field
  input  logic [HASH_W-1:0] k,          // rank of the matching hash
  output logic [HASH_W-1:0] rf_idx,     // group base register file index
  input  logic [ADDR_W-1:0] base,       // base of group num_next
  output logic [ADDR_W-1:0] next_addr
);

  logic [HASH_W:0]           g;        // group number 1..2**HASH_W
  logic [ADDR_W-1:0]         prod;     // g * offset, modulo 2**ADDR_W

  always_comb begin
    g         = (num_next == '0) ? (HASH_W+1)'(2**HASH_W) : {1'b0, num_next};
    rf_idx    = num_next - HASH_W'(1);
    prod      = ADDR_W'(g) * ADDR_W'(offset);
    next_addr = base + prod + ADDR_W'(k);
  end

endmodule
