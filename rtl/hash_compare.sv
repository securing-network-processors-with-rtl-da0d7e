// hash_compare -- hash comparison block of the monitor.
//
// Given the valid-hash vector of the current DFA state (bit i set when an
// outgoing edge carries hash value i) and the hash reported for the
// instruction just executed, it
//   * raises match when the one-hot bit of that hash is set in the vector, and
//   * gives k, the number of set bits below that position, i.e. the rank of
//     the matching edge when the edges are ordered by hash value. k selects
//     the next state inside its set of sibling states in memory.
// Both functions follow the published monitor; the count is a plain
// population count of the masked vector.
//
// Purely combinational. k is meaningful only when match is high.
module hash_compare #(
  parameter int unsigned HASH_W = mon_pkg::DEF_HASH_W
) (
  input  logic [(2**HASH_W)-1:0] valid_vec,
  input  logic [HASH_W-1:0]      hash,
  output logic                   match,
  output logic [HASH_W-1:0]      k
);

  localparam int unsigned NV = 2**HASH_W;

  logic [NV-1:0] below;   // bits strictly below the reported hash

  always_comb begin
    below = valid_vec & ((NV'(1) << hash) - NV'(1));
    match = valid_vec[hash];
    k     = '0;
    for (int i = 0; i < NV; i++) begin
      k = k + HASH_W'(below[i]);
    end
  end

endmodule
