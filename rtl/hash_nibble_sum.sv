// hash_nibble_sum -- instruction hash of the monitor ("nibble-sum").
//
// The 32-bit instruction word is cut into its eight 4-bit nibbles, which are
// added; the low HASH_W bits of the sum are the hash. This is the hash function
// the monitor uses for the edges of its monitoring graph (it spreads the hash
// values of real code most evenly of the four functions considered). With the
// default HASH_W = 4 it is simply the sum modulo 16. For other widths the same
// sum is taken and truncated to HASH_W bits, as the published definition says.
//
// Purely combinational: the hash is valid in the same cycle as the instruction.
module hash_nibble_sum #(
  parameter int unsigned HASH_W = mon_pkg::DEF_HASH_W
) (
  input  logic [31:0]       instr,
  output logic [HASH_W-1:0] hash
);

  // Sum of eight 4-bit values fits in 7 bits.
  logic [6:0] sum;

  always_comb begin
    sum = '0;
    for (int i = 0; i < 8; i++) begin
      sum = sum + 7'(instr[4*i +: 4]);
    end
  end

  if (HASH_W <= 7) begin : g_trunc
    assign hash = sum[HASH_W-1:0];
  end else begin : g_ext
    assign hash = HASH_W'(sum);
  end

endmodule
