// group_base_rf -- register file of state group base addresses.
//
// Rows of the state machine memory are arranged in groups: a state belongs to
// group g when the state before it has g outgoing edges. This register file
// holds the first memory row of each group, one entry per possible group
// (2**HASH_W entries, 16 for the 4-bit hash). Entry i holds the base of group
// i+1, so that the 4-bit number-of-next-states field of a row, minus one,
// indexes it directly (group 16 is entry 15).
//
// One write port for the control processor that installs a monitoring graph,
// one combinational read port for the address computation. Entries reset to 0.
// The register file and its 16 entries are part of the published monitor; the
// entry numbering, the write port and the reset value are this design's.
module group_base_rf #(
  parameter int unsigned HASH_W = mon_pkg::DEF_HASH_W,
  parameter int unsigned ADDR_W = mon_pkg::DEF_ADDR_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // write port
  input  logic              we,
  input  logic [HASH_W-1:0] widx,
  input  logic [ADDR_W-1:0] wdata,
  // read port
  input  logic [HASH_W-1:0] ridx,
  output logic [ADDR_W-1:0] rdata
);

  localparam int unsigned N = 2**HASH_W;

  logic [ADDR_W-1:0] base_q [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) base_q[i] <= '0;
    end else if (we) begin
      base_q[widx] <= wdata;
    end
  end

  assign rdata = base_q[ridx];

endmodule
