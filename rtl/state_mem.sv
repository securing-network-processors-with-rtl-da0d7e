// state_mem -- state machine memory of the monitor.
//
// ROWS words of WIDTH bits; each word is one DFA state as the tuple
// {number of next states, offset in state group, valid hash vector}. The
// published prototype has room for 4096 entries; with a 4-bit hash and the
// 12-bit offset field chosen here a word is 32 bits.
//
// Simple dual-port RAM: one synchronous write port for the control processor
// that installs a monitoring graph, and one synchronous read port for the
// monitor. A read issued with re high in cycle t shows on rdata in cycle t+1;
// while re is low rdata holds its value, so the current state's row stays
// available while the processor reports no instruction. Contents are not
// reset: a graph must be written before monitoring is enabled. The row
// contents are the published ones; the port arrangement and the 12-bit
// offset field that sets the word width are this design's choices.
module state_mem #(
  parameter int unsigned ROWS   = mon_pkg::DEF_ROWS,
  parameter int unsigned ADDR_W = mon_pkg::DEF_ADDR_W,
  parameter int unsigned WIDTH  = 32
) (
  input  logic              clk,
  // write port
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [WIDTH-1:0]  wdata,
  // read port
  input  logic              re,
  input  logic [ADDR_W-1:0] raddr,
  output logic [WIDTH-1:0]  rdata
);

  logic [WIDTH-1:0] mem [ROWS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end

endmodule
