// np_security_monitor -- instruction-level DFA hardware monitor for a network
// processor core (top level).
//
// The processor reports every instruction it executes. The monitor hashes the
// instruction word to HASH_W bits (nibble-sum), checks the hash against the
// valid-hash vector of the current DFA state and, if it is valid, fetches the
// next state with a single memory read at
//     group_base[g] + g * offset + k
// (g: number of next states of the current state, offset: its set index
// within group g, k: rank of the matching hash among the valid ones). An
// invalid hash means the processor has left the statically known control flow
// (for instance after a stack-smashing return-to-library attack): the packet
// is dropped, the processor is reset and monitoring restarts at the start
// state. One instruction is checked per clock, so the processor never stalls.
//
// Datapath (published): hash unit, state machine memory of ROWS rows,
// 16-entry group base register file, hash comparison, next-address adder.
// This design's own choices: the 32-bit row layout
//     [31:28] number of next states (0 = 16)  [27:16] offset  [15:0] vector
// (general: {HASH_W, OFF_W, 2**HASH_W} bits, MSB first), a start row address
// register for the state before the processor's first instruction, the
// enable input, and the reset hold time. The graph is written by the control
// processor through the cfg_* ports, which would sit behind the on-chip
// interconnect and the graph decryption of the full system.
//
// Ports
//   instr_valid/instr    processor: executed instruction, one per cycle at most
//   np_reset             to processor: hold in reset (restart or recovery)
//   drop_packet          to packet buffer: clear the current packet (1 cycle)
//   attack               invalid transition detected (1 cycle)
//   cfg_*                control processor: memory rows, group bases, start row
//   enable               monitoring on; its rise resets the processor
module np_security_monitor #(
  parameter int unsigned HASH_W     = mon_pkg::DEF_HASH_W,
  parameter int unsigned ROWS       = mon_pkg::DEF_ROWS,
  parameter int unsigned ADDR_W     = mon_pkg::DEF_ADDR_W,
  parameter int unsigned OFF_W      = mon_pkg::DEF_OFF_W,
  parameter int unsigned RST_CYCLES = mon_pkg::DEF_RST_CYCLES,
  localparam int unsigned NV        = 2**HASH_W,
  localparam int unsigned ROW_W     = HASH_W + OFF_W + NV
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable,
  // processor side
  input  logic              instr_valid,
  input  logic [31:0]       instr,
  output logic              np_reset,
  output logic              drop_packet,
  output logic              attack,
  // control processor side
  input  logic              cfg_mem_we,
  input  logic [ADDR_W-1:0] cfg_mem_addr,
  input  logic [ROW_W-1:0]  cfg_mem_wdata,
  input  logic              cfg_base_we,
  input  logic [HASH_W-1:0] cfg_base_idx,
  input  logic [ADDR_W-1:0] cfg_base_wdata,
  input  logic              cfg_start_we,
  input  logic [ADDR_W-1:0] cfg_start_wdata,
  // observation
  output logic [ADDR_W-1:0] cur_state_addr,
  output logic              running
);

  import mon_pkg::*;

  logic [HASH_W-1:0] hash;
  logic [ROW_W-1:0]  row;
  logic [HASH_W-1:0] row_num_next;
  logic [OFF_W-1:0]  row_offset;
  logic [NV-1:0]     row_vec;
  logic              match;
  logic [HASH_W-1:0] k;
  logic [HASH_W-1:0] rf_idx;
  logic [ADDR_W-1:0] base;
  logic [ADDR_W-1:0] next_addr;
  logic              mem_re;
  logic [ADDR_W-1:0] mem_raddr;
  logic [ADDR_W-1:0] start_q;
  mon_state_e        state;

  // Start row register, written by the control processor.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            start_q <= '0;
    else if (cfg_start_we) start_q <= cfg_start_wdata;
  end

  hash_nibble_sum #(.HASH_W(HASH_W)) u_hash (
    .instr (instr),
    .hash  (hash)
  );

  state_mem #(.ROWS(ROWS), .ADDR_W(ADDR_W), .WIDTH(ROW_W)) u_mem (
    .clk   (clk),
    .we    (cfg_mem_we),
    .waddr (cfg_mem_addr),
    .wdata (cfg_mem_wdata),
    .re    (mem_re),
    .raddr (mem_raddr),
    .rdata (row)
  );

  assign {row_num_next, row_offset, row_vec} = row;

  hash_compare #(.HASH_W(HASH_W)) u_cmp (
    .valid_vec (row_vec),
    .hash      (hash),
    .match     (match),
    .k         (k)
  );

  group_base_rf #(.HASH_W(HASH_W), .ADDR_W(ADDR_W)) u_rf (
    .clk   (clk),
    .rst_n (rst_n),
    .we    (cfg_base_we),
    .widx  (cfg_base_idx),
    .wdata (cfg_base_wdata),
    .ridx  (rf_idx),
    .rdata (base)
  );

  next_addr_calc #(.HASH_W(HASH_W), .ADDR_W(ADDR_W), .OFF_W(OFF_W)) u_addr (
    .num_next  (row_num_next),
    .offset    (row_offset),
    .k         (k),
    .rf_idx    (rf_idx),
    .base      (base),
    .next_addr (next_addr)
  );

  monitor_ctrl #(.ADDR_W(ADDR_W), .RST_CYCLES(RST_CYCLES)) u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .enable      (enable),
    .start_addr  (start_q),
    .instr_valid (instr_valid),
    .match       (match),
    .next_addr   (next_addr),
    .mem_re      (mem_re),
    .mem_raddr   (mem_raddr),
    .np_reset    (np_reset),
    .drop_packet (drop_packet),
    .attack      (attack),
    .cur_addr    (cur_state_addr),
    .state       (state)
  );

  assign running = (state == MON_RUN);

endmodule
