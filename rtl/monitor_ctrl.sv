// monitor_ctrl -- sequencing and recovery control of the monitor.
//
// The controller walks the monitoring DFA one step per reported instruction
// and reacts to an invalid transition the way the published system does: the
// offending packet is dropped and the processor is reset, after which
// monitoring resumes at the start state together with the processor.
//
// States (mon_pkg::mon_state_e):
//   MON_IDLE     enable low. Nothing is checked and the processor is left alone;
//                the graph, group bases and start row may be loaded.
//   MON_RESTART  entered when enable rises. np_reset is held for RST_CYCLES
//                cycles while the start row (start_addr) is fetched, so that
//                processor and monitor begin from the same point.
//   MON_RUN      each cycle with instr_valid: if match, the row at next_addr
//                is read and becomes the current state in the next cycle; if
//                not, the instruction is an attack.
//   MON_RECOVER  like MON_RESTART, entered on an attack; drop_packet pulses
//                in its first cycle.
//
// Timing: a step costs one memory read and nothing else, so one instruction
// per clock is checked with no stall of the processor. np_reset, drop_packet
// and attack are registered and rise in the cycle after the failing
// instruction was reported. Instructions reported while np_reset is high are
// ignored. The start row address, the reset hold time and the use of an
// enable input are this design's choices; the published text only says that
// the processor is reset and the packet dropped.
module monitor_ctrl #(
  parameter int unsigned ADDR_W     = mon_pkg::DEF_ADDR_W,
  parameter int unsigned RST_CYCLES = mon_pkg::DEF_RST_CYCLES
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable,       // monitoring switched on
  input  logic [ADDR_W-1:0] start_addr,   // row of the state before the first instruction
  input  logic              instr_valid,  // processor reports an executed instruction
  input  logic              match,        // its hash is a valid edge of the current row
  input  logic [ADDR_W-1:0] next_addr,    // row of the state that edge leads to
  output logic              mem_re,       // state machine memory read
  output logic [ADDR_W-1:0] mem_raddr,
  output logic              np_reset,     // hold the processor in reset
  output logic              drop_packet,  // clear the packet buffer (one cycle)
  output logic              attack,       // invalid transition seen (one cycle)
  output logic [ADDR_W-1:0] cur_addr,     // row of the current DFA state
  output mon_pkg::mon_state_e state
);

  import mon_pkg::*;

  localparam int unsigned CNT_W = (RST_CYCLES > 1) ? $clog2(RST_CYCLES) : 1;

  mon_state_e        state_q, state_d;
  logic [CNT_W-1:0]  cnt_q, cnt_d;
  logic [ADDR_W-1:0] cur_q, cur_d;
  logic              violation;

  always_comb begin
    state_d   = state_q;
    cnt_d     = cnt_q;
    cur_d     = cur_q;
    mem_re    = 1'b0;
    mem_raddr = start_addr;
    violation = 1'b0;
    unique case (state_q)
      MON_IDLE: begin
        if (enable) begin
          state_d = MON_RESTART;
          cnt_d   = CNT_W'(RST_CYCLES - 1);
        end
      end
      MON_RESTART, MON_RECOVER: begin
        mem_re = 1'b1;
        cur_d  = start_addr;
        if (!enable) begin
          state_d = MON_IDLE;
        end else if (cnt_q == '0) begin
          state_d = MON_RUN;
        end else begin
          cnt_d = cnt_q - CNT_W'(1);
        end
      end
      MON_RUN: begin
        if (!enable) begin
          state_d = MON_IDLE;
        end else if (instr_valid) begin
          if (match) begin
            mem_re    = 1'b1;
            mem_raddr = next_addr;
            cur_d     = next_addr;
          end else begin
            violation = 1'b1;
            state_d   = MON_RECOVER;
            cnt_d     = CNT_W'(RST_CYCLES - 1);
          end
        end
      end
      default: state_d = MON_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= MON_IDLE;
      cnt_q       <= '0;
      cur_q       <= '0;
      drop_packet <= 1'b0;
      attack      <= 1'b0;
    end else begin
      state_q     <= state_d;
      cnt_q       <= cnt_d;
      cur_q       <= cur_d;
      drop_packet <= violation;
      attack      <= violation;
    end
  end

  assign np_reset = (state_q == MON_RESTART) || (state_q == MON_RECOVER);
  assign cur_addr = cur_q;
  assign state    = state_q;

  // A dropped packet always comes with a processor reset.
  a_drop_resets: assert property (@(posedge clk) disable iff (!rst_n)
    drop_packet |-> np_reset);
  // Outside MON_RUN the processor's reports never move the DFA.
  a_no_step_in_reset: assert property (@(posedge clk) disable iff (!rst_n)
    (state_q != MON_RUN) |-> (mem_raddr == start_addr));

endmodule
