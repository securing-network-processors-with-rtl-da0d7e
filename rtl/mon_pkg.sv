// mon_pkg -- constants and types shared by the instruction-level DFA monitor.
//
// The monitor checks a network processor instruction by instruction against a
// deterministic monitoring graph. Each executed instruction is reduced to a
// 4-bit hash; each row of the state machine memory holds one DFA state as the
// tuple {number of next states, offset in state group, one-hot vector of the
// hashes on its outgoing edges}. The 4-bit hash, the 16-bit vector, the 16-entry
// group base register file and the 4096-row memory are the published
// configuration. The 12-bit offset field (which makes a row exactly 32 bits,
// 4096 x 32 = 131,072 bits, the monitor memory size of the FPGA prototype) and
// the controller's state encoding are this design's choices.
package mon_pkg;

  // Published configuration.
  localparam int unsigned DEF_HASH_W = 4;     // hash bits h
  localparam int unsigned DEF_ROWS   = 4096;  // state machine memory rows
  // Design choices.
  localparam int unsigned DEF_ADDR_W = 12;    // row address bits (log2 of DEF_ROWS)
  localparam int unsigned DEF_OFF_W  = 12;    // offset-in-state-group field bits
  localparam int unsigned DEF_RST_CYCLES = 4; // cycles the processor reset is held

  // Controller states.
  typedef enum logic [1:0] {
    MON_IDLE    = 2'd0,   // monitoring disabled, graph may be (re)loaded
    MON_RESTART = 2'd1,   // processor held in reset, start row being fetched
    MON_RUN     = 2'd2,   // one DFA step per reported instruction
    MON_RECOVER = 2'd3    // attack seen: packet dropped, processor held in reset
  } mon_state_e;

endpackage
