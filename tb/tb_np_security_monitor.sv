// tb_np_security_monitor -- end-to-end test of the monitor at its default
// size (4-bit hash, 4096-row state machine memory, 16 group bases).
//
// The testbench plays three parts:
//   * Offline graph generator (class mon_graph_pkg::mon_graph). It builds a
//     random deterministic monitoring graph of NSTATES instruction states: each state carries a random 32-bit
//     instruction word; most states fall through to one successor, some branch
//     to 2-5, a few fan out to up to 16 (like a subroutine return with many
//     call sites). Successors of a state always have distinct hashes, as after
//     NFA-to-DFA conversion. One extra state stands before the first
//     instruction. The graph is laid out as the monitor expects: the successor
//     set of a state with g edges is g consecutive rows in group g, ordered by
//     hash; a row holds {g of that state (16 -> 0), its set index, its one-hot
//     hash vector}. Unused rows are filled with random words.
//   * Control processor. Writes every row, the 16 group bases and the start
//     row through the cfg ports, then enables monitoring.
//   * Network processor. After each reset it runs "packets": walks of random
//     length through the graph, one instruction per cycle with random idle
//     cycles. Some packets are attacks: from some point on the processor runs
//     instructions off the graph (a return into the middle of other code).
//
// Reference: the testbench tracks the graph state the monitor must be in.
// For each reported instruction whose hash is an edge of that state it checks
// that the monitor's current row becomes the row of the matching successor in
// the next cycle; for one whose hash is not, it checks that attack and
// drop_packet pulse in the next cycle and np_reset stays high for 4 cycles,
// and that nothing is flagged otherwise. It counts each mechanism (in-order
// step, branch taken to k > 0, each fanout group 1..16, idle cycle, attack
// detected and recovered, clean packet after an attack, restart by enable,
// group-16 state, instructions on consecutive clocks, reports ignored while
// the processor is in reset) and fails if one never happened. Instructions
// are reported on consecutive clocks except for random idle gaps, so every
// row check also checks the rate of one instruction per clock.
module tb_np_security_monitor;

  localparam int NSTATES  = 2600;    // graph states (instructions)
  localparam int MAXROWS  = 4096;
  localparam int RST      = 4;       // processor reset hold of the default build
  localparam int NPACKETS = 400;

  int unsigned checks = 0, failures = 0;

  logic        clk = 0, rst_n = 0, enable = 0;
  logic        instr_valid = 0;
  logic [31:0] instr = '0;
  logic        np_reset, drop_packet, attack, running;
  logic        cfg_mem_we = 0, cfg_base_we = 0, cfg_start_we = 0;
  logic [11:0] cfg_mem_addr = '0, cfg_base_wdata = '0, cfg_start_wdata = '0;
  logic [31:0] cfg_mem_wdata = '0;
  logic [3:0]  cfg_base_idx = '0;
  logic [11:0] cur_state_addr;

  np_security_monitor dut (
    .clk(clk), .rst_n(rst_n), .enable(enable),
    .instr_valid(instr_valid), .instr(instr),
    .np_reset(np_reset), .drop_packet(drop_packet), .attack(attack),
    .cfg_mem_we(cfg_mem_we), .cfg_mem_addr(cfg_mem_addr), .cfg_mem_wdata(cfg_mem_wdata),
    .cfg_base_we(cfg_base_we), .cfg_base_idx(cfg_base_idx), .cfg_base_wdata(cfg_base_wdata),
    .cfg_start_we(cfg_start_we), .cfg_start_wdata(cfg_start_wdata),
    .cur_state_addr(cur_state_addr), .running(running));

  always #5 clk = ~clk;

  // ------------------------------------------------------------------ graph
  mon_graph_pkg::mon_graph #(4, 12) gr;

  function automatic int ref_hash(logic [31:0] w);
    return mon_graph_pkg::mon_graph#(4, 12)::ref_hash(w);
  endfunction

  initial gr = new(NSTATES, MAXROWS);

  // ------------------------------------------------------------ stimulus
  int  m_state;              // graph state the monitor must be in
  int  m_row;                // its row
  int  n_steps = 0, n_k_pos = 0, n_idle = 0, n_attacks = 0, n_recover = 0;
  int  n_clean_after = 0, n_restart = 0, n_packets_ok = 0, n_packets_dropped = 0;
  int  n_group [17];
  int  n_back_to_back = 0, n_ignored = 0;
  bit  after_attack = 0;
  int  cycle = 0;

  task automatic expect1(string what, bit cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL cycle %0d: %s", cycle, what);
    end
  endtask

  // One reported instruction, driven at a falling edge and checked one clock
  // later; instr_valid stays high so that the next call continues at full
  // rate, one instruction per clock. Returns 1 when it was flagged.
  task automatic report(logic [31:0] w, output bit flagged);
    int h, r;
    bit valid_edge = 0;
    h = ref_hash(w);
    r = 0;
    foreach (gr.succ[m_state][i]) if (gr.hsh[gr.succ[m_state][i]] == h) begin valid_edge = 1; r = i; end
    if (instr_valid) n_back_to_back++;
    instr_valid = 1; instr = w;
    @(negedge clk);
    cycle++;
    if (valid_edge) begin
      int nr = gr.row_of(m_state, r);
      n_group[gr.fanout(m_state)]++;
      if (r > 0) n_k_pos++;
      n_steps++;
      m_state = gr.succ[m_state][r];
      m_row   = nr;
      expect1("no flag on valid edge", !attack && !drop_packet && !np_reset);
      expect1($sformatf("current row %0d expected %0d", cur_state_addr, nr), cur_state_addr == 12'(nr));
      flagged = 0;
    end else begin
      expect1("attack flagged one cycle after", attack && drop_packet && np_reset);
      flagged = 1;
      n_attacks++;
    end
  endtask

  // Processor reset: held for exactly RST cycles, then the start state.
  // The processor model keeps reporting junk while in reset; the monitor
  // must ignore it. seen_first: the first reset cycle was already observed.
  task automatic wait_reset_release(bit seen_first);
    int held = seen_first ? 1 : 0;
    while (np_reset) begin
      instr_valid = 1'($urandom() % 2);
      instr       = $urandom();
      if (instr_valid) n_ignored++;
      @(negedge clk);
      cycle++;
      if (np_reset) held++;
      expect1("no extra attack pulse in reset", !attack);
    end
    instr_valid = 0;
    expect1($sformatf("np_reset held %0d cycles", held), held == RST);
    expect1("running after reset", running);
    expect1("start row", cur_state_addr == 12'(gr.start_row));
    m_state = NSTATES;
    m_row   = gr.start_row;
  endtask

  task automatic idle(int n);
    instr_valid = 0;
    repeat (n) begin
      @(negedge clk);
      cycle++;
      n_idle++;
      expect1("no flag when idle", !attack && !np_reset);
      expect1("row held when idle", cur_state_addr == 12'(m_row));
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (n_group[g]) n_group[g] = 0;
    #0;
    $display("graph: %0d states, %0d rows used of %0d", NSTATES, gr.nrows + 1, MAXROWS);
    repeat (3) @(negedge clk);
    rst_n = 1;
    // control processor loads the graph
    for (int r = 0; r < MAXROWS; r++) begin
      @(negedge clk);
      cfg_mem_we = 1; cfg_mem_addr = 12'(r); cfg_mem_wdata = gr.image[r];
    end
    @(negedge clk) cfg_mem_we = 0;
    for (int g = 1; g <= 16; g++) begin
      cfg_base_we = 1; cfg_base_idx = 4'(g - 1); cfg_base_wdata = 12'(gr.base[g]);
      @(negedge clk);
    end
    cfg_base_we = 0;
    cfg_start_we = 1; cfg_start_wdata = 12'(gr.start_row);
    @(negedge clk) cfg_start_we = 0;
    expect1("idle before enable", !np_reset && !running);

    for (int p = 0; p < NPACKETS; p++) begin
      bit is_attack, flagged;
      int len, attack_at;
      // (re)enable monitoring every 100 packets
      if (p % 100 == 0) begin
        if (p > 0) begin
          instr_valid = 0;
          enable = 0;
          @(negedge clk);
          expect1("disabled", !running && !np_reset);
        end
        enable = 1;
        @(negedge clk);
        expect1("restart resets processor", np_reset);
        n_restart++;
        wait_reset_release(1);
      end
      is_attack = ($urandom() % 4) == 0;
      len       = 20 + ($urandom() % 200);
      attack_at = is_attack ? ($urandom() % len) : len;
      flagged   = 0;
      for (int i = 0; i < len && !flagged; i++) begin
        if ($urandom() % 8 == 0) idle(1 + $urandom() % 3);
        if (i < attack_at) begin
          int r;
          r = $urandom() % gr.fanout(m_state);
          report(gr.word[gr.succ[m_state][r]], flagged);
          if (flagged) begin failures++; $display("FAIL valid walk flagged"); end
        end else begin
          // off the graph: a word from another place in the code
          report(gr.word[$urandom() % NSTATES], flagged);
        end
      end
      if (is_attack) begin
        // keep running off-graph code until caught
        while (!flagged) report(gr.word[$urandom() % NSTATES], flagged);
      end
      if (flagged) begin
        n_packets_dropped++;
        n_recover++;
        wait_reset_release(1);
        after_attack = 1;
      end else begin
        n_packets_ok++;
        if (after_attack) n_clean_after++;
        after_attack = 0;
        // the packet loop returns to its start: reset between packets
        // is not needed, the walk just continues
      end
    end

    $display("steps=%0d k>0=%0d idle=%0d attacks=%0d recoveries=%0d restarts=%0d",
             n_steps, n_k_pos, n_idle, n_attacks, n_recover, n_restart);
    $display("back-to-back instructions=%0d reports ignored in reset=%0d", n_back_to_back, n_ignored);
    $display("packets forwarded=%0d dropped=%0d clean-after-attack=%0d",
             n_packets_ok, n_packets_dropped, n_clean_after);
    $write("steps per fanout group:");
    for (int g = 1; g <= 16; g++) $write(" %0d", n_group[g]);
    $write("\n");
    expect1("DFA steps happened", n_steps > 0);
    expect1("branch with k>0 happened", n_k_pos > 0);
    expect1("idle cycles happened", n_idle > 0);
    expect1("back-to-back instructions happened", n_back_to_back > 0);
    expect1("reports during reset ignored", n_ignored > 0);
    expect1("attack detected", n_attacks > 0);
    expect1("recovery happened", n_recover > 0);
    expect1("clean packet after attack", n_clean_after > 0);
    expect1("restart by enable", n_restart > 1);
    expect1("group 1 used", n_group[1] > 0);
    expect1("group 2 used", n_group[2] > 0);
    expect1("group 16 used", n_group[16] > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
