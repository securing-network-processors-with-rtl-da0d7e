// mon_config_harness -- drives one np_security_monitor configuration end to
// end; used by tb_hash_widths to run several configurations side by side.
//
// For a monitor built with hash width HASH_W and offset field OFF_W it
// generates a random NSTATES-instruction monitoring graph
// (mon_graph_pkg::mon_graph), loads it, enables monitoring and runs NPACKETS
// packets at one instruction per clock with random idle cycles; about one
// packet in four leaves the graph partway through. After each step it checks
// the monitor's current row against the graph, checks that attack,
// drop_packet and np_reset rise exactly one cycle after an instruction whose
// hash is not a valid edge, that the reset lasts 4 cycles and that the monitor
// is back at the start row afterwards. It also checks that the row width is
// HASH_W + OFF_W + 2**HASH_W bits (ROW_W_EXPECTED). Counts of steps, steps
// with k > 0, steps out of a state with 2**HASH_W successors and attacks are
// reported; a configuration where one of them never happens counts a failure.
// done rises when the run is over; checks and failures are then final.
module mon_config_harness #(
  parameter int HASH_W         = 4,
  parameter int OFF_W          = 10,
  parameter int NSTATES        = 900,
  parameter int NPACKETS       = 150,
  parameter int ROW_W_EXPECTED = 30
) (
  output logic done,
  output int   checks,
  output int   failures
);

  localparam int NV    = 1 << HASH_W;
  localparam int ROW_W = HASH_W + OFF_W + NV;
  localparam int ROWS  = 4096;
  localparam int RST   = 4;

  logic              clk = 0, rst_n = 0, enable = 0;
  logic              instr_valid = 0;
  logic [31:0]       instr = '0;
  logic              np_reset, drop_packet, attack, running;
  logic              cfg_mem_we = 0, cfg_base_we = 0, cfg_start_we = 0;
  logic [11:0]       cfg_mem_addr = '0, cfg_base_wdata = '0, cfg_start_wdata = '0;
  logic [ROW_W-1:0]  cfg_mem_wdata = '0;
  logic [HASH_W-1:0] cfg_base_idx = '0;
  logic [11:0]       cur_state_addr;

  np_security_monitor #(.HASH_W(HASH_W), .OFF_W(OFF_W)) dut (
    .clk(clk), .rst_n(rst_n), .enable(enable),
    .instr_valid(instr_valid), .instr(instr),
    .np_reset(np_reset), .drop_packet(drop_packet), .attack(attack),
    .cfg_mem_we(cfg_mem_we), .cfg_mem_addr(cfg_mem_addr), .cfg_mem_wdata(cfg_mem_wdata),
    .cfg_base_we(cfg_base_we), .cfg_base_idx(cfg_base_idx), .cfg_base_wdata(cfg_base_wdata),
    .cfg_start_we(cfg_start_we), .cfg_start_wdata(cfg_start_wdata),
    .cur_state_addr(cur_state_addr), .running(running));

  always #5 clk = ~clk;

  typedef mon_graph_pkg::mon_graph #(HASH_W, OFF_W) graph_t;
  graph_t gr;
  initial gr = new(NSTATES, ROWS);

  int m_state;
  int n_steps = 0, n_k_pos = 0, n_full = 0, n_attacks = 0;

  task automatic expect1(string what, bit cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL (HASH_W=%0d): %s", HASH_W, what);
    end
  endtask

  task automatic step(logic [31:0] w, output bit flagged);
    int r;
    r = gr.succ_with_hash(m_state, graph_t::ref_hash(w));
    instr_valid = 1; instr = w;
    @(negedge clk);
    flagged = attack;
    if (r >= 0) begin
      expect1("valid instruction passes", !attack && !np_reset);
      expect1("row follows", cur_state_addr == 12'(gr.row_of(m_state, r)));
      n_steps++;
      if (r > 0) n_k_pos++;
      if (gr.fanout(m_state) == NV) n_full++;
      m_state = gr.succ[m_state][r];
    end else begin
      expect1("invalid instruction flagged next cycle", attack && drop_packet && np_reset);
      n_attacks++;
    end
  endtask

  task automatic recover(int seen);
    int held;
    held = seen;
    instr_valid = 0;
    while (np_reset) begin
      @(negedge clk);
      if (np_reset) held++;
    end
    expect1("reset hold", held == RST);
    expect1("start row", cur_state_addr == 12'(gr.start_row));
    m_state = NSTATES;
  endtask

  initial begin
    done = 0; checks = 0; failures = 0;
    #0;
    expect1("row width", ROW_W == ROW_W_EXPECTED && $bits(cfg_mem_wdata) == ROW_W_EXPECTED);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < ROWS; r++) begin
      @(negedge clk);
      cfg_mem_we = 1; cfg_mem_addr = 12'(r); cfg_mem_wdata = gr.image[r];
    end
    @(negedge clk) cfg_mem_we = 0;
    for (int g = 1; g <= NV; g++) begin
      cfg_base_we = 1; cfg_base_idx = HASH_W'(g - 1); cfg_base_wdata = 12'(gr.base[g]);
      @(negedge clk);
    end
    cfg_base_we = 0;
    cfg_start_we = 1; cfg_start_wdata = 12'(gr.start_row);
    @(negedge clk) cfg_start_we = 0;
    enable = 1;
    @(negedge clk);
    recover(1);
    for (int p = 0; p < NPACKETS; p++) begin
      bit is_attack, flagged;
      int len, attack_at;
      is_attack = ($urandom() % 4) == 0;
      len       = 20 + ($urandom() % 200);
      attack_at = is_attack ? ($urandom() % len) : len;
      flagged   = 0;
      for (int i = 0; i < len && !flagged; i++) begin
        int r;
        if ($urandom() % 8 == 0) begin
          instr_valid = 0;
          @(negedge clk);
        end
        if (i < attack_at) begin
          r = $urandom() % gr.fanout(m_state);
          step(gr.word[gr.succ[m_state][r]], flagged);
          if (flagged) expect1("valid walk not flagged", 0);
        end else begin
          step(gr.word[$urandom() % NSTATES], flagged);
        end
      end
      if (is_attack) while (!flagged) step(gr.word[$urandom() % NSTATES], flagged);
      if (flagged) recover(1);
    end
    $display("HASH_W=%0d OFF_W=%0d row=%0d bits: %0d rows used, steps=%0d k>0=%0d full-fanout steps=%0d attacks=%0d",
             HASH_W, OFF_W, ROW_W, gr.nrows + 1, n_steps, n_k_pos, n_full, n_attacks);
    expect1("steps", n_steps > 0);
    expect1("k > 0", n_k_pos > 0);
    expect1("full fanout", n_full > 0);
    expect1("attacks", n_attacks > 0);
    done = 1;
  end

endmodule
