// tb_packet_throughput -- packet-rate workload for the monitor at its default
// size.
//
// Models the evaluation setting of the published prototype: one processor
// core at 125 MHz (8 ns per cycle, one instruction per cycle) processing
// 256-byte packets with about 5,355 instructions each, mixed with attack
// packets whose malicious control transfer happens early in the code.
//   * A regular packet is a walk of PKT_INSTR instructions on a random
//     monitoring graph (mon_graph_pkg), reported on consecutive clocks. It
//     must pass without a flag and cost exactly PKT_INSTR cycles: the monitor
//     adds no stall.
//   * An attack packet runs ATTACK_AT valid instructions, then jumps off the
//     graph. It must be flagged in the cycle after its first off-graph
//     instruction whose hash is not a valid edge, and the processor is back
//     after the 4-cycle reset.
// For attack shares of 0%, 25% and 50% the testbench measures the cycles
// used and prints the data processing rate (all packets) and the rate of
// regular packets, in Mbit/s at 125 MHz. With no attacks the rate must be
// 2048 bits / (5,355 x 8 ns) = 47.8 Mbit/s, and it must rise when attack
// packets are mixed in, since they are dropped after a few cycles.
module tb_packet_throughput;

  localparam int    NSTATES   = 2600;
  localparam int    MAXROWS   = 4096;
  localparam int    PKT_INSTR = 5355;   // instructions per 256-byte packet
  localparam int    PKT_BITS  = 256 * 8;
  localparam int    ATTACK_AT = 20;     // valid instructions before the attack
  localparam int    NPKT      = 40;     // packets per attack share
  localparam int    RST       = 4;
  localparam real   CYCLE_NS  = 8.0;

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

  mon_graph_pkg::mon_graph #(4, 12) gr;
  initial gr = new(NSTATES, MAXROWS);

  int m_state;
  longint cycles = 0;

  task automatic expect1(string what, bit cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL cycle %0d: %s", cycles, what);
    end
  endtask

  // drive one instruction for one clock; returns 1 if the monitor flagged it
  task automatic step(logic [31:0] w, output bit flagged);
    int r;
    r = gr.succ_with_hash(m_state, mon_graph_pkg::mon_graph#(4, 12)::ref_hash(w));
    instr_valid = 1; instr = w;
    @(negedge clk);
    cycles++;
    flagged = attack;
    if (r >= 0) begin
      expect1("valid instruction passes", !attack && !np_reset);
      expect1("row follows", cur_state_addr == 12'(gr.row_of(m_state, r)));
      m_state = gr.succ[m_state][r];
    end else begin
      expect1("invalid instruction flagged next cycle", attack && drop_packet && np_reset);
    end
  endtask

  task automatic recover();
    int held = 1;
    instr_valid = 0;
    while (np_reset) begin
      @(negedge clk);
      cycles++;
      if (np_reset) held++;
    end
    expect1("reset hold", held == RST);
    expect1("start row", cur_state_addr == 12'(gr.start_row));
    m_state = NSTATES;
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real rate [3];
    #0;
    repeat (3) @(negedge clk);
    rst_n = 1;
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
    enable = 1;
    @(negedge clk);
    recover();

    for (int share = 0; share < 3; share++) begin
      longint c0;
      int     nreg, natt;
      c0 = cycles; nreg = 0; natt = 0;
      for (int p = 0; p < NPKT; p++) begin
        bit is_attack, flagged;
        longint cp;
        is_attack = (p % 4) < share;    // 0%, 25%, 50%
        cp = cycles;
        flagged = 0;
        if (!is_attack) begin
          for (int i = 0; i < PKT_INSTR; i++) begin
            int r;
            r = $urandom() % gr.fanout(m_state);
            step(gr.word[gr.succ[m_state][r]], flagged);
            if (flagged) break;
          end
          expect1("regular packet not dropped", !flagged);
          expect1($sformatf("regular packet takes %0d cycles", cycles - cp), cycles - cp == longint'(PKT_INSTR));
          nreg++;
        end else begin
          longint first_bad;
          for (int i = 0; i < ATTACK_AT; i++) begin
            int r;
            r = $urandom() % gr.fanout(m_state);
            step(gr.word[gr.succ[m_state][r]], flagged);
          end
          first_bad = -1;
          while (!flagged) begin
            logic [31:0] w;
            w = gr.word[$urandom() % NSTATES];
            if (first_bad < 0 && gr.succ_with_hash(m_state, mon_graph_pkg::mon_graph#(4, 12)::ref_hash(w)) < 0)
              first_bad = cycles;
            step(w, flagged);
          end
          expect1("flagged at the first invalid instruction", cycles - first_bad == 1);
          recover();
          natt++;
        end
      end
      rate[share] = real'(NPKT * PKT_BITS) / (real'(cycles - c0) * CYCLE_NS) * 1000.0;
      $display("attack share %0d%%: %0d regular + %0d attack packets in %0d cycles: processing %.2f Mbit/s, regular %.2f Mbit/s",
               share * 25, nreg, natt, cycles - c0, rate[share],
               real'(nreg * PKT_BITS) / (real'(cycles - c0) * CYCLE_NS) * 1000.0);
    end
    // 2048 bits / (5355 * 8 ns) = 47.81 Mbit/s
    expect1($sformatf("no-attack rate %.3f Mbit/s", rate[0]),
            rate[0] > 47.80 && rate[0] < 47.82);
    expect1("processing rate rises with attack share", rate[1] > rate[0] && rate[2] > rate[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
