// tb_monitor_ctrl -- self-checking test of the monitor's sequencing and
// recovery control.
//
// Drives enable, instr_valid, match and next_addr randomly and compares every
// output, every cycle, with a cycle-level reference kept in the testbench:
//   * enable rising: np_reset high for exactly RST_CYCLES (4) cycles, the
//     start row read in each of them, then the DFA runs;
//   * a valid instruction with match: one read of next_addr, which becomes
//     the current row; no instruction: no read;
//   * a valid instruction without match: attack and drop_packet for one cycle
//     and np_reset for RST_CYCLES cycles, starting in the next cycle;
//     reports during the reset are ignored;
//   * enable falling: back to idle with the processor released.
// Counts how often each of these happened and fails if one never did.
module tb_monitor_ctrl;

  localparam int RST = 4;

  int unsigned checks = 0, failures = 0;
  int unsigned n_restart = 0, n_step = 0, n_attack = 0, n_idle_cycles = 0, n_disable = 0;
  logic        clk = 0, rst_n = 0;
  logic        enable = 0, instr_valid = 0, match = 0;
  logic [11:0] start_addr = 12'h0A5, next_addr = '0;
  logic        mem_re, np_reset, drop_packet, attack;
  logic [11:0] mem_raddr, cur_addr;
  mon_pkg::mon_state_e state;

  monitor_ctrl #(.ADDR_W(12), .RST_CYCLES(RST)) dut (
    .clk(clk), .rst_n(rst_n), .enable(enable), .start_addr(start_addr),
    .instr_valid(instr_valid), .match(match), .next_addr(next_addr),
    .mem_re(mem_re), .mem_raddr(mem_raddr), .np_reset(np_reset),
    .drop_packet(drop_packet), .attack(attack), .cur_addr(cur_addr), .state(state));

  always #5 clk = ~clk;

  // reference state
  int  m_rst_left = 0;      // remaining reset cycles, 0 = not in reset
  bit  m_on = 0;            // monitoring enabled (past idle)
  bit  m_drop = 0;
  logic [11:0] m_cur = '0;

  task automatic expect_eq(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL t=%0t %s = %0h expected %0h", $time, what, got, exp);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      bit exp_re;
      logic [11:0] exp_raddr;
      bit step, viol;
      // drive inputs for this cycle
      @(negedge clk);
      if (cyc % 1500 == 0) enable = 1'b1;
      else if (cyc % 1500 == 1400) enable = 1'b0;
      instr_valid = ($urandom() % 4) != 0;
      match       = ($urandom() % 60) != 0;
      next_addr   = 12'($urandom());
      if (cyc % 97 == 5) start_addr = 12'($urandom());
      #1;
      // combinational outputs of this cycle
      expect_eq("np_reset", 32'(np_reset), 32'(m_rst_left > 0));
      expect_eq("drop_packet", 32'(drop_packet), 32'(m_drop));
      expect_eq("attack", 32'(attack), 32'(m_drop));
      expect_eq("cur_addr", 32'(cur_addr), 32'(m_cur));
      step = 0; viol = 0;
      if (m_rst_left > 0) begin
        exp_re = 1; exp_raddr = start_addr;
      end else if (m_on && enable && instr_valid) begin
        exp_re = match; exp_raddr = match ? next_addr : start_addr;
        step = match; viol = !match;
      end else begin
        exp_re = 0; exp_raddr = start_addr;
      end
      expect_eq("mem_re", 32'(mem_re), 32'(exp_re));
      if (exp_re) expect_eq("mem_raddr", 32'(mem_raddr), 32'(exp_raddr));
      // advance the reference
      m_drop = 0;
      if (!m_on) begin
        n_idle_cycles++;
        if (enable) begin m_on = 1; m_rst_left = RST; n_restart++; end
      end else if (!enable) begin
        if (m_rst_left == 0) n_disable++;
        else m_cur = start_addr;
        m_on = 0; m_rst_left = 0;
      end else if (m_rst_left > 0) begin
        m_cur = start_addr;
        m_rst_left--;
      end else if (step) begin
        m_cur = next_addr; n_step++;
      end else if (viol) begin
        m_drop = 1; m_rst_left = RST; n_attack++;
      end
    end
    if (n_restart == 0)  begin failures++; $display("FAIL no restart"); end
    if (n_step == 0)     begin failures++; $display("FAIL no DFA step"); end
    if (n_attack == 0)   begin failures++; $display("FAIL no attack"); end
    if (n_disable == 0)  begin failures++; $display("FAIL no disable"); end
    $display("restarts=%0d steps=%0d attacks=%0d disables=%0d idle_cycles=%0d",
             n_restart, n_step, n_attack, n_disable, n_idle_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
