// tb_next_addr_calc -- self-checking test of the next-state address arithmetic.
//
// A small table stands in for the group base register file (driven from
// rf_idx). Checks the published example (two next states, offset 0, k = 1,
// group 2 based at 0x002: row 0x003), the full-fanout case (count field 0
// meaning 16 next states, group 16 = entry 15), and 3000 random cases
// against row = base[g] + g * offset + k computed with integers modulo 4096.
module tb_next_addr_calc;

  int unsigned checks = 0, failures = 0;
  logic [3:0]  num_next, k, rf_idx;
  logic [11:0] offset, next_addr;
  logic [11:0] bases [16];
  logic [11:0] base;

  assign base = bases[rf_idx];

  next_addr_calc #(.HASH_W(4), .ADDR_W(12), .OFF_W(12)) dut (
    .num_next(num_next), .offset(offset), .k(k), .rf_idx(rf_idx), .base(base), .next_addr(next_addr));

  task automatic check(int g, int off, int kk);
    int unsigned exp;
    num_next = 4'(g % 16);
    offset   = 12'(off);
    k        = 4'(kk);
    #1;
    exp = (int'(bases[g-1]) + g * off + kk) % 4096;
    checks++;
    if (next_addr !== 12'(exp)) begin
      failures++;
      $display("FAIL g=%0d off=%0d k=%0d addr=%03h expected %03h", g, off, kk, next_addr, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) bases[i] = 12'(i * 100);
    bases[1] = 12'h002;          // group 2 base of the published example
    check(2, 0, 1);              // -> 0x003
    checks++;
    if (next_addr !== 12'h003) begin failures++; $display("FAIL example"); end
    check(16, 3, 15);            // full fanout, count field 0
    check(1, 4095, 0);           // wrap-around
    for (int i = 0; i < 3000; i++) begin
      int g;
      g = 1 + ($urandom() % 16);
      for (int j = 0; j < 16; j++) bases[j] = 12'($urandom());
      check(g, $urandom() % 4096, $urandom() % g);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
