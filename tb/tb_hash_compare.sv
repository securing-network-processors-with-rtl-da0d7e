// tb_hash_compare -- self-checking test of the hash comparison block.
//
// Checks the published example (vector with bits 2 and 7 set, hash 7: match,
// k = 1), every hash against a set of corner vectors, and 3000 random
// vector/hash pairs. The reference tests the bit with a shift and computes k
// by walking the vector from bit 0 and counting the set bits it passes.
// Combinational block: outputs are sampled 1 ns after the inputs change.
module tb_hash_compare;

  int unsigned checks = 0, failures = 0;
  logic [15:0] vec;
  logic [3:0]  hash, k;
  logic        match;

  hash_compare #(.HASH_W(4)) dut (.valid_vec(vec), .hash(hash), .match(match), .k(k));

  task automatic check(logic [15:0] v, logic [3:0] h);
    int unsigned rk = 0;
    logic rm;
    vec = v; hash = h;
    #1;
    rm = v[h];
    for (int i = 0; i < 16; i++) if (i < h && v[i]) rk++;
    checks++;
    if (match !== rm || (rm && k !== 4'(rk))) begin
      failures++;
      $display("FAIL vec=%04h hash=%0d match=%b k=%0d expected %b %0d", v, h, match, k, rm, rk);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // published example: edges with hashes 2 and 7, reported hash 7
    vec = 16'h0084; hash = 4'd7; #1;
    checks++;
    if (!match || k !== 4'd1) begin failures++; $display("FAIL example"); end
    hash = 4'd5; #1;
    checks++;
    if (match) begin failures++; $display("FAIL example mismatch"); end
    for (int h = 0; h < 16; h++) begin
      check(16'h0000, 4'(h));
      check(16'hFFFF, 4'(h));
      check(16'h8001, 4'(h));
      check(16'h5555, 4'(h));
      check(16'(1 << h), 4'(h));
    end
    for (int i = 0; i < 3000; i++) check(16'($urandom()), 4'($urandom()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
