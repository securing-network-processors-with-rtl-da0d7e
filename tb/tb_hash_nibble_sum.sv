// tb_hash_nibble_sum -- self-checking test of the nibble-sum instruction hash.
//
// Applies hand-worked instruction words and 2000 random ones to the 4-bit
// hash and compares with a reference that adds the instruction's nibbles by
// shifting the word, then reduces modulo 16. A second instance with a 3-bit
// hash checks the truncation for other widths. Combinational block: each
// check is taken 1 ns after the input changes.
module tb_hash_nibble_sum;

  int unsigned checks = 0, failures = 0;
  logic [31:0] instr;
  logic [3:0]  hash4;
  logic [2:0]  hash3;

  hash_nibble_sum #(.HASH_W(4)) dut4 (.instr(instr), .hash(hash4));
  hash_nibble_sum #(.HASH_W(3)) dut3 (.instr(instr), .hash(hash3));

  function automatic int unsigned ref_sum(logic [31:0] w);
    int unsigned s = 0;
    logic [31:0] t = w;
    repeat (8) begin
      s += t & 32'hF;
      t = t >> 4;
    end
    return s;
  endfunction

  task automatic check(logic [31:0] w);
    int unsigned s;
    instr = w;
    #1;
    s = ref_sum(w);
    checks += 2;
    if (hash4 !== 4'(s % 16)) begin
      failures++;
      $display("FAIL instr=%08h hash4=%0d expected %0d", w, hash4, s % 16);
    end
    if (hash3 !== 3'(s % 8)) begin
      failures++;
      $display("FAIL instr=%08h hash3=%0d expected %0d", w, hash3, s % 8);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // hand-worked: 0x00000000 -> 0; 0xFFFFFFFF -> 120 = 0x78 -> 8;
    // 0x12345678 -> 36 -> 4; 0x27BDFFE8 (addiu sp,sp,-24) -> 2+7+11+13+15+15+14+8 = 85 -> 5
    instr = '0; #1;
    checks++; if (hash4 !== 4'd0) failures++;
    instr = 32'hFFFF_FFFF; #1;
    checks++; if (hash4 !== 4'd8) failures++;
    instr = 32'h1234_5678; #1;
    checks++; if (hash4 !== 4'd4) failures++;
    instr = 32'h27BD_FFE8; #1;
    checks++; if (hash4 !== 4'd5) failures++;
    for (int i = 0; i < 2000; i++) check($urandom());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
