// tb_hash_widths -- the monitor in the three hash-width configurations whose
// memory cost was compared for the benchmark programs: 3-, 4- and 5-bit
// hashes with a 10-bit offset field, i.e. rows of 21, 30 and 47 bits
// (8 + 3 + 10, 16 + 4 + 10, 32 + 5 + 10). Each runs in its own
// mon_config_harness with a 900-instruction random program graph, the size of
// the mid-sized benchmarks, in the default 4096-row memory. The results of
// the three are summed into one verdict.
module tb_hash_widths;

  logic done3, done4, done5;
  int   c3, c4, c5, f3, f4, f5;

  mon_config_harness #(.HASH_W(3), .OFF_W(10), .ROW_W_EXPECTED(21)) h3 (.done(done3), .checks(c3), .failures(f3));
  mon_config_harness #(.HASH_W(4), .OFF_W(10), .ROW_W_EXPECTED(30)) h4 (.done(done4), .checks(c4), .failures(f4));
  mon_config_harness #(.HASH_W(5), .OFF_W(10), .ROW_W_EXPECTED(47)) h5 (.done(done5), .checks(c5), .failures(f5));

  initial begin
    #2000000;
    $display("TB_RESULT checks=%0d failures=%0d", c3 + c4 + c5, f3 + f4 + f5 + 1);
    $finish;
  end

  initial begin
    #1;
    wait (done3 && done4 && done5);
    $display("TB_RESULT checks=%0d failures=%0d", c3 + c4 + c5, f3 + f4 + f5);
    $finish;
  end

endmodule
