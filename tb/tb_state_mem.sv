// tb_state_mem -- self-checking test of the state machine memory.
//
// Fills all 4096 rows with a pattern derived from the address, reads them
// back (data one cycle after the read), then mixes random writes and reads
// against a testbench copy. Also checks that rdata holds while re is low,
// even when the read address changes.
module tb_state_mem;

  int unsigned checks = 0, failures = 0;
  logic        clk = 0;
  logic        we = 0, re = 0;
  logic [11:0] waddr = '0, raddr = '0;
  logic [31:0] wdata = '0, rdata;
  logic [31:0] model [4096];

  state_mem #(.ROWS(4096), .ADDR_W(12), .WIDTH(32)) dut (
    .clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .re(re), .raddr(raddr), .rdata(rdata));

  always #5 clk = ~clk;

  function automatic logic [31:0] pattern(int a);
    return 32'(a) * 32'h9E37_79B9 ^ 32'h5A5A_0000;
  endfunction

  task automatic rd(int a);
    @(negedge clk);
    re = 1; raddr = 12'(a);
    @(negedge clk);
    re = 0;
    checks++;
    if (rdata !== model[a]) begin
      failures++;
      $display("FAIL row %0d = %08h expected %08h", a, rdata, model[a]);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 4096; a++) begin
      @(negedge clk);
      we = 1; waddr = 12'(a); wdata = pattern(a);
      model[a] = pattern(a);
    end
    @(negedge clk) we = 0;
    for (int a = 0; a < 4096; a++) rd(a);
    // hold while re is low
    for (int n = 0; n < 50; n++) begin
      int a;
      a = $urandom() % 4096;
      rd(a);
      // re low with another address: the output must not change
      raddr = 12'($urandom());
      repeat (3) @(negedge clk);
      checks++;
      if (rdata !== model[a]) begin failures++; $display("FAIL hold row %0d", a); end
    end
    for (int n = 0; n < 2000; n++) begin
      if (($urandom() % 2) != 0) begin
        @(negedge clk);
        we = 1; waddr = 12'($urandom()); wdata = $urandom();
        model[waddr] = wdata;
        @(negedge clk) we = 0;
      end else begin
        rd($urandom() % 4096);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
