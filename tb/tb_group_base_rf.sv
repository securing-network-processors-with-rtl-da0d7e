// tb_group_base_rf -- self-checking test of the group base register file.
//
// After reset all 16 entries must read 0. The test then writes random bases
// to random entries (with idle cycles in between), mirrors every write in a
// testbench array, and after each clock reads all 16 entries back through
// the combinational read port and compares with the mirror.
module tb_group_base_rf;

  int unsigned checks = 0, failures = 0;
  logic        clk = 0, rst_n = 0;
  logic        we = 0;
  logic [3:0]  widx = '0, ridx = '0;
  logic [11:0] wdata = '0, rdata;
  logic [11:0] model [16];

  group_base_rf #(.HASH_W(4), .ADDR_W(12)) dut (
    .clk(clk), .rst_n(rst_n), .we(we), .widx(widx), .wdata(wdata), .ridx(ridx), .rdata(rdata));

  always #5 clk = ~clk;

  task automatic read_all();
    for (int i = 0; i < 16; i++) begin
      ridx = 4'(i);
      #1;
      checks++;
      if (rdata !== model[i]) begin
        failures++;
        $display("FAIL entry %0d = %03h expected %03h", i, rdata, model[i]);
      end
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) model[i] = '0;
    repeat (2) @(posedge clk);
    #2 rst_n = 1;
    read_all();
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      we    = ($urandom() % 4) != 0;
      widx  = 4'($urandom());
      wdata = 12'($urandom());
      @(posedge clk);
      if (we) model[widx] = wdata;
      #1 we = 0;
      read_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
