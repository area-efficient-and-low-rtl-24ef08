// shared_mem_tb: reset must clear all eight words; random reads and writes are
// then compared with a testbench array. Writes need `en` and `we`; reads return
// the addressed word in the same cycle; address bits above bit 2 alias.
module shared_mem_tb;
  logic clk = 0, rst_n = 0, en = 0, we = 0;
  logic [7:0] addr = 0, wdata = 0, rdata;
  logic [7:0] model [8];
  int checks = 0, failures = 0;

  shared_mem dut (.clk, .rst_n, .en, .we, .addr, .wdata, .rdata);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) model[i] = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 8; i++) begin
      @(negedge clk); addr = 8'(i); #1;
      check(rdata == 0, $sformatf("word %0d cleared", i));
    end
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      we = $urandom_range(0, 1) == 1;
      addr = 8'($urandom);
      wdata = 8'($urandom);
      #1;
      check(rdata == model[addr[2:0]], $sformatf("read %0d got %h want %h", addr, rdata, model[addr[2:0]]));
      @(posedge clk);
      if (en && we) model[addr[2:0]] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
