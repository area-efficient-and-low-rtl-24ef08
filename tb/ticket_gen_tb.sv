// ticket_gen_tb: checks the ticket store. After reset the counts must be
// 1, 2, 3, 4; then random run-time writes are applied and every count is
// compared with a testbench copy after each clock.
module ticket_gen_tb;
  logic clk = 0, rst_n = 0, wr_en = 0;
  logic [1:0] wr_idx = 0;
  logic [3:0] wr_tickets = 0;
  logic [3:0] tickets [4];
  logic [3:0] model [4];
  int checks = 0, failures = 0;

  ticket_gen dut (.clk, .rst_n, .wr_en, .wr_idx, .wr_tickets, .tickets);
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
    model = '{4'd1, 4'd2, 4'd3, 4'd4};
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    for (int i = 0; i < 4; i++) check(tickets[i] == model[i], $sformatf("reset ticket %0d", i));
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      wr_en      = ($urandom_range(0, 1) == 1);
      wr_idx     = 2'($urandom_range(0, 3));
      wr_tickets = 4'($urandom_range(0, 15));
      @(posedge clk); #1;
      if (wr_en) model[wr_idx] = wr_tickets;
      for (int i = 0; i < 4; i++)
        check(tickets[i] == model[i], $sformatf("cycle %0d ticket %0d got %0d want %0d", n, i, tickets[i], model[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
