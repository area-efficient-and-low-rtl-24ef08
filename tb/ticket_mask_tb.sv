// ticket_mask_tb: every request map with random ticket counts; a masked count
// must equal the ticket count when the master requests and zero otherwise.
module ticket_mask_tb;
  logic [3:0] req;
  logic [3:0] tickets [4];
  logic [3:0] masked  [4];
  int checks = 0, failures = 0;

  ticket_mask dut (.req, .tickets, .masked);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      req = 4'(n % 16);
      for (int i = 0; i < 4; i++) tickets[i] = 4'($urandom_range(0, 15));
      #1;
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (masked[i] != (req[i] ? tickets[i] : 4'd0)) begin
          failures++;
          $display("FAIL req=%b i=%0d t=%0d got %0d", req, i, tickets[i], masked[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
