// partial_sum_tb: the document's example (masked tickets 1, 0, 3, 4 giving
// partial sums 1, 1, 4, 8) and random inputs, against sums computed here.
module partial_sum_tb;
  logic [3:0] masked [4];
  logic [6:0] psum   [4];
  logic [6:0] total;
  int checks = 0, failures = 0;
  int acc;

  partial_sum dut (.masked, .psum, .total);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    masked = '{4'd1, 4'd0, 4'd3, 4'd4};
    #1;
    check(psum[0] == 1 && psum[1] == 1 && psum[2] == 4 && psum[3] == 8 && total == 8,
          "example 1:0:3:4");
    for (int n = 0; n < 500; n++) begin
      for (int i = 0; i < 4; i++) masked[i] = 4'($urandom_range(0, 15));
      if (n == 0) masked = '{4'd15, 4'd15, 4'd15, 4'd15};
      #1;
      acc = 0;
      for (int i = 0; i < 4; i++) begin
        acc += masked[i];
        check(psum[i] == acc, $sformatf("psum[%0d] got %0d want %0d", i, psum[i], acc));
      end
      check(total == acc, "total");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
