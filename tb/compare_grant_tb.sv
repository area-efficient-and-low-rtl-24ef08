// compare_grant_tb: the document's worked example and random cases.
// Example: request map 1011 with tickets 1:3:4 on masters 1, 3 and 4 gives
// partial sums 1, 1, 4, 8. The fifth number of the range (4 counted from 0)
// must go to master 4, and the first (0) to master 1 although every
// comparator fires. Random cases are checked against a direct search for the
// sub-range [s_{i-1}, s_i) that holds the number.
module compare_grant_tb;
  logic [6:0] rnd;
  logic       valid;
  logic [6:0] psum [4];
  logic [3:0] hit, win, expect_win;
  int checks = 0, failures = 0;
  int lo;

  compare_grant dut (.rnd, .valid, .psum, .hit, .win);

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
    valid = 1;
    psum = '{7'd1, 7'd1, 7'd4, 7'd8};
    rnd = 4; #1;
    check(win == 4'b1000, $sformatf("example draw 5 -> master 4, got %b", win));
    check(hit == 4'b1000, "example draw 5 hits");
    rnd = 0; #1;
    check(hit == 4'b1111, "example draw 1 fires every comparator");
    check(win == 4'b0001, $sformatf("example draw 1 -> master 1, got %b", win));
    for (int r = 0; r < 8; r++) begin
      rnd = 7'(r); #1;
      check(win == (r < 1 ? 4'b0001 : r < 4 ? 4'b0100 : 4'b1000), $sformatf("example draw %0d", r));
    end
    valid = 0; #1;
    check(win == 0, "no grant when invalid");
    valid = 1;
    for (int n = 0; n < 1000; n++) begin
      int acc;
      int t [4];
      acc = 0;
      for (int i = 0; i < 4; i++) begin
        t[i] = $urandom_range(0, 15);
        acc += t[i];
        psum[i] = 7'(acc);
      end
      if (acc == 0) continue;
      rnd = 7'($urandom_range(0, acc - 1));
      #1;
      expect_win = 0;
      lo = 0;
      for (int i = 0; i < 4; i++) begin
        if (rnd >= lo && rnd < psum[i]) expect_win[i] = 1;
        lo = psum[i];
      end
      check(win == expect_win, $sformatf("rnd=%0d got %b want %b", rnd, win, expect_win));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
