// rand_range_tb: every 8-bit raw number against every ticket total 0..60;
// the folded number must be raw mod total, and `valid` low exactly when the
// total is zero. Also checks that the fold stays inside [0, total).
module rand_range_tb;
  logic [7:0] raw;
  logic [6:0] total, rnd;
  logic       valid;
  int checks = 0, failures = 0;

  rand_range dut (.raw, .total, .rnd, .valid);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t <= 60; t++) begin
      for (int r = 0; r < 256; r++) begin
        raw = 8'(r); total = 7'(t);
        #1;
        checks++;
        if (t == 0) begin
          if (valid) begin failures++; $display("FAIL valid with zero total"); end
        end else if (!valid || rnd != 7'(r % t) || rnd >= total) begin
          failures++;
          $display("FAIL raw=%0d total=%0d got %0d", r, t, rnd);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
