// lfsr_rng_tb: checks the lottery's random number generator.
// A reference LFSR written out bit by bit in the testbench (x^8+x^6+x^5+x^4+1)
// is stepped alongside the block; every output is compared with it, the
// sequence must have period 255 with no repeat before, and holding `en` low
// must freeze the register.
module lfsr_rng_tb;
  logic clk = 0, rst_n = 0, en = 0;
  logic [7:0] rnd, ref_q, first;
  int checks = 0, failures = 0, period = 0;
  bit seen [256];

  lfsr_rng dut (.clk, .rst_n, .en, .rnd);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_q = 8'h5A;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    check(rnd == 8'h5A, "reset value");
    // frozen while en is low
    repeat (3) @(posedge clk);
    check(rnd == 8'h5A, "hold with en low");
    en <= 1;
    first = rnd;
    for (int i = 0; i < 600; i++) begin
      @(posedge clk); #1;
      ref_q = {ref_q[6:0], ref_q[7] ^ ref_q[5] ^ ref_q[4] ^ ref_q[3]};
      check(rnd == ref_q, $sformatf("step %0d: got %h want %h", i, rnd, ref_q));
      check(rnd != 0, "never zero");
      if (i < 255) begin
        if (rnd == first && period == 0) period = i + 1;
        if (period == 0) begin
          check(!seen[rnd], "no repeat inside the period");
          seen[rnd] = 1;
        end
      end
    end
    check(period == 255, $sformatf("period %0d", period));
    en <= 0;
    @(posedge clk); #1 first = rnd;
    repeat (5) @(posedge clk);
    #1 check(rnd == first, "hold after en drops");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
