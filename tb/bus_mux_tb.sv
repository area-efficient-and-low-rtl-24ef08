// bus_mux_tb: random one-hot grants and request maps; the bus must carry the
// owner's command when it requests and be idle (all zeros, not valid) when it
// does not or nobody owns the bus.
module bus_mux_tb;
  import soc_pkg::*;
  logic [3:0] gnt, req;
  bus_cmd_t   m_cmd [4];
  bus_cmd_t   bus_cmd;
  logic       bus_valid;
  int checks = 0, failures = 0;
  int owner;

  bus_mux dut (.gnt, .req, .m_cmd, .bus_cmd, .bus_valid);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      for (int i = 0; i < 4; i++) m_cmd[i] = bus_cmd_t'($urandom);
      owner = $urandom_range(0, 4);          // 4 = no owner
      gnt   = (owner < 4) ? 4'(1 << owner) : 4'b0;
      req   = 4'($urandom_range(0, 15));
      #1;
      checks++;
      if (owner < 4 && req[owner]) begin
        if (!bus_valid || bus_cmd != m_cmd[owner]) begin
          failures++; $display("FAIL owner %0d command not on bus", owner);
        end
      end else if (bus_valid || bus_cmd != '0) begin
        failures++; $display("FAIL bus not idle (owner %0d req %b)", owner, req);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
