// tb_bus_mux2: self-checking test of the 2-to-1 bus multiplexer.
// Drives random u, v, sel into an 8-bit and a 6-bit instance (the two widths
// the CPU uses) and compares z with the expected selection.
module tb_bus_mux2;
  int checks = 0, failures = 0;
  logic [7:0] u8, v8, z8;
  logic [5:0] u6, v6, z6;
  logic       s8, s6;

  bus_mux2 #(.WIDTH(8)) dut8 (.u(u8), .v(v8), .sel(s8), .z(z8));
  bus_mux2 #(.WIDTH(6)) dut6 (.u(u6), .v(v6), .sel(s6), .z(z6));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      u8 = 8'($urandom); v8 = 8'($urandom); s8 = 1'($urandom);
      u6 = 6'($urandom); v6 = 6'($urandom); s6 = 1'($urandom);
      #1;
      checks++;
      if (z8 !== (s8 ? v8 : u8)) begin
        failures++; $display("FAIL 8-bit u=%h v=%h s=%b z=%h", u8, v8, s8, z8);
      end
      checks++;
      if (z6 !== (s6 ? v6 : u6)) begin
        failures++; $display("FAIL 6-bit u=%h v=%h s=%b z=%h", u6, v6, s6, z6);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
