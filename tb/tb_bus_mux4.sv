// tb_bus_mux4: self-checking test of the 4-to-1 bus multiplexer.
// Random data on inputs a..d; every select value is checked against the
// input it should pass (00 a, 01 b, 10 c, 11 d).
module tb_bus_mux4;
  int checks = 0, failures = 0;
  logic [7:0] a, b, c, d, q, exp_q;
  logic [1:0] sel;

  bus_mux4 #(.WIDTH(8)) dut (.a(a), .b(b), .c(c), .d(d), .sel(sel), .q(q));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      a = 8'($urandom); b = 8'($urandom); c = 8'($urandom); d = 8'($urandom);
      for (int s = 0; s < 4; s++) begin
        sel = 2'(s);
        #1;
        exp_q = (s == 0) ? a : (s == 1) ? b : (s == 2) ? c : d;
        checks++;
        if (q !== exp_q) begin
          failures++; $display("FAIL sel=%0d q=%h expected %h", s, q, exp_q);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
