// tb_flags_register: self-checking test of the flags register.
// Random flag values with random write enables; the stored value must follow
// a testbench copy, and reset must clear it.
module tb_flags_register;
  import i281_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst, we;
  flags_t d, q, model;

  flags_register dut (.clk(clk), .rst(rst), .we(we), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; we = 0; d = '1; model = '0;
    @(negedge clk);
    checks++;
    if (q !== 3'b000) begin failures++; $display("FAIL reset q=%b", q); end
    rst = 0;
    for (int i = 0; i < 300; i++) begin
      we = 1'($urandom); d = flags_t'($urandom);
      @(posedge clk);
      if (we) model = d;
      #1;
      checks++;
      if (q !== model) begin failures++; $display("FAIL q=%b exp %b", q, model); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
