// tb_par_reg: self-checking test of the parallel-access register.
// Checks asynchronous reset (also mid-cycle), hold when write enable is 0 and
// load when it is 1, against a reference value kept by the testbench, for an
// 8-bit and a 16-bit instance with a non-zero reset value.
module tb_par_reg;
  int checks = 0, failures = 0;
  logic clk = 0, rst, we;
  logic [7:0]  d8, q8, ref8;
  logic [15:0] d16, q16, ref16;

  par_reg #(.WIDTH(8))                             dut8  (.clk(clk), .rst(rst), .we(we), .d(d8),  .q(q8));
  par_reg #(.WIDTH(16), .RESET_VALUE(16'hBEEF))    dut16 (.clk(clk), .rst(rst), .we(we), .d(d16), .q(q16));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_q(string what);
    checks++;
    if (q8 !== ref8 || q16 !== ref16) begin
      failures++;
      $display("FAIL %s: q8=%h (exp %h) q16=%h (exp %h)", what, q8, ref8, q16, ref16);
    end
  endtask

  initial begin
    rst = 0; we = 0; d8 = '0; d16 = '0;
    #1 rst = 1;  // rising edge of the asynchronous reset, no clock edge yet
    #1;
    ref8 = 8'h00; ref16 = 16'hBEEF;
    check_q("async reset");
    @(negedge clk); rst = 0;
    for (int i = 0; i < 300; i++) begin
      we = 1'($urandom); d8 = 8'($urandom); d16 = 16'($urandom);
      @(posedge clk);
      if (we) begin ref8 = d8; ref16 = d16; end
      #1 check_q(we ? "load" : "hold");
      @(negedge clk);
    end
    // reset between clock edges takes effect at once
    #2 rst = 1; #1;
    ref8 = 8'h00; ref16 = 16'hBEEF;
    check_q("mid-cycle reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
