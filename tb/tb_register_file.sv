// tb_register_file: self-checking test of the four-register file.
// Random reads on both ports and random writes (with and without write
// enable) are compared against an array model of registers A..D.
module tb_register_file;
  int checks = 0, failures = 0;
  logic clk = 0, rst, we;
  logic [1:0] p0_sel, p1_sel, wr_sel;
  logic [7:0] wdata, p0, p1;
  logic [3:0][7:0] regs;
  logic [7:0] model [4];

  register_file #(.WIDTH(8)) dut (
    .clk(clk), .rst(rst), .p0_sel(p0_sel), .p1_sel(p1_sel), .wr_sel(wr_sel),
    .we(we), .wdata(wdata), .p0(p0), .p1(p1), .regs(regs)
  );

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; we = 0; wr_sel = 0; wdata = 0; p0_sel = 0; p1_sel = 0;
    foreach (model[r]) model[r] = 8'h00;
    @(negedge clk); rst = 0;
    for (int i = 0; i < 500; i++) begin
      p0_sel = 2'($urandom); p1_sel = 2'($urandom);
      wr_sel = 2'($urandom); we = 1'($urandom); wdata = 8'($urandom);
      #1;
      checks++;
      if (p0 !== model[p0_sel] || p1 !== model[p1_sel]) begin
        failures++;
        $display("FAIL read p0[%0d]=%h exp %h p1[%0d]=%h exp %h",
                 p0_sel, p0, model[p0_sel], p1_sel, p1, model[p1_sel]);
      end
      @(posedge clk);
      if (we) model[wr_sel] = wdata;
      #1;
      for (int r = 0; r < 4; r++) begin
        checks++;
        if (regs[r] !== model[r]) begin
          failures++; $display("FAIL reg %0d = %h exp %h", r, regs[r], model[r]);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
