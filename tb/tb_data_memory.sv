// tb_data_memory: self-checking test of the 16 x 8 data memory.
// Checks that reset loads the initial contents (here a custom table), then
// runs random writes and reads against an array model, checking the read
// port and the all-cells output used by the video card.
module tb_data_memory;
  int checks = 0, failures = 0;
  logic clk = 0, rst, we;
  logic [3:0] addr;
  logic [7:0] wdata, rdata;
  logic [15:0][7:0] mem;
  logic [7:0] model [16];

  localparam logic [15:0][7:0] INIT = '{0: 8'h07, 1: 8'h03, 2: 8'h02, 3: 8'h01,
                                         4: 8'h06, 5: 8'h04, 6: 8'h05, 7: 8'h08,
                                         8: 8'h07, default: 8'h00};

  data_memory #(.DEPTH(16), .WIDTH(8), .INIT(INIT)) dut (
    .clk(clk), .rst(rst), .addr(addr), .we(we), .wdata(wdata), .rdata(rdata), .mem(mem)
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
    rst = 1; we = 0; addr = 0; wdata = 0;
    for (int i = 0; i < 16; i++) model[i] = INIT[i];
    @(negedge clk); rst = 0;
    for (int i = 0; i < 16; i++) begin
      addr = 4'(i); #1;
      checks++;
      if (rdata !== model[i]) begin
        failures++; $display("FAIL init [%0d]=%h exp %h", i, rdata, model[i]);
      end
    end
    for (int i = 0; i < 500; i++) begin
      addr = 4'($urandom); we = 1'($urandom); wdata = 8'($urandom);
      #1;
      checks++;
      if (rdata !== model[addr]) begin
        failures++; $display("FAIL read [%0d]=%h exp %h", addr, rdata, model[addr]);
      end
      @(posedge clk);
      if (we) model[addr] = wdata;
      #1;
      for (int k = 0; k < 16; k++) begin
        checks++;
        if (mem[k] !== model[k]) begin
          failures++; $display("FAIL cell %0d = %h exp %h", k, mem[k], model[k]);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
