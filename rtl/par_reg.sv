// par_reg: parallel-access register with write enable and reset.
//
// Each bit is a rising-edge D flip-flop whose D input comes from a 2-to-1
// mux: its own Q when we is 0 (hold), the new input d when we is 1 (load).
// rst is active high and asynchronous, clearing (or presetting to
// RESET_VALUE) every bit, as in the published drawing where Reset is inverted
// onto the flip-flops' clear inputs. The i281 builds its registers A-D
// (8 bits), data memory cells (8 bits) and code memory words (16 bits) from
// this circuit. q changes one clock after we/d are sampled.
module par_reg #(
  parameter int unsigned     WIDTH       = 8,
  parameter logic [WIDTH-1:0] RESET_VALUE = '0
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             we,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] next;

  bus_mux2 #(.WIDTH(WIDTH)) u_hold_mux (.u(q), .v(d), .sel(we), .z(next));

  always_ff @(posedge clk or posedge rst) begin
    if (rst) q <= RESET_VALUE;
    else     q <= next;
  end

endmodule
