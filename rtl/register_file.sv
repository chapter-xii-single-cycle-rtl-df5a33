// register_file: NREGS x WIDTH register file with two read ports and one
// write port, the storage of the triple bus datapath.
//
// x_ra and y_ra select the registers put on the X bus and on the register
// file's Y data out; both reads are combinational. When rwe is 1 the value on
// z_data is written into register z_wa at the rising clock edge that ends the
// cycle, so a register read and written in the same cycle gives its old value
// on X/Y and holds the new one from the next cycle on. Reset (synchronous,
// active low) clears every register; the reset is this design's addition.
module register_file #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned NREGS = 32,
  localparam int unsigned AW   = $clog2(NREGS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [AW-1:0]    x_ra,
  input  logic [AW-1:0]    y_ra,
  input  logic [AW-1:0]    z_wa,
  input  logic             rwe,
  input  logic [WIDTH-1:0] z_data,
  output logic [WIDTH-1:0] x_data,
  output logic [WIDTH-1:0] y_data
);

  logic [WIDTH-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (rwe) begin
      regs[z_wa] <= z_data;
    end
  end

  assign x_data = regs[x_ra];
  assign y_data = regs[y_ra];

endmodule
