// add_sub_unit (AU): WIDTH-bit adder/subtractor of the datapath.
//
// With as_n = 0 it adds, z = x + y; with as_n = 1 it subtracts, z = x - y,
// computed as x + ~y + 1 on one adder. The result wraps modulo 2**WIDTH; no
// flags are produced. When en is 0 the unit does not drive the Z bus: its
// output is all zeros so that the enabled unit alone sets the OR-combined bus
// (standing in for a high-impedance output). Purely combinational.
module add_sub_unit #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             en,
  input  logic             as_n,
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  output logic [WIDTH-1:0] z
);

  logic [WIDTH-1:0] y_op;
  logic [WIDTH-1:0] sum;

  always_comb begin
    y_op = as_n ? ~y : y;
    sum  = x + y_op + WIDTH'(as_n);
    z    = en ? sum : '0;
  end

endmodule
