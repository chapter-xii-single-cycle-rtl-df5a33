// immediate_register: the immediate source of the Y bus.
//
// im_en decides who drives the Y bus. With im_en = 1 the immediate register
// puts its value, im_va, on the bus and the register file's Y data out is
// released; with im_en = 0 the immediate register is released and the
// register file's Y data out drives the bus. The two released (high
// impedance) states are modelled as a 2:1 select. im_va is taken as a full
// WIDTH-bit word supplied by the microcode of the same cycle, so that an
// operation such as R28 = R5 + immediate completes in one cycle.
// Purely combinational.
module immediate_register #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             im_en,
  input  logic [WIDTH-1:0] im_va,
  input  logic [WIDTH-1:0] rf_y,
  output logic [WIDTH-1:0] y_bus
);

  always_comb y_bus = im_en ? im_va : rf_y;

endmodule
