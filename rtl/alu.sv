// alu: arithmetic logic unit formed from the adder/subtractor (AU), logic
// unit (LU) and shift unit (SU).
//
// All three see the X and Y buses; each has its own enable in ctl, and at
// most one may be set in a cycle because the three share the Z bus. A
// disabled unit outputs zeros, so the ALU output is the OR of the three.
// With no enable set ("ALU disabled", as for a memory access) the output is
// zero and active is 0, leaving the Z bus to the memory load gate. An
// assertion flags two units enabled at once. Purely combinational.
module alu
  import dpu_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  alu_ctl_t         ctl,
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  output logic [WIDTH-1:0] z,
  output logic             active
);

  logic [WIDTH-1:0] z_au, z_lu, z_su;

  add_sub_unit #(.WIDTH(WIDTH)) u_au (
    .en(ctl.au_en), .as_n(ctl.as_n), .x(x), .y(y), .z(z_au)
  );

  logic_unit #(.WIDTH(WIDTH)) u_lu (
    .en(ctl.lu_en), .lf(ctl.lf), .x(x), .y(y), .z(z_lu)
  );

  shift_unit #(.WIDTH(WIDTH)) u_su (
    .en(ctl.su_en), .st(ctl.st), .x(x), .y(y), .z(z_su)
  );

  assign z      = z_au | z_lu | z_su;
  assign active = ctl.au_en | ctl.lu_en | ctl.su_en;

  always_comb begin
    assert ($onehot0({ctl.au_en, ctl.lu_en, ctl.su_en}))
      else $error("alu: more than one of AU/LU/SU enabled");
  end

endmodule
