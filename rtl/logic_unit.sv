// logic_unit (LU): WIDTH-bit bitwise logic unit of the datapath.
//
// The function code lf selects AND, OR, XOR of the X and Y buses, or NOT X
// (encoding in dpu_pkg::logic_fn_e, a choice of this design). When en is 0
// the output is all zeros so the unit does not disturb the OR-combined Z bus.
// Purely combinational.
module logic_unit
  import dpu_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic             en,
  input  logic_fn_e        lf,
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  output logic [WIDTH-1:0] z
);

  logic [WIDTH-1:0] res;

  always_comb begin
    unique case (lf)
      LF_AND:  res = x & y;
      LF_OR:   res = x | y;
      LF_XOR:  res = x ^ y;
      default: res = ~x;
    endcase
    z = en ? res : '0;
  end

endmodule
