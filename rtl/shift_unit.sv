// shift_unit (SU): WIDTH-bit barrel shifter of the datapath.
//
// The X bus carries the value and the low log2(WIDTH) bits of the Y bus the
// distance. ST = 00 is a logical shift (taken here as left); 01 logical right,
// 10 arithmetic right and 11 rotate right are this design's choice for the
// other codes. When en is 0 the output is all zeros so the unit does not
// disturb the OR-combined Z bus. Purely combinational. The upper bits of y
// and the upper half of the doubled word used for the rotate are unused by
// design, which lint reports.
module shift_unit
  import dpu_pkg::*;
#(
  parameter int unsigned WIDTH = 32,
  localparam int unsigned SW   = $clog2(WIDTH)
) (
  input  logic             en,
  input  shift_type_e      st,
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  output logic [WIDTH-1:0] z
);

  logic [SW-1:0]      sh_dist;
  logic [WIDTH-1:0]   res;
  logic [2*WIDTH-1:0] rot;

  always_comb begin
    sh_dist = y[SW-1:0];
    rot  = {x, x} >> sh_dist;
    unique case (st)
      ST_LSL:  res = x << sh_dist;
      ST_LSR:  res = x >> sh_dist;
      ST_ASR:  res = WIDTH'($signed(x) >>> sh_dist);
      default: res = rot[WIDTH-1:0];
    endcase
    z = en ? res : '0;
  end

endmodule
