// memory_gates: the two transmission gates between the datapath buses and
// the data lines of the external memory.
//
// The store gate (st_en) passes the Y bus to the memory data lines; the load
// gate (ld_en) passes the memory data lines onto the Z bus. The memory's
// bidirectional data lines are split here into mem_wdata (driven when
// mem_drive is 1) and mem_rdata. A closed gate contributes zeros, so the load
// value can be OR-combined with the ALU on the Z bus. The memory address comes
// straight from the X bus outside this module. An assertion flags both gates
// open at once. Purely combinational.
module memory_gates #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             st_en,
  input  logic             ld_en,
  input  logic [WIDTH-1:0] y_bus,
  input  logic [WIDTH-1:0] mem_rdata,
  output logic [WIDTH-1:0] mem_wdata,
  output logic             mem_drive,
  output logic [WIDTH-1:0] z_ld
);

  always_comb begin
    mem_drive = st_en;
    mem_wdata = st_en ? y_bus : '0;
    z_ld      = ld_en ? mem_rdata : '0;
  end

  always_comb begin
    assert (!(st_en && ld_en))
      else $error("memory_gates: store and load gates open together");
  end

endmodule
