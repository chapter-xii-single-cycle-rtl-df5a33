// single_cycle_dpu: a single cycle datapath unit with a triple bus internal
// architecture, an immediate register and an external memory interface.
//
// Three internal buses connect the parts. The register file's two read ports
// put registers x_ra and y_ra on the X and Y buses; the immediate register
// can take over the Y bus instead (im_en). The ALU (adder/subtractor, logic
// unit, shift unit, at most one enabled) combines X and Y onto the Z bus, or,
// for a load, the load gate puts the memory's data on the Z bus. When rwe is 1
// the Z bus is written into register z_wa at the rising edge that ends the
// cycle. For memory the X bus is the address; the store gate puts the Y bus on
// the memory data lines; rw (0 read, 1 write) and msel go straight to the
// memory. Every operation, from R3 = R1 + R2 to R4 = M[R7] and M[R5] = R9,
// takes exactly one clock cycle.
//
// Interface: uc is the microcode word, all control signals for the current
// cycle, applied from outside at the start of the cycle. The memory is
// outside this module: its address, write data (valid when mem_drive is 1),
// read/write and select lines are outputs and its read data is an input,
// which must be valid in the same cycle. The three buses are brought out for
// observation.
//
// The bus structure, the control signals and their meaning follow the
// datapath described for this machine. Modelling high impedance by gating
// drivers to zero and OR-ing them, the logic and shift function codes, the
// split memory data lines and the reset are this design's choices.
module single_cycle_dpu
  import dpu_pkg::*;
#(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned NREGS = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  ucode_t           uc,
  output logic [WIDTH-1:0] mem_addr,
  output logic [WIDTH-1:0] mem_wdata,
  output logic             mem_drive,
  input  logic [WIDTH-1:0] mem_rdata,
  output logic             mem_rw,
  output logic             mem_msel,
  output logic [WIDTH-1:0] x_bus,
  output logic [WIDTH-1:0] y_bus,
  output logic [WIDTH-1:0] z_bus
);

  localparam int unsigned AW = $clog2(NREGS);

  logic [WIDTH-1:0] rf_y;
  logic [WIDTH-1:0] z_alu;
  logic [WIDTH-1:0] z_ld;
  logic             alu_active;

  register_file #(.WIDTH(WIDTH), .NREGS(NREGS)) u_rf (
    .clk    (clk),
    .rst_n  (rst_n),
    .x_ra   (AW'(uc.x_ra)),
    .y_ra   (AW'(uc.y_ra)),
    .z_wa   (AW'(uc.z_wa)),
    .rwe    (uc.rwe),
    .z_data (z_bus),
    .x_data (x_bus),
    .y_data (rf_y)
  );

  immediate_register #(.WIDTH(WIDTH)) u_imm (
    .im_en (uc.im_en),
    .im_va (WIDTH'(uc.im_va)),
    .rf_y  (rf_y),
    .y_bus (y_bus)
  );

  alu #(.WIDTH(WIDTH)) u_alu (
    .ctl    (uc.alu),
    .x      (x_bus),
    .y      (y_bus),
    .z      (z_alu),
    .active (alu_active)
  );

  memory_gates #(.WIDTH(WIDTH)) u_mg (
    .st_en     (uc.st_en),
    .ld_en     (uc.ld_en),
    .y_bus     (y_bus),
    .mem_rdata (mem_rdata),
    .mem_wdata (mem_wdata),
    .mem_drive (mem_drive),
    .z_ld      (z_ld)
  );

  assign z_bus    = z_alu | z_ld;
  assign mem_addr = x_bus;
  assign mem_rw   = uc.rw;
  assign mem_msel = uc.msel;

  // Only one driver may own the Z bus in a cycle.
  always_comb begin
    assert (!(alu_active && uc.ld_en))
      else $error("single_cycle_dpu: ALU and memory load both drive the Z bus");
  end

endmodule
