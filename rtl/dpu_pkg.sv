// dpu_pkg: shared word size, control encodings and the microcode word of the
// single cycle datapath unit.
//
// The datapath is built from 32-bit elements around a 32-entry register file;
// those two numbers are the defaults below. One microcode word holds every
// control signal the datapath needs for one clock cycle. The unit enables,
// the add/subtract line, the 2-bit shift type, the register addresses, the
// immediate controls and the memory controls are the datapath's own signals.
// The logic-unit function codes and the shift codes other than 00 (logical
// shift) are this design's choice.
package dpu_pkg;

  localparam int unsigned WORD_W  = 32;  // data and address width
  localparam int unsigned NUM_REG = 32;  // registers in the register file
  localparam int unsigned REG_AW  = $clog2(NUM_REG);

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [REG_AW-1:0] reg_addr_t;

  // Shift unit type (ST). 00 is the logical shift; the rest are this design's.
  typedef enum logic [1:0] {
    ST_LSL = 2'b00,  // logical shift left
    ST_LSR = 2'b01,  // logical shift right
    ST_ASR = 2'b10,  // arithmetic shift right
    ST_ROR = 2'b11   // rotate right
  } shift_type_e;

  // Logic unit function (this design's encoding).
  typedef enum logic [1:0] {
    LF_AND = 2'b00,
    LF_OR  = 2'b01,
    LF_XOR = 2'b10,
    LF_NOT = 2'b11   // NOT X
  } logic_fn_e;

  // ALU controls: one enable per unit, at most one set in a cycle.
  typedef struct packed {
    logic        au_en;  // adder/subtractor drives Z
    logic        as_n;   // 0 = add, 1 = subtract
    logic        lu_en;  // logic unit drives Z
    logic_fn_e   lf;
    logic        su_en;  // shift unit drives Z
    shift_type_e st;
  } alu_ctl_t;

  // One microcode word: all control signals for one clock cycle.
  typedef struct packed {
    alu_ctl_t  alu;
    reg_addr_t x_ra;   // register on X bus
    reg_addr_t y_ra;   // register on Y bus
    reg_addr_t z_wa;   // register written from Z bus
    logic      rwe;    // register write enable
    logic      im_en;  // immediate register drives Y bus
    word_t     im_va;  // immediate value
    logic      st_en;  // store gate: Y bus -> memory data
    logic      ld_en;  // load gate: memory data -> Z bus
    logic      rw;     // memory read/write line: 0 = read, 1 = write
    logic      msel;   // memory select
  } ucode_t;

endpackage
