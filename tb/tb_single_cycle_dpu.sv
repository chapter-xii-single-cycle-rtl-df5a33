// tb_single_cycle_dpu: end-to-end test of the single cycle datapath at its
// default size (32-bit words, 32 registers), with a behavioural external
// memory (mem_model).
//
// First it runs the worked operations of the datapath one microcode word per
// cycle: R3 = R1 + R2, R2 = R1 + R2 with R1 = 1 and R2 = 3 (R2 must read 3
// during the cycle and hold 4 after it), a logical shift of R15 by R6,
// R28 = R5 + immediate, the load R4 = M[R7] and the store M[R5] = R9. Then it
// runs a long random microcode stream against a reference model of the
// register file and memory kept in the testbench, checking the Z bus every
// cycle and every register at the end. Each operation must be complete one
// clock edge after its microcode is applied. Every mechanism (add, subtract,
// each logic and shift function, immediate operand, load, store, read and
// write of one register in one cycle, a write suppressed by rwe = 0) is
// counted, and one that never happened counts as a failure.
module tb_single_cycle_dpu;
  import dpu_pkg::*;

  logic        clk = 0, rst_n;
  ucode_t      uc;
  logic [31:0] mem_addr, mem_wdata, mem_rdata, x_bus, y_bus, z_bus;
  logic        mem_drive, mem_rw, mem_msel;
  int checks = 0, failures = 0;

  single_cycle_dpu dut (
    .clk(clk), .rst_n(rst_n), .uc(uc),
    .mem_addr(mem_addr), .mem_wdata(mem_wdata), .mem_drive(mem_drive),
    .mem_rdata(mem_rdata), .mem_rw(mem_rw), .mem_msel(mem_msel),
    .x_bus(x_bus), .y_bus(y_bus), .z_bus(z_bus)
  );

  mem_model #(.DEPTH(256)) u_mem (
    .clk(clk), .addr(mem_addr), .wdata(mem_wdata), .drive(mem_drive),
    .rw(mem_rw), .msel(mem_msel), .rdata(mem_rdata)
  );

  always #5 clk = ~clk;

  // Reference model
  logic [31:0] rmodel [32];
  logic [31:0] mmodel [256];

  logic [31:0] last_y;  // Y bus seen during the last step

  // Mechanism counters
  int n_add = 0, n_sub = 0, n_imm = 0, n_load = 0, n_store = 0;
  int n_lf [4] = '{0, 0, 0, 0};
  int n_st [4] = '{0, 0, 0, 0};
  int n_rmw = 0, n_nowrite = 0, n_cycles = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  // Reference result of one microcode word, from the model state.
  function automatic logic [31:0] ref_z(ucode_t u);
    logic [31:0] xv, yv;
    logic [4:0]  d;
    xv = rmodel[u.x_ra];
    yv = u.im_en ? u.im_va : rmodel[u.y_ra];
    d  = yv[4:0];
    if (u.alu.au_en) return u.alu.as_n ? xv - yv : xv + yv;
    if (u.alu.lu_en)
      case (u.alu.lf)
        LF_AND:  return xv & yv;
        LF_OR:   return xv | yv;
        LF_XOR:  return xv ^ yv;
        default: return ~xv;
      endcase
    if (u.alu.su_en)
      case (u.alu.st)
        ST_LSL:  return xv << d;
        ST_LSR:  return xv >> d;
        ST_ASR:  return 32'($signed(xv) >>> d);
        default: return (xv >> d) | (d == 0 ? 32'h0 : xv << (6'd32 - 6'(d)));
      endcase
    if (u.ld_en && u.msel && u.rw == 1'b0) return mmodel[xv[7:0]];
    return 32'h0;
  endfunction

  // Apply one microcode word for one cycle: check the Z bus before the edge,
  // update the model at the edge, and count mechanisms.
  task automatic step(input ucode_t u, input string what);
    logic [31:0] exp;
    @(negedge clk);
    uc = u;
    #1;
    exp = ref_z(u);
    last_y = y_bus;
    expect_eq(z_bus, exp, {what, " Z bus"});
    if (u.alu.au_en) begin if (u.alu.as_n) n_sub++; else n_add++; end
    if (u.alu.lu_en) n_lf[u.alu.lf]++;
    if (u.alu.su_en) n_st[u.alu.st]++;
    if (u.im_en && (u.alu.au_en || u.alu.lu_en || u.alu.su_en)) n_imm++;
    if (u.ld_en && u.msel && !u.rw && u.rwe) n_load++;
    if (u.st_en && u.msel && u.rw) n_store++;
    if (u.rwe && (u.z_wa == u.x_ra || (!u.im_en && u.z_wa == u.y_ra))) n_rmw++;
    if (!u.rwe && (u.alu.au_en || u.alu.lu_en || u.alu.su_en)) n_nowrite++;
    @(posedge clk);
    #1;
    n_cycles++;
    if (u.rwe) rmodel[u.z_wa] = exp;
    if (u.st_en && u.msel && u.rw) mmodel[rmodel[u.x_ra][7:0]] = (u.im_en ? u.im_va : rmodel[u.y_ra]);
  endtask

  // Read a register through the X bus with everything else disabled.
  task automatic expect_reg(input int r, input logic [31:0] exp, input string what);
    ucode_t u;
    @(negedge clk);
    u = '0; u.x_ra = 5'(r);
    uc = u;
    #1;
    expect_eq(x_bus, exp, what);
    expect_eq(x_bus, rmodel[r], {what, " (model)"});
  endtask

  function automatic ucode_t op_add(int z, int x, int y, logic sub = 0);
    ucode_t u = '0;
    u.alu.au_en = 1; u.alu.as_n = sub;
    u.x_ra = 5'(x); u.y_ra = 5'(y); u.z_wa = 5'(z); u.rwe = 1;
    return u;
  endfunction

  function automatic ucode_t op_addi(int z, int x, logic [31:0] imm);
    ucode_t u = '0;
    u.alu.au_en = 1; u.im_en = 1; u.im_va = imm;
    u.x_ra = 5'(x); u.z_wa = 5'(z); u.rwe = 1;
    return u;
  endfunction

  function automatic ucode_t op_load(int z, int a);
    ucode_t u = '0;
    u.x_ra = 5'(a); u.z_wa = 5'(z); u.rwe = 1;
    u.ld_en = 1; u.rw = 1'b0; u.msel = 1;
    return u;
  endfunction

  function automatic ucode_t op_store(int a, int d);
    ucode_t u = '0;
    u.x_ra = 5'(a); u.y_ra = 5'(d);
    u.st_en = 1; u.rw = 1'b1; u.msel = 1;
    return u;
  endfunction

  function automatic ucode_t rand_op();
    ucode_t u = '0;
    int kind = $urandom_range(0, 6);
    u.x_ra = 5'($urandom); u.y_ra = 5'($urandom); u.z_wa = 5'($urandom);
    u.rwe = ($urandom % 8) != 0;
    u.im_en = ($urandom % 4) == 0;
    u.im_va = ($urandom % 2) ? $urandom : 32'($urandom_range(0, 40));
    case (kind)
      0, 1: begin u.alu.au_en = 1; u.alu.as_n = 1'($urandom); end
      2:    begin u.alu.lu_en = 1; u.alu.lf = logic_fn_e'($urandom); end
      3:    begin u.alu.su_en = 1; u.alu.st = shift_type_e'($urandom); end
      4:    begin u.ld_en = 1; u.msel = 1; u.rw = 1'b0; u.im_en = 0; end
      5:    begin u.st_en = 1; u.msel = 1; u.rw = 1'b1; u.rwe = 0; end
      default: begin u.rwe = 0; u.im_en = 0; end
    endcase
    return u;
  endfunction

  initial begin
    ucode_t u;
    uc = '0;
    rst_n = 0;
    for (int i = 0; i < 32; i++) rmodel[i] = 0;
    for (int i = 0; i < 256; i++) mmodel[i] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // Set up R1 = 1, R2 = 3 with immediates (R0 is zero after reset).
    step(op_addi(1, 0, 32'h1), "R1 = R0 + 1");
    step(op_addi(2, 0, 32'h3), "R2 = R0 + 3");

    // R3 = R1 + R2: result one edge later.
    step(op_add(3, 1, 2), "R3 = R1 + R2");
    expect_reg(3, 32'h4, "R3 after R3 = R1 + R2");

    // R2 = R1 + R2: Y bus shows the old R2 during the cycle.
    step(op_add(2, 1, 2), "R2 = R1 + R2");
    expect_eq(last_y, 32'h3, "old R2 on Y during R2 = R1 + R2");
    expect_reg(2, 32'h4, "R2 after R2 = R1 + R2");

    // Logical shift of R15 by the distance in R6, result back in R15.
    step(op_addi(15, 0, 32'h8000_00F1), "R15 = imm");
    step(op_addi(6, 0, 32'd4), "R6 = 4");
    u = '0; u.alu.su_en = 1; u.alu.st = ST_LSL;
    u.x_ra = 5'd15; u.y_ra = 5'd6; u.z_wa = 5'd15; u.rwe = 1;
    step(u, "R15 = R15 shifted by R6");
    expect_reg(15, 32'h0000_0F10, "R15 after shift");

    // R28 = R5 + immediate.
    step(op_addi(5, 0, 32'd20), "R5 = 20");
    step(op_addi(28, 5, 32'h100), "R28 = R5 + imm");
    expect_reg(28, 32'd276, "R28 after R28 = R5 + imm");

    // M[R5] = R9, then R4 = M[R7] with R7 = R5.
    step(op_addi(9, 0, 32'hCAFE_F00D), "R9 = imm");
    step(op_store(5, 9), "M[R5] = R9");
    expect_eq(u_mem.mem[20], 32'hCAFE_F00D, "memory word after M[R5] = R9");
    step(op_addi(7, 5, 32'h0), "R7 = R5");
    step(op_load(4, 7), "R4 = M[R7]");
    expect_reg(4, 32'hCAFE_F00D, "R4 after R4 = M[R7]");

    // rwe = 0: nothing is written.
    u = op_add(4, 1, 2); u.rwe = 0;
    step(u, "R4 = R1 + R2 with rwe = 0");
    expect_reg(4, 32'hCAFE_F00D, "R4 unchanged with rwe = 0");

    // Random microcode stream against the reference model.
    for (int i = 0; i < 20000; i++) begin
      u = rand_op();
      step(u, $sformatf("random op %0d", i));
    end
    for (int r = 0; r < 32; r++) expect_reg(r, rmodel[r], $sformatf("final R%0d", r));
    for (int a = 0; a < 256; a++) expect_eq(u_mem.mem[a], mmodel[a], $sformatf("final M[%0d]", a));

    // Every mechanism must have happened.
    begin
      int counts [12];
      string names [12];
      counts = '{n_add, n_sub, n_lf[0], n_lf[1], n_lf[2], n_lf[3],
                 n_st[0] + n_st[1] + n_st[2] + n_st[3], n_imm, n_load, n_store, n_rmw, n_nowrite};
      names  = '{"add", "subtract", "AND", "OR", "XOR", "NOT", "shift", "immediate",
                 "load", "store", "same-register read/write", "rwe=0"};
      for (int k = 0; k < 12; k++) begin
        checks++;
        if (counts[k] == 0) begin failures++; $display("FAIL mechanism %s never happened", names[k]); end
        else $display("mechanism %-26s %0d", names[k], counts[k]);
      end
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (n_st[k] == 0) begin failures++; $display("FAIL shift type %0d never happened", k); end
      end
    end
    $display("cycles: %0d operations in %0d cycles", n_cycles, n_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
