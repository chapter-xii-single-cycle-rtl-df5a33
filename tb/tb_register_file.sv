// tb_register_file: self-checking test of the register file against an array
// model kept in the testbench. Checks reset, writes gated by rwe, two
// independent combinational read ports, and that a register read and written
// in the same cycle shows its old value until the clock edge.
module tb_register_file;
  logic        clk = 0, rst_n;
  logic [4:0]  x_ra, y_ra, z_wa;
  logic        rwe;
  logic [31:0] z_data, x_data, y_data;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  register_file #(.WIDTH(32), .NREGS(32)) dut (
    .clk(clk), .rst_n(rst_n), .x_ra(x_ra), .y_ra(y_ra), .z_wa(z_wa), .rwe(rwe),
    .z_data(z_data), .x_data(x_data), .y_data(y_data)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_reads(input string what);
    checks += 2;
    if (x_data !== model[x_ra]) begin
      failures++; $display("FAIL %s X r%0d got %h exp %h", what, x_ra, x_data, model[x_ra]);
    end
    if (y_data !== model[y_ra]) begin
      failures++; $display("FAIL %s Y r%0d got %h exp %h", what, y_ra, y_data, model[y_ra]);
    end
  endtask

  initial begin
    rst_n = 0; rwe = 0; x_ra = 0; y_ra = 0; z_wa = 0; z_data = 0;
    @(negedge clk); @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 32; i++) model[i] = 0;
    // Every register reads zero after reset
    for (int i = 0; i < 32; i++) begin
      x_ra = 5'(i); y_ra = 5'(31 - i); #1; check_reads("reset");
    end
    // Fill every register
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      rwe = 1; z_wa = 5'(i); z_data = $urandom;
      x_ra = 5'(i); y_ra = 5'(i); #1;
      check_reads("before write");        // old value still visible
      @(posedge clk); model[i] = z_data;
      #1; check_reads("after write");
    end
    // Random mix of reads and gated writes
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      rwe = 1'($urandom); z_wa = 5'($urandom); z_data = $urandom;
      x_ra = 5'($urandom); y_ra = 5'($urandom);
      #1; check_reads("random");
      @(posedge clk); if (rwe) model[z_wa] = z_data;
    end
    @(negedge clk); rwe = 0;
    for (int i = 0; i < 32; i++) begin
      x_ra = 5'(i); y_ra = 5'((i + 7) % 32); #1; check_reads("final");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
