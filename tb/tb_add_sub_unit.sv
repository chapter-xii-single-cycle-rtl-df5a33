// tb_add_sub_unit: self-checking test of the adder/subtractor. Drives corner
// values and random operands in both modes and with the unit disabled, and
// compares with results computed in the testbench at 64-bit precision and
// truncated to 32 bits.
module tb_add_sub_unit;
  logic        en, as_n;
  logic [31:0] x, y, z;
  int checks = 0, failures = 0;

  add_sub_unit #(.WIDTH(32)) dut (.en(en), .as_n(as_n), .x(x), .y(y), .z(z));

  task automatic check(input logic [31:0] exp, input string what);
    #1;
    checks++;
    if (z !== exp) begin
      failures++;
      $display("FAIL %s: x=%h y=%h en=%b as=%b got %h exp %h", what, x, y, en, as_n, z, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned ref_v;
    // Corner cases
    en = 1; as_n = 0; x = 32'h0000_0001; y = 32'h0000_0003; check(32'h4, "1+3");
    as_n = 1; x = 32'h0000_0001; y = 32'h0000_0003; check(32'hFFFF_FFFE, "1-3");
    as_n = 0; x = 32'hFFFF_FFFF; y = 32'h1; check(32'h0, "wrap add");
    as_n = 1; x = 32'h0; y = 32'h1; check(32'hFFFF_FFFF, "wrap sub");
    as_n = 1; x = 32'h8000_0000; y = 32'h8000_0000; check(32'h0, "sub equal");
    for (int i = 0; i < 2000; i++) begin
      x = $urandom; y = $urandom; as_n = 1'($urandom); en = ($urandom % 4) != 0;
      ref_v = as_n ? (64'(x) - 64'(y)) : (64'(x) + 64'(y));
      check(en ? ref_v[31:0] : 32'h0, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
