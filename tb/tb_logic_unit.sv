// tb_logic_unit: self-checking test of the logic unit. Every function code
// with random operands, plus the disabled case, against bitwise results
// computed one bit at a time in the testbench.
module tb_logic_unit;
  import dpu_pkg::*;
  logic        en;
  logic_fn_e   lf;
  logic [31:0] x, y, z;
  int checks = 0, failures = 0;

  logic_unit #(.WIDTH(32)) dut (.en(en), .lf(lf), .x(x), .y(y), .z(z));

  function automatic logic [31:0] model(logic [1:0] f, logic [31:0] a, logic [31:0] b);
    logic [31:0] r;
    for (int i = 0; i < 32; i++) begin
      case (f)
        2'b00: r[i] = (a[i] == 1'b1 && b[i] == 1'b1);
        2'b01: r[i] = (a[i] == 1'b1 || b[i] == 1'b1);
        2'b10: r[i] = (a[i] != b[i]);
        default: r[i] = (a[i] == 1'b0);
      endcase
    end
    return r;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] f;
    logic [31:0] exp;
    for (int i = 0; i < 2000; i++) begin
      f = 2'(i % 4);
      lf = logic_fn_e'(f);
      x = $urandom; y = $urandom; en = (i % 7) != 0;
      #1;
      exp = en ? model(f, x, y) : 32'h0;
      checks++;
      if (z !== exp) begin
        failures++;
        $display("FAIL lf=%b x=%h y=%h en=%b got %h exp %h", f, x, y, en, z, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
