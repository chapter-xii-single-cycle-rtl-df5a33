// tb_alu: self-checking test of the ALU. Random operands with each of the
// three units enabled alone, and with none enabled, against results computed
// in the testbench; also checks the active flag.
module tb_alu;
  import dpu_pkg::*;
  alu_ctl_t    ctl;
  logic [31:0] x, y, z;
  logic        active;
  int checks = 0, failures = 0;

  alu #(.WIDTH(32)) dut (.ctl(ctl), .x(x), .y(y), .z(z), .active(active));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] exp;
    int unit;
    logic [1:0] f;
    logic [4:0] d;
    for (int i = 0; i < 4000; i++) begin
      unit = i % 4;                // 0 none, 1 AU, 2 LU, 3 SU
      ctl = '0;
      x = $urandom; y = $urandom; f = 2'($urandom);
      d = y[4:0];
      ctl.as_n = 1'($urandom);
      ctl.lf   = logic_fn_e'(f);
      ctl.st   = shift_type_e'(f);
      ctl.au_en = (unit == 1);
      ctl.lu_en = (unit == 2);
      ctl.su_en = (unit == 3);
      case (unit)
        1: exp = ctl.as_n ? x - y : x + y;
        2: case (f)
             2'b00: exp = x & y;
             2'b01: exp = x | y;
             2'b10: exp = x ^ y;
             default: exp = ~x;
           endcase
        3: case (f)
             2'b00: exp = x << d;
             2'b01: exp = x >> d;
             2'b10: exp = 32'($signed(x) >>> d);
             default: exp = (x >> d) | (d == 0 ? 32'h0 : x << (6'd32 - 6'(d)));
           endcase
        default: exp = 32'h0;
      endcase
      #1;
      checks += 2;
      if (z !== exp) begin
        failures++; $display("FAIL unit=%0d f=%b x=%h y=%h got %h exp %h", unit, f, x, y, z, exp);
      end
      if (active !== (unit != 0)) begin
        failures++; $display("FAIL active unit=%0d got %b", unit, active);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
