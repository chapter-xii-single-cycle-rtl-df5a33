// tb_shift_unit: self-checking test of the shift unit. Every shift type and
// every distance 0..31 with random values, and random distances whose upper
// bits must be ignored, against a bit-by-bit model built in the testbench.
module tb_shift_unit;
  import dpu_pkg::*;
  logic        en;
  shift_type_e st;
  logic [31:0] x, y, z;
  int checks = 0, failures = 0;

  shift_unit #(.WIDTH(32)) dut (.en(en), .st(st), .x(x), .y(y), .z(z));

  function automatic logic [31:0] model(logic [1:0] t, logic [31:0] a, int d);
    logic [31:0] r;
    for (int i = 0; i < 32; i++) begin
      case (t)
        2'b00: r[i] = (i - d >= 0) ? a[i - d] : 1'b0;
        2'b01: r[i] = (i + d < 32) ? a[i + d] : 1'b0;
        2'b10: r[i] = (i + d < 32) ? a[i + d] : a[31];
        default: r[i] = a[(i + d) % 32];
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
    logic [1:0] t;
    logic [31:0] exp;
    for (int i = 0; i < 4 * 32 * 4; i++) begin
      t  = 2'(i % 4);
      st = shift_type_e'(t);
      x  = $urandom;
      if (i % 8 == 7) x[31] = 1'b1;
      y  = (i < 4 * 32 * 2) ? 32'((i / 4) % 32) : ($urandom | 32'h0000_0100);
      en = (i % 9) != 0;
      #1;
      exp = en ? model(t, x, int'(y[4:0])) : 32'h0;
      checks++;
      if (z !== exp) begin
        failures++;
        $display("FAIL st=%b x=%h y=%h en=%b got %h exp %h", t, x, y, en, z, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
