// tb_immediate_register: self-checking test of the Y-bus source select.
// With im_en = 1 the Y bus must carry the immediate value, with im_en = 0 the
// register file's Y data out.
module tb_immediate_register;
  logic        im_en;
  logic [31:0] im_va, rf_y, y_bus;
  int checks = 0, failures = 0;

  immediate_register #(.WIDTH(32)) dut (.im_en(im_en), .im_va(im_va), .rf_y(rf_y), .y_bus(y_bus));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] exp;
    for (int i = 0; i < 1000; i++) begin
      im_en = i[0];
      im_va = $urandom; rf_y = $urandom;
      if (im_va == rf_y) rf_y = ~rf_y;
      #1;
      exp = im_en ? im_va : rf_y;
      checks++;
      if (y_bus !== exp) begin
        failures++;
        $display("FAIL im_en=%b im_va=%h rf_y=%h got %h", im_en, im_va, rf_y, y_bus);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
