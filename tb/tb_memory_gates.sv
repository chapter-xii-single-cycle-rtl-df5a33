// tb_memory_gates: self-checking test of the store and load gates. A store
// must put the Y bus on the memory data lines and flag that they are driven;
// a load must put the memory data on the Z contribution; a closed gate must
// contribute zeros.
module tb_memory_gates;
  logic        st_en, ld_en, mem_drive;
  logic [31:0] y_bus, mem_rdata, mem_wdata, z_ld;
  int checks = 0, failures = 0;

  memory_gates #(.WIDTH(32)) dut (
    .st_en(st_en), .ld_en(ld_en), .y_bus(y_bus), .mem_rdata(mem_rdata),
    .mem_wdata(mem_wdata), .mem_drive(mem_drive), .z_ld(z_ld)
  );

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 900; i++) begin
      // 0: both closed, 1: store, 2: load
      st_en = (i % 3) == 1;
      ld_en = (i % 3) == 2;
      y_bus = $urandom | 32'h1; mem_rdata = $urandom | 32'h2;
      #1;
      checks += 3;
      if (mem_wdata !== (st_en ? y_bus : 32'h0)) begin
        failures++; $display("FAIL wdata st=%b got %h", st_en, mem_wdata);
      end
      if (mem_drive !== st_en) begin
        failures++; $display("FAIL drive st=%b got %b", st_en, mem_drive);
      end
      if (z_ld !== (ld_en ? mem_rdata : 32'h0)) begin
        failures++; $display("FAIL z_ld ld=%b got %h", ld_en, z_ld);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
