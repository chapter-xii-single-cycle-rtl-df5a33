// mem_model: behavioural model of the external memory used by the datapath
// testbenches (not synthesizable logic of the design). Word addressed:
// each address holds one 32-bit word, and DEPTH words are kept, selected by
// the low address bits. With msel = 1 and rw = 0 (read) the addressed word
// appears on rdata in the same cycle; with msel = 1 and rw = 1 (write) the
// word on wdata is written at the rising clock edge. The model also counts
// reads and writes for the testbench.
module mem_model #(
  parameter int unsigned DEPTH = 256
) (
  input  logic        clk,
  input  logic [31:0] addr,
  input  logic [31:0] wdata,
  input  logic        drive,
  input  logic        rw,
  input  logic        msel,
  output logic [31:0] rdata
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [31:0] mem [DEPTH];
  int reads = 0, writes = 0;

  initial for (int i = 0; i < DEPTH; i++) mem[i] = 32'h0;

  assign rdata = (msel && !rw) ? mem[addr[AW-1:0]] : 32'h0;

  always @(posedge clk) begin
    if (msel && rw) begin
      if (!drive) $error("mem_model: write while the data lines are not driven");
      mem[addr[AW-1:0]] <= wdata;
      writes++;
    end else if (msel) begin
      reads++;
    end
  end
endmodule
