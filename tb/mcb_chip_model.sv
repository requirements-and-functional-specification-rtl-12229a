// mcb_chip_model: behavioural model of one chip on a Station Board MCB group
// (a filter, WBC, VSI, IC, delay-module, timing, output or configuration
// FPGA), for simulation only.
//
// It holds 256 16-bit registers, one per address[7:0]. Register r of chip
// c starts as {c, r}, so every chip answers with a different word.
// While cs is high and rw low the word on data_i is stored at the rising
// clk edge. While cs and rw are both high the chip drives mem[addr] onto
// data_o with data_oe high, combinationally. The real chips' internal
// registers are their own designs and are not modelled.
module mcb_chip_model #(
  parameter logic [7:0] CHIP = 8'h01
) (
  input  logic        clk,
  input  logic        cs,
  input  logic        rw,       // 1 = read, 0 = write
  input  logic [7:0]  addr,
  input  logic [15:0] data_i,
  output logic [15:0] data_o,
  output logic        data_oe,
  output int          n_writes,
  output int          n_reads
);
  logic [15:0] mem [256];

  initial begin
    for (int r = 0; r < 256; r++) mem[r] = {CHIP, 8'(r)};
    n_writes = 0;
    n_reads  = 0;
  end

  always @(posedge clk) begin
    if (cs && !rw) begin
      mem[addr] <= data_i;
      n_writes  <= n_writes + 1;
    end
    if (cs && rw) n_reads <= n_reads + 1;
  end

  assign data_oe = cs && rw;
  assign data_o  = data_oe ? mem[addr] : 16'h0000;
endmodule
