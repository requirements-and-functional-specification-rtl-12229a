// mcb_fanout_fpga: Station Board MCB fan-out FPGA, top level.
//
// The PCMC (the board's PC/104 controller card) has one monitor-and-control
// bus (MCB); the board has 46 other chips that need it, and most of them
// cannot take its 3.3 V levels. This FPGA sits in between. It decodes the
// chip address (address[15:8]) and repeats the bus onto nine separate group
// buses, so that no copy carries more than seven chips, and it returns the
// addressed chip's read data. Chip address 0x00 is the FPGA itself: five
// registers hold the board ID, the firmware version, a read-back test word,
// the front-panel LED colour and the control of the board's analog
// monitoring mux.
//
// Data flow:
//   PCMC -> mcb_addr_decode -> mcb_bus_fanout -> nine group buses
//                           -> mcb_regs (chip 0x00)
//   read data: selected group or mcb_regs -> pcmc_data_o
//
// Interface conventions (the bus timing itself is specified elsewhere, so
// these are this design's choices):
//   * chip selects are active high, rw high means read;
//   * every bidirectional data bus is split into _i, _o and _oe; the
//     tri-state pads and the level shifting belong to the I/O cells;
//   * pcmc_data_oe is high during every read with pcmc_cs high, so the PCMC
//     gets zero from an address no chip answers;
//   * decode, fan-out and read return are combinational (pin-to-pin delay
//     only). Register writes take effect on the rising mcb_clk edge of a
//     write cycle, and rst_n resets the registers asynchronously.
module mcb_fanout_fpga
  import mcb_pkg::*;
(
  input  logic                  mcb_clk,
  input  logic                  rst_n,
  // PCMC bus
  input  logic                  pcmc_cs,
  input  logic                  pcmc_rw,
  input  logic [ADDR_W-1:0]     pcmc_addr,
  input  logic [DATA_W-1:0]     pcmc_data_i,
  output logic [DATA_W-1:0]     pcmc_data_o,
  output logic                  pcmc_data_oe,
  // Nine group buses (index = mcb_pkg::grp_e)
  output logic [7:0]            grp_addr    [N_GROUPS],
  output logic                  grp_rw      [N_GROUPS],
  output logic [MAX_CS-1:0]     grp_cs      [N_GROUPS],
  output logic [DATA_W-1:0]     grp_data_o  [N_GROUPS],
  output logic                  grp_data_oe [N_GROUPS],
  input  logic [DATA_W-1:0]     grp_data_i  [N_GROUPS],
  // Board ID from the backplanes
  input  logic [15:0]           board_id,
  // Front-panel status LED
  output logic                  led_red,
  output logic                  led_green,
  // Analog monitoring mux
  output logic [4:0]            amux_addr,
  output logic                  namux_ena,
  output logic                  namux_wr
);

  logic                int_sel;
  logic                ext_sel;
  logic [N_GROUPS-1:0] grp_sel;
  logic [MAX_CS-1:0]   sel_cs [N_GROUPS];
  logic [DATA_W-1:0]   fan_rdata;
  logic                fan_rvalid;
  logic [DATA_W-1:0]   reg_rdata;

  mcb_addr_decode u_decode (
    .cs        (pcmc_cs),
    .chip_addr (pcmc_addr[15:8]),
    .int_sel   (int_sel),
    .ext_sel   (ext_sel),
    .grp_sel   (grp_sel),
    .grp_cs    (sel_cs)
  );

  mcb_bus_fanout u_fanout (
    .rw          (pcmc_rw),
    .reg_addr    (pcmc_addr[7:0]),
    .wdata       (pcmc_data_i),
    .grp_sel     (grp_sel),
    .sel_cs      (sel_cs),
    .rdata       (fan_rdata),
    .rdata_valid (fan_rvalid),
    .grp_addr    (grp_addr),
    .grp_rw      (grp_rw),
    .grp_cs      (grp_cs),
    .grp_data_o  (grp_data_o),
    .grp_data_oe (grp_data_oe),
    .grp_data_i  (grp_data_i)
  );

  mcb_regs u_regs (
    .clk       (mcb_clk),
    .rst_n     (rst_n),
    .sel       (int_sel),
    .rw        (pcmc_rw),
    .addr      (pcmc_addr[7:0]),
    .wdata     (pcmc_data_i),
    .rdata     (reg_rdata),
    .board_id  (board_id),
    .led_red   (led_red),
    .led_green (led_green),
    .amux_addr (amux_addr),
    .namux_ena (namux_ena),
    .namux_wr  (namux_wr)
  );

  always_comb begin
    pcmc_data_oe = pcmc_cs && (pcmc_rw == RW_READ);
    if (int_sel)         pcmc_data_o = reg_rdata;
    else if (fan_rvalid) pcmc_data_o = fan_rdata;
    else                 pcmc_data_o = '0;
  end

  // The fan-out FPGA and an external chip never answer the same address.
  always_comb
    assert (!(int_sel && ext_sel))
      else $error("mcb_fanout_fpga: internal and external select together");

endmodule
