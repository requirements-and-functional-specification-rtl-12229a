// mcb_regs: the fan-out FPGA's own register file (chip address 0x00).
//
//   addr  name  access  reset  contents
//   00h   SBID  R       --     board_id pins: rack, crate and slot from the
//                              rear backplanes, read live
//   01h   FVR   R       0001h  [7:4] version, [3:0] revision
//   02h   RBT   R/W     0000h  read-back test word, keeps the last write
//   03h   CC    R/W     0000h  [2:1] SBST, front-panel LED colour
//   04h   AM    R/W     001Fh  [6] nAMUX_WR, [5] nAMUX_ENA, [4:0] AMUX_ADDR
//
// The map, the field positions and the reset values are the
// specification's. Unused bits read as zero and ignore writes, and
// addresses 05h..FFh read as zero; the specification does not say what
// they return. A write takes effect on the rising edge of clk while sel is
// high and rw is low. Reads are combinational, so the PCMC sees the data in
// the same bus cycle. Reset is asynchronous and active low.
//
// SBST drives a two-colour LED: bit 1 lights red, bit 2 green, and both
// together give orange. The analog-mux fields are brought straight out to
// the external mux's address, enable and address-latch pins. Both active-low
// enables reset to 0, so after reset the mux is enabled and points at input
// 11111b (V/T[1]).
module mcb_regs
  import mcb_pkg::*;
#(
  parameter logic [3:0] VERSION  = 4'd0,   // FVR[7:4]; reset value 0001h
  parameter logic [3:0] REVISION = 4'd1    // FVR[3:0]
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sel,        // chip address 0x00 and cs active
  input  logic              rw,         // 1 = read, 0 = write
  input  logic [7:0]        addr,       // address[7:0]
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata,
  input  logic [15:0]       board_id,   // backplane ID straps
  // Front-panel status LED
  output logic              led_red,
  output logic              led_green,
  // Analog mux control
  output logic [4:0]        amux_addr,
  output logic              namux_ena,
  output logic              namux_wr
);

  logic [15:0] rbt_q;
  sbst_e       sbst_q;
  logic [6:0]  am_q;
  logic        wr;

  assign wr = sel && (rw == RW_WRITE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rbt_q  <= RBT_RESET;
      sbst_q <= sbst_e'(CC_RESET[2:1]);
      am_q   <= AM_RESET[6:0];
    end else if (wr) begin
      case (addr)
        REG_RBT: rbt_q  <= wdata;
        REG_CC:  sbst_q <= sbst_e'(wdata[2:1]);
        REG_AM:  am_q   <= wdata[6:0];
        default: ;  // SBID, FVR and unused addresses ignore writes
      endcase
    end
  end

  always_comb begin
    rdata = '0;
    case (addr)
      REG_SBID: rdata = board_id;
      REG_FVR:  rdata = {8'h00, VERSION, REVISION};
      REG_RBT:  rdata = rbt_q;
      REG_CC:   rdata = {13'b0, sbst_q, 1'b0};
      REG_AM:   rdata = {9'b0, am_q};
      default:  rdata = '0;
    endcase
  end

  assign led_red   = sbst_q[0];
  assign led_green = sbst_q[1];
  assign amux_addr = am_q[4:0];
  assign namux_ena = am_q[5];
  assign namux_wr  = am_q[6];

endmodule
