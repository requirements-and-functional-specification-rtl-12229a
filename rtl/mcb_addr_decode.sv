// mcb_addr_decode: Station Board chip decoder.
//
// Splits the MCB chip address (address[15:8]) into three outcomes while the
// PCMC chip select is active:
//   * 0x00           -> int_sel: the fan-out FPGA's own registers;
//   * 0x01 .. 0x2E   -> one group in grp_sel (one-hot) and one bit of that
//                       group's chip-select bus in grp_cs;
//   * anything else  -> nothing selected (no chip answers).
// The chip-to-address table is the board address map; which group carries
// which chip comes from the board's MCB grouping drawings. Inside a group
// the filter chips take select bits 0..5 in ascending chip number, as drawn.
// The WBC and VSIA FPGAs, added to filter groups bG1 and aG3, take bit 6, and
// in the IC, TC and DM groups the chips take the bits in drawing order; these
// bit positions are this design's choice.
//
// Purely combinational; outputs follow the inputs in the same cycle.
module mcb_addr_decode
  import mcb_pkg::*;
(
  input  logic                  cs,          // PCMC chip select, active high
  input  logic [7:0]            chip_addr,   // address[15:8]
  output logic                  int_sel,     // internal registers addressed
  output logic                  ext_sel,     // an external chip addressed
  output logic [N_GROUPS-1:0]   grp_sel,     // one-hot group select
  output logic [MAX_CS-1:0]     grp_cs [N_GROUPS]  // per-chip selects
);

  chip_loc_t  loc;
  logic [7:0] fil_idx;   // filter chip number 0..35 (bank A then bank B)

  // Address map: chip address -> group and select bit.
  always_comb begin
    loc     = '{hit: 1'b1, grp: GRP_AG1, slot: 3'd0};
    fil_idx = chip_addr - 8'h0b;
    case (chip_addr)
      8'h01: loc = '{1'b1, GRP_TC,  3'd0};  // CFG  U43
      8'h02: loc = '{1'b1, GRP_BG1, 3'd6};  // WBC  U42
      8'h03: loc = '{1'b1, GRP_IC,  3'd0};  // IC   U54
      8'h04: loc = '{1'b1, GRP_DM,  3'd0};  // DMA
      8'h05: loc = '{1'b1, GRP_DM,  3'd1};  // DMB
      8'h06: loc = '{1'b1, GRP_TC,  3'd1};  // TC   U44
      8'h07: loc = '{1'b1, GRP_TC,  3'd2};  // OUTA U32
      8'h08: loc = '{1'b1, GRP_TC,  3'd3};  // OUTB U53
      8'h09: loc = '{1'b1, GRP_AG3, 3'd6};  // VSIA U31
      8'h0a: loc = '{1'b1, GRP_IC,  3'd1};  // VSIB U70
      default: begin
        // Filter bank A chips 0..17 at 0x0B..0x1C, bank B at 0x1D..0x2E,
        // six consecutive chips per group.
        if (chip_addr >= 8'h0b && chip_addr <= 8'h2e) begin
          loc.grp  = grp_e'(fil_idx / 8'd6);        // aG1..bG3
          loc.slot = 3'(fil_idx % 8'd6);
        end else begin
          loc.hit = 1'b0;                           // 0x00 and 0x2F..0xFF
        end
      end
    endcase
  end

  assign int_sel = cs && (chip_addr == SELF_CHIP);
  assign ext_sel = cs && loc.hit;

  always_comb begin
    grp_sel = '0;
    for (int g = 0; g < N_GROUPS; g++) grp_cs[g] = '0;
    if (ext_sel) begin
      grp_sel[loc.grp]           = 1'b1;
      grp_cs[loc.grp][loc.slot]  = 1'b1;
    end
  end

endmodule
