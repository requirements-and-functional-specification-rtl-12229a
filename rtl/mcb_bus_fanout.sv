// mcb_bus_fanout: one MCB bus in, nine group buses out.
//
// The PCMC's bus is repeated onto the nine board groups so that no group
// carries more than seven chips. Address[7:0] and the read/write line go to
// every group. The chip selects from the decoder go only to their own group.
// Write data is driven onto all nine data buses, but only the selected group
// gets its output enable, and only during a write. The other groups' data
// lines stay released so their chips can never fight the fan-out FPGA. For a
// read the selected group's data bus is returned to the PCMC side as rdata
// with rdata_valid high. With no group selected rdata is zero.
//
// The bidirectional data pins are split into _o / _oe / _i signals: the
// tri-state pad and its voltage-level conversion sit in the FPGA's I/O
// cells, outside this logic. The path is purely combinational, because the
// fan-out is meant to add only pin-to-pin delay (about 12 ns on the target
// part, each direction).
module mcb_bus_fanout
  import mcb_pkg::*;
(
  // PCMC side (after decoding)
  input  logic                  rw,                    // 1 = read, 0 = write
  input  logic [7:0]            reg_addr,              // address[7:0]
  input  logic [DATA_W-1:0]     wdata,                 // PCMC write data
  input  logic [N_GROUPS-1:0]   grp_sel,               // one-hot, from decoder
  input  logic [MAX_CS-1:0]     sel_cs  [N_GROUPS],    // from decoder
  output logic [DATA_W-1:0]     rdata,                 // selected group's data
  output logic                  rdata_valid,           // a group is being read
  // Group side, one entry per group
  output logic [7:0]            grp_addr    [N_GROUPS],
  output logic                  grp_rw      [N_GROUPS],
  output logic [MAX_CS-1:0]     grp_cs      [N_GROUPS],
  output logic [DATA_W-1:0]     grp_data_o  [N_GROUPS],
  output logic                  grp_data_oe [N_GROUPS],
  input  logic [DATA_W-1:0]     grp_data_i  [N_GROUPS]
);

  logic reading;
  assign reading = (rw == RW_READ);

  // Forward direction: PCMC -> groups.
  always_comb begin
    for (int g = 0; g < N_GROUPS; g++) begin
      grp_addr[g]    = reg_addr;
      grp_rw[g]      = rw;
      grp_cs[g]      = grp_sel[g] ? sel_cs[g] : '0;
      grp_data_o[g]  = wdata;
      grp_data_oe[g] = grp_sel[g] && !reading;
    end
  end

  // Return direction: selected group -> PCMC.
  always_comb begin
    rdata = '0;
    for (int g = 0; g < N_GROUPS; g++)
      if (grp_sel[g] && reading) rdata |= grp_data_i[g];
  end

  assign rdata_valid = reading && (grp_sel != '0);

  // Bus rules: never more than one group at a time, and a group's data
  // lines are driven only while that group is written.
  always_comb begin
    assert ($onehot0(grp_sel))
      else $error("mcb_bus_fanout: more than one group selected");
    for (int g = 0; g < N_GROUPS; g++)
      assert (!(grp_data_oe[g] && reading))
        else $error("mcb_bus_fanout: group %0d driven during a read", g);
  end

endmodule
