// mcb_pkg: types and constants shared by the MCB fan-out FPGA.
//
// The Station Board monitor-and-control bus (MCB) carries a 16-bit address
// and 16-bit data. Address[15:8] picks a chip on the board, address[7:0] a
// register inside it. The fan-out FPGA answers to chip address 0x00 itself
// and passes every other chip address on to one of nine board groups, each a
// separate copy of the bus with one chip select per chip.
//
// The group membership, chip addresses and register map below follow the
// specification's address table and group drawings. The widest group holds
// seven chips (six filter chips plus the WBC or the VSIA FPGA), so every
// group's select bus is carried as MAX_CS bits and the unused bits stay low.
package mcb_pkg;

  localparam int ADDR_W   = 16;
  localparam int DATA_W   = 16;
  localparam int N_GROUPS = 9;
  localparam int MAX_CS   = 7;

  // Chip address of the fan-out FPGA itself (address[15:8]).
  localparam logic [7:0] SELF_CHIP = 8'h00;

  // Group index. Names follow the bus names of the board drawings:
  // aG1..aG3 are the filter bank A groups, bG1..bG3 filter bank B, IC the
  // Input FPGA / VSIB pair, TC the CFG / TC / OUTA / OUTB group and DM the
  // two delay modules.
  typedef enum logic [3:0] {
    GRP_AG1 = 4'd0,
    GRP_AG2 = 4'd1,
    GRP_AG3 = 4'd2,
    GRP_BG1 = 4'd3,
    GRP_BG2 = 4'd4,
    GRP_BG3 = 4'd5,
    GRP_IC  = 4'd6,
    GRP_TC  = 4'd7,
    GRP_DM  = 4'd8
  } grp_e;

  // Location of a chip on the fanned-out buses.
  typedef struct packed {
    logic       hit;   // address[15:8] names an external chip
    grp_e       grp;   // its group
    logic [2:0] slot;  // its bit in the group's chip-select bus
  } chip_loc_t;

  // Number of chips on each group (index = grp_e value).
  localparam int GRP_SIZE [N_GROUPS] = '{6, 6, 7, 7, 6, 6, 2, 4, 2};

  // MCB read/write line: high reads, low writes.
  localparam logic RW_READ  = 1'b1;
  localparam logic RW_WRITE = 1'b0;

  // Internal register addresses (address[7:0] with address[15:8] = 0x00).
  localparam logic [7:0] REG_SBID = 8'h00;
  localparam logic [7:0] REG_FVR  = 8'h01;
  localparam logic [7:0] REG_RBT  = 8'h02;
  localparam logic [7:0] REG_CC   = 8'h03;
  localparam logic [7:0] REG_AM   = 8'h04;

  // Reset values of the writable registers.
  localparam logic [15:0] RBT_RESET = 16'h0000;
  localparam logic [15:0] CC_RESET  = 16'h0000;
  localparam logic [15:0] AM_RESET  = 16'h001F;

  // Front-panel status LED colour held in CC[2:1] (SBST).
  typedef enum logic [1:0] {
    LED_OFF    = 2'b00,
    LED_RED    = 2'b01,
    LED_GREEN  = 2'b10,
    LED_ORANGE = 2'b11
  } sbst_e;

endpackage
