// tb_mcb_fanout_fpga: end-to-end test of the MCB fan-out FPGA.
//
// The top runs with its default configuration. Every one of the 46 board
// chips is present as an mcb_chip_model on its group bus, wired the way the
// board groups it (the group and select-bit lists below). The test plays
// the PCMC: it drives one bus cycle per clock and checks the results
// against its own reference values.
//   * reset values of the five internal registers;
//   * a write to every chip, with a check in the same cycle that exactly
//     that chip's select is high and only its group's data is driven. Each
//     write is then read back through the fan-out, along with an untouched
//     register of the same chip;
//   * internal register writes and reads, the four LED colours and the
//     analog-mux pins;
//   * unmapped chip addresses 2Fh..FFh, which must select nothing and read
//     zero, and idle cycles with the chip select low;
//   * two drivers on one group data bus are counted as failures.
// Each mechanism (external write/read, internal write/read, unmapped
// access, idle cycle, each of the nine groups, each LED colour) is counted,
// and one that never happened counts as a failure.
module tb_mcb_fanout_fpga;
  import mcb_pkg::*;

  logic                mcb_clk = 0;
  logic                rst_n;
  logic                pcmc_cs;
  logic                pcmc_rw;
  logic [ADDR_W-1:0]   pcmc_addr;
  logic [DATA_W-1:0]   pcmc_data_i;
  logic [DATA_W-1:0]   pcmc_data_o;
  logic                pcmc_data_oe;
  logic [7:0]          grp_addr    [N_GROUPS];
  logic                grp_rw      [N_GROUPS];
  logic [MAX_CS-1:0]   grp_cs      [N_GROUPS];
  logic [DATA_W-1:0]   grp_data_o  [N_GROUPS];
  logic                grp_data_oe [N_GROUPS];
  logic [DATA_W-1:0]   grp_data_i  [N_GROUPS];
  logic [15:0]         board_id;
  logic                led_red, led_green;
  logic [4:0]          amux_addr;
  logic                namux_ena, namux_wr;

  always #5 mcb_clk = ~mcb_clk;

  mcb_fanout_fpga dut (.*);

  // Board wiring: chip addresses per group in select-bit order, FF = none.
  localparam logic [0:N_GROUPS-1][0:MAX_CS-1][7:0] MAP = {
    {8'h0b, 8'h0c, 8'h0d, 8'h0e, 8'h0f, 8'h10, 8'hff},
    {8'h11, 8'h12, 8'h13, 8'h14, 8'h15, 8'h16, 8'hff},
    {8'h17, 8'h18, 8'h19, 8'h1a, 8'h1b, 8'h1c, 8'h09},
    {8'h1d, 8'h1e, 8'h1f, 8'h20, 8'h21, 8'h22, 8'h02},
    {8'h23, 8'h24, 8'h25, 8'h26, 8'h27, 8'h28, 8'hff},
    {8'h29, 8'h2a, 8'h2b, 8'h2c, 8'h2d, 8'h2e, 8'hff},
    {8'h03, 8'h0a, 8'hff, 8'hff, 8'hff, 8'hff, 8'hff},
    {8'h01, 8'h06, 8'h07, 8'h08, 8'hff, 8'hff, 8'hff},
    {8'h04, 8'h05, 8'hff, 8'hff, 8'hff, 8'hff, 8'hff}
  };

  logic [15:0] chip_do [N_GROUPS][MAX_CS];
  logic        chip_oe [N_GROUPS][MAX_CS];
  int          chip_nw [N_GROUPS][MAX_CS];
  int          chip_nr [N_GROUPS][MAX_CS];

  for (genvar g = 0; g < N_GROUPS; g++) begin : g_grp
    for (genvar s = 0; s < MAX_CS; s++) begin : g_slot
      if (MAP[g][s] != 8'hff) begin : g_chip
        mcb_chip_model #(.CHIP(MAP[g][s])) u_chip (
          .clk      (mcb_clk),
          .cs       (grp_cs[g][s]),
          .rw       (grp_rw[g]),
          .addr     (grp_addr[g]),
          .data_i   (grp_data_oe[g] ? grp_data_o[g] : 16'hDEAD),
          .data_o   (chip_do[g][s]),
          .data_oe  (chip_oe[g][s]),
          .n_writes (chip_nw[g][s]),
          .n_reads  (chip_nr[g][s])
        );
      end else begin : g_none
        assign chip_do[g][s] = '0;
        assign chip_oe[g][s] = 1'b0;
        assign chip_nw[g][s] = 0;
        assign chip_nr[g][s] = 0;
      end
    end
  end

  // Group data buses: wired-OR of the driving chips; count drivers.
  int drivers [N_GROUPS];
  always_comb begin
    for (int g = 0; g < N_GROUPS; g++) begin
      grp_data_i[g] = '0;
      drivers[g]    = grp_data_oe[g] ? 1 : 0;
      for (int s = 0; s < MAX_CS; s++)
        if (chip_oe[g][s]) begin
          grp_data_i[g] |= chip_do[g][s];
          drivers[g]++;
        end
    end
  end

  int checks = 0, failures = 0;
  int n_ext_wr = 0, n_ext_rd = 0, n_int_wr = 0, n_int_rd = 0;
  int n_unmapped = 0, n_idle = 0, n_contention = 0;
  int n_grp [N_GROUPS];
  bit [3:0] colours = '0;

  always @(posedge mcb_clk)
    for (int g = 0; g < N_GROUPS; g++)
      if (drivers[g] > 1) n_contention++;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // Number of select lines high over all groups, and whether (g,s) is one.
  function automatic int n_cs_high();
    int n = 0;
    for (int g = 0; g < N_GROUPS; g++)
      for (int s = 0; s < MAX_CS; s++) if (grp_cs[g][s]) n++;
    return n;
  endfunction

  function automatic int n_oe_high();
    int n = 0;
    for (int g = 0; g < N_GROUPS; g++) if (grp_data_oe[g]) n++;
    return n;
  endfunction

  // One bus cycle; the read data are sampled just before the clock edge.
  task automatic cycle(input logic cs, input logic rw, input logic [15:0] a,
                       input logic [15:0] d, output logic [15:0] q);
    @(negedge mcb_clk);
    pcmc_cs = cs; pcmc_rw = rw; pcmc_addr = a; pcmc_data_i = d;
    #4;
    q = pcmc_data_o;
    check(pcmc_data_oe == (cs && rw == RW_READ), "pcmc_data_oe");
  endtask

  task automatic idle();
    logic [15:0] q;
    cycle(1'b0, RW_READ, 16'($urandom), 16'($urandom), q);
    check(n_cs_high() == 0 && n_oe_high() == 0, "idle: nothing selected");
    n_idle++;
  endtask

  task automatic int_write(input logic [7:0] r, input logic [15:0] d);
    logic [15:0] q;
    cycle(1'b1, RW_WRITE, {8'h00, r}, d, q);
    check(n_cs_high() == 0 && n_oe_high() == 0, "internal write: no group touched");
    n_int_wr++;
  endtask

  task automatic int_read(input logic [7:0] r, input logic [15:0] exp);
    logic [15:0] q;
    cycle(1'b1, RW_READ, {8'h00, r}, 16'($urandom), q);
    check(q == exp, $sformatf("internal read %02h = %04h exp %04h", r, q, exp));
    check(n_cs_high() == 0, "internal read: no chip selected");
    n_int_rd++;
  endtask

  task automatic ext_access(input int g, input int s, input logic rw,
                            input logic [7:0] r, input logic [15:0] d,
                            input logic [15:0] exp);
    logic [15:0] q;
    cycle(1'b1, rw, {MAP[g][s], r}, d, q);
    check(n_cs_high() == 1 && grp_cs[g][s],
          $sformatf("chip %02h: only its select high", MAP[g][s]));
    check(grp_addr[g] == r && grp_rw[g] == rw, "group address / rw");
    if (rw == RW_WRITE) begin
      check(n_oe_high() == 1 && grp_data_oe[g] && grp_data_o[g] == d,
            "write data driven on the chip's group only");
      n_ext_wr++;
    end else begin
      check(n_oe_high() == 0, "no group driven during a read");
      check(q == exp, $sformatf("read chip %02h reg %02h = %04h exp %04h",
                                MAP[g][s], r, q, exp));
      n_ext_rd++;
    end
    n_grp[g]++;
  endtask

  initial begin
    logic [15:0] q;
    logic [15:0] am_exp;
    for (int g = 0; g < N_GROUPS; g++) n_grp[g] = 0;
    pcmc_cs = 0; pcmc_rw = RW_READ; pcmc_addr = 0; pcmc_data_i = 0;
    board_id = 16'h0123;
    rst_n = 0;
    repeat (3) @(posedge mcb_clk);
    rst_n = 1;

    // Internal registers after reset.
    int_read(8'h00, 16'h0123);
    int_read(8'h01, 16'h0001);
    int_read(8'h02, 16'h0000);
    int_read(8'h03, 16'h0000);
    int_read(8'h04, 16'h001F);
    check(amux_addr == 5'h1F && !namux_ena && !namux_wr, "AM pins after reset");
    check(!led_red && !led_green, "LED off after reset");
    idle();

    // Every chip: write a register, read it back and read an untouched one.
    for (int g = 0; g < N_GROUPS; g++)
      for (int s = 0; s < MAX_CS; s++)
        if (MAP[g][s] != 8'hff) begin
          logic [7:0]  r;
          logic [15:0] d;
          r = 8'($urandom_range(0, 127));
          d = 16'($urandom);
          ext_access(g, s, RW_WRITE, r, d, '0);
          ext_access(g, s, RW_READ, r, '0, d);
          ext_access(g, s, RW_READ, 8'(r + 128), '0, {MAP[g][s], 8'(r + 128)});
          if (($urandom & 3) == 0) idle();
        end
    // Each write reached exactly one chip; each chip was read twice.
    @(posedge mcb_clk); #1;
    for (int g = 0; g < N_GROUPS; g++)
      for (int s = 0; s < MAX_CS; s++)
        if (MAP[g][s] != 8'hff)
          check(chip_nw[g][s] == 1 && chip_nr[g][s] == 2,
                $sformatf("chip %02h saw %0d writes, %0d reads", MAP[g][s],
                          chip_nw[g][s], chip_nr[g][s]));

    // Internal registers: read-back word, LED colours, analog mux.
    int_write(8'h02, 16'hA5C3);
    int_read(8'h02, 16'hA5C3);
    for (int c = 0; c < 4; c++) begin
      int_write(8'h03, 16'hFFF9 | 16'(c << 1));
      int_read(8'h03, 16'(c << 1));
      @(posedge mcb_clk); #1;
      check(led_red == c[0] && led_green == c[1], $sformatf("LED colour %0d", c));
      colours[c] = 1'b1;
    end
    for (int k = 0; k < 8; k++) begin
      logic [15:0] w;
      w = 16'($urandom);
      am_exp = w & 16'h007F;
      int_write(8'h04, w);
      int_read(8'h04, am_exp);
      check(amux_addr == am_exp[4:0] && namux_ena == am_exp[5] &&
            namux_wr == am_exp[6], "AM pins follow the register");
    end
    int_write(8'h01, 16'hFFFF);            // read-only
    int_read(8'h01, 16'h0001);
    board_id = 16'hBEEF;
    int_read(8'h00, 16'hBEEF);

    // Unmapped chip addresses: nothing selected, zero returned.
    for (int a = 8'h2f; a < 256; a += 7) begin
      cycle(1'b1, RW_READ, {8'(a), 8'($urandom)}, '0, q);
      check(q == 16'h0000 && n_cs_high() == 0, $sformatf("unmapped %02h", a));
      cycle(1'b1, RW_WRITE, {8'(a), 8'($urandom)}, 16'($urandom), q);
      check(n_cs_high() == 0 && n_oe_high() == 0, "unmapped write touches nothing");
      n_unmapped++;
    end
    idle();

    // Mechanism coverage.
    check(n_contention == 0, $sformatf("%0d bus contentions", n_contention));
    check(n_ext_wr == 46 && n_ext_rd == 92, "external access counts");
    check(n_int_wr > 0 && n_int_rd > 0, "internal accesses");
    check(n_unmapped > 0 && n_idle > 0, "unmapped and idle cycles");
    for (int g = 0; g < N_GROUPS; g++)
      check(n_grp[g] == 3 * GRP_SIZE[g], $sformatf("group %0d accesses", g));
    check(colours == 4'hF, "all LED colours");
    $display("ext_wr=%0d ext_rd=%0d int_wr=%0d int_rd=%0d unmapped=%0d idle=%0d",
             n_ext_wr, n_ext_rd, n_int_wr, n_int_rd, n_unmapped, n_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge mcb_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
