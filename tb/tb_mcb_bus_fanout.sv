// tb_mcb_bus_fanout: randomised check of the group fan-out.
//
// Drives random bus cycles: read or write, random address and data, one
// random group (or none) selected with one random chip-select bit, and a
// different random word on every group's read-data input. For each cycle
// the expected group outputs and read return are worked out here from the
// fan-out rules (address and rw to all groups; selects and write-data
// enable to the selected group only, enable only on writes; read data from
// the selected group only) and compared with the block.
module tb_mcb_bus_fanout;
  import mcb_pkg::*;

  logic                rw;
  logic [7:0]          reg_addr;
  logic [DATA_W-1:0]   wdata;
  logic [N_GROUPS-1:0] grp_sel;
  logic [MAX_CS-1:0]   sel_cs      [N_GROUPS];
  logic [DATA_W-1:0]   rdata;
  logic                rdata_valid;
  logic [7:0]          grp_addr    [N_GROUPS];
  logic                grp_rw      [N_GROUPS];
  logic [MAX_CS-1:0]   grp_cs      [N_GROUPS];
  logic [DATA_W-1:0]   grp_data_o  [N_GROUPS];
  logic                grp_data_oe [N_GROUPS];
  logic [DATA_W-1:0]   grp_data_i  [N_GROUPS];

  int checks = 0, failures = 0;
  int n_reads = 0, n_writes = 0, n_idle = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  mcb_bus_fanout dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    for (int it = 0; it < 2000; it++) begin
      int sel_g;
      rw       = $urandom_range(0, 1) == 1 ? RW_READ : RW_WRITE;
      reg_addr = 8'($urandom);
      wdata    = 16'($urandom);
      sel_g    = $urandom_range(0, N_GROUPS);    // N_GROUPS = none
      grp_sel  = '0;
      for (int g = 0; g < N_GROUPS; g++) begin
        sel_cs[g]     = '0;
        grp_data_i[g] = 16'($urandom);
      end
      if (sel_g < N_GROUPS) begin
        grp_sel[sel_g] = 1'b1;
        sel_cs[sel_g][$urandom_range(0, GRP_SIZE[sel_g] - 1)] = 1'b1;
      end
      @(posedge clk);
      for (int g = 0; g < N_GROUPS; g++) begin
        logic mine;
        mine = (g == sel_g);
        check(grp_addr[g] == reg_addr, $sformatf("grp_addr[%0d]", g));
        check(grp_rw[g] == rw, $sformatf("grp_rw[%0d]", g));
        check(grp_cs[g] == (mine ? sel_cs[g] : '0), $sformatf("grp_cs[%0d]", g));
        check(grp_data_oe[g] == (mine && rw == RW_WRITE),
              $sformatf("grp_data_oe[%0d] it=%0d", g, it));
        if (grp_data_oe[g])
          check(grp_data_o[g] == wdata, $sformatf("grp_data_o[%0d]", g));
      end
      if (sel_g < N_GROUPS && rw == RW_READ) begin
        check(rdata_valid, "rdata_valid");
        check(rdata == grp_data_i[sel_g],
              $sformatf("rdata %h exp %h (group %0d)", rdata, grp_data_i[sel_g], sel_g));
        n_reads++;
      end else begin
        check(!rdata_valid, "rdata_valid while not reading");
        check(rdata == '0, "rdata not zero");
        if (sel_g < N_GROUPS) n_writes++; else n_idle++;
      end
    end
    check(n_reads > 0 && n_writes > 0 && n_idle > 0, "all cycle kinds seen");
    $display("reads=%0d writes=%0d idle=%0d", n_reads, n_writes, n_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
