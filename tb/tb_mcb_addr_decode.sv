// tb_mcb_addr_decode: exhaustive check of the chip decoder.
//
// Walks all 256 chip addresses with the chip select low and high and compares
// every output with a reference map kept here as plain lists: for each of
// the nine groups, the chip addresses on it in select-bit order. The lists
// are written out from the board grouping drawings and the address table, not
// derived from the decoder. Also checks that the group sizes in mcb_pkg
// agree with the lists.
module tb_mcb_addr_decode;
  import mcb_pkg::*;

  logic                cs;
  logic [7:0]          chip_addr;
  logic                int_sel, ext_sel;
  logic [N_GROUPS-1:0] grp_sel;
  logic [MAX_CS-1:0]   grp_cs [N_GROUPS];

  int checks = 0, failures = 0;
  int n_ext = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  mcb_addr_decode dut (.*);

  // Reference: chip addresses per group in select-bit order, FF = no chip.
  localparam logic [7:0] MAP [N_GROUPS][MAX_CS] = '{
    '{8'h0b, 8'h0c, 8'h0d, 8'h0e, 8'h0f, 8'h10, 8'hff},  // aG1 UA1..UA6
    '{8'h11, 8'h12, 8'h13, 8'h14, 8'h15, 8'h16, 8'hff},  // aG2 UA7..UA12
    '{8'h17, 8'h18, 8'h19, 8'h1a, 8'h1b, 8'h1c, 8'h09},  // aG3 UA13..UA18, VSIA
    '{8'h1d, 8'h1e, 8'h1f, 8'h20, 8'h21, 8'h22, 8'h02},  // bG1 UB1..UB6, WBC
    '{8'h23, 8'h24, 8'h25, 8'h26, 8'h27, 8'h28, 8'hff},  // bG2 UB7..UB12
    '{8'h29, 8'h2a, 8'h2b, 8'h2c, 8'h2d, 8'h2e, 8'hff},  // bG3 UB13..UB18
    '{8'h03, 8'h0a, 8'hff, 8'hff, 8'hff, 8'hff, 8'hff},  // IC, VSIB
    '{8'h01, 8'h06, 8'h07, 8'h08, 8'hff, 8'hff, 8'hff},  // CFG, TC, OUTA, OUTB
    '{8'h04, 8'h05, 8'hff, 8'hff, 8'hff, 8'hff, 8'hff}   // DMA, DMB
  };

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL cs=%0b addr=%02h: %s", cs, chip_addr, what);
    end
  endtask

  initial begin
    // Group sizes in the package against the reference lists.
    for (int g = 0; g < N_GROUPS; g++) begin
      int n;
      n = 0;
      for (int s = 0; s < MAX_CS; s++) if (MAP[g][s] != 8'hff) n++;
      check(GRP_SIZE[g] == n, $sformatf("GRP_SIZE[%0d]", g));
    end
    for (int c = 0; c < 2; c++) begin
      for (int a = 0; a < 256; a++) begin
        logic [N_GROUPS-1:0] exp_sel;
        logic [MAX_CS-1:0]   exp_cs [N_GROUPS];
        logic                exp_ext;
        cs = c[0];
        chip_addr = a[7:0];
        exp_sel = '0;
        exp_ext = 1'b0;
        for (int g = 0; g < N_GROUPS; g++) begin
          exp_cs[g] = '0;
          for (int s = 0; s < MAX_CS; s++)
            if (cs && MAP[g][s] != 8'hff && MAP[g][s] == chip_addr) begin
              exp_cs[g][s] = 1'b1;
              exp_sel[g]   = 1'b1;
              exp_ext      = 1'b1;
            end
        end
        @(posedge clk);
        check(int_sel == (cs && chip_addr == 8'h00), "int_sel");
        check(ext_sel == exp_ext, "ext_sel");
        check(grp_sel == exp_sel, $sformatf("grp_sel %b exp %b", grp_sel, exp_sel));
        for (int g = 0; g < N_GROUPS; g++)
          check(grp_cs[g] == exp_cs[g],
                $sformatf("grp_cs[%0d] %b exp %b", g, grp_cs[g], exp_cs[g]));
        if (exp_ext) n_ext++;
      end
    end
    // 46 external chips, each answering once.
    check(n_ext == 46, $sformatf("%0d external chips decoded", n_ext));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
