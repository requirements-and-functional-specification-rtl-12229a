// tb_mcb_regs: register-file check against the register map.
//
// After reset it reads all five registers and compares them with the
// documented reset values (FVR 0001h, RBT 0000h, CC 0000h, AM 001Fh; SBID
// follows the board_id pins). It then writes random words to every address
// 00h..07h and checks, against a shadow model kept here, that RBT keeps all
// 16 bits, CC only SBST[2:1], AM only [6:0], that SBID and FVR ignore
// writes and that unused addresses read zero. Each write is checked one
// clock later (single-cycle write). The LED pins are checked for all four
// SBST colours and the analog-mux pins against the AM fields. A write with
// sel low must change nothing, and a mid-run reset must restore the reset
// values.
module tb_mcb_regs;
  import mcb_pkg::*;

  logic              clk = 0;
  logic              rst_n;
  logic              sel;
  logic              rw;
  logic [7:0]        addr;
  logic [DATA_W-1:0] wdata;
  logic [DATA_W-1:0] rdata;
  logic [15:0]       board_id;
  logic              led_red, led_green;
  logic [4:0]        amux_addr;
  logic              namux_ena, namux_wr;

  int checks = 0, failures = 0;
  bit [3:0] colours_seen = '0;
  always #5 clk = ~clk;

  mcb_regs dut (.*);

  // Shadow copies of the writable registers.
  logic [15:0] m_rbt, m_cc, m_am;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [15:0] expect_read(input logic [7:0] a);
    case (a)
      8'h00:   return board_id;
      8'h01:   return 16'h0001;
      8'h02:   return m_rbt;
      8'h03:   return m_cc;
      8'h04:   return m_am;
      default: return 16'h0000;
    endcase
  endfunction

  task automatic do_write(input logic [7:0] a, input logic [15:0] d, input logic s);
    @(negedge clk);
    sel = s; rw = RW_WRITE; addr = a; wdata = d;
    @(negedge clk);
    sel = 1'b0; rw = RW_READ;
    if (s) begin
      if (a == 8'h02) m_rbt = d;
      if (a == 8'h03) m_cc  = d & 16'h0006;
      if (a == 8'h04) m_am  = d & 16'h007F;
    end
  endtask

  task automatic read_check(input logic [7:0] a);
    @(negedge clk);
    sel = 1'b1; rw = RW_READ; addr = a; wdata = 16'($urandom);
    #1;
    check(rdata == expect_read(a),
          $sformatf("read %02h = %04h exp %04h", a, rdata, expect_read(a)));
  endtask

  task automatic pins_check();
    check(led_red == m_cc[1] && led_green == m_cc[2],
          $sformatf("LED pins r=%0b g=%0b for SBST=%0d", led_red, led_green, m_cc[2:1]));
    check(amux_addr == m_am[4:0] && namux_ena == m_am[5] && namux_wr == m_am[6],
          "analog mux pins");
    colours_seen[m_cc[2:1]] = 1'b1;
  endtask

  task automatic reset_model();
    m_rbt = 16'h0000; m_cc = 16'h0000; m_am = 16'h001F;
  endtask

  initial begin
    sel = 0; rw = RW_READ; addr = 0; wdata = 0; board_id = 16'h3A5C;
    rst_n = 0;
    reset_model();
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < 8; a++) read_check(8'(a));
    pins_check();
    check(amux_addr == 5'h1F && !namux_ena && !namux_wr, "AM reset: V/T[1], enabled");
    // SBID follows the pins.
    board_id = 16'hC0DE;
    read_check(8'h00);
    // Random writes to every address, each followed by a full read-back.
    for (int it = 0; it < 300; it++) begin
      logic [7:0] a;
      a = 8'($urandom_range(0, 7));
      do_write(a, 16'($urandom), 1'b1);
      for (int b = 0; b < 8; b++) read_check(8'(b));
      pins_check();
    end
    // Every LED colour explicitly.
    for (int c = 0; c < 4; c++) begin
      do_write(8'h03, 16'(c << 1), 1'b1);
      read_check(8'h03);
      pins_check();
    end
    // Write with sel low changes nothing.
    do_write(8'h02, 16'hBEEF, 1'b0);
    do_write(8'h04, 16'h0000, 1'b0);
    for (int b = 0; b < 8; b++) read_check(8'(b));
    // Write timing: new value visible right after the clock edge.
    @(negedge clk);
    sel = 1; rw = RW_WRITE; addr = 8'h02; wdata = 16'h1234;
    #1 check(rdata == m_rbt, "RBT unchanged before the clock edge");
    @(posedge clk); #1;
    check(rdata == 16'h1234, "RBT updated one edge after the write");
    m_rbt = 16'h1234;
    // Reset in the middle of operation.
    @(negedge clk);
    sel = 0; rst_n = 0;
    #2 rst_n = 1;
    reset_model();
    for (int b = 0; b < 8; b++) read_check(8'(b));
    pins_check();
    check(colours_seen == 4'hF, "all four LED colours seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
