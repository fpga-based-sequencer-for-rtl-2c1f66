// tb_aic_seq_top: end-to-end testbench of the AIC-ISO sequencer at its
// default parameters.
//
// The sequencer is connected to the AD7608 behavioural model and driven by a
// behavioural VME master; the card sits in slot 3 (window 0x1800). The test
// runs the whole acquisition path as a CPU would use it: start a scan, wait
// for data_rdy, read the results over VME. It checks
//   - the DAS reset pulse after power-up;
//   - a scan of the fixed test pattern (AAA0 + n, BBB0 + n per channel), read
//     back word by word with D16 cycles and compared with the expected memory
//     image (words 2n and 2n+1 hold channel n);
//   - scans of random 18-bit codes without oversampling (5 us conversion) and
//     at ratio 64 (0.32 ms), read back channel by channel with D32 cycles and
//     reassembled into the 18-bit codes, with the scan length in clocks;
//   - a VME read while a scan runs, byte reads, settings held during a scan,
//     the multiplexer select and range reaching the pins, start ignored in
//     standby;
//   - BERR* for a write, a read past the memory and an unaligned long word, and
//     no answer for another slot, an A24 address modifier and a GA parity error.
// Each of these mechanisms is counted, and one that never happened is a failure.
module tb_aic_seq_top;
  timeunit 1ns;
  timeprecision 1ps;

  import aic_pkg::*;

  localparam real TCLK = 62.5;   // 16 MHz
  localparam int  SLOT = 3;
  localparam logic [15:0] BASE = 16'(SLOT << 11);

  logic        clk = 1'b0, rst_n = 1'b1;
  logic        vme_as_n, vme_write_n, vme_lword_n;
  logic [1:0]  vme_ds_n;
  logic [5:0]  vme_am;
  logic [15:1] vme_addr;
  logic [4:0]  vme_ga_n;
  logic        vme_gap_n;
  logic [31:0] vme_d_out;
  logic        vme_d_oe, vme_dtack_n, vme_berr_n, board_sel;
  logic        start_conv = 1'b0, range_in = 1'b0, standby_in = 1'b0;
  logic [2:0]  os_in = 3'd0;
  logic [7:0][1:0] mux_sel_in = '0;
  logic        scanning, data_rdy;
  logic        das_busy, das_frstdata;
  logic [15:0] das_db;
  logic        das_reset, das_convst_n, das_cs_rd_n, das_range, das_stby_n;
  logic [2:0]  das_os;
  logic [7:0][1:0] mux_sel;
  logic [7:0][17:0] codes = '0;
  logic        test_pattern = 1'b0;
  int unsigned n_conv, n_reads, n_viol;
  logic        last_range;

  int checks = 0, failures = 0;

  typedef enum int {
    M_DAS_RESET, M_PATTERN_SCAN, M_D16_READ, M_D32_READ, M_BYTE_READ,
    M_OVERSAMPLING, M_READ_DURING_SCAN, M_SETTINGS_HELD, M_MUX_SELECT,
    M_STANDBY_BLOCK, M_BERR_WRITE, M_BERR_RANGE, M_BERR_ALIGN,
    M_OTHER_SLOT, M_WRONG_AM, M_GA_PARITY, M_NUM
  } mech_t;
  int mech [M_NUM];

  aic_seq_top dut (.*);

  ad7608_model das (
    .reset(das_reset), .convst_n(das_convst_n), .cs_rd_n(das_cs_rd_n),
    .range_sel(das_range), .stby_n(das_stby_n), .os(das_os), .codes, .test_pattern,
    .busy(das_busy), .frstdata(das_frstdata), .db(das_db),
    .n_conv, .n_reads, .n_viol, .last_range
  );

  vme_master_bfm bfm (
    .as_n(vme_as_n), .ds_n(vme_ds_n), .write_n(vme_write_n), .lword_n(vme_lword_n),
    .am(vme_am), .addr(vme_addr), .d_in(vme_d_out), .d_oe(vme_d_oe),
    .dtack_n(vme_dtack_n), .berr_n(vme_berr_n)
  );

  always #(TCLK / 2) clk = ~clk;

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  task automatic set_slot(input int s, input logic bad_parity);
    int grounded = 0;
    vme_ga_n = ~5'(s);
    for (int b = 0; b < 5; b++) if (!vme_ga_n[b]) grounded++;
    vme_gap_n = (grounded % 2 == 1);
    if (bad_parity) vme_gap_n = ~vme_gap_n;
  endtask

  task automatic vme_read16(input logic [15:0] a, input logic [1:0] ds, output logic [15:0] w);
    logic [31:0] d; logic berr, tmo; int lat;
    bfm.cycle(a, AM_A16_USER, 1'b1, 1'b1, ds, d, berr, tmo, lat);
    check(!berr && !tmo && d[31:16] == 16'h0, $sformatf("D16 read %h answered", a));
    w = d[15:0];
  endtask

  task automatic vme_read32(input logic [15:0] a, output logic [31:0] d);
    logic berr, tmo; int lat;
    bfm.cycle(a, AM_A16_SUP, 1'b0, 1'b1, 2'b00, d, berr, tmo, lat);
    check(!berr && !tmo, $sformatf("D32 read %h answered", a));
  endtask

  // start one scan and wait for it; returns clocks from start to data_rdy
  task automatic scan(output int clocks);
    int c;
    @(negedge clk);
    start_conv = 1'b1;
    c = 0;
    do begin @(negedge clk); c++; end while (data_rdy && c < 10);
    do begin @(negedge clk); c++; end while (!data_rdy && c < 100000);
    start_conv = 1'b0;
    clocks = c;
    check(data_rdy, "scan finished");
  endtask

  initial begin
    int          clocks, conv_cyc, n_prev;
    logic [15:0] w;
    logic [31:0] d;
    logic        berr, tmo;
    int          lat;

    set_slot(SLOT, 1'b0);
    #1 rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // DAS reset pulse
    check(das_reset, "DAS reset high at power-up");
    repeat (4) @(negedge clk);
    check(!das_reset && !scanning && !data_rdy, "DAS initialised, sequencer idle");
    if (!das_reset) mech[M_DAS_RESET]++;

    // ---- scan of the fixed test pattern, memory image read with D16 ----
    test_pattern = 1'b1;
    scan(clocks);
    for (int k = 0; k < 16; k++) begin
      logic [15:0] exp;
      exp = (k % 2 == 0) ? 16'hAAA0 + 16'(k / 2) : 16'hBBB0 + 16'(k / 2);
      vme_read16(BASE + 16'(2 * k), 2'b00, w);
      check(w == exp, $sformatf("memory word %0d = %h, expected %h", k, w, exp));
      mech[M_D16_READ]++;
    end
    mech[M_PATTERN_SCAN]++;
    // byte reads return the word on D15..D00
    vme_read16(BASE + 16'd4, 2'b01, w);
    check(w == 16'hAAA1, "byte read, DS1*");
    vme_read16(BASE + 16'd5, 2'b10, w);
    check(w == 16'hAAA1, "byte read, DS0*");
    mech[M_BYTE_READ]++;

    // ---- random codes, no oversampling, reference multiplexer input ----
    test_pattern = 1'b0;
    for (int c = 0; c < 8; c++) codes[c] = 18'($urandom);
    // calibration: channels 0-3 on the reference input, 4-7 on the field signal
    mux_sel_in = 16'h0055; range_in = 1'b1;
    repeat (3) @(negedge clk);
    check(mux_sel == 16'h0055 && das_range, "multiplexer select and range on the pins");
    mech[M_MUX_SELECT]++;
    scan(clocks);
    // start sync 3 + CONVST 1 + conversion + BUSY sync 2-3 + 16 reads x 3
    conv_cyc = int'($ceil((40.0 + 5000.0) / TCLK));
    check(clocks >= conv_cyc + 4 + 48 && clocks <= conv_cyc + 10 + 48,
          $sformatf("scan took %0d clocks, expected about %0d", clocks, conv_cyc + 55));
    check(last_range == 1'b1, "DAS saw the range setting");
    for (int n = 0; n < 8; n++) begin
      vme_read32(BASE + 16'(4 * n), d);
      check({d[31:16], d[15:14]} == codes[n] && d[13:0] == 14'h0,
            $sformatf("channel %0d: read %h, code %h", n, d, codes[n]));
      mech[M_D32_READ]++;
    end

    // ---- oversampling 64: 0.32 ms conversion, settings held, read during scan ----
    for (int c = 0; c < 8; c++) codes[c] = 18'($urandom);
    os_in = 3'd6;
    repeat (3) @(negedge clk);
    fork
      scan(clocks);
      begin
        wait (scanning);
        repeat (20) @(negedge clk);
        // settings changed during the scan do not reach the pins
        os_in = 3'd0; mux_sel_in = 16'hAAAA; range_in = 1'b0;
        repeat (5) @(negedge clk);
        check(das_os == 3'd6 && mux_sel == 16'h0055 && das_range, "settings held during scan");
        mech[M_SETTINGS_HELD]++;
        // the CPU may read while the DAS converts
        vme_read32(BASE + 16'd0, d);
        check(scanning, "VME read completed during the scan");
        mech[M_READ_DURING_SCAN]++;
      end
    join
    conv_cyc = int'($ceil((40.0 + 5000.0 * 64) / TCLK));
    check(clocks >= conv_cyc + 4 + 48 && clocks <= conv_cyc + 10 + 48,
          $sformatf("oversampled scan took %0d clocks, expected about %0d", clocks, conv_cyc + 55));
    for (int n = 0; n < 8; n++) begin
      vme_read32(BASE + 16'(4 * n), d);
      check({d[31:16], d[15:14]} == codes[n], $sformatf("oversampled channel %0d", n));
    end
    mech[M_OVERSAMPLING]++;
    repeat (3) @(negedge clk);
    check(das_os == 3'd0 && mux_sel == 16'hAAAA, "settings follow again after the scan");

    // ---- standby blocks a start ----
    standby_in = 1'b1;
    repeat (3) @(negedge clk);
    check(!das_stby_n, "standby on the pin");
    n_prev = n_conv;
    start_conv = 1'b1;
    repeat (30) @(negedge clk);
    start_conv = 1'b0;
    check(n_conv == n_prev && !scanning && data_rdy, "start ignored in standby");
    mech[M_STANDBY_BLOCK]++;
    standby_in = 1'b0;

    // ---- refused and foreign cycles ----
    bfm.cycle(BASE, AM_A16_USER, 1'b1, 1'b0, 2'b00, d, berr, tmo, lat);
    check(berr && !tmo, "write gets BERR*");
    if (berr) mech[M_BERR_WRITE]++;
    bfm.cycle(BASE + 16'h20, AM_A16_USER, 1'b1, 1'b1, 2'b00, d, berr, tmo, lat);
    check(berr && !tmo, "read past memory gets BERR*");
    if (berr) mech[M_BERR_RANGE]++;
    bfm.cycle(BASE + 16'h6, AM_A16_USER, 1'b0, 1'b1, 2'b00, d, berr, tmo, lat);
    check(berr && !tmo, "unaligned D32 gets BERR*");
    if (berr) mech[M_BERR_ALIGN]++;
    bfm.cycle(16'((SLOT + 1) << 11), AM_A16_USER, 1'b1, 1'b1, 2'b00, d, berr, tmo, lat);
    check(tmo && !board_sel, "other slot: no answer");
    if (tmo) mech[M_OTHER_SLOT]++;
    bfm.cycle(BASE, 6'h39, 1'b1, 1'b1, 2'b00, d, berr, tmo, lat);
    check(tmo, "A24 address modifier: no answer");
    if (tmo) mech[M_WRONG_AM]++;
    set_slot(SLOT, 1'b1);
    bfm.cycle(BASE, AM_A16_USER, 1'b1, 1'b1, 2'b00, d, berr, tmo, lat);
    check(tmo, "GA parity error: no answer");
    if (tmo) mech[M_GA_PARITY]++;
    set_slot(SLOT, 1'b0);
    vme_read16(BASE + 16'd2, 2'b00, w);
    check(w == {codes[0][1:0], 14'h0}, "board answers again");

    // ---- totals ----
    check(n_conv == 3, $sformatf("%0d conversions, expected 3", n_conv));
    check(n_reads == 48, $sformatf("%0d DAS reads, expected 48", n_reads));
    check(n_viol == 0, "no DAS protocol violations");
    check(bfm.drive_err == 0, "data driven at every DTACK*");
    for (int m = 0; m < M_NUM; m++) begin
      automatic mech_t mm = mech_t'(m);
      $display("mechanism %-20s seen %0d times", mm.name(), mech[m]);
      check(mech[m] > 0, $sformatf("mechanism %s exercised", mm.name()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
