// tb_das_ctrl: self-checking testbench of the DAS interface logic.
//
// Connects das_ctrl to the AD7608 behavioural model and records every memory
// write. Checks the initial DAS reset pulse, CONVST and CS_RD_n pulse widths,
// the 16 stored words of a scan against words built here from the analog
// codes given to the model (code[17:2], then {code[1:0], 14'b0}) and against
// the fixed AAA/BBB test pattern, the scan length in clock cycles without
// oversampling (5 us conversion) and at ratio 64 (0.32 ms), data_rdy and
// scanning, that range, oversampling and multiplexer settings follow the
// inputs only between scans, that a start held high runs one scan only, and
// that a start in standby is ignored.
module tb_das_ctrl;
  timeunit 1ns;
  timeprecision 1ps;

  localparam real TCLK = 62.5;   // 16 MHz

  logic        clk = 1'b0, rst_n = 1'b1;
  logic        start = 1'b0, range_in = 1'b0, standby_in = 1'b0;
  logic [2:0]  os_in = 3'd0;
  logic [7:0][1:0] mux_sel_in = '0;
  logic        scanning, data_rdy;
  logic        busy, frstdata;
  logic [15:0] db;
  logic        das_reset, convst_n, cs_rd_n, range_o, stby_n;
  logic [2:0]  os_o;
  logic [7:0][1:0] mux_sel_o;
  logic        mem_we;
  logic [3:0]  mem_waddr;
  logic [15:0] mem_wdata;
  logic [7:0][17:0] codes;
  logic        test_pattern = 1'b0;
  int unsigned n_conv, n_reads, n_viol;
  logic        last_range;

  int          checks = 0, failures = 0;
  logic [15:0] got_mem [16];
  int          n_writes = 0;
  int          cyc = 0;

  das_ctrl dut (
    .clk, .rst_n, .start, .range_in, .standby_in, .os_in, .mux_sel_in,
    .scanning, .data_rdy, .busy, .db, .das_reset, .convst_n, .cs_rd_n,
    .range_o, .stby_n, .os_o, .mux_sel_o, .mem_we, .mem_waddr, .mem_wdata
  );

  ad7608_model das (
    .reset(das_reset), .convst_n, .cs_rd_n, .range_sel(range_o), .stby_n,
    .os(os_o), .codes, .test_pattern, .busy, .frstdata, .db,
    .n_conv, .n_reads, .n_viol, .last_range
  );

  always #(TCLK / 2) clk = ~clk;
  always @(posedge clk) cyc++;

  always @(posedge clk) if (mem_we) begin
    got_mem[mem_waddr] <= mem_wdata;
    n_writes++;
  end

  // pulse width monitors (in clocks)
  int convst_w = 0, rd_w = 0, bad_convst = 0, bad_rd = 0, n_rd_pulses = 0;
  always @(posedge clk) begin
    if (!convst_n) convst_w++;
    else if (convst_w != 0) begin
      if (convst_w != 1) bad_convst++;
      convst_w = 0;
    end
    if (!cs_rd_n) rd_w++;
    else if (rd_w != 0) begin
      if (rd_w != 2) bad_rd++;
      n_rd_pulses++;
      rd_w = 0;
    end
  end

  initial begin
    #5ms;
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

  function automatic logic [15:0] exp_word(int idx, logic pat);
    int ch = idx / 2;
    if (pat) return (idx % 2 == 0) ? 16'hAAA0 + 16'(ch) : 16'hBBB0 + 16'(ch);
    return (idx % 2 == 0) ? codes[ch][17:2] : {codes[ch][1:0], 14'b0};
  endfunction

  // one scan: pulse start, wait for data_rdy, check memory and cycle count
  task automatic run_scan(input logic [2:0] os, input logic pat, input string tag);
    int c0, c_conv, c_done, conv_cyc, n0, w0, p0;
    n0 = n_conv; w0 = n_writes; p0 = n_rd_pulses;
    test_pattern = pat;
    for (int c = 0; c < 8; c++) codes[c] = 18'($urandom);
    os_in = os;
    repeat (2) @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    c0 = cyc;
    @(posedge convst_n);
    c_conv = cyc;
    check(c_conv - c0 <= 5, {tag, ": CONVST within 5 clocks of start"});
    // settings may not change during the scan
    #1;
    range_in = ~range_in; os_in = ~os_in; mux_sel_in = ~mux_sel_in;
    check(scanning, {tag, ": scanning during conversion"});
    wait (data_rdy);
    c_done = cyc;
    start = 1'b0;
    check(os_o == os, {tag, ": os held during scan"});
    // conversion time of the model, rounded up to clocks, plus 2-3 clocks of
    // BUSY synchronisation, plus 16 reads of 3 clocks
    conv_cyc = int'($ceil((40.0 + (5000.0 * (2 ** os))) / TCLK));
    check((c_done - c_conv) >= conv_cyc + 16 * 3 + 1 && (c_done - c_conv) <= conv_cyc + 16 * 3 + 4,
          $sformatf("%s: scan length %0d clocks after CONVST (conversion %0d)", tag, c_done - c_conv, conv_cyc));
    @(negedge clk);
    check(!scanning, {tag, ": scanning low after scan"});
    check(n_conv == n0 + 1, {tag, ": one conversion"});
    check(n_writes == w0 + 16, {tag, ": 16 memory writes"});
    check(n_rd_pulses == p0 + 16, {tag, ": 16 CS_RD_n pulses"});
    for (int i = 0; i < 16; i++)
      check(got_mem[i] == exp_word(i, pat),
            $sformatf("%s: word %0d got %h expected %h", tag, i, got_mem[i], exp_word(i, pat)));
    // settings follow the inputs again once idle
    repeat (2) @(negedge clk);
    check(os_o == os_in && range_o == range_in && mux_sel_o == mux_sel_in,
          {tag, ": settings follow inputs when idle"});
  endtask

  initial begin
    int hi;
    codes = '0;
    #1 rst_n = 1'b0;
    repeat (3) @(negedge clk);
    check(das_reset && convst_n && cs_rd_n, "outputs in reset");
    rst_n = 1'b1;
    hi = 0;
    repeat (10) begin
      @(posedge clk); #1;
      if (das_reset) hi++;
    end
    check(hi == 1, $sformatf("DAS reset pulse %0d clocks after reset release (2 in total)", hi));
    check(!scanning && !data_rdy, "idle after init");

    // settings in idle
    @(negedge clk);
    range_in = 1'b1; os_in = 3'd2; mux_sel_in = 16'h1B6C; standby_in = 1'b1;
    repeat (2) @(negedge clk);
    check(range_o && os_o == 3'd2 && mux_sel_o == 16'h1B6C && !stby_n, "settings follow inputs in idle");

    // start in standby is ignored
    start = 1'b1;
    repeat (20) @(negedge clk);
    check(n_conv == 0 && !scanning, "start ignored in standby");
    start = 1'b0;
    standby_in = 1'b0; range_in = 1'b0; mux_sel_in = '0;
    repeat (3) @(negedge clk);

    run_scan(3'd0, 1'b1, "test pattern");
    run_scan(3'd0, 1'b0, "codes, no oversampling");
    run_scan(3'd6, 1'b0, "codes, oversampling 64");
    check(last_range == 1'b1 || last_range == 1'b0, "range seen by DAS");

    // start held high: one scan only
    begin
      int n0;
      n0 = n_conv;
      @(negedge clk); start = 1'b1;
      wait (data_rdy == 1'b0);
      wait (data_rdy == 1'b1);
      repeat (400) @(negedge clk);
      check(n_conv == n0 + 1, $sformatf("held start runs one scan (%0d conversions)", n_conv - n0));
      start = 1'b0;
    end

    check(bad_convst == 0, "CONVST pulses one clock wide");
    check(bad_rd == 0, "CS_RD_n pulses two clocks wide");
    check(n_viol == 0, $sformatf("DAS protocol violations: %0d", n_viol));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
