// tb_vme_if: self-checking testbench of the VME64x slave interface.
//
// A behavioural VME master runs asynchronous A16 cycles against vme_if, whose
// memory read port is served by a synchronous memory model holding random
// words. The board sits in slot 5 (GA* pins and odd parity set accordingly),
// so its window starts at 0x2800. Checks: D16 reads of all 16 words, D32 reads
// of all 8 channels (even word on D31..D16), byte reads on either strobe, the
// DTACK* latency in clocks, BERR* for a write, a read past the memory and an
// unaligned long word, and no answer at all (bus timer) for another slot's
// address, an A24 address modifier or a GA parity error.
module tb_vme_if;
  timeunit 1ns;
  timeprecision 1ps;

  localparam real TCLK = 62.5;
  localparam int  SLOT = 5;
  localparam logic [15:0] BASE = 16'(SLOT << 11);

  logic        clk = 1'b0, rst_n = 1'b1;
  logic        as_n, write_n, lword_n;
  logic [1:0]  ds_n;
  logic [5:0]  am;
  logic [15:1] addr;
  logic [4:0]  ga_n;
  logic        gap_n;
  logic [31:0] d_out;
  logic        d_oe, dtack_n, berr_n, board_sel;
  logic        mem_re;
  logic [3:0]  mem_raddr;
  logic [15:0] mem_rdata = '0;
  logic [15:0] mem_model [16];
  int          checks = 0, failures = 0;
  int          n_sel = 0;

  vme_if dut (.*);

  vme_master_bfm bfm (
    .as_n, .ds_n, .write_n, .lword_n, .am, .addr,
    .d_in(d_out), .d_oe, .dtack_n, .berr_n
  );

  always #(TCLK / 2) clk = ~clk;
  always @(posedge clk) if (mem_re) mem_rdata <= mem_model[mem_raddr];
  always @(posedge board_sel) n_sel++;

  initial begin
    #10ms;
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

  // GA* pins for a slot, with GAP* giving an odd number of grounded pins
  task automatic set_slot(input int s, input logic bad_parity);
    int grounded = 0;
    ga_n = ~5'(s);
    for (int b = 0; b < 5; b++) if (!ga_n[b]) grounded++;
    gap_n = (grounded % 2 == 1);
    if (bad_parity) gap_n = ~gap_n;
  endtask

  task automatic expect_read(input logic [15:0] a, input logic lw, input logic [1:0] ds,
                             input logic [31:0] exp, input int min_clk, input int max_clk,
                             input string what);
    logic [31:0] d;
    logic        berr, tmo;
    int          lat;
    bfm.cycle(a, 6'h29, lw, 1'b1, ds, d, berr, tmo, lat);
    check(!berr && !tmo, {what, ": DTACK* answered"});
    check(d == exp, $sformatf("%s: data %h expected %h", what, d, exp));
    check(lat >= int'(min_clk * TCLK) - 1 && lat <= int'(max_clk * TCLK) + 1,
          $sformatf("%s: DTACK* after %0d ns", what, lat));
  endtask

  task automatic expect_berr(input logic [15:0] a, input logic [5:0] m, input logic lw,
                             input logic wr_n, input logic [1:0] ds, input string what);
    logic [31:0] d;
    logic        berr, tmo;
    int          lat;
    bfm.cycle(a, m, lw, wr_n, ds, d, berr, tmo, lat);
    check(berr && !tmo, {what, ": BERR*"});
  endtask

  task automatic expect_silence(input logic [15:0] a, input logic [5:0] m, input string what);
    logic [31:0] d;
    logic        berr, tmo;
    int          lat, s0;
    s0 = n_sel;
    bfm.cycle(a, m, 1'b1, 1'b1, 2'b00, d, berr, tmo, lat);
    check(tmo && !berr, {what, ": no answer"});
    check(n_sel == s0, {what, ": board not selected"});
  endtask

  initial begin
    for (int i = 0; i < 16; i++) mem_model[i] = 16'($urandom);
    set_slot(SLOT, 1'b0);
    #1 rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);

    // D16 reads: strobe synchronisation (2-3 clocks) plus 3 clocks
    for (int k = 0; k < 16; k++)
      expect_read(BASE + 16'(2 * k), 1'b1, 2'b00, {16'h0, mem_model[k]}, 4, 7, $sformatf("D16 word %0d", k));
    // D32 reads: one clock more
    for (int n = 0; n < 8; n++)
      expect_read(BASE + 16'(4 * n), 1'b0, 2'b00, {mem_model[2 * n], mem_model[2 * n + 1]}, 5, 8,
                  $sformatf("D32 channel %0d", n));
    // byte reads on DS1* only and DS0* only
    expect_read(BASE + 16'd6, 1'b1, 2'b01, {16'h0, mem_model[3]}, 4, 7, "byte read DS1*");
    expect_read(BASE + 16'd6, 1'b1, 2'b10, {16'h0, mem_model[3]}, 4, 7, "byte read DS0*");
    // supervisory AM works as well
    begin
      logic [31:0] d; logic berr, tmo; int lat;
      bfm.cycle(BASE + 16'd8, 6'h2D, 1'b1, 1'b1, 2'b00, d, berr, tmo, lat);
      check(!berr && !tmo && d == {16'h0, mem_model[4]}, "supervisory A16 read");
    end

    // refused accesses
    expect_berr(BASE + 16'd0, 6'h29, 1'b1, 1'b0, 2'b00, "D16 write");
    expect_berr(BASE + 16'd4, 6'h29, 1'b0, 1'b0, 2'b00, "D32 write");
    expect_berr(BASE + 16'h40, 6'h29, 1'b1, 1'b1, 2'b00, "read past memory");
    expect_berr(BASE + 16'd2, 6'h29, 1'b0, 1'b1, 2'b00, "unaligned D32");

    // not for this board
    expect_silence(16'((SLOT + 1) << 11), 6'h29, "other slot");
    expect_silence(BASE, 6'h39, "A24 address modifier");
    set_slot(SLOT, 1'b1);
    expect_silence(BASE, 6'h29, "GA parity error");
    set_slot(SLOT, 1'b0);
    expect_read(BASE + 16'd30, 1'b1, 2'b00, {16'h0, mem_model[15]}, 4, 7, "read after silence");

    check(bfm.drive_err == 0, "data driven at every DTACK*");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
