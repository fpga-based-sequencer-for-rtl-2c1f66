// tb_vme_dtack: self-checking testbench of DTACK*/BERR* generation and the
// read data path of the VME slave.
//
// Drives board select, the strobe flag, the access class and the word address
// directly and serves the memory read port from a synchronous memory model
// filled with random words. For random D16, D32 and refused accesses it checks
// the data on the bus (D16: the word on D15..D00 and zeros above; D32: the
// even word on D31..D16 and the next word on D15..D00), the clock at which
// DTACK* or BERR* falls (3, 4 and 1 clocks after the strobe is seen), that
// data is driven whenever DTACK* is low, that the answer is held until the
// strobes rise and removed one clock later, and that an unselected board never
// answers.
module tb_vme_dtack;
  timeunit 1ns;
  timeprecision 1ps;

  import aic_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b1;
  logic        board_sel = 1'b0, ds_any = 1'b0;
  vme_acc_t    acc = ACC_NONE;
  logic [3:0]  word_addr = '0;
  logic        mem_re;
  logic [3:0]  mem_raddr;
  logic [15:0] mem_rdata = '0;
  logic [31:0] d_out;
  logic        d_oe, dtack_n, berr_n;
  logic [15:0] mem_model [16];
  int          checks = 0, failures = 0;
  int          n_d16 = 0, n_d32 = 0, n_err = 0;

  vme_dtack dut (.*);

  always #31.25 clk = ~clk;
  always @(posedge clk) if (mem_re) mem_rdata <= mem_model[mem_raddr];

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

  initial begin
    for (int i = 0; i < 16; i++) mem_model[i] = 16'($urandom);
    #1 rst_n = 1'b0;
    repeat (2) @(negedge clk);
    check(dtack_n && berr_n && !d_oe, "released after reset");
    rst_n = 1'b1;

    // an unselected board does not answer
    @(negedge clk);
    board_sel = 1'b0; ds_any = 1'b1; acc = ACC_NONE;
    repeat (8) begin
      @(negedge clk);
      check(dtack_n && berr_n && !d_oe, "no answer when not selected");
    end
    ds_any = 1'b0;

    for (int i = 0; i < 600; i++) begin
      int          sel, lat, exp_lat;
      logic [31:0] exp_d;
      int          w;
      sel = $urandom_range(2);
      w   = $urandom_range(15);
      @(negedge clk);
      board_sel = 1'b1;
      unique case (sel)
        0: begin acc = ACC_D16; word_addr = 4'(w); exp_d = {16'h0, mem_model[w]}; exp_lat = 3; n_d16++; end
        1: begin w = w & ~1; acc = ACC_D32; word_addr = 4'(w);
                 exp_d = {mem_model[w], mem_model[w + 1]}; exp_lat = 4; n_d32++; end
        default: begin acc = ACC_ERR; word_addr = 4'(w); exp_d = '0; exp_lat = 1; n_err++; end
      endcase
      ds_any = 1'b1;
      lat = 0;
      do begin
        @(posedge clk); #1 lat++;
        if (!dtack_n) check(d_oe, "data driven while DTACK* low");
      end while (dtack_n && berr_n && lat < 20);
      check(lat == exp_lat, $sformatf("answer after %0d clocks, expected %0d (acc %s)", lat, exp_lat, acc.name()));
      if (sel == 2) begin
        check(!berr_n && dtack_n && !d_oe, "refused access gets BERR* only");
      end else begin
        check(berr_n && !dtack_n, "read gets DTACK* only");
        check(d_out == exp_d, $sformatf("data %h expected %h (acc %s word %0d)", d_out, exp_d, acc.name(), w));
      end
      // answer held while the strobes stay low
      repeat ($urandom_range(4)) begin
        @(negedge clk);
        check(!dtack_n || !berr_n, "answer held while strobes low");
      end
      @(negedge clk);
      ds_any = 1'b0; acc = ACC_NONE;
      if ($urandom_range(1) != 0) board_sel = 1'b0;
      @(posedge clk); #1;
      check(dtack_n && berr_n && !d_oe, "answer removed after strobes rise");
    end
    check(n_d16 > 0 && n_d32 > 0 && n_err > 0, "all access classes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
