// tb_vme_select: self-checking testbench of board select and word select.
//
// Drives already-synchronised AS*, DS1*/DS0*, WRITE*, LWORD*, the address and
// the decoder's hit, cycle by cycle. For random cycles it checks that board
// select is taken from hit when AS* falls and is kept although address and hit
// change afterwards, that it drops when AS* rises, and that the access class
// and word address match the board's memory map worked out here from byte
// addresses: a D16 or byte read of byte address 2k (k < 16) reads word k, a
// D32 read of byte address 4n (n < 8) reads words 2n and 2n+1, everything
// else (writes, addresses past 32 bytes, unaligned or partial long words) is
// an error.
module tb_vme_select;
  timeunit 1ns;
  timeprecision 1ps;

  import aic_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b1;
  logic        as_n_s = 1'b1;
  logic [1:0]  ds_n_s = 2'b11;
  logic        write_n = 1'b1, lword_n = 1'b1;
  logic [15:1] addr = '0;
  logic        hit = 1'b0;
  logic        board_sel, ds_any;
  vme_acc_t    acc;
  logic [3:0]  word_addr;
  int          checks = 0, failures = 0;
  int          n_d16 = 0, n_d32 = 0, n_err = 0, n_unsel = 0;

  vme_select dut (.*);

  always #31.25 clk = ~clk;

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
    #1 rst_n = 1'b0;
    repeat (2) @(negedge clk);
    check(!board_sel && acc == ACC_NONE, "idle after reset");
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      int          byte_addr;
      logic        h, lw, wr;
      logic [1:0]  ds;
      vme_acc_t    exp_acc;
      int          exp_word;
      byte_addr = ($urandom_range(3) == 0) ? 2 * $urandom_range(1023) : 2 * $urandom_range(19);
      h  = ($urandom_range(3) != 0);
      lw = 1'($urandom_range(1));
      wr = ($urandom_range(5) != 0);
      ds = ($urandom_range(2) == 0) ? 2'($urandom_range(2)) : 2'b00;
      // address phase
      @(negedge clk);
      addr = {5'($urandom), 10'(byte_addr / 2)};
      hit = h; lword_n = lw;
      as_n_s = 1'b0;
      @(negedge clk);
      check(board_sel == h, $sformatf("board select = hit %0b", h));
      // address lines and hit may change now; the latched values count
      addr = 15'($urandom); hit = ~h; lword_n = ~lw;
      write_n = wr;
      @(negedge clk);
      check(board_sel == h, "board select held while AS* low");
      check(acc == ACC_NONE && !ds_any, "no access before a data strobe");
      ds_n_s = ds;
      #1;
      // expected class from the byte address
      exp_word = byte_addr / 2;
      if (!h) exp_acc = ACC_NONE;
      else if (!wr || byte_addr >= 32) exp_acc = ACC_ERR;
      else if (!lw) begin
        if (ds == 2'b00 && byte_addr % 4 == 0) exp_acc = ACC_D32;
        else exp_acc = ACC_ERR;
      end else exp_acc = ACC_D16;
      check(ds_any, "ds_any with a strobe low");
      check(acc == exp_acc, $sformatf("acc %s expected %s (byte %0d lw %0b wr %0b ds %b)",
                                      acc.name(), exp_acc.name(), byte_addr, lw, wr, ds));
      if (exp_acc == ACC_D16 || exp_acc == ACC_D32)
        check(word_addr == 4'(exp_word), $sformatf("word_addr %0d expected %0d", word_addr, exp_word));
      unique case (exp_acc)
        ACC_D16: n_d16++;
        ACC_D32: n_d32++;
        ACC_ERR: n_err++;
        default: n_unsel++;
      endcase
      @(negedge clk);
      ds_n_s = 2'b11;
      #1 check(acc == ACC_NONE && !ds_any, "no access after strobes rise");
      @(negedge clk);
      as_n_s = 1'b1;
      @(negedge clk);
      check(!board_sel, "board select drops after AS* rises");
    end
    check(n_d16 > 0 && n_d32 > 0 && n_err > 0 && n_unsel > 0,
          $sformatf("all classes seen: d16 %0d d32 %0d err %0d unselected %0d", n_d16, n_d32, n_err, n_unsel));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
