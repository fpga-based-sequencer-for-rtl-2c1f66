// tb_vme_ga_am_decode: exhaustive self-checking testbench of the
// geographical address and address-modifier decoder.
//
// For every combination of GA4*..GA0* and GAP*, a set of address modifiers
// (the two A16 codes and others) and addresses inside and outside the slot's
// window, it computes the expected slot, parity, AM and hit results by
// counting grounded pins and comparing fields, and compares them with the
// decoder's outputs.
module tb_vme_ga_am_decode;
  timeunit 1ns;
  timeprecision 1ps;

  logic [4:0]  ga_n;
  logic        gap_n;
  logic [5:0]  am;
  logic [15:1] addr;
  logic [4:0]  slot;
  logic        ga_ok, am_ok, hit;
  int          checks = 0, failures = 0;
  int          n_hit = 0;

  vme_ga_am_decode dut (.*);

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    automatic logic [5:0] ams [8] = '{6'h29, 6'h2D, 6'h39, 6'h3D, 6'h09, 6'h0D, 6'h2F, 6'h28};
    for (int g = 0; g < 32; g++) begin
      for (int p = 0; p < 2; p++) begin
        for (int m = 0; m < 8; m++) begin
          for (int k = 0; k < 6; k++) begin
            int grounded;
            int exp_slot;
            logic exp_ga, exp_am, exp_hit;
            ga_n  = 5'(g);
            gap_n = 1'(p);
            am    = ams[m];
            exp_slot = 31 - g;
            // even k: inside the slot's window, odd k: another window
            if (k % 2 == 0) addr = {5'(exp_slot), 10'($urandom)};
            else            addr = {5'(exp_slot + 1 + $urandom_range(30)), 10'($urandom)};
            #1;
            grounded = 0;
            for (int b = 0; b < 5; b++) if (!ga_n[b]) grounded++;
            if (!gap_n) grounded++;
            exp_ga  = (grounded % 2 == 1) && (exp_slot != 0);
            exp_am  = (am == 6'h29) || (am == 6'h2D);
            exp_hit = exp_ga && exp_am && (k % 2 == 0);
            check(slot == 5'(exp_slot), $sformatf("slot ga_n=%b", ga_n));
            check(ga_ok == exp_ga, $sformatf("ga_ok ga_n=%b gap_n=%b", ga_n, gap_n));
            check(am_ok == exp_am, $sformatf("am_ok am=%h", am));
            check(hit == exp_hit, $sformatf("hit ga_n=%b gap_n=%b am=%h addr=%h", ga_n, gap_n, am, addr));
            if (hit) n_hit++;
          end
        end
      end
    end
    check(n_hit > 0, "at least one hit seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
