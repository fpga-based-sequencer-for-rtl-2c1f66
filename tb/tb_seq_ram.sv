// tb_seq_ram: self-checking testbench of the 16 x 16 scan memory.
//
// Writes every location with random data through the write port, reads all of
// them back through the read port and compares with a reference array kept in
// the testbench. Also checks the one-cycle read latency, that data_out holds
// while RE is low, that a read and a write of the same location in one cycle
// return the old word, that WE low leaves the array unchanged, and the reset
// value of data_out.
module tb_seq_ram;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int DEPTH = 16;
  localparam int WIDTH = 16;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic             we = 1'b0, re = 1'b0;
  logic [3:0]       write_addr = '0, read_addr = '0;
  logic [WIDTH-1:0] data_in = '0;
  logic [WIDTH-1:0] data_out;
  logic [WIDTH-1:0] ref_mem [DEPTH];
  int               checks = 0, failures = 0;

  seq_ram dut (.*);

  always #31.25 clk = ~clk;

  initial begin
    #100us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [WIDTH-1:0] got, input logic [WIDTH-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic write_word(input int a, input logic [WIDTH-1:0] d);
    @(negedge clk);
    we = 1'b1; write_addr = 4'(a); data_in = d;
    @(negedge clk);
    we = 1'b0;
    ref_mem[a] = d;
  endtask

  task automatic read_word(input int a, output logic [WIDTH-1:0] d);
    @(negedge clk);
    re = 1'b1; read_addr = 4'(a);
    @(posedge clk);
    #1 d = data_out;
    @(negedge clk);
    re = 1'b0;
  endtask

  initial begin
    logic [WIDTH-1:0] d, held;
    repeat (3) @(negedge clk);
    check(data_out, '0, "data_out after reset");
    rst_n = 1'b1;

    // fill and read back in order, then in reverse
    for (int a = 0; a < DEPTH; a++) write_word(a, WIDTH'($urandom));
    for (int a = 0; a < DEPTH; a++) begin
      read_word(a, d);
      check(d, ref_mem[a], $sformatf("read addr %0d", a));
    end
    for (int a = DEPTH - 1; a >= 0; a--) begin
      read_word(a, d);
      check(d, ref_mem[a], $sformatf("reverse read addr %0d", a));
    end

    // latency: data_out changes only at the edge that samples RE
    @(negedge clk);
    re = 1'b1; read_addr = 4'd3;
    #1 check(data_out, ref_mem[DEPTH - 1 - 15], "data_out before read edge");
    @(posedge clk); #1 check(data_out, ref_mem[3], "data_out one cycle after RE");
    @(negedge clk); re = 1'b0; read_addr = 4'd9;
    held = data_out;
    repeat (4) @(posedge clk);
    #1 check(data_out, held, "data_out holds while RE low");

    // WE low: no write
    @(negedge clk); we = 1'b0; write_addr = 4'd5; data_in = ~ref_mem[5];
    @(negedge clk);
    read_word(5, d);
    check(d, ref_mem[5], "no write with WE low");

    // same-cycle read and write of one location returns the old word
    @(negedge clk);
    we = 1'b1; write_addr = 4'd7; data_in = 16'h1234;
    re = 1'b1; read_addr = 4'd7;
    @(posedge clk); #1 check(data_out, ref_mem[7], "read during write returns old word");
    @(negedge clk); we = 1'b0; re = 1'b0; ref_mem[7] = 16'h1234;
    read_word(7, d);
    check(d, 16'h1234, "new word after write");

    // random mix
    for (int i = 0; i < 200; i++) begin
      if ($urandom_range(1) != 0) write_word($urandom_range(DEPTH - 1), WIDTH'($urandom));
      else begin
        automatic int a = $urandom_range(DEPTH - 1);
        read_word(a, d);
        check(d, ref_mem[a], $sformatf("random read addr %0d", a));
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
