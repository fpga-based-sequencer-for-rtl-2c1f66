// vme_master_bfm: behavioural VME bus master for the testbenches (not
// synthesizable). It drives the address, AM, LWORD*, WRITE*, AS* and
// DS1*/DS0* of A16 cycles with asynchronous timing and waits for DTACK* or
// BERR*, or gives up after a bus-timer delay when nobody answers.
//
// Task cycle(addr, am, lword_n, write_n, ds_n, data, berr, timeout, lat_ns):
// address and AM are set up 40 ns before AS* falls, the strobes fall 15 ns
// after AS*, and the data lines are sampled when DTACK* falls (they must be
// driven then; the flag drive_err counts cycles where they were not). lat_ns
// is the time from the strobes falling to DTACK* or BERR*. The strobes and
// AS* are then released together, and the next cycle waits until the slave
// has released DTACK* and BERR*.
module vme_master_bfm #(
  parameter int unsigned BUS_TIMER_NS = 4000
) (
  output logic        as_n,
  output logic [1:0]  ds_n,
  output logic        write_n,
  output logic        lword_n,
  output logic [5:0]  am,
  output logic [15:1] addr,
  input  logic [31:0] d_in,
  input  logic        d_oe,
  input  logic        dtack_n,
  input  logic        berr_n
);
  timeunit 1ns;
  timeprecision 1ps;

  int unsigned drive_err = 0;

  initial begin
    as_n = 1'b1; ds_n = 2'b11; write_n = 1'b1; lword_n = 1'b1;
    am = 6'h00; addr = '0;
  end

  task automatic cycle(input logic [15:0] a, input logic [5:0] m, input logic lw,
                       input logic wr_n, input logic [1:0] ds,
                       output logic [31:0] data, output logic berr,
                       output logic timeout, output int lat_ns);
    time t0;
    data = '0; berr = 1'b0; timeout = 1'b0;
    addr = a[15:1]; am = m; lword_n = lw; write_n = wr_n;
    #40ns as_n = 1'b0;
    #15ns ds_n = ds;
    t0 = $time;
    fork
      wait (!dtack_n || !berr_n);
      #(BUS_TIMER_NS * 1ns);
    join_any
    disable fork;
    lat_ns = int'($time - t0);
    if (!dtack_n) begin
      if (!d_oe) drive_err++;
      data = d_in;
    end else if (!berr_n) begin
      berr = 1'b1;
    end else begin
      timeout = 1'b1;
    end
    #10ns;
    ds_n = 2'b11; as_n = 1'b1;
    fork
      wait (dtack_n && berr_n);
      #(BUS_TIMER_NS * 1ns);
    join_any
    disable fork;
    write_n = 1'b1; lword_n = 1'b1;
    #30ns;
  endtask
endmodule
