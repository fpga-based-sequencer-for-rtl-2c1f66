// vme_if: VME64x A16/D32 slave interface of the AIC-ISO sequencer.
//
// Lets the CPU read the scan memory over the VME bus. It is made of the three
// parts the card's VME interface is divided into: geographical addressing and
// AM decoding (vme_ga_am_decode), board select and word select generation
// (vme_select) and DTACK signal generation (vme_dtack). Because the bus is
// asynchronous, AS*, DS0* and DS1* pass through two-flip-flop synchronisers
// first; address, AM, LWORD* and WRITE* are only sampled once the synchronised
// strobes show they are stable.
//
// Interface: the VME signals as the FPGA sees them behind the card's bus
// transceivers, active-low where the bus is; the data lines are split into
// d_out and d_oe, the transceiver direction control. board_sel shows the board
// is addressed. The memory read port connects to seq_ram.
// Timing: a D16 read gets DTACK* 5 to 6 clocks after DS* falls, a D32 read one
// clock later; DTACK* rises 3 to 4 clocks after both strobes rise.
module vme_if
  import aic_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              as_n,
  input  logic [1:0]        ds_n,
  input  logic              write_n,
  input  logic              lword_n,
  input  logic [5:0]        am,
  input  logic [VME_AW-1:1] addr,
  input  logic [GA_W-1:0]   ga_n,
  input  logic              gap_n,
  output logic [VME_DW-1:0] d_out,
  output logic              d_oe,
  output logic              dtack_n,
  output logic              berr_n,
  output logic              board_sel,
  output logic              mem_re,
  output logic [MEM_AW-1:0] mem_raddr,
  input  logic [MEM_W-1:0]  mem_rdata
);
  logic              as_n_s;
  logic [1:0]        ds_n_s;
  logic [GA_W-1:0]   slot;
  logic              ga_ok, am_ok, hit;   // slot, ga_ok, am_ok: only hit is used here
  logic              ds_any;
  vme_acc_t          acc;
  logic [MEM_AW-1:0] word_addr;

  sync2 #(.RESET_VAL(1'b1)) u_sync_as  (.clk, .rst_n, .d(as_n),    .q(as_n_s));
  sync2 #(.RESET_VAL(1'b1)) u_sync_ds0 (.clk, .rst_n, .d(ds_n[0]), .q(ds_n_s[0]));
  sync2 #(.RESET_VAL(1'b1)) u_sync_ds1 (.clk, .rst_n, .d(ds_n[1]), .q(ds_n_s[1]));

  vme_ga_am_decode u_decode (
    .ga_n, .gap_n, .am, .addr, .slot, .ga_ok, .am_ok, .hit
  );

  vme_select u_select (
    .clk, .rst_n, .as_n_s, .ds_n_s, .write_n, .lword_n, .addr, .hit,
    .board_sel, .ds_any, .acc, .word_addr
  );

  vme_dtack u_dtack (
    .clk, .rst_n, .board_sel, .ds_any, .acc, .word_addr,
    .mem_re, .mem_raddr, .mem_rdata, .d_out, .d_oe, .dtack_n, .berr_n
  );
endmodule
