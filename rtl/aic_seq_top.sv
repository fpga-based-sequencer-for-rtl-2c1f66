// aic_seq_top: FPGA sequencer of the analog input card with isolation.
//
// The card digitises 8 isolated analog inputs with an 18-bit simultaneous-
// sampling DAS and makes the results available to a CPU on a VME64x bus. To
// keep the CPU load low, the FPGA runs the whole acquisition: on a start from
// the CPU, the DAS interface logic (das_ctrl) converts all channels, reads
// them from the DAS in two 16-bit reads each and writes them into the 16 x 16
// scan memory (seq_ram); the CPU then reads the memory over VME (vme_if),
// either one 16-bit word or one whole channel (two words) per D32 cycle.
//
// Memory map of the board's A16 window (base = slot number << 11):
//   base + 4*n      D32: channel n, first read (bits 17:2) on D31..D16 and
//                   second read (bits 1:0) on D15..D00, n = 0..7
//   base + 2*k      D16: memory word k, k = 0..15 (word 2n+1 holds the
//                   second read of channel n)
// Any write, and any read beyond the 32 bytes of memory, ends with BERR*.
//
// Control from the CPU (start_conv, range_in, standby_in, os_in, mux_sel_in)
// and the scan status (scanning, data_rdy) are plain ports of the sequencer;
// how they reach the CPU is outside it. One clock, clk, is assumed to be the
// 16 MHz VME system clock; rst_n is the active-low system reset.
// The three-block structure follows the card; the memory map, the D32 packing
// and the status ports are this design's own choices.
module aic_seq_top
  import aic_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // VME64x slave (behind the bus transceivers)
  input  logic              vme_as_n,
  input  logic [1:0]        vme_ds_n,
  input  logic              vme_write_n,
  input  logic              vme_lword_n,
  input  logic [5:0]        vme_am,
  input  logic [VME_AW-1:1] vme_addr,
  input  logic [GA_W-1:0]   vme_ga_n,
  input  logic              vme_gap_n,
  output logic [VME_DW-1:0] vme_d_out,
  output logic              vme_d_oe,
  output logic              vme_dtack_n,
  output logic              vme_berr_n,
  output logic              board_sel,
  // CPU control and status
  input  logic              start_conv,
  input  logic              range_in,
  input  logic              standby_in,
  input  logic [2:0]        os_in,
  input  logic [N_CH-1:0][1:0] mux_sel_in,
  output logic              scanning,
  output logic              data_rdy,
  // DAS chip
  input  logic              das_busy,
  input  logic [DB_W-1:0]   das_db,
  output logic              das_reset,
  output logic              das_convst_n,
  output logic              das_cs_rd_n,
  output logic              das_range,
  output logic              das_stby_n,
  output logic [2:0]        das_os,
  // analog input multiplexers, one 2-bit select per channel:
  // 0 field signal, 1 reference, 2 and 3 ground
  output logic [N_CH-1:0][1:0] mux_sel
);
  logic              mem_we, mem_re;
  logic [MEM_AW-1:0] mem_waddr, mem_raddr;
  logic [MEM_W-1:0]  mem_wdata, mem_rdata;

  das_ctrl u_das (
    .clk, .rst_n,
    .start      (start_conv),
    .range_in, .standby_in, .os_in, .mux_sel_in,
    .scanning, .data_rdy,
    .busy       (das_busy),
    .db         (das_db),
    .das_reset,
    .convst_n   (das_convst_n),
    .cs_rd_n    (das_cs_rd_n),
    .range_o    (das_range),
    .stby_n     (das_stby_n),
    .os_o       (das_os),
    .mux_sel_o  (mux_sel),
    .mem_we, .mem_waddr, .mem_wdata
  );

  seq_ram #(.DEPTH(MEM_DEPTH), .WIDTH(MEM_W)) u_ram (
    .clk, .rst_n,
    .we         (mem_we),
    .write_addr (mem_waddr),
    .data_in    (mem_wdata),
    .re         (mem_re),
    .read_addr  (mem_raddr),
    .data_out   (mem_rdata)
  );

  vme_if u_vme (
    .clk, .rst_n,
    .as_n       (vme_as_n),
    .ds_n       (vme_ds_n),
    .write_n    (vme_write_n),
    .lword_n    (vme_lword_n),
    .am         (vme_am),
    .addr       (vme_addr),
    .ga_n       (vme_ga_n),
    .gap_n      (vme_gap_n),
    .d_out      (vme_d_out),
    .d_oe       (vme_d_oe),
    .dtack_n    (vme_dtack_n),
    .berr_n     (vme_berr_n),
    .board_sel,
    .mem_re, .mem_raddr, .mem_rdata
  );
endmodule
