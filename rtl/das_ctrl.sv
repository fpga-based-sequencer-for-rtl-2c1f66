// das_ctrl: DAS interface logic of the AIC-ISO sequencer.
//
// Drives an AD7608-class 8-channel, 18-bit simultaneous-sampling DAS over its
// 16-bit parallel interface and stores one scan in the sequencer memory. It
// follows the scan flow of the card: initialise the DAS, wait for a start from
// the CPU, set the channel number to the first channel, issue CONVST, wait
// until BUSY reports the conversion over, then for each channel issue two
// active-low CS_RD_n reads (bits 17:2 first, bits 1:0 second), increment the
// channel number, and stop after 8 channels.
//
// Interface:
//   start          rising edge starts one scan (from the CPU; asynchronous,
//                  synchronised here). Ignored during a scan or in standby.
//   range_in, standby_in, os_in, mux_sel_in
//                  DAS range, standby, oversampling ratio and, per channel, the
//                  input multiplexer selection (0 field signal, 1 reference,
//                  2 and 3 ground) requested by the CPU. They are copied to
//                  range_o, stby_n, os_o and mux_sel_o only while no scan runs,
//                  so they cannot change in the middle of a scan.
//   das_reset, convst_n, cs_rd_n, busy, db
//                  DAS chip pins. busy is asynchronous and synchronised here.
//   mem_we, mem_waddr, mem_wdata
//                  write port of the memory: channel c, read k goes to address
//                  WORDS_PER_CH*c + k.
//   scanning       high from the start of a scan to its last memory write.
//   data_rdy       set when all channels are stored, cleared by the next start.
//
// Timing, at the 16 MHz VME system clock this design assumes: after reset,
// das_reset is high for RESET_CYCLES. A scan is: CONVST low for CONVST_CYCLES,
// the conversion time of the DAS (BUSY high; 5 us without oversampling, up to
// 0.32 ms with it), two to three cycles of BUSY synchronisation, then
// 2*N_CH reads of RD_LOW_CYCLES low plus RD_HIGH_CYCLES high. The data bus is
// sampled at the clock edge that ends the last low cycle of each read. The
// pulse widths are this design's choice, sized for the DAS's minimum timing.
// Gating start by standby is also this design's choice.
module das_ctrl
  import aic_pkg::*;
#(
  parameter int unsigned N_CHAN         = N_CH,
  parameter int unsigned WORDS          = WORDS_PER_CH,
  parameter int unsigned RESET_CYCLES   = 2,
  parameter int unsigned CONVST_CYCLES  = 1,
  parameter int unsigned RD_LOW_CYCLES  = 2,
  parameter int unsigned RD_HIGH_CYCLES = 1,
  localparam int unsigned AW = $clog2(N_CHAN * WORDS),
  localparam int unsigned CW = (N_CHAN > 1) ? $clog2(N_CHAN) : 1,
  localparam int unsigned KW = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  // CPU side
  input  logic            start,
  input  logic            range_in,
  input  logic            standby_in,
  input  logic [2:0]      os_in,
  input  logic [N_CHAN-1:0][1:0] mux_sel_in,
  output logic            scanning,
  output logic            data_rdy,
  // DAS chip
  input  logic            busy,
  input  logic [DB_W-1:0] db,
  output logic            das_reset,
  output logic            convst_n,
  output logic            cs_rd_n,
  output logic            range_o,
  output logic            stby_n,
  output logic [2:0]      os_o,
  // analog input multiplexers
  output logic [N_CHAN-1:0][1:0] mux_sel_o,
  // memory write port
  output logic            mem_we,
  output logic [AW-1:0]   mem_waddr,
  output logic [DB_W-1:0] mem_wdata
);
  das_state_t    state;
  logic [7:0]    cnt;
  logic [CW-1:0] ch_no;
  logic [KW-1:0] word_no;
  logic          busy_s, start_s, start_q;
  logic          start_req;

  sync2 #(.RESET_VAL(1'b0)) u_sync_busy  (.clk, .rst_n, .d(busy),  .q(busy_s));
  sync2 #(.RESET_VAL(1'b0)) u_sync_start (.clk, .rst_n, .d(start), .q(start_s));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) start_q <= 1'b0;
    else        start_q <= start_s;
  end
  assign start_req = start_s && !start_q && stby_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= DAS_INIT;
      cnt       <= '0;
      ch_no     <= '0;
      word_no   <= '0;
      das_reset <= 1'b1;
      convst_n  <= 1'b1;
      cs_rd_n   <= 1'b1;
      range_o   <= 1'b0;
      stby_n    <= 1'b1;
      os_o      <= 3'd0;
      mux_sel_o <= '0;
      data_rdy  <= 1'b0;
      mem_we    <= 1'b0;
      mem_waddr <= '0;
      mem_wdata <= '0;
    end else begin
      mem_we <= 1'b0;
      unique case (state)
        DAS_INIT: begin
          if (cnt == 8'(RESET_CYCLES - 1)) begin
            das_reset <= 1'b0;
            cnt       <= '0;
            state     <= DAS_IDLE;
          end else begin
            cnt <= cnt + 8'd1;
          end
        end
        DAS_IDLE: begin
          range_o   <= range_in;
          stby_n    <= !standby_in;
          os_o      <= os_in;
          mux_sel_o <= mux_sel_in;
          if (start_req) begin
            data_rdy <= 1'b0;
            ch_no    <= '0;
            word_no  <= '0;
            cnt      <= '0;
            convst_n <= 1'b0;
            state    <= DAS_CONVST;
          end
        end
        DAS_CONVST: begin
          if (cnt == 8'(CONVST_CYCLES - 1)) begin
            convst_n <= 1'b1;
            cnt      <= '0;
            state    <= DAS_WAIT_BUSY;
          end else begin
            cnt <= cnt + 8'd1;
          end
        end
        DAS_WAIT_BUSY: begin
          if (busy_s) state <= DAS_WAIT_DONE;
        end
        DAS_WAIT_DONE: begin
          if (!busy_s) begin
            cs_rd_n <= 1'b0;
            cnt     <= '0;
            state   <= DAS_RD_LOW;
          end
        end
        DAS_RD_LOW: begin
          if (cnt == 8'(RD_LOW_CYCLES - 1)) begin
            cs_rd_n   <= 1'b1;
            mem_we    <= 1'b1;
            mem_waddr <= AW'(ch_no * WORDS + word_no);
            mem_wdata <= db;
            cnt       <= '0;
            state     <= DAS_RD_HIGH;
          end else begin
            cnt <= cnt + 8'd1;
          end
        end
        DAS_RD_HIGH: begin
          if (cnt == 8'(RD_HIGH_CYCLES - 1)) begin
            cnt <= '0;
            if (word_no == KW'(WORDS - 1)) begin
              word_no <= '0;
              if (ch_no == CW'(N_CHAN - 1)) begin
                data_rdy <= 1'b1;
                state    <= DAS_IDLE;
              end else begin
                ch_no   <= ch_no + 1'b1;
                cs_rd_n <= 1'b0;
                state   <= DAS_RD_LOW;
              end
            end else begin
              word_no <= word_no + 1'b1;
              cs_rd_n <= 1'b0;
              state   <= DAS_RD_LOW;
            end
          end else begin
            cnt <= cnt + 8'd1;
          end
        end
        default: state <= DAS_INIT;
      endcase
    end
  end

  assign scanning = (state != DAS_IDLE) && (state != DAS_INIT);

  // CS_RD_n and CONVST are never low together
  a_no_rd_during_convst: assert property (@(posedge clk) disable iff (!rst_n)
    !(!cs_rd_n && !convst_n));
  // memory writes stay inside one scan's address range
  a_waddr_range: assert property (@(posedge clk) disable iff (!rst_n)
    mem_we |-> (32'(mem_waddr) < N_CHAN * WORDS));
endmodule
