// vme_dtack: DTACK* (and BERR*) generation and read data path of the VME slave.
//
// When the board is selected and a data strobe is low, this block answers the
// cycle. For a valid read it fetches the word (D16) or the two words (D32)
// from the sequencer memory through its synchronous read port, drives them on
// the data lines, and one clock later pulls DTACK* low. For a refused access
// (ACC_ERR) it pulls BERR* low instead. Either stays low until the master
// releases both data strobes; then the data lines are released and DTACK* or
// BERR* goes high again, ending the cycle.
//
// D32 byte order is the VME one (big-endian): the word at the lower address,
// the first read of a channel, goes on D31..D16 and the next word on D15..D00.
// For D16 the word goes on D15..D00 and D31..D16 read as 0.
//
// Timing in clock cycles from the cycle in which board_sel and ds_any are both
// seen: D16: data driven after 2, DTACK* low after 3. D32: data driven after 3,
// DTACK* low after 4. BERR*: low after 1. Add the 2-3 cycles of strobe
// synchronisation in front of this block. The cycle counts are this design's.
module vme_dtack
  import aic_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              board_sel,
  input  logic              ds_any,
  input  vme_acc_t          acc,
  input  logic [MEM_AW-1:0] word_addr,
  // memory read port
  output logic              mem_re,
  output logic [MEM_AW-1:0] mem_raddr,
  input  logic [MEM_W-1:0]  mem_rdata,
  // VME data and handshake
  output logic [VME_DW-1:0] d_out,
  output logic              d_oe,
  output logic              dtack_n,
  output logic              berr_n
);
  typedef enum logic [2:0] {
    S_IDLE,     // wait for a selected data strobe
    S_RD_B,     // D32: second memory read, capture first word
    S_CAP_LO,   // capture the last word, drive the data lines
    S_SETUP,    // data valid for one clock before DTACK*
    S_TERM      // DTACK* or BERR* low until the strobes are released
  } dt_state_t;

  dt_state_t         state;
  logic [MEM_AW-1:0] addr_q;
  logic              go;

  assign go = (state == S_IDLE) && board_sel && ds_any;

  always_comb begin
    mem_re    = 1'b0;
    mem_raddr = word_addr;
    if (go && (acc == ACC_D16 || acc == ACC_D32)) begin
      mem_re = 1'b1;
    end else if (state == S_RD_B) begin
      mem_re    = 1'b1;
      mem_raddr = addr_q | MEM_AW'(1);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      addr_q  <= '0;
      d_out   <= '0;
      d_oe    <= 1'b0;
      dtack_n <= 1'b1;
      berr_n  <= 1'b1;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (go) begin
            addr_q <= word_addr;
            unique case (acc)
              ACC_D16: state <= S_CAP_LO;
              ACC_D32: state <= S_RD_B;
              ACC_ERR: begin
                berr_n <= 1'b0;
                state  <= S_TERM;
              end
              default: state <= S_IDLE;
            endcase
          end
        end
        S_RD_B: begin
          d_out[VME_DW-1:MEM_W] <= mem_rdata;
          state                 <= S_CAP_LO;
        end
        S_CAP_LO: begin
          d_out[MEM_W-1:0] <= mem_rdata;
          d_oe             <= 1'b1;
          state            <= S_SETUP;
        end
        S_SETUP: begin
          dtack_n <= 1'b0;
          state   <= S_TERM;
        end
        S_TERM: begin
          if (!ds_any) begin
            dtack_n <= 1'b1;
            berr_n  <= 1'b1;
            d_oe    <= 1'b0;
            d_out   <= '0;
            state   <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // DTACK* and BERR* are never asserted together
  a_ack_excl: assert property (@(posedge clk) disable iff (!rst_n)
    !(!dtack_n && !berr_n));
  // DTACK* is only asserted with valid data on the bus
  a_dtack_data: assert property (@(posedge clk) disable iff (!rst_n)
    !dtack_n |-> d_oe);
endmodule
