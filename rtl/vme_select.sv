// vme_select: board select and word select generation for the VME slave.
//
// The VME bus is asynchronous: the master puts address, AM and LWORD* on the
// bus and then drops AS*; it drives WRITE* and drops DS0*/DS1* for the data
// phase. This block sees AS* and the data strobes after synchronisation. On
// the first clock at which the synchronised AS* is low it captures the
// decoder's hit (board select), the word offset A10..A01 and LWORD*; board
// select stays high until AS* rises again.
//
// While board select is high and a data strobe is low, acc classifies the
// access (word select):
//   ACC_D16  DS1*/DS0* (either or both) low, LWORD* high, read, offset within
//            the 16 memory words: one word, word_addr = A04..A01.
//   ACC_D32  both strobes low, LWORD* low, A01 low, read, within the memory:
//            two words, word_addr = A04..A02 with bit 0 cleared.
//   ACC_ERR  any write, an offset beyond the memory, or an unaligned or
//            partial long-word access.
// A byte read gets the whole word on D15..D00; the master takes its byte lane.
// ds_any is high while either synchronised data strobe is low, selected or not.
// The memory map (16 words at the start of the board window) and the refusal
// of writes are this design's choices: the card description names the block
// but not its rules.
module vme_select
  import aic_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              as_n_s,
  input  logic [1:0]        ds_n_s,
  input  logic              write_n,
  input  logic              lword_n,
  input  logic [VME_AW-1:1] addr,
  input  logic              hit,
  output logic              board_sel,
  output logic              ds_any,
  output vme_acc_t          acc,
  output logic [MEM_AW-1:0] word_addr
);
  localparam int unsigned OFF_W = VME_AW - 1 - GA_W;   // A10..A01

  logic             as_q;
  logic [OFF_W-1:0] off_q;
  logic             lword_q;
  logic             in_mem;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      as_q      <= 1'b1;
      board_sel <= 1'b0;
      off_q     <= '0;
      lword_q   <= 1'b1;
    end else begin
      as_q <= as_n_s;
      if (as_n_s) begin
        board_sel <= 1'b0;
      end else if (as_q) begin
        board_sel <= hit;
        off_q     <= addr[OFF_W:1];
        lword_q   <= lword_n;
      end
    end
  end

  assign ds_any = (ds_n_s != 2'b11);
  assign in_mem = (32'(off_q) < MEM_DEPTH);

  always_comb begin
    acc       = ACC_NONE;
    word_addr = off_q[MEM_AW-1:0];
    if (board_sel && ds_any) begin
      if (!write_n || !in_mem) begin
        acc = ACC_ERR;
      end else if (!lword_q) begin
        if (ds_n_s == 2'b00 && !off_q[0]) begin
          acc       = ACC_D32;
          word_addr = {off_q[MEM_AW-1:1], 1'b0};
        end else begin
          acc = ACC_ERR;
        end
      end else begin
        acc = ACC_D16;
      end
    end
  end
endmodule
