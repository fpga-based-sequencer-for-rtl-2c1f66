// ad7608_model: behavioural model of the AD7608 8-channel, 18-bit
// simultaneous-sampling DAS, as far as the sequencer uses it. Not
// synthesizable: it uses delays and exists only for the testbenches.
//
// A rising edge of convst_n (CONVST A and B tied) samples all 8 channels,
// taken from codes (or, with test_pattern high, from a fixed pattern), raises
// BUSY after T_BUSY_NS and drops it T_CONV_NS * 2^os later: 5 us for 8
// channels without oversampling and 0.32 ms at the highest ratio, 64 (os = 6).
// Each falling edge of cs_rd_n then drives the next word on db after
// T_ACC_NS: for channel n first code[17:2], then {code[1:0], 14'b0}. With
// test_pattern high the two words are 16'hAAA0 + n and 16'hBBB0 + n instead.
// frstdata is high while the first word of channel 0 is on the bus. reset
// clears the read pointer; CONVST is ignored during reset, in standby and
// while BUSY is high.
// Counters report conversions, reads, and protocol violations (a read while
// BUSY is high, more than 16 reads per conversion).
module ad7608_model #(
  parameter int unsigned T_BUSY_NS = 40,
  parameter int unsigned T_CONV_NS = 5000,
  parameter int unsigned T_ACC_NS  = 20
) (
  input  logic             reset,
  input  logic             convst_n,
  input  logic             cs_rd_n,
  input  logic             range_sel,
  input  logic             stby_n,
  input  logic [2:0]       os,
  input  logic [7:0][17:0] codes,
  input  logic             test_pattern,
  output logic             busy,
  output logic             frstdata,
  output logic [15:0]      db,
  output int unsigned      n_conv,
  output int unsigned      n_reads,
  output int unsigned      n_viol,
  output logic             last_range
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [7:0][17:0] held;
  logic             held_pat;
  int unsigned      rd_idx;

  initial begin
    busy       = 1'b0;
    frstdata   = 1'b0;
    db         = '0;
    n_conv     = 0;
    n_reads    = 0;
    n_viol     = 0;
    rd_idx     = 0;
    held       = '0;
    held_pat   = 1'b0;
    last_range = 1'b0;
  end

  function automatic logic [15:0] word_at(int unsigned idx);
    int unsigned ch = idx / 2;
    if (idx >= 16) return 16'h0000;
    if (held_pat) return (idx % 2 == 0) ? 16'hAAA0 + 16'(ch) : 16'hBBB0 + 16'(ch);
    if (idx % 2 == 0) return held[ch][17:2];
    return {held[ch][1:0], 14'b0};
  endfunction

  always @(posedge convst_n) begin
    if (!reset && stby_n && !busy) begin
      held       = codes;
      held_pat   = test_pattern;
      last_range = range_sel;
      n_conv++;
      #(T_BUSY_NS * 1ns);
      busy = 1'b1;
      // 5 us per conversion, repeated for each oversampling step
      repeat (1 << ((os > 3'd6) ? 3'd6 : os)) #(T_CONV_NS * 1ns);
      busy   = 1'b0;
      rd_idx = 0;
    end
  end

  always @(negedge cs_rd_n) begin
    if (busy || rd_idx >= 16) begin
      n_viol++;
      $display("ad7608_model: read violation busy=%0b rd_idx=%0d at %0t", busy, rd_idx, $time);
    end
    n_reads++;
    #(T_ACC_NS * 1ns);
    db       = word_at(rd_idx);
    frstdata = (rd_idx == 0);
  end

  always @(posedge cs_rd_n) begin
    rd_idx++;
    frstdata = 1'b0;
  end

  always @(posedge reset) rd_idx = 0;
endmodule
