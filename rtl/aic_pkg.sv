// aic_pkg: constants and types shared by the AIC-ISO sequencer.
//
// The analog input card scans 8 channels through an 18-bit simultaneous-
// sampling DAS (AD7608-class) whose 16-bit parallel bus needs two reads per
// channel, so one scan fills 16 words of a 16 x 16 memory. The card is a
// VME64x slave in A16 space with a 32-bit data path. The channel count,
// resolution, memory size and bus widths follow the card's specification;
// the address-modifier codes are the standard VME A16 codes, and the
// address map (one 2 KiB window per slot) is this design's own choice.
package aic_pkg;

  localparam int unsigned N_CH         = 8;   // analog channels per card
  localparam int unsigned ADC_BITS     = 18;  // DAS resolution
  localparam int unsigned DB_W         = 16;  // DAS parallel data bus width
  localparam int unsigned WORDS_PER_CH = 2;   // reads per channel (17:2, then 1:0)
  localparam int unsigned MEM_DEPTH    = 16;  // memory locations
  localparam int unsigned MEM_W        = 16;  // bits per location
  localparam int unsigned MEM_AW       = $clog2(MEM_DEPTH);

  localparam int unsigned VME_AW = 16;        // A16 addressing
  localparam int unsigned VME_DW = 32;        // D32 data path
  localparam int unsigned GA_W   = 5;         // VME64x GA4*..GA0*

  // A16 address modifiers accepted by the board
  localparam logic [5:0] AM_A16_USER = 6'h29;
  localparam logic [5:0] AM_A16_SUP  = 6'h2D;

  // Kind of access decoded from DS1*/DS0*, LWORD*, A01 and WRITE*
  typedef enum logic [1:0] {
    ACC_NONE = 2'd0,   // no data strobe active
    ACC_D16  = 2'd1,   // single word (or byte) read: one memory word on D15..D0
    ACC_D32  = 2'd2,   // long-word read: two memory words on D31..D0
    ACC_ERR  = 2'd3    // access the board does not support: answered with BERR*
  } vme_acc_t;

  // States of the DAS interface sequencer (flow chart of the scan)
  typedef enum logic [3:0] {
    DAS_INIT,       // reset pulse to the DAS chip
    DAS_IDLE,       // wait for start from the CPU
    DAS_CONVST,     // CONVST low pulse; conversion starts at its rising edge
    DAS_WAIT_BUSY,  // wait for BUSY to rise
    DAS_WAIT_DONE,  // wait for BUSY to fall (conversion over)
    DAS_RD_LOW,     // CS_RD_n low, data sampled on the last low cycle
    DAS_RD_HIGH     // CS_RD_n high between reads, then next word or channel
  } das_state_t;

endpackage
