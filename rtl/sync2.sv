// sync2: two-flip-flop synchroniser for a single asynchronous level.
//
// Used for every signal that reaches the sequencer from outside its clock
// domain: the DAS BUSY line, the start request from the CPU and the VME
// strobes AS*, DS0*, DS1*, which the asynchronous VME bus drives without any
// clock. The output follows the input two clock edges later. RESET_VAL sets
// the value both stages take under the active-low reset, so an active-low
// strobe can be held inactive (1) while the design is in reset.
module sync2 #(
  parameter logic RESET_VAL = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);
  logic meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= RESET_VAL;
      q    <= RESET_VAL;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
