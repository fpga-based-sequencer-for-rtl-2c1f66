// seq_ram: the sequencer's scan memory, 16 locations of 16 bits.
//
// It holds one complete scan: channel n's first DAS read (bits 17:2) at
// address 2n and its second read (bits 1:0) at address 2n+1. The memory has
// one write port and one read port with their own addresses, as the card's
// memory description lists them (WE, RE, write address, read address,
// data_in, data_out), so the DAS interface can store a scan while the VME
// interface reads.
//
// Timing (this design's choice; the description does not fix it): both ports
// are synchronous to clk. When WE is high, data_in is written to write_addr at
// the rising edge. When RE is high, data_out takes the word at read_addr at the
// rising edge (one cycle of latency) and keeps it while RE is low. A read of
// the location written in the same cycle returns the old word. The array is
// not reset; data_out resets to 0.
module seq_ram #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,
  input  logic [AW-1:0]    write_addr,
  input  logic [WIDTH-1:0] data_in,
  input  logic             re,
  input  logic [AW-1:0]    read_addr,
  output logic [WIDTH-1:0] data_out
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[write_addr] <= data_in;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  data_out <= '0;
    else if (re) data_out <= mem[read_addr];
  end
endmodule
