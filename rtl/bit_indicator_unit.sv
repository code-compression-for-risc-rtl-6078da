// bit_indicator_unit: store and reader for the bit indicator stream.
//
// Every instruction slot of the compressed code has one indicator bit: 1
// when the slot is a one-byte dictionary index, 0 when it is a normal
// instruction. Attaching the bit to each instruction would break byte
// alignment, so the bits are kept apart, packed eight to a byte in their own
// memory, the first slot in bit 0 (LSB) of byte 0.
//
// The reader keeps the current byte in a register (cur) with a byte address
// and bit position. bit is cur[pos]. adv steps to the next bit; when it
// leaves bit 7 the next byte is read from the memory in the same clock, so a
// bit is available every cycle without bubbles. load restarts the reader at
// (load_byte, load_pos), as given by a branch address table entry; load wins
// over adv. byte_rd pulses for every byte read from the memory, for access
// counting.
//
// Timing: after a load or adv edge the new bit is valid in the following
// cycle. The memory write port (we, waddr, wdata) is clocked; a reader must
// be loaded after the stream is written. LSB-first packing and the single
// byte buffer are this design's own choices.
module bit_indicator_unit
  import cc_pkg::*;
#(
  parameter int unsigned BYTES = 2048,
  localparam int unsigned AW   = $clog2(BYTES)
) (
  input  logic          clk,
  input  logic          rst_n,
  // loading
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [7:0]    wdata,
  // reader control
  input  logic          load,
  input  addr_t         load_byte,
  input  logic [2:0]    load_pos,
  input  logic          adv,
  output logic          bit_o,
  output logic [AW-1:0] byte_addr,
  output logic [2:0]    pos,
  output logic          byte_rd
);

  logic [7:0]    mem [BYTES];
  logic [7:0]    cur;
  logic [AW-1:0] next_addr;

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  assign next_addr = load ? AW'(load_byte) : byte_addr + 1'b1;
  assign byte_rd   = load || (adv && pos == 3'd7);
  assign bit_o     = cur[pos];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      cur       <= '0;
      byte_addr <= '0;
      pos       <= '0;
    end else if (load) begin
      cur       <= mem[next_addr];
      byte_addr <= next_addr;
      pos       <= load_pos;
    end else if (adv) begin
      pos <= pos + 1'b1;
      if (pos == 3'd7) begin
        cur       <= mem[next_addr];
        byte_addr <= next_addr;
      end
    end

endmodule
