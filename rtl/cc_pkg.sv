// cc_pkg: types and constants shared by the dictionary-based code
// decompressor for a variable length instruction set.
//
// The front end reads a byte-aligned stream that mixes normal instructions
// and one-byte dictionary indexes. Instructions are 1 to MAX_ILEN bytes
// long; byte 0 sits at the lowest address and lands in bits [7:0] of an
// instr_t, unused upper bytes are zero.
//
// The instruction set of the host processor is not fixed by the design. The
// length rule used here, byte0[7:6] + 1 bytes, is this design's own choice and
// is the one place to change for a real instruction set (ilen_of below).
// The branch address table entry follows the description: original address,
// new (compressed) address, and the byte address and bit position of the
// matching bit indicator. All addresses are 16 bits wide.
package cc_pkg;

  localparam int unsigned MAX_ILEN = 4;             // longest instruction, bytes
  localparam int unsigned ADDR_W   = 16;            // all byte addresses
  localparam int unsigned IDX_W    = 8;             // dictionary index: one byte

  typedef logic [8*MAX_ILEN-1:0] instr_t;
  typedef logic [2:0]            ilen_t;            // 1..MAX_ILEN
  typedef logic [ADDR_W-1:0]     addr_t;

  typedef struct packed {
    addr_t      orig_addr;   // branch target in the uncompressed program
    addr_t      new_addr;    // same instruction in the compressed code
    addr_t      bit_byte;    // byte of the bit indicator stream holding its bit
    logic [2:0] bit_pos;     // bit within that byte, 0 = LSB
  } bat_entry_t;

  // Length of a normal (uncompressed) instruction from its first byte.
  function automatic ilen_t ilen_of(input logic [7:0] b0);
    return ilen_t'({1'b0, b0[7:6]}) + ilen_t'(1);
  endfunction

  // Keep only the first len bytes of an instruction window.
  function automatic instr_t mask_len(input instr_t w, input ilen_t len);
    instr_t m;
    for (int i = 0; i < int'(MAX_ILEN); i++)
      m[8*i +: 8] = (ilen_t'(i) < len) ? 8'hFF : 8'h00;
    return w & m;
  endfunction

endpackage
