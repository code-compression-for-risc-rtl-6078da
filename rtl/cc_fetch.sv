// cc_fetch: fetch stage of the decompressing front end.
//
// The stage walks the mixed code stream: a program counter pc (a byte
// address of the compressed code) and, in step with it, the bit indicator
// reader. In each cycle it reads a MAX_ILEN-byte window at pc and the
// current indicator bit. A set bit means the slot is a one-byte dictionary
// index, so pc advances by 1; a clear bit means a normal instruction whose
// length comes from its first byte (cc_pkg::ilen_of), and pc advances by
// that length. The window, the bit and the slot length are registered into
// the fetch/post-fetch pipeline register (f_*). Sequential fetch therefore
// delivers one slot per cycle.
//
// Branches: a redirect (redir_valid with the target's address in the
// original program) flushes the pipe and starts a branch address table
// lookup. On a hit, pc is loaded with the new address and the bit reader
// with the target's bit byte and position, and fetching resumes. On a miss
// fetching stops and bat_miss is raised until the next redirect. The
// program's entry point is reached the same way, by a redirect after reset.
//
// Interface: stall holds the stage (downstream output not taken). flush is
// high in the redirect cycle for later stages. code_addr/code_win and
// bat_* connect to the code memory and the table; bit_* to the bit reader.
// Following the description: the per-slot indicator bit, the one-byte
// index, and translation through the table. Own choices: the redirect
// protocol, the stop on a miss, and fetching one slot per cycle.
module cc_fetch
  import cc_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  // processor side
  input  logic   redir_valid,
  input  addr_t  redir_addr,
  input  logic   stall,
  output logic   flush,
  output logic   searching,
  output logic   bat_miss,
  // code memory
  output addr_t  code_addr,
  input  instr_t code_win,
  // bit indicator reader
  input  logic   bit_i,
  output logic   bit_load,
  output addr_t  bit_load_byte,
  output logic [2:0] bit_load_pos,
  output logic   bit_adv,
  // branch address table
  output logic   bat_req,
  output addr_t  bat_key,
  input  logic   bat_done,
  input  logic   bat_hit,
  input  bat_entry_t bat_entry,
  // to post-fetch stage
  output logic   f_valid,
  output logic   f_cbit,
  output instr_t f_win,
  output ilen_t  f_len,
  output addr_t  f_pc
);

  addr_t pc;
  logic  running;
  ilen_t len;
  logic  fire;

  assign code_addr = pc;
  assign len       = bit_i ? ilen_t'(1) : ilen_of(code_win[7:0]);
  assign fire      = running && !stall && !redir_valid;

  assign flush         = redir_valid;
  assign bat_req       = redir_valid;
  assign bat_key       = redir_addr;
  assign bit_load      = bat_done && bat_hit;
  assign bit_load_byte = bat_entry.bit_byte;
  assign bit_load_pos  = bat_entry.bit_pos;
  assign bit_adv       = fire;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      pc        <= '0;
      running   <= 1'b0;
      searching <= 1'b0;
      bat_miss  <= 1'b0;
      f_valid   <= 1'b0;
      f_cbit    <= 1'b0;
      f_win     <= '0;
      f_len     <= '0;
      f_pc      <= '0;
    end else begin
      if (redir_valid) begin
        running   <= 1'b0;
        searching <= 1'b1;
        bat_miss  <= 1'b0;
        f_valid   <= 1'b0;
      end else if (bat_done) begin
        searching <= 1'b0;
        running   <= bat_hit;
        bat_miss  <= !bat_hit;
        if (bat_hit) pc <= bat_entry.new_addr;
      end else if (!stall) begin
        f_valid <= fire;
        if (fire) begin
          f_cbit <= bit_i;
          f_win  <= code_win;
          f_len  <= len;
          f_pc   <= pc;
          pc     <= pc + addr_t'(len);
        end
      end
    end

endmodule
