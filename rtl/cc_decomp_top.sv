// cc_decomp_top: dictionary-based code decompression front end for a
// processor with variable length instructions.
//
// The program is compressed offline: the 256 most frequent instructions go
// into a dictionary, and each of their occurrences is replaced by a one-byte
// index, so the code stays byte aligned. One indicator bit per instruction
// slot, kept in a separate bit stream, tells an index from a normal
// instruction. A branch address table (BAT) maps each branch target of the
// original program to its new address and to the position of its indicator
// bit. This block holds all four stores and the two pipeline stages that
// undo the compression at run time:
//
//   fetch       reads a 4-byte window of compressed code at pc and the next
//               indicator bit, advances pc by 1 (index) or by the
//               instruction's length, and on a redirect translates the
//               target through the BAT;
//   post-fetch  expands indexes through the dictionary, passes normal
//               instructions through, and hands one instruction per cycle to
//               the processor's decode stage.
//
// Interface. Loading ports (code_*, bit_*, dict_*, bat_*) fill the stores
// before a run; they are clocked byte or entry writes. Processor side:
// redir_valid/redir_addr start execution at an address of the original
// program (also used for the entry point after reset); out_valid/out_ready/
// out_instr/out_len deliver the original instruction stream; out_compressed
// says the instruction came from the dictionary. searching is high during a
// BAT lookup, bat_miss after a target that is not in the table, dict_err
// with an output whose index lies beyond the loaded dictionary. The pulse
// outputs fetch_fire, bit_byte_rd and dict_rd, with fetch_len, let a user
// count code, bit stream and dictionary traffic.
//
// Timing: sequential code flows at one instruction per cycle, two cycles
// from fetch to output. A redirect whose target the BAT finds after k
// compares (k <= floor(log2 BAT_ENTRIES) + 1) delivers its first
// instruction k + 3 clock edges after the edge that samples the redirect.
// An output offered in the redirect cycle is dropped.
// Sizes: 256 dictionary entries follow the description; the other store
// sizes are this design's own, chosen to hold programs of up to 16 KiB of
// compressed code with up to 512 branch targets.
module cc_decomp_top
  import cc_pkg::*;
#(
  parameter int unsigned CODE_BYTES   = 16384,
  parameter int unsigned BIT_BYTES    = 2048,
  parameter int unsigned DICT_ENTRIES = 256,
  parameter int unsigned DICT_BYTES   = 1024,
  parameter int unsigned BAT_ENTRIES  = 512,
  localparam int unsigned CAW = $clog2(CODE_BYTES),
  localparam int unsigned BAW = $clog2(BIT_BYTES),
  localparam int unsigned DAW = $clog2(DICT_BYTES),
  localparam int unsigned DCW = $clog2(DICT_ENTRIES + 1),
  localparam int unsigned TIW = $clog2(BAT_ENTRIES),
  localparam int unsigned TCW = $clog2(BAT_ENTRIES + 1),
  localparam int unsigned GW  = $clog2(MAX_ILEN)
) (
  input  logic           clk,
  input  logic           rst_n,
  // loading: compressed code
  input  logic           code_we,
  input  logic [CAW-1:0] code_waddr,
  input  logic [7:0]     code_wdata,
  // loading: bit indicator stream
  input  logic           bit_we,
  input  logic [BAW-1:0] bit_waddr,
  input  logic [7:0]     bit_wdata,
  // loading: dictionary bytes and per-length entry counts
  input  logic           dict_we,
  input  logic [DAW-1:0] dict_waddr,
  input  logic [7:0]     dict_wdata,
  input  logic           dict_cnt_we,
  input  logic [GW-1:0]  dict_cnt_grp,
  input  logic [DCW-1:0] dict_cnt_val,
  // loading: branch address table
  input  logic           bat_we,
  input  logic [TIW-1:0] bat_waddr,
  input  bat_entry_t     bat_wdata,
  input  logic           bat_cnt_we,
  input  logic [TCW-1:0] bat_cnt_val,
  // processor side
  input  logic           redir_valid,
  input  addr_t          redir_addr,
  output logic           out_valid,
  input  logic           out_ready,
  output instr_t         out_instr,
  output ilen_t          out_len,
  output logic           out_compressed,
  // status
  output logic           searching,
  output logic           bat_miss,
  output logic           dict_err,
  // traffic
  output logic           fetch_fire,
  output ilen_t          fetch_len,
  output logic           bit_byte_rd,
  output logic           dict_rd
);

  // code memory
  addr_t  code_addr;
  instr_t code_win;
  // bit reader
  logic       bit_v, bit_load, bit_adv;
  addr_t      bit_load_byte;
  logic [2:0] bit_load_pos;
  // table
  logic       bat_req, bat_done, bat_hit, bat_busy;
  addr_t      bat_key;
  bat_entry_t bat_entry;
  // dictionary
  logic [IDX_W-1:0] dict_idx;
  instr_t     dict_instr;
  ilen_t      dict_len;
  logic       dict_idx_valid;
  // pipeline
  logic       stall, flush;
  logic       f_valid, f_cbit;
  instr_t     f_win;
  ilen_t      f_len;
  addr_t      f_pc;

  byte_window_mem #(.BYTES(CODE_BYTES), .WIN(MAX_ILEN)) u_code (
    .clk  (clk),
    .we   (code_we),
    .waddr(code_waddr),
    .wdata(code_wdata),
    .raddr(code_addr[CAW-1:0]),
    .rdata(code_win)
  );

  bit_indicator_unit #(.BYTES(BIT_BYTES)) u_bits (
    .clk      (clk),
    .rst_n    (rst_n),
    .we       (bit_we),
    .waddr    (bit_waddr),
    .wdata    (bit_wdata),
    .load     (bit_load),
    .load_byte(bit_load_byte),
    .load_pos (bit_load_pos),
    .adv      (bit_adv),
    .bit_o    (bit_v),
    .byte_addr(),
    .pos      (),
    .byte_rd  (bit_byte_rd)
  );

  cc_bat #(.ENTRIES(BAT_ENTRIES)) u_bat (
    .clk    (clk),
    .rst_n  (rst_n),
    .we     (bat_we),
    .waddr  (bat_waddr),
    .wdata  (bat_wdata),
    .cnt_we (bat_cnt_we),
    .cnt_val(bat_cnt_val),
    .req    (bat_req),
    .key    (bat_key),
    .busy   (bat_busy),
    .done   (bat_done),
    .hit    (bat_hit),
    .entry  (bat_entry)
  );

  cc_dictionary #(.ENTRIES(DICT_ENTRIES), .BYTES(DICT_BYTES)) u_dict (
    .clk      (clk),
    .rst_n    (rst_n),
    .we       (dict_we),
    .waddr    (dict_waddr),
    .wdata    (dict_wdata),
    .cnt_we   (dict_cnt_we),
    .cnt_grp  (dict_cnt_grp),
    .cnt_val  (dict_cnt_val),
    .idx      (dict_idx[$clog2(DICT_ENTRIES)-1:0]),
    .instr    (dict_instr),
    .ilen     (dict_len),
    .idx_valid(dict_idx_valid)
  );

  cc_fetch u_fetch (
    .clk          (clk),
    .rst_n        (rst_n),
    .redir_valid  (redir_valid),
    .redir_addr   (redir_addr),
    .stall        (stall),
    .flush        (flush),
    .searching    (searching),
    .bat_miss     (bat_miss),
    .code_addr    (code_addr),
    .code_win     (code_win),
    .bit_i        (bit_v),
    .bit_load     (bit_load),
    .bit_load_byte(bit_load_byte),
    .bit_load_pos (bit_load_pos),
    .bit_adv      (bit_adv),
    .bat_req      (bat_req),
    .bat_key      (bat_key),
    .bat_done     (bat_done),
    .bat_hit      (bat_hit),
    .bat_entry    (bat_entry),
    .f_valid      (f_valid),
    .f_cbit       (f_cbit),
    .f_win        (f_win),
    .f_len        (f_len),
    .f_pc         (f_pc)
  );

  cc_postfetch u_pf (
    .clk           (clk),
    .rst_n         (rst_n),
    .flush         (flush),
    .f_valid       (f_valid),
    .f_cbit        (f_cbit),
    .f_win         (f_win),
    .f_len         (f_len),
    .dict_idx      (dict_idx),
    .dict_rd       (dict_rd),
    .dict_instr    (dict_instr),
    .dict_len      (dict_len),
    .dict_idx_valid(dict_idx_valid),
    .stall         (stall),
    .out_valid     (out_valid),
    .out_ready     (out_ready),
    .out_instr     (out_instr),
    .out_len       (out_len),
    .out_compressed(out_compressed),
    .dict_err      (dict_err)
  );

  assign fetch_fire = bit_adv;
  assign fetch_len  = bit_v ? ilen_t'(1) : ilen_of(code_win[7:0]);

endmodule
