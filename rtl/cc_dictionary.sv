// cc_dictionary: dictionary of the most frequent instructions, stored packed
// and grouped by instruction length.
//
// The offline compressor picks the ENTRIES most frequent instructions (256,
// so an index fits in one byte) and orders them so that all entries of the
// same length are adjacent: first every 1-byte entry, then every 2-byte
// entry, and so on. Entries are stored back to back in a byte memory with no
// padding. The number of entries of each length is held in a small count
// register file (cnt_*). From the counts the block derives, for each length
// group g, its first index first[g] and its first byte base[g]. An index idx
// falls in the highest group g with first[g] <= idx; its length is g+1 and
// its bytes start at base[g] + (idx - first[g]) * (g+1). So the index alone
// gives both the instruction and its length, as the description requires.
//
// Interface: byte write port (we, waddr, wdata) and count write port
// (cnt_we, cnt_grp, cnt_val) for loading, both clocked. Lookup is
// combinational: idx -> instr (unused upper bytes zero), ilen, and
// idx_valid (low when idx is past the last loaded entry). The post-fetch
// stage registers the result. Grouping by length and 256 entries follow the
// description; the packed storage, count registers and the combinational
// read are this design's own choices.
module cc_dictionary
  import cc_pkg::*;
#(
  parameter int unsigned ENTRIES = 256,
  parameter int unsigned BYTES   = 1024,      // ENTRIES * MAX_ILEN fits all cases
  localparam int unsigned IW     = $clog2(ENTRIES),
  localparam int unsigned CW     = $clog2(ENTRIES + 1),
  localparam int unsigned AW     = $clog2(BYTES),
  localparam int unsigned GW     = $clog2(MAX_ILEN)
) (
  input  logic          clk,
  input  logic          rst_n,
  // loading
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [7:0]    wdata,
  input  logic          cnt_we,
  input  logic [GW-1:0] cnt_grp,      // length group: entries of cnt_grp+1 bytes
  input  logic [CW-1:0] cnt_val,
  // lookup
  input  logic [IW-1:0] idx,
  output instr_t        instr,
  output ilen_t         ilen,
  output logic          idx_valid
);

  logic [CW-1:0] cnt   [MAX_ILEN];
  logic [CW:0]   first [MAX_ILEN+1];
  logic [AW:0]   base  [MAX_ILEN];
  logic [GW-1:0] grp;
  logic [AW-1:0] raddr;
  instr_t        win;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int g = 0; g < int'(MAX_ILEN); g++) cnt[g] <= '0;
    end else if (cnt_we) begin
      cnt[cnt_grp] <= cnt_val;
    end

  // Prefix sums over the groups: first index and first byte of each group.
  always_comb begin
    first[0] = '0;
    base[0]  = '0;
    for (int g = 1; g <= int'(MAX_ILEN); g++)
      first[g] = first[g-1] + (CW+1)'(cnt[g-1]);
    for (int g = 1; g < int'(MAX_ILEN); g++)
      base[g] = base[g-1] + (AW+1)'(cnt[g-1] * g);
  end

  always_comb begin
    grp = '0;
    for (int g = 1; g < int'(MAX_ILEN); g++)
      if ((CW+1)'(idx) >= first[g]) grp = GW'(g);
    idx_valid = (CW+1)'(idx) < first[MAX_ILEN];
    raddr = AW'(base[grp] + (AW+1)'(((CW+1)'(idx) - first[grp]) * ((CW+1)'(grp) + 1'b1)));
    ilen  = ilen_t'(grp) + ilen_t'(1);
  end

  byte_window_mem #(.BYTES(BYTES), .WIN(MAX_ILEN)) u_store (
    .clk  (clk),
    .we   (we),
    .waddr(waddr),
    .wdata(wdata),
    .raddr(raddr),
    .rdata(win)
  );

  assign instr = mask_len(win, ilen);

endmodule
