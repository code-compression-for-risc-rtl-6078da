// cc_bat: branch address table with a sequential binary search.
//
// Compression moves instructions, so a branch target given as an address of
// the original program must be translated. Each table entry holds the
// original address, the new address in the compressed code, and the byte
// address and bit position of that instruction's bit indicator, so fetch can
// restart both the code stream and the bit stream at the target. The
// compressor writes the entries sorted by original address; count holds how
// many are valid.
//
// A lookup starts with a one-cycle req pulse carrying key; a req during a
// search abandons it and starts over with the new key. The block then halves the range [lo, hi) once per clock, comparing
// key with entry (lo+hi)/2. done pulses for one cycle with hit and the
// matching entry; hit is low when the key is not in the table. With N
// entries a lookup takes at most floor(log2 N) + 1 compare cycles. On a
// hit, done is high in the cycle after the matching compare; on a miss one
// more cycle is spent finding the range empty.
//
// Interface: table write port (we, waddr, wdata) and count write (cnt_we,
// cnt_val) for loading, clocked. The table contents follow the description;
// the sorted layout and binary search are this design's own choice, since
// the description does not say how the table is indexed.
module cc_bat
  import cc_pkg::*;
#(
  parameter int unsigned ENTRIES = 512,
  localparam int unsigned IW     = $clog2(ENTRIES),
  localparam int unsigned CW     = $clog2(ENTRIES + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // loading
  input  logic          we,
  input  logic [IW-1:0] waddr,
  input  bat_entry_t    wdata,
  input  logic          cnt_we,
  input  logic [CW-1:0] cnt_val,
  // lookup
  input  logic          req,
  input  addr_t         key,
  output logic          busy,
  output logic          done,
  output logic          hit,
  output bat_entry_t    entry
);

  bat_entry_t    tab [ENTRIES];
  logic [CW-1:0] count;
  logic [CW-1:0] lo, hi, mid;
  addr_t         key_q;
  bat_entry_t    probe;

  always_ff @(posedge clk)
    if (we) tab[waddr] <= wdata;

  assign mid   = CW'((lo + hi) >> 1);
  assign probe = tab[IW'(mid)];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      count <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
      hit   <= 1'b0;
      entry <= '0;
      lo    <= '0;
      hi    <= '0;
      key_q <= '0;
    end else begin
      done <= 1'b0;
      if (cnt_we) count <= cnt_val;
      if (req) begin
        busy  <= 1'b1;
        key_q <= key;
        lo    <= '0;
        hi    <= count;
        hit   <= 1'b0;
      end else if (!busy) begin
        // idle
      end else if (lo >= hi) begin
        busy <= 1'b0;
        done <= 1'b1;
        hit  <= 1'b0;
      end else if (probe.orig_addr == key_q) begin
        busy  <= 1'b0;
        done  <= 1'b1;
        hit   <= 1'b1;
        entry <= probe;
      end else if (probe.orig_addr < key_q) begin
        lo <= mid + 1'b1;
      end else begin
        hi <= mid;
      end
    end

endmodule
