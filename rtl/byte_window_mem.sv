// byte_window_mem: byte-addressed memory that returns WIN consecutive bytes
// starting at any byte address in one read.
//
// Compressed code is byte aligned but instructions are 1 to 4 bytes long and
// start anywhere, so both the code store and the packed dictionary need an
// unaligned multi-byte read. The memory is split into WIN banks interleaved
// on the low address bits; bank b holds bytes whose address mod WIN is b.
// Each bank gets its own row address (row of raddr, plus one for banks below
// the start offset), and the bank outputs are rotated so rdata[7:0] is the
// byte at raddr. Reads past the last byte wrap to address 0.
//
// Interface: one byte write port (we, waddr, wdata) written on the rising
// clock edge, and one combinational window read (raddr -> rdata). The bank
// organisation is this design's own choice; the description only asks for a
// byte-aligned code store.
module byte_window_mem #(
  parameter int unsigned BYTES = 16384,   // power of two, multiple of WIN
  parameter int unsigned WIN   = 4,       // bytes per read, power of two
  localparam int unsigned AW   = $clog2(BYTES),
  localparam int unsigned BW   = $clog2(WIN),
  localparam int unsigned ROWS = BYTES / WIN
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [7:0]       wdata,
  input  logic [AW-1:0]    raddr,
  output logic [8*WIN-1:0] rdata
);

  logic [7:0] bank_q [WIN];

  for (genvar b = 0; b < int'(WIN); b++) begin : g_bank
    logic [7:0]      mem [ROWS];
    logic [AW-BW-1:0] row;

    always_ff @(posedge clk)
      if (we && waddr[BW-1:0] == BW'(b))
        mem[waddr[AW-1:BW]] <= wdata;

    // Banks below the start offset serve the next row.
    always_comb begin
      row = raddr[AW-1:BW];
      if (BW'(b) < raddr[BW-1:0]) row = row + 1'b1;
    end

    assign bank_q[b] = mem[row];
  end

  always_comb
    for (int i = 0; i < int'(WIN); i++)
      rdata[8*i +: 8] = bank_q[BW'(raddr[BW-1:0] + BW'(i))];

endmodule
