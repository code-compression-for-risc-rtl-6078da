// tb_bit_indicator_unit: self-checking test of the indicator bit reader.
// Writes a random bit stream, then repeatedly loads the reader at a random
// byte and bit position and steps it a random number of bits, sometimes
// pausing. Each bit is compared with the stream, read LSB first, and each
// byte read from the memory (byte_rd) is counted against the number of byte
// boundaries crossed.
module tb_bit_indicator_unit;
  import cc_pkg::*;
  localparam int unsigned BYTES = 64;
  localparam int unsigned AW    = $clog2(BYTES);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          we, load, adv, bit_o, byte_rd;
  logic [AW-1:0] waddr, byte_addr;
  logic [7:0]    wdata;
  addr_t         load_byte;
  logic [2:0]    load_pos, pos;
  logic [7:0]    ref_mem [BYTES];
  int checks = 0, failures = 0;
  int rd_seen = 0, rd_want = 0;

  bit_indicator_unit #(.BYTES(BYTES)) dut (.*);

  always @(posedge clk) if (byte_rd) rd_seen++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bitno;
    we = 0; load = 0; adv = 0; waddr = '0; wdata = '0; load_byte = '0; load_pos = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < int'(BYTES); a++) begin
      @(negedge clk);
      we = 1; waddr = AW'(a); wdata = 8'($urandom); ref_mem[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int run = 0; run < 60; run++) begin
      automatic int b = $urandom % (BYTES - 8);
      automatic int p = $urandom % 8;
      automatic int n = 1 + $urandom % 40;
      load = 1; load_byte = addr_t'(b); load_pos = 3'(p);
      rd_want++;
      @(negedge clk); load = 0;
      bitno = b * 8 + p;
      for (int k = 0; k < n; k++) begin
        checks++;
        if (bit_o !== ref_mem[bitno / 8][bitno % 8] || byte_addr !== AW'(bitno / 8) || pos !== 3'(bitno % 8)) begin
          failures++;
          $display("FAIL bit %0d: got %0d want %0d", bitno, bit_o, ref_mem[bitno / 8][bitno % 8]);
        end
        adv = ($urandom % 4) != 0;
        if (adv) begin
          if (bitno % 8 == 7) rd_want++;
          bitno++;
        end
        @(negedge clk); adv = 0;
      end
    end
    checks++;
    if (rd_seen != rd_want) begin
      failures++;
      $display("FAIL byte reads %0d want %0d", rd_seen, rd_want);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
