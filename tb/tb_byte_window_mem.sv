// tb_byte_window_mem: self-checking test of the banked byte memory.
// Fills a small memory with random bytes through the write port, keeping a
// plain byte array as reference, then reads the 4-byte window at every
// start address (including those that wrap past the end) and compares each
// byte. Overwrites a few bytes and re-reads around them.
module tb_byte_window_mem;
  localparam int unsigned BYTES = 64;
  localparam int unsigned WIN   = 4;
  localparam int unsigned AW    = $clog2(BYTES);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic             we;
  logic [AW-1:0]    waddr, raddr;
  logic [7:0]       wdata;
  logic [8*WIN-1:0] rdata;
  logic [7:0]       ref_mem [BYTES];
  int checks = 0, failures = 0;

  byte_window_mem #(.BYTES(BYTES), .WIN(WIN)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_byte(input int a, input logic [7:0] d);
    @(negedge clk);
    we = 1'b1; waddr = AW'(a); wdata = d;
    @(negedge clk);
    we = 1'b0;
    ref_mem[a] = d;
  endtask

  task automatic check_all();
    for (int a = 0; a < int'(BYTES); a++) begin
      raddr = AW'(a);
      #1;
      for (int i = 0; i < int'(WIN); i++) begin
        checks++;
        if (rdata[8*i +: 8] !== ref_mem[(a + i) % BYTES]) begin
          failures++;
          $display("FAIL addr %0d byte %0d: got %02h want %02h", a, i,
                   rdata[8*i +: 8], ref_mem[(a + i) % BYTES]);
        end
      end
    end
  endtask

  initial begin
    we = 1'b0; waddr = '0; wdata = '0; raddr = '0;
    for (int a = 0; a < int'(BYTES); a++) write_byte(a, 8'($urandom));
    check_all();
    for (int k = 0; k < 10; k++) write_byte($urandom % BYTES, 8'($urandom));
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
