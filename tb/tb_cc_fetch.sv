// tb_cc_fetch: self-checking test of the fetch stage on its own.
// The code memory, the bit indicator reader and the branch address table
// are modelled in the testbench: random code bytes, random indicator bits,
// and a table that answers after a random delay with a random new address
// and bit position (or a miss for key FFFF). A reference walk of the stream
// (1 byte for a marked slot, the length rule otherwise) gives the slots the
// stage must deliver. Random stalls hold the stage; each slot taken by the
// next stage is compared. Checks that a miss stops fetching and raises
// bat_miss, and that after a hit the first slot appears two cycles after
// the table answers.
module tb_cc_fetch;
  import cc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       redir_valid, stall, flush, searching, bat_miss;
  addr_t      redir_addr, code_addr, bit_load_byte, bat_key, f_pc;
  instr_t     code_win, f_win;
  logic       bit_i, bit_load, bit_adv, bat_req, bat_done, bat_hit;
  logic [2:0] bit_load_pos;
  bat_entry_t bat_entry;
  logic       f_valid, f_cbit;
  ilen_t      f_len;

  cc_fetch dut (.*);

  logic [7:0] code [1024];
  logic       bits [8192];
  int         bp;
  int checks = 0, failures = 0;

  // code memory and bit reader models
  always_comb
    for (int i = 0; i < 4; i++) code_win[8*i +: 8] = code[(int'(code_addr) + i) % 1024];
  assign bit_i = bits[bp];
  always @(posedge clk)
    if (bit_load) bp <= int'(bit_load_byte) * 8 + int'(bit_load_pos);
    else if (bit_adv) bp <= bp + 1;

  // table model
  int delay = -1;
  addr_t key_q;
  always @(posedge clk) begin
    bat_done <= 1'b0;
    if (bat_req) begin key_q <= bat_key; delay <= 1 + $urandom % 4; end
    else if (delay > 0) delay <= delay - 1;
    else if (delay == 0) begin
      delay     <= -1;
      bat_done  <= 1'b1;
      bat_hit   <= key_q != 16'hFFFF;
      bat_entry.orig_addr <= key_q;
      bat_entry.new_addr  <= addr_t'($urandom % 900);
      bat_entry.bit_byte  <= addr_t'($urandom % 512);
      bat_entry.bit_pos   <= 3'($urandom);
    end
  end

  // reference walk
  int exp_pc, exp_bp, got = 0, done_cyc = -1, cyc = 0, first_lat = -1;
  always @(posedge clk) begin
    cyc++;
    if (bat_done && bat_hit) begin
      exp_pc = int'(bat_entry.new_addr);
      exp_bp = int'(bat_entry.bit_byte) * 8 + int'(bat_entry.bit_pos);
      done_cyc = cyc;
    end else if (rst_n && f_valid && !stall && !redir_valid) begin
      logic   cb;
      int     len;
      instr_t w;
      cb  = bits[exp_bp];
      len = cb ? 1 : int'(code[exp_pc % 1024][7:6]) + 1;
      for (int i = 0; i < 4; i++) w[8*i +: 8] = code[(exp_pc + i) % 1024];
      checks++;
      if (f_cbit !== cb || int'(f_len) != len || f_win !== w || int'(f_pc) != exp_pc) begin
        failures++;
        $display("FAIL cyc %0d slot at %0d: got c%0d l%0d %08h pc %0d, want c%0d l%0d %08h",
                 cyc, exp_pc, f_cbit, f_len, f_win, f_pc, cb, len, w);
      end
      if (done_cyc >= 0) begin first_lat = cyc - done_cyc; done_cyc = -1; end
      got++;
      exp_pc += len;
      exp_bp++;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int want;
    bp = 0;
    for (int i = 0; i < 1024; i++) code[i] = 8'($urandom);
    for (int i = 0; i < 8192; i++) bits[i] = 1'($urandom);
    redir_valid = 0; redir_addr = '0; stall = 0; bat_hit = 0; bat_entry = '0; bat_done = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 30; r++) begin
      redir_valid = 1; redir_addr = addr_t'($urandom % 1000);
      @(negedge clk); redir_valid = 0;
      checks++;
      if (f_valid || !searching) begin failures++; $display("FAIL redirect did not flush"); end
      want = got + 5 + $urandom % 30;
      while (got < want) begin
        stall = ($urandom % 3) == 0;
        @(negedge clk);
      end
      stall = 0;
      if (r % 5 == 0) begin
        checks++;
        if (first_lat != 2 && !(first_lat > 2 && r != 0)) begin
          failures++;
          $display("FAIL first slot %0d cycles after table answer", first_lat);
        end
      end
    end
    // unstalled run: first slot exactly two cycles after the answer
    redir_valid = 1; redir_addr = 16'h0010;
    @(negedge clk); redir_valid = 0;
    while (!bat_done) @(negedge clk);
    repeat (4) @(negedge clk);
    checks++;
    if (first_lat != 2) begin failures++; $display("FAIL latency %0d", first_lat); end
    // miss: fetching stops, bat_miss set
    redir_valid = 1; redir_addr = 16'hFFFF;
    @(negedge clk); redir_valid = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (!bat_miss || f_valid || searching) begin
      failures++;
      $display("FAIL miss: bat_miss %0d f_valid %0d", bat_miss, f_valid);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
