// tb_cc_bat: self-checking test of the branch address table.
// Loads a random sorted table (all 512 entries, then partly filled, then empty),
// looks up every stored original address and random absent ones, and
// checks hit, the returned entry, and the search time. The expected number
// of compare cycles is worked out by running the same halving search on the
// reference list; a lookup must also never take more than
// floor(log2 N) + 3 cycles. Also checks that a new request restarts a search.
module tb_cc_bat;
  import cc_pkg::*;
  localparam int unsigned ENTRIES = 512;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       we, cnt_we, req, busy, done, hit;
  logic [8:0] waddr;
  logic [9:0] cnt_val;
  bat_entry_t wdata, entry;
  addr_t      key;
  bat_entry_t ref_t [ENTRIES];
  int         n;
  int checks = 0, failures = 0;

  cc_bat dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference search: cycles from req to done, and the result.
  function automatic int ref_search(input addr_t k, output int found);
    int lo = 0, hi = n, cyc = 1;
    found = -1;
    while (1) begin
      int mid;
      if (lo >= hi) return cyc + 1;
      mid = (lo + hi) / 2;
      if (ref_t[mid].orig_addr == k) begin found = mid; return cyc + 1; end
      if (ref_t[mid].orig_addr < k) lo = mid + 1; else hi = mid;
      cyc++;
    end
  endfunction

  task automatic lookup(input addr_t k);
    int found, want_cyc, cyc;
    want_cyc = ref_search(k, found);
    @(negedge clk);
    req = 1; key = k;
    @(negedge clk);
    req = 0;
    cyc = 1;
    while (!done && cyc < 40) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != want_cyc || cyc > $clog2(ENTRIES) + 3) begin
      failures++;
      $display("FAIL key %04h: %0d cycles, want %0d", k, cyc, want_cyc);
    end
    checks++;
    if (found >= 0) begin
      if (!hit || entry !== ref_t[found]) begin
        failures++;
        $display("FAIL key %04h: hit %0d entry %h want %h", k, hit, entry, ref_t[found]);
      end
    end else if (hit) begin
      failures++;
      $display("FAIL key %04h: unexpected hit", k);
    end
  endtask

  task automatic load_table(input int cnt);
    int addr = $urandom % 8;
    n = cnt;
    for (int i = 0; i < n; i++) begin
      ref_t[i].orig_addr = addr_t'(addr);
      ref_t[i].new_addr  = addr_t'($urandom);
      ref_t[i].bit_byte  = addr_t'($urandom);
      ref_t[i].bit_pos   = 3'($urandom);
      addr += 2 + $urandom % 100;
      @(negedge clk);
      we = 1; waddr = 9'(i); wdata = ref_t[i];
    end
    @(negedge clk);
    we = 0; cnt_we = 1; cnt_val = 10'(n);
    @(negedge clk);
    cnt_we = 0;
  endtask

  initial begin
    we = 0; cnt_we = 0; req = 0; waddr = '0; cnt_val = '0; wdata = '0; key = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    foreach (n_sizes[s]) begin
      load_table(n_sizes[s]);
      for (int i = 0; i < n; i++) lookup(ref_t[i].orig_addr);
      for (int i = 0; i < 50; i++) lookup(addr_t'($urandom));
      if (n > 0) lookup(addr_t'(ref_t[n-1].orig_addr + 1));
    end
    // restart: a second request during a search replaces the first
    load_table(512);
    @(negedge clk); req = 1; key = ref_t[3].orig_addr;
    @(negedge clk); key = ref_t[200].orig_addr;
    @(negedge clk); req = 0;
    while (!done) @(negedge clk);
    checks++;
    if (!hit || entry !== ref_t[200]) begin
      failures++;
      $display("FAIL restart returned %h", entry);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_sizes [3] = '{512, 37, 0};
endmodule
