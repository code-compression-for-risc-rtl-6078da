// tb_cc_postfetch: self-checking test of the post-fetch stage.
// A producer offers random slots (marked dictionary indexes or normal
// instructions with random windows and lengths) and obeys stall; the
// dictionary is a fixed function of the index in the testbench; decode
// takes outputs when a random ready is high. Every slot accepted by the
// stage is queued with its expected expansion and compared when it leaves.
// Flushes are inserted and must empty the stage. Also checks one-cycle
// latency with ready held high and that dict_rd counts the expansions.
module tb_cc_postfetch;
  import cc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       flush, f_valid, f_cbit, dict_rd, dict_idx_valid, stall;
  logic       out_valid, out_ready, out_compressed, dict_err;
  instr_t     f_win, dict_instr, out_instr;
  ilen_t      f_len, dict_len, out_len;
  logic [7:0] dict_idx;

  cc_postfetch dut (.*);

  // dictionary model
  function automatic instr_t dict_f(input logic [7:0] i);
    return mask_len({i ^ 8'h5A, ~i, i + 8'd1, i}, ilen_t'(i % 4 + 1));
  endfunction
  assign dict_instr     = dict_f(dict_idx);
  assign dict_len       = ilen_t'(dict_idx % 4 + 1);
  assign dict_idx_valid = dict_idx < 8'd250;

  typedef struct { instr_t i; int l; bit c; bit e; } item_t;
  item_t q[$];
  int checks = 0, failures = 0, n_rd = 0, n_comp = 0, n_out = 0, n_err = 0;

  task automatic new_slot();
    f_cbit = 1'($urandom);
    f_win  = instr_t'($urandom);
    f_len  = ilen_t'($urandom % 4 + 1);
    f_valid = ($urandom % 5) != 0;
  endtask

  always @(posedge clk) begin
    if (dict_rd) n_rd++;
    if (flush) q.delete();
    else begin
      if (out_valid && out_ready) begin
        item_t it;
        it = q.pop_front();
        checks++;
        n_out++;
        if (out_instr !== it.i || int'(out_len) != it.l || out_compressed !== it.c || dict_err !== it.e) begin
          failures++;
          $display("FAIL out %08h/%0d c%0d e%0d want %08h/%0d c%0d e%0d", out_instr, out_len,
                   out_compressed, dict_err, it.i, it.l, it.c, it.e);
        end
      end
      if (f_valid && !stall) begin
        item_t it;
        it.c = f_cbit;
        it.i = f_cbit ? dict_f(f_win[7:0]) : mask_len(f_win, f_len);
        it.l = f_cbit ? int'(f_win[7:0] % 4 + 1) : int'(f_len);
        it.e = f_cbit && f_win[7:0] >= 8'd250;
        if (f_cbit) n_comp++;
        if (it.e) n_err++;
        q.push_back(it);
      end
    end
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flush = 0; out_ready = 0; f_valid = 0; f_cbit = 0; f_win = '0; f_len = 3'd1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 5000; c++) begin
      bit took;
      took = !stall || flush;
      out_ready = ($urandom % 3) != 0;
      flush = ($urandom % 200) == 0;
      if (took || !f_valid) new_slot();
      @(negedge clk);
    end
    // latency: ready high, one slot in, out one cycle later
    flush = 0; out_ready = 1; f_valid = 0;
    repeat (3) @(negedge clk);
    f_valid = 1; f_cbit = 1; f_win = 32'h0000_0007; f_len = 3'd1;
    @(negedge clk);
    f_valid = 0;
    checks++;
    if (!out_valid || out_instr !== dict_f(8'd7)) begin failures++; $display("FAIL latency"); end
    @(negedge clk);
    checks++;
    if (n_rd != n_comp || n_err == 0 || n_out < 1000) begin
      failures++;
      $display("FAIL dict_rd %0d expansions %0d errors %0d outputs %0d", n_rd, n_comp, n_err, n_out);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
