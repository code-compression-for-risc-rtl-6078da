// tb_cc_capacity: end-to-end run of the front end, at its default sizes,
// with a program as large as the largest example programs the design is
// sized for: about 15000 bytes of original code (6000 instructions drawn
// from a wide pool of 2500 distinct instructions, so the dictionary covers
// less of the program and the compressed code stays large) and about 450
// branch targets in the branch address table. The program is built,
// compressed and loaded as in tb_cc_decomp_top, run once from the entry
// point and then through random redirects; every instruction delivered is
// compared with the original program, and the image sizes are checked
// against the store sizes.
module tb_cc_capacity;
  import cc_pkg::*;

  localparam int NPOOL = 2500;
  localparam int NI    = 6000;
  localparam int NT    = 470;           // random branch targets besides entry

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        code_we, bit_we, dict_we, dict_cnt_we, bat_we, bat_cnt_we;
  logic [13:0] code_waddr;
  logic [10:0] bit_waddr;
  logic [9:0]  dict_waddr;
  logic [7:0]  code_wdata, bit_wdata, dict_wdata;
  logic [1:0]  dict_cnt_grp;
  logic [8:0]  dict_cnt_val;
  logic [9:0]  bat_cnt_val;
  logic [8:0]  bat_waddr;
  bat_entry_t  bat_wdata;
  logic        redir_valid, out_valid, out_ready, out_compressed;
  addr_t       redir_addr;
  instr_t      out_instr;
  ilen_t       out_len, fetch_len;
  logic        searching, bat_miss, dict_err, fetch_fire, bit_byte_rd, dict_rd;

  cc_decomp_top dut (.*);

  // ---------------------------------------------------------------- program
  instr_t pool_i [NPOOL];
  int     pool_l [NPOOL];
  int     pool_f [NPOOL];
  int     pool_d [NPOOL];             // dictionary index or -1
  int     prog   [NI];                // pool id per instruction
  int     oaddr  [NI+1];
  int     caddr  [NI+1];
  logic [7:0] cmem [16384];
  logic [7:0] bmem [2048];
  logic [7:0] dmem [1024];
  int     dict_pool [256];
  int     dict_n, dict_bytes, code_bytes;
  int     grp_cnt [4];
  bit     is_tgt [NI];
  int     tgt [$];                    // target instruction numbers, ascending

  int checks = 0, failures = 0;

  task automatic fail(input string s);
    failures++;
    $display("FAIL %s", s);
  endtask

  task automatic build();
    int order [NPOOL];
    for (int p = 0; p < NPOOL; p++) begin
      pool_l[p] = 1 + $urandom % 4;
      pool_i[p] = '0;
      for (int b = 0; b < pool_l[p]; b++) pool_i[p][8*b +: 8] = 8'($urandom);
      pool_i[p][7:6] = 2'(pool_l[p] - 1);
      pool_f[p] = 0;
      pool_d[p] = -1;
      order[p] = p;
    end
    for (int i = 0; i < NI; i++) begin
      prog[i] = int'(($urandom % NPOOL) * (($urandom % NPOOL) + NPOOL) / (2 * NPOOL));
      pool_f[prog[i]]++;
    end
    // most frequent first
    for (int a = 1; a < NPOOL; a++)
      for (int b = a; b > 0 && pool_f[order[b]] > pool_f[order[b-1]]; b--) begin
        int t = order[b]; order[b] = order[b-1]; order[b-1] = t;
      end
    // the 256 most frequent, then grouped by length
    dict_n = 0;
    dict_bytes = 0;
    for (int g = 0; g < 4; g++) grp_cnt[g] = 0;
    for (int g = 0; g < 4; g++)
      for (int k = 0; k < 256 && k < NPOOL; k++)
        if (pool_f[order[k]] > 0 && pool_l[order[k]] == g + 1) begin
          pool_d[order[k]] = dict_n;
          dict_pool[dict_n] = order[k];
          for (int b = 0; b <= g; b++) dmem[dict_bytes + b] = pool_i[order[k]][8*b +: 8];
          dict_bytes += g + 1;
          dict_n++;
          grp_cnt[g]++;
        end
    // compressed code and indicator bits
    for (int i = 0; i < 2048; i++) bmem[i] = '0;
    oaddr[0] = 0;
    caddr[0] = 0;
    for (int i = 0; i < NI; i++) begin
      int p = prog[i];
      oaddr[i+1] = oaddr[i] + pool_l[p];
      if (pool_d[p] >= 0) begin
        cmem[caddr[i]] = 8'(pool_d[p]);
        bmem[i / 8][i % 8] = 1'b1;
        caddr[i+1] = caddr[i] + 1;
      end else begin
        for (int b = 0; b < pool_l[p]; b++) cmem[caddr[i] + b] = pool_i[p][8*b +: 8];
        caddr[i+1] = caddr[i] + pool_l[p];
      end
    end
    code_bytes = caddr[NI];
    if (code_bytes > 16384 || oaddr[NI] > 65536) $fatal(1, "program image too large");
    // branch targets: entry point plus random instructions
    for (int i = 0; i < NI; i++) is_tgt[i] = 1'b0;
    is_tgt[0] = 1'b1;
    for (int k = 0; k < NT; k++) is_tgt[$urandom % NI] = 1'b1;
    for (int i = 0; i < NI; i++) if (is_tgt[i]) tgt.push_back(i);
    if (tgt.size() > 512) $fatal(1, "too many branch targets");
  endtask

  task automatic load();
    @(negedge clk);
    for (int a = 0; a < code_bytes; a++) begin
      code_we = 1; code_waddr = 14'(a); code_wdata = cmem[a];
      @(negedge clk);
    end
    code_we = 0;
    for (int a = 0; a < NI / 8 + 1; a++) begin
      bit_we = 1; bit_waddr = 11'(a); bit_wdata = bmem[a];
      @(negedge clk);
    end
    bit_we = 0;
    for (int a = 0; a < dict_bytes; a++) begin
      dict_we = 1; dict_waddr = 10'(a); dict_wdata = dmem[a];
      @(negedge clk);
    end
    dict_we = 0;
    for (int g = 0; g < 4; g++) begin
      dict_cnt_we = 1; dict_cnt_grp = 2'(g); dict_cnt_val = 9'(grp_cnt[g]);
      @(negedge clk);
    end
    dict_cnt_we = 0;
    foreach (tgt[k]) begin
      bat_we = 1; bat_waddr = 9'(k);
      bat_wdata.orig_addr = addr_t'(oaddr[tgt[k]]);
      bat_wdata.new_addr  = addr_t'(caddr[tgt[k]]);
      bat_wdata.bit_byte  = addr_t'(tgt[k] / 8);
      bat_wdata.bit_pos   = 3'(tgt[k] % 8);
      @(negedge clk);
    end
    bat_we = 0;
    bat_cnt_we = 1; bat_cnt_val = 10'(tgt.size());
    @(negedge clk);
    bat_cnt_we = 0;
  endtask

  // compares the table's binary search needs to find orig address a
  function automatic int search_compares(input int a);
    int lo = 0, hi = tgt.size(), k = 0;
    while (lo < hi) begin
      int mid = (lo + hi) / 2;
      k++;
      if (oaddr[tgt[mid]] == a) return k;
      if (oaddr[tgt[mid]] < a) lo = mid + 1; else hi = mid;
    end
    return -1;
  endfunction

  // ---------------------------------------------------------------- monitor
  int ei = 0, pending = 0;
  int n_out = 0, n_comp = 0, n_norm = 0, n_stall = 0, n_flush_held = 0;
  int n_redir = 0, n_miss = 0, n_cross = 0, n_midpos = 0;
  int n_grp [4] = '{0, 0, 0, 0};
  int bytes_normal = 0, bytes_code = 0, bytes_bits = 0, bytes_dict = 0;
  bit counting = 0;

  always @(posedge clk) if (rst_n) begin
    if (redir_valid) begin
      ei = pending;
      n_redir++;
      if (out_valid && !out_ready) n_flush_held++;
    end else begin
      if (out_valid && !out_ready) n_stall++;
      if (out_valid && out_ready) begin
        int p;
        p = prog[ei];
        checks++;
        n_out++;
        if (out_instr !== pool_i[p] || int'(out_len) != pool_l[p] ||
            out_compressed !== (pool_d[p] >= 0) || dict_err)
          fail($sformatf("instr %0d: got %08h/%0d c%0d, want %08h/%0d c%0d", ei,
                         out_instr, out_len, out_compressed, pool_i[p], pool_l[p], pool_d[p] >= 0));
        if (out_compressed) begin n_comp++; n_grp[out_len - 1]++; end
        else n_norm++;
        if (counting) begin
          bytes_normal += pool_l[p];
          if (out_compressed) bytes_dict += pool_l[p];
        end
        ei++;
      end
    end
    if (bit_byte_rd && !dut.bit_load) n_cross++;
    if (dut.bit_load && dut.bit_load_pos != 0) n_midpos++;
    if (counting && fetch_fire) bytes_code += int'(fetch_len);
    if (counting && bit_byte_rd) bytes_bits++;
  end

  // ---------------------------------------------------------------- driving
  task automatic redirect(input int i);
    pending = i;
    redir_valid = 1; redir_addr = addr_t'(oaddr[i]);
    @(negedge clk);
    redir_valid = 0;
  endtask

  task automatic consume(input int n, input int ready_pct);
    int want = n_out + n;
    int guard = 0;
    while (n_out < want && guard < 100 * n + 100) begin
      out_ready = ($urandom % 100) < ready_pct;
      @(negedge clk);
      guard++;
    end
    if (n_out < want) fail($sformatf("stream stopped at instruction %0d", ei));
  endtask

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    code_we = 0; bit_we = 0; dict_we = 0; dict_cnt_we = 0; bat_we = 0; bat_cnt_we = 0;
    code_waddr = '0; bit_waddr = '0; dict_waddr = '0; code_wdata = '0; bit_wdata = '0;
    dict_wdata = '0; dict_cnt_grp = '0; dict_cnt_val = '0; bat_waddr = '0; bat_wdata = '0;
    bat_cnt_val = '0; redir_valid = 0; redir_addr = '0; out_ready = 0;
    build();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    load();

    // 1. whole program from the entry point, decode taking 80% of cycles
    counting = 1;
    redirect(0);
    consume(NI - 1, 80);
    counting = 0;
    checks++;
    if (ei != NI - 1) fail($sformatf("sequential run ended at %0d", ei));

    // 2. random redirects, some while an output is held
    for (int r = 0; r < 150; r++) begin
      automatic int t = tgt[$urandom % tgt.size()];
      automatic int n = 1 + $urandom % 40;
      if (t + n >= NI) n = NI - 1 - t;
      if (r % 3 == 0) begin
        out_ready = 0;
        repeat (3) @(negedge clk);
      end
      redirect(t);
      if (n > 0) consume(n, 60);
    end

    // 3. latency with decode always ready
    out_ready = 1;
    for (int r = 0; r < 20; r++) begin
      automatic int t = tgt[$urandom % tgt.size()];
      automatic int k = search_compares(oaddr[t]);
      automatic int lat = 0;
      redirect(t);
      lat = 1;
      while (!out_valid && lat < 50) begin @(negedge clk); lat++; end
      checks++;
      if (lat != k + 4) fail($sformatf("redirect to %0d: first output after %0d cycles, want %0d", t, lat, k + 4));
      // then one instruction per cycle
      for (int j = 0; j < 5 && t + j + 1 < NI; j++) begin
        checks++;
        if (!out_valid) fail("bubble in sequential flow");
        @(negedge clk);
      end
    end

    // 4. a target missing from the table
    begin
      automatic int t = 1;
      while (is_tgt[t]) t++;
      redirect(t);
      repeat (20) @(negedge clk);
      checks++;
      if (!bat_miss || out_valid) fail("missing target not flagged");
      else n_miss++;
    end

    // mechanisms
    $display("outputs %0d: from dictionary %0d (lengths 1..4: %0d %0d %0d %0d), normal %0d",
             n_out, n_comp, n_grp[0], n_grp[1], n_grp[2], n_grp[3], n_norm);
    $display("redirects %0d, table misses %0d, stall cycles %0d, held outputs flushed %0d",
             n_redir, n_miss, n_stall, n_flush_held);
    $display("bit stream byte crossings %0d, restarts inside a byte %0d", n_cross, n_midpos);
    checks++; if (n_comp == 0) fail("no dictionary expansion");
    checks++; if (n_norm == 0) fail("no normal instruction");
    for (int g = 0; g < 4; g++) begin
      checks++; if (n_grp[g] == 0) fail($sformatf("no %0d-byte dictionary entry used", g + 1));
    end
    checks++; if (n_redir < 2) fail("no redirect");
    checks++; if (n_miss == 0) fail("no table miss");
    checks++; if (n_stall == 0) fail("no stall");
    checks++; if (n_flush_held == 0) fail("no flush of a held output");
    checks++; if (n_cross == 0) fail("no bit stream byte crossing");
    checks++; if (n_midpos == 0) fail("no restart inside a bit stream byte");

    // storage and traffic of the generated program
    $display("storage: original %0d B, code %0d B, bits %0d B, dictionary %0d B, table %0d entries",
             oaddr[NI], code_bytes, (NI + 7) / 8, dict_bytes, tgt.size());
    $display("traffic over the sequential run: normal fetch %0d B, code %0d B + bits %0d B, dictionary %0d B",
             bytes_normal, bytes_code, bytes_bits, bytes_dict);
    checks++;
    if (bytes_code + bytes_bits >= bytes_normal) fail("compressed fetch traffic not below normal");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
