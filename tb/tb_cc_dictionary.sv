// tb_cc_dictionary: self-checking test of the length-grouped dictionary.
// For several random splits of 256 entries over the four lengths (one with
// an empty group, one not full), builds reference entries, writes them
// packed in length order, writes the group counts, and looks up every index.
// Expected instruction, length and validity come from the reference list.
module tb_cc_dictionary;
  import cc_pkg::*;
  localparam int unsigned ENTRIES = 256;
  localparam int unsigned BYTES   = 1024;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        we, cnt_we, idx_valid;
  logic [9:0]  waddr;
  logic [7:0]  wdata;
  logic [1:0]  cnt_grp;
  logic [8:0]  cnt_val;
  logic [7:0]  idx;
  instr_t      instr;
  ilen_t       ilen;
  instr_t      ref_i [ENTRIES];
  int          ref_l [ENTRIES];
  int checks = 0, failures = 0;

  cc_dictionary dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cnt [4];
    int total, a, e;
    we = 0; cnt_we = 0; waddr = '0; wdata = '0; cnt_grp = '0; cnt_val = '0; idx = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int trial = 0; trial < 4; trial++) begin
      // split the entries over the length groups
      total = (trial == 3) ? 200 : 256;
      cnt[0] = $urandom % 40;
      cnt[1] = (trial == 2) ? 0 : $urandom % (total - cnt[0]);
      cnt[2] = $urandom % (total - cnt[0] - cnt[1] + 1);
      cnt[3] = total - cnt[0] - cnt[1] - cnt[2];
      a = 0; e = 0;
      for (int g = 0; g < 4; g++) begin
        @(negedge clk);
        cnt_we = 1; cnt_grp = 2'(g); cnt_val = 9'(cnt[g]);
        for (int k = 0; k < cnt[g]; k++) begin
          ref_l[e] = g + 1;
          ref_i[e] = '0;
          for (int b = 0; b <= g; b++) begin
            ref_i[e][8*b +: 8] = 8'($urandom);
            @(negedge clk);
            cnt_we = 0;
            we = 1; waddr = 10'(a); wdata = ref_i[e][8*b +: 8];
            a++;
          end
          e++;
        end
        @(negedge clk); we = 0; cnt_we = 0;
      end
      for (int i = 0; i < int'(ENTRIES); i++) begin
        idx = 8'(i);
        #1;
        checks++;
        if (i < total) begin
          if (!idx_valid || instr !== ref_i[i] || int'(ilen) != ref_l[i]) begin
            failures++;
            $display("FAIL trial %0d idx %0d: got %08h/%0d want %08h/%0d", trial, i,
                     instr, ilen, ref_i[i], ref_l[i]);
          end
        end else if (idx_valid) begin
          failures++;
          $display("FAIL trial %0d idx %0d should be invalid", trial, i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
