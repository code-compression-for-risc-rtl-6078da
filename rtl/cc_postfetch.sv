// cc_postfetch: post-fetch (decompression) stage.
//
// Sits between fetch and the processor's decode stage. When the slot in the
// fetch/post-fetch register is marked by its indicator bit as a dictionary
// index, its first byte indexes the dictionary, which returns the full
// instruction and its length; otherwise the fetched window, cut to the
// instruction's own length, passes through. The result is registered and
// offered to decode with a valid/ready handshake.
//
// Timing: one cycle through the stage, one instruction per cycle. stall
// (out_valid && !out_ready) freezes this stage and the fetch stage. flush
// (a redirect) empties the output register. A held output keeps its value
// until taken, which an assertion checks. dict_err marks an expanded index
// beyond the loaded dictionary. The extra stage follows the description;
// the handshake and the error flag are this design's own choices.
module cc_postfetch
  import cc_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   flush,
  // from fetch
  input  logic   f_valid,
  input  logic   f_cbit,
  input  instr_t f_win,
  input  ilen_t  f_len,
  // dictionary lookup
  output logic [IDX_W-1:0] dict_idx,
  output logic   dict_rd,
  input  instr_t dict_instr,
  input  ilen_t  dict_len,
  input  logic   dict_idx_valid,
  // to decode
  output logic   stall,
  output logic   out_valid,
  input  logic   out_ready,
  output instr_t out_instr,
  output ilen_t  out_len,
  output logic   out_compressed,
  output logic   dict_err
);

  assign stall    = out_valid && !out_ready;
  assign dict_idx = f_win[IDX_W-1:0];
  assign dict_rd  = f_valid && f_cbit && !stall && !flush;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      out_valid      <= 1'b0;
      out_instr      <= '0;
      out_len        <= '0;
      out_compressed <= 1'b0;
      dict_err       <= 1'b0;
    end else if (flush) begin
      out_valid <= 1'b0;
      dict_err  <= 1'b0;
    end else if (!stall) begin
      out_valid <= f_valid;
      if (f_valid) begin
        out_compressed <= f_cbit;
        out_instr      <= f_cbit ? dict_instr : mask_len(f_win, f_len);
        out_len        <= f_cbit ? dict_len : f_len;
        dict_err       <= f_cbit && !dict_idx_valid;
      end
    end

  // A held instruction must stay put until decode takes it.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (out_valid && !out_ready && !flush) |=> (out_valid && $stable(out_instr) && $stable(out_len)));

endmodule
