// wdp_cfc: control-flow checker of the watchdog processor.
//
// The checker watches the words the main processor fetches, in program
// order. A signature word (see wdp_pkg) opens a basic block: the checker
// stores the block's reference signature and restarts the running signature
// at SIG_SEED. Every other word is folded into the running signature. When
// the next signature arrives, the running signature must equal the stored
// reference; otherwise the processor has left the expected flow and
// cfe_o pulses for one cycle. ok_o pulses for a check that passed. Before
// the first signature (active = 0) nothing is checked.
//
// Words are only taken while mon_en_i is high, so code that carries no
// signatures (the scheduler, interrupt entry) can run unmonitored.
// ctx_load_i replaces the whole state with ctx_i in one cycle, taking
// priority over a fetched word; ctx_o shows the state for saving at a task
// switch.
//
// Timing: cfe_o and ok_o are combinational in the cycle of the signature;
// the state updates on the next clock edge.
//
// The published architecture gives what the watchdog does (detect control-flow errors
// from signatures placed at the start of each basic block). The compaction
// function and the save/restore port are this design's choices.
module wdp_cfc
  import wdp_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     instr_valid_i,
  input  word_t    instr_i,
  input  logic     mon_en_i,
  input  logic     ctx_load_i,
  input  wdp_ctx_t ctx_i,
  output logic     active_o,
  output sig_t     ref_o,
  output sig_t     acc_o,
  output logic     sig_o,      // a signature was taken this cycle
  output logic     ok_o,       // check passed
  output logic     cfe_o       // control-flow error detected
);

  logic      active_q;
  sig_t      ref_q, acc_q;
  sig_word_t dec;
  logic      take;

  assign dec   = decode_sig(instr_i);
  assign take  = instr_valid_i && mon_en_i && !ctx_load_i;
  assign sig_o = take && dec.is_sig;
  assign cfe_o = sig_o && active_q && (acc_q != ref_q);
  assign ok_o  = sig_o && active_q && (acc_q == ref_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active_q <= 1'b0;
      ref_q    <= '0;
      acc_q    <= SIG_SEED;
    end else if (ctx_load_i) begin
      active_q <= ctx_i.active;
      ref_q    <= ctx_i.ref_sig;
      acc_q    <= ctx_i.acc;
    end else if (take) begin
      if (dec.is_sig) begin
        active_q <= 1'b1;
        ref_q    <= dec.ref_sig;
        acc_q    <= SIG_SEED;
      end else if (active_q) begin
        acc_q    <= compact(acc_q, instr_i);
      end
    end
  end

  assign active_o = active_q;
  assign ref_o    = ref_q;
  assign acc_o    = acc_q;

endmodule
