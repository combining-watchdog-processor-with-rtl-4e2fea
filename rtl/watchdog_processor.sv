// watchdog_processor: watchdog coprocessor that monitors the main
// processor's control flow and, through the same signatures, controls the
// locking of the instruction cache.
//
// It snoops every word the instruction cache hands to the main processor
// (snoop_valid_i/snoop_instr_i, in program order). The control-flow checker
// (wdp_cfc) compares each basic block's running signature with the
// reference carried by the signature that opened the block; a mismatch sets
// the sticky error flag cfe_o, which stays set until err_clr_i. The lock
// circuitry (wdp_lock_ctrl) takes the cache-control bit of each signature
// and drives cache_lock_o to the cache controller.
//
// Task switches: ctx_o is the state to save for the preempted task,
// ctx_load_i with ctx_i restores it (or loads an idle state for a task that
// starts from its beginning). mon_en_i low stops monitoring for code that
// has no signatures.
//
// Timing: cache_lock_o, cfe_pulse_o, ok_pulse_o and sig_pulse_o are
// combinational in the cycle a word is snooped; cfe_o is set on the next
// clock edge.
//
// What the watchdog does and the lock bit in the signatures follow the published
// architecture; the signature format, the compaction, the error flag and the
// context port are this design's choices.
module watchdog_processor
  import wdp_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     snoop_valid_i,
  input  word_t    snoop_instr_i,
  input  logic     mon_en_i,
  input  logic     ctx_load_i,
  input  wdp_ctx_t ctx_i,
  output wdp_ctx_t ctx_o,
  input  logic     err_clr_i,
  output logic     cache_lock_o,
  output logic     cfe_o,
  output logic     cfe_pulse_o,
  output logic     ok_pulse_o,
  output logic     sig_pulse_o,
  output logic     lock_evt_o,
  output logic     unlock_evt_o
);

  sig_word_t dec;
  logic      active;
  sig_t      ref_sig, acc;
  logic      locked;
  logic      cfe_q;

  assign dec = decode_sig(snoop_instr_i);

  wdp_cfc u_cfc (
    .clk           (clk),
    .rst_n         (rst_n),
    .instr_valid_i (snoop_valid_i),
    .instr_i       (snoop_instr_i),
    .mon_en_i      (mon_en_i),
    .ctx_load_i    (ctx_load_i),
    .ctx_i         (ctx_i),
    .active_o      (active),
    .ref_o         (ref_sig),
    .acc_o         (acc),
    .sig_o         (sig_pulse_o),
    .ok_o          (ok_pulse_o),
    .cfe_o         (cfe_pulse_o)
  );

  wdp_lock_ctrl u_lock (
    .clk          (clk),
    .rst_n        (rst_n),
    .sig_valid_i  (sig_pulse_o),
    .sig_unlock_i (dec.unlock),
    .ctx_load_i   (ctx_load_i),
    .ctx_locked_i (ctx_i.locked),
    .locked_o     (locked),
    .lock_o       (cache_lock_o),
    .lock_evt_o   (lock_evt_o),
    .unlock_evt_o (unlock_evt_o)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           cfe_q <= 1'b0;
    else if (cfe_pulse_o) cfe_q <= 1'b1;
    else if (err_clr_i)   cfe_q <= 1'b0;
  end

  assign cfe_o = cfe_q;
  assign ctx_o = '{active: active, ref_sig: ref_sig, acc: acc, locked: locked};

endmodule
