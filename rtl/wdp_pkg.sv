// wdp_pkg: types, constants and functions shared by the watchdog processor
// and the instruction cache.
//
// Signature word. The main processor is MIPS R2000 compatible, and a
// signature has to execute as a no-operation on it. Here a signature is
// "ori $zero, $zero, imm16" (opcode 001101, rs = 0, rt = 0). Writing $zero
// has no effect, so the processor runs it as a NOP while the watchdog reads
// the 16-bit immediate:
//   imm[15]   cache-control bit. 1 = unlock: blocks fetched from now on may
//             enter the cache. 0 = lock: the cache contents stay as they are.
//   imm[14:0] reference signature of the basic block that starts with this
//             word.
// The cache-control bit and its meaning follow the design. The opcode, the
// field layout and the 15-bit reference are this implementation's choice.
//
// Compaction. The reference of a basic block is the running signature of
// the instructions between its signature and the next one. Starting from
// SIG_SEED, each word w updates the value acc as
//   acc' = rotl1(acc) ^ w[14:0] ^ w[29:15] ^ {13'b0, w[31:30]}
// This function is also this implementation's choice.
package wdp_pkg;

  localparam int unsigned XLEN   = 32;
  localparam int unsigned SIG_W  = 15;
  localparam logic [5:0]  OP_ORI = 6'b001101;
  localparam logic [SIG_W-1:0] SIG_SEED = '0;

  typedef logic [XLEN-1:0]  word_t;
  typedef logic [SIG_W-1:0] sig_t;

  // Decoded view of one fetched word.
  typedef struct packed {
    logic is_sig;   // word is a watchdog signature
    logic unlock;   // cache-control bit (1 = unlock, 0 = lock)
    sig_t ref_sig;  // reference signature of the block it starts
  } sig_word_t;

  // Watchdog state that a task switch saves and restores, so that the
  // preempted task resumes with its own check and its own lock state.
  typedef struct packed {
    logic active;   // a signature has been seen: a check is running
    sig_t ref_sig;  // reference of the current basic block
    sig_t acc;      // running signature of the current basic block
    logic locked;   // lock state sent to the cache
  } wdp_ctx_t;

  function automatic sig_word_t decode_sig(word_t w);
    sig_word_t d;
    d.is_sig  = (w[31:26] == OP_ORI) && (w[25:21] == 5'd0) && (w[20:16] == 5'd0);
    d.unlock  = w[15];
    d.ref_sig = w[SIG_W-1:0];
    return d;
  endfunction

  function automatic word_t encode_sig(logic unlock, sig_t ref_sig);
    return {OP_ORI, 5'd0, 5'd0, unlock, ref_sig};
  endfunction

  function automatic sig_t compact(sig_t acc, word_t w);
    return {acc[SIG_W-2:0], acc[SIG_W-1]} ^ w[14:0] ^ w[29:15] ^ {13'b0, w[31:30]};
  endfunction

endpackage
