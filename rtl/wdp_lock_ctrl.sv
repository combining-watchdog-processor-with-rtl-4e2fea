// wdp_lock_ctrl: cache-lock circuitry of the watchdog processor.
//
// Each signature carries one cache-control bit. A 1 unlocks the cache, so
// the main memory blocks fetched from then on are loaded as they arrive;
// a 0 locks it, so nothing already in the cache can be displaced. The state
// holds until the next signature, which either keeps it or swaps it.
//
// locked_o is the stored state. lock_o is what the cache controller uses
// for the word being delivered now: when that word is itself a signature,
// its own bit already applies, so the line that holds the signature follows
// the vertex the signature opens; otherwise it is the stored state.
// ctx_load_i restores a saved state at a task switch.
//
// Timing: lock_o is combinational from sig_valid_i/sig_unlock_i; locked_o
// changes on the clock edge after the signature. Reset leaves the cache
// unlocked.
//
// The bit, its meaning (1 = unlock, 0 = lock) and the hold-until-next-
// signature rule follow the published architecture. Applying a signature's bit to its own
// line, the reset state and the restore port are this design's choices.
module wdp_lock_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic sig_valid_i,   // a signature is being taken this cycle
  input  logic sig_unlock_i,  // its cache-control bit
  input  logic ctx_load_i,
  input  logic ctx_locked_i,
  output logic locked_o,
  output logic lock_o,
  output logic lock_evt_o,    // signature switches unlocked -> locked
  output logic unlock_evt_o   // signature switches locked -> unlocked
);

  logic locked_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           locked_q <= 1'b0;
    else if (ctx_load_i)  locked_q <= ctx_locked_i;
    else if (sig_valid_i) locked_q <= !sig_unlock_i;
  end

  assign locked_o     = locked_q;
  assign lock_o       = (sig_valid_i && !ctx_load_i) ? !sig_unlock_i : locked_q;
  assign lock_evt_o   = sig_valid_i && !ctx_load_i && !sig_unlock_i && !locked_q;
  assign unlock_evt_o = sig_valid_i && !ctx_load_i &&  sig_unlock_i &&  locked_q;

endmodule
