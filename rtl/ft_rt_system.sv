// ft_rt_system: fault-tolerant, predictable instruction path of a
// real-time system: an instruction cache whose locking is controlled by a
// watchdog processor.
//
// The main processor (outside this module) fetches through cpu_*; the
// instruction cache (icache_ctrl) serves the fetch from its lines or from
// main memory (mem_*). Every word handed to the processor is also snooped
// by the watchdog processor, which checks the control flow against the
// signatures in the code and turns each signature's cache-control bit into
// the lock signal of the cache. One piece of hardware thus gives both
// control-flow error detection (cfe_o) and dynamic cache locking.
//
// For preemptive multitasking the scheduler saves the watchdog state of the
// preempted task from wdp_ctx_o and restores it with wdp_ctx_load_i and
// wdp_ctx_i; wdp_mon_en_i low lets code without signatures run unchecked.
// The ev_* outputs pulse on each hit, line-buffer hit, fill, bypass, signature, passed check,
// lock and unlock, for counting.
//
// Timing is that of icache_ctrl: one cycle per hit, two cycles plus the
// memory latency per miss. The lock decision for a missed block is taken in
// the cycle its word is delivered.
module ft_rt_system
  import wdp_pkg::*;
#(
  parameter int unsigned LINES = 4096,
  parameter int unsigned WORDS = 4
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // main processor fetch port
  input  logic                          cpu_req_valid_i,
  output logic                          cpu_req_ready_o,
  input  word_t                         cpu_req_addr_i,
  output logic                          cpu_rsp_valid_o,
  output word_t                         cpu_rsp_instr_o,
  // main memory port
  output logic                          mem_req_valid_o,
  input  logic                          mem_req_ready_i,
  output logic [XLEN-$clog2(WORDS)-3:0] mem_req_addr_o,
  input  logic                          mem_rsp_valid_i,
  input  logic [WORDS*XLEN-1:0]         mem_rsp_line_i,
  // watchdog control and status
  input  logic                          wdp_mon_en_i,
  input  logic                          wdp_ctx_load_i,
  input  wdp_ctx_t                      wdp_ctx_i,
  output wdp_ctx_t                      wdp_ctx_o,
  input  logic                          wdp_err_clr_i,
  output logic                          cfe_o,
  output logic                          cfe_pulse_o,
  output logic                          cache_lock_o,
  // event pulses
  output logic                          ev_hit_o,
  output logic                          ev_fill_o,
  output logic                          ev_bypass_o,
  output logic                          ev_lbuf_o,
  output logic                          ev_sig_o,
  output logic                          ev_ok_o,
  output logic                          ev_lock_o,
  output logic                          ev_unlock_o
);

  logic  rsp_valid;
  word_t rsp_instr;
  logic  lock;

  icache_ctrl #(
    .LINES (LINES),
    .WORDS (WORDS)
  ) u_icache (
    .clk             (clk),
    .rst_n           (rst_n),
    .req_valid_i     (cpu_req_valid_i),
    .req_ready_o     (cpu_req_ready_o),
    .req_addr_i      (cpu_req_addr_i),
    .rsp_valid_o     (rsp_valid),
    .rsp_instr_o     (rsp_instr),
    .rsp_hit_o       (ev_hit_o),
    .lock_i          (lock),
    .mem_req_valid_o (mem_req_valid_o),
    .mem_req_ready_i (mem_req_ready_i),
    .mem_req_addr_o  (mem_req_addr_o),
    .mem_rsp_valid_i (mem_rsp_valid_i),
    .mem_rsp_line_i  (mem_rsp_line_i),
    .fill_o          (ev_fill_o),
    .bypass_o        (ev_bypass_o),
    .lbuf_hit_o      (ev_lbuf_o)
  );

  watchdog_processor u_wdp (
    .clk           (clk),
    .rst_n         (rst_n),
    .snoop_valid_i (rsp_valid),
    .snoop_instr_i (rsp_instr),
    .mon_en_i      (wdp_mon_en_i),
    .ctx_load_i    (wdp_ctx_load_i),
    .ctx_i         (wdp_ctx_i),
    .ctx_o         (wdp_ctx_o),
    .err_clr_i     (wdp_err_clr_i),
    .cache_lock_o  (lock),
    .cfe_o         (cfe_o),
    .cfe_pulse_o   (cfe_pulse_o),
    .ok_pulse_o    (ev_ok_o),
    .sig_pulse_o   (ev_sig_o),
    .lock_evt_o    (ev_lock_o),
    .unlock_evt_o  (ev_unlock_o)
  );

  assign cpu_rsp_valid_o = rsp_valid;
  assign cpu_rsp_instr_o = rsp_instr;
  assign cache_lock_o    = lock;

endmodule
