// tb_wdp_lock_ctrl: self-checking testbench of the cache-lock circuitry.
//
// Drives random signatures (with random cache-control bits), idle cycles and
// state restores, and compares lock_o, locked_o and the lock/unlock event
// pulses with a reference model kept in the testbench: a signature's bit
// (1 = unlock, 0 = lock) applies at once to lock_o and is held in locked_o
// until the next signature; a restore overrides everything.
module tb_wdp_lock_ctrl;
  logic clk = 1'b0, rst_n = 1'b0;
  logic sig_valid = 1'b0, sig_unlock = 1'b0, ctx_load = 1'b0, ctx_locked = 1'b0;
  logic locked, lock, lock_evt, unlock_evt;
  int checks = 0, failures = 0;
  int n_lock = 0, n_unlock = 0;
  logic m_state;
  logic exp_lock, exp_levt, exp_uevt;

  always #5 clk = ~clk;

  wdp_lock_ctrl dut (
    .clk(clk), .rst_n(rst_n), .sig_valid_i(sig_valid), .sig_unlock_i(sig_unlock),
    .ctx_load_i(ctx_load), .ctx_locked_i(ctx_locked),
    .locked_o(locked), .lock_o(lock), .lock_evt_o(lock_evt), .unlock_evt_o(unlock_evt)
  );

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    m_state = 1'b0;
    #1 check("reset unlocked", locked, 1'b0);
    check("reset lock_o", lock, 1'b0);
    for (int i = 0; i < 2000; i++) begin
      @(posedge clk); #1;
      sig_valid  = ($urandom() % 3) == 0;
      sig_unlock = $urandom() % 2;
      ctx_load   = ($urandom() % 23) == 0;
      ctx_locked = $urandom() % 2;
      #3;
      check("locked_o", locked, m_state);
      exp_lock = (sig_valid && !ctx_load) ? !sig_unlock : m_state;
      exp_levt = sig_valid && !ctx_load && !sig_unlock && !m_state;
      exp_uevt = sig_valid && !ctx_load && sig_unlock && m_state;
      check("lock_o", lock, exp_lock);
      check("lock_evt", lock_evt, exp_levt);
      check("unlock_evt", unlock_evt, exp_uevt);
      n_lock += int'(exp_levt);
      n_unlock += int'(exp_uevt);
      if (ctx_load) m_state = ctx_locked;
      else if (sig_valid) m_state = !sig_unlock;
    end
    @(posedge clk); #1;
    sig_valid = 1'b0; ctx_load = 1'b0;
    // Held across idle cycles.
    repeat (5) begin @(posedge clk); #1; check("hold", locked, m_state); check("hold lock_o", lock, m_state); end
    check("lock events seen", n_lock > 10, 1'b1);
    check("unlock events seen", n_unlock > 10, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
