// tb_watchdog_processor: self-checking testbench of the watchdog processor.
//
// Plays random basic blocks through the snoop port, each opened by a
// signature with a reference and a cache-control bit computed by the
// testbench. Checks, cycle by cycle, the lock signal to the cache (the
// signature's own bit in its cycle, the held state afterwards), the passed
// and failed check pulses, the sticky error flag and its clear, and the
// saved context (ctx_o) against the testbench's model; then restores a saved
// context and checks that the check and the lock state resume from it.
module tb_watchdog_processor;
  import wdp_pkg::*;

  logic     clk = 1'b0, rst_n = 1'b0;
  logic     sv = 1'b0;
  word_t    si = '0;
  logic     mon_en = 1'b1, ctx_load = 1'b0, err_clr = 1'b0;
  wdp_ctx_t ctx_in = '0, ctx_out;
  logic     lock, cfe, cfe_p, ok_p, sig_p, levt, uevt;
  int checks = 0, failures = 0;
  int n_err = 0, n_ok = 0, n_clr = 0, n_restore = 0;

  // reference model
  logic        m_active, m_locked, m_cfe;
  logic [14:0] m_ref, m_acc;

  always #5 clk = ~clk;

  watchdog_processor dut (
    .clk(clk), .rst_n(rst_n), .snoop_valid_i(sv), .snoop_instr_i(si),
    .mon_en_i(mon_en), .ctx_load_i(ctx_load), .ctx_i(ctx_in), .ctx_o(ctx_out),
    .err_clr_i(err_clr), .cache_lock_o(lock), .cfe_o(cfe), .cfe_pulse_o(cfe_p),
    .ok_pulse_o(ok_p), .sig_pulse_o(sig_p), .lock_evt_o(levt), .unlock_evt_o(uevt)
  );

  function automatic logic [14:0] m_compact(logic [14:0] a, logic [31:0] w);
    logic [14:0] r;
    for (int i = 0; i < 15; i++) r[(i + 1) % 15] = a[i];
    for (int i = 0; i < 32; i++) r[i % 15] ^= w[i];
    return r;
  endfunction

  function automatic logic [31:0] rnd_instr();
    logic [31:0] w;
    do w = $urandom(); while (w[31:16] == 16'h3400);
    return w;
  endfunction

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h at %0t", what, got, exp, $time);
    end
  endtask

  task automatic feed(logic [31:0] w);
    logic is_sig;
    is_sig = (w[31:16] == 16'h3400);
    sv = 1'b1; si = w;
    #4;
    check("lock", lock, is_sig ? !w[15] : m_locked);
    check("sig", sig_p, is_sig);
    check("ok", ok_p, is_sig && m_active && (m_acc == m_ref));
    check("cfe pulse", cfe_p, is_sig && m_active && (m_acc != m_ref));
    if (is_sig && m_active && m_acc != m_ref) begin m_cfe = 1'b1; n_err++; end
    if (is_sig && m_active && m_acc == m_ref) n_ok++;
    if (is_sig) begin m_active = 1'b1; m_ref = w[14:0]; m_acc = 15'd0; m_locked = !w[15]; end
    else if (m_active) m_acc = m_compact(m_acc, w);
    @(posedge clk); #1;
    sv = 1'b0;
    check("cfe flag", cfe, m_cfe);
    check("ctx", ctx_out, {m_active, m_ref, m_acc, m_locked});
  endtask

  logic [31:0] body [32];
  logic [14:0] r;
  int          len;
  wdp_ctx_t    saved;

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m_active = 1'b0; m_locked = 1'b0; m_cfe = 1'b0; m_ref = '0; m_acc = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    check("reset ctx", ctx_out, '0);
    for (int b = 0; b < 300; b++) begin
      len = 1 + ($urandom() % 12);
      r = 15'd0;
      for (int i = 0; i < len; i++) begin body[i] = rnd_instr(); r = m_compact(r, body[i]); end
      feed({6'b001101, 10'd0, 1'($urandom() % 2), r});
      if ($urandom() % 5 == 0) body[$urandom() % len] ^= 32'h0000_0100;
      for (int i = 0; i < len; i++) feed(body[i]);
      if (b % 20 == 10) begin
        // Save, load an idle state, run a foreign block, restore.
        saved = ctx_out;
        ctx_load = 1'b1; ctx_in = '{active: 1'b0, ref_sig: '0, acc: '0, locked: 1'b1};
        @(posedge clk); #1; ctx_load = 1'b0;
        m_active = 1'b0; m_locked = 1'b1; m_acc = '0; m_ref = '0;
        check("idle ctx", ctx_out, {1'b0, 15'd0, 15'd0, 1'b1});
        feed(rnd_instr());
        feed({6'b001101, 10'd0, 1'b1, 15'h0abc});
        feed(rnd_instr());
        ctx_load = 1'b1; ctx_in = saved;
        @(posedge clk); #1; ctx_load = 1'b0;
        m_active = saved.active; m_ref = saved.ref_sig; m_acc = saved.acc; m_locked = saved.locked;
        check("restored ctx", ctx_out, saved);
        n_restore++;
      end
      if (m_cfe && ($urandom() % 2 == 0)) begin
        err_clr = 1'b1; @(posedge clk); #1; err_clr = 1'b0;
        m_cfe = 1'b0; n_clr++;
        check("cleared", cfe, 1'b0);
      end
    end
    check("errors detected", n_err > 10, 1);
    check("checks passed", n_ok > 100, 1);
    check("clears", n_clr > 2, 1);
    check("restores", n_restore > 2, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
