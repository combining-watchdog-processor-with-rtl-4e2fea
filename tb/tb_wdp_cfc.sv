// tb_wdp_cfc: self-checking testbench of the control-flow checker.
//
// Feeds random basic blocks, each opened by a signature whose reference the
// testbench computes with its own bit-serial model of the compaction
// (rotate left by one, then XOR the word folded to 15 bits). Some blocks are
// corrupted (a word dropped, changed or added) so that the following
// signature must flag a control-flow error; others must pass. Also checks
// that words with monitoring disabled are ignored, that nothing is checked
// before the first signature, and that a saved state restored with
// ctx_load_i resumes the check exactly.
module tb_wdp_cfc;
  import wdp_pkg::*;

  logic     clk = 1'b0;
  logic     rst_n = 1'b0;
  logic     instr_valid = 1'b0;
  word_t    instr = '0;
  logic     mon_en = 1'b1;
  logic     ctx_load = 1'b0;
  wdp_ctx_t ctx_in = '0;
  logic     active, sig, ok, cfe;
  sig_t     ref_sig, acc;

  int checks = 0, failures = 0;
  int n_ok = 0, n_cfe = 0;

  always #5 clk = ~clk;

  wdp_cfc dut (
    .clk(clk), .rst_n(rst_n), .instr_valid_i(instr_valid), .instr_i(instr),
    .mon_en_i(mon_en), .ctx_load_i(ctx_load), .ctx_i(ctx_in),
    .active_o(active), .ref_o(ref_sig), .acc_o(acc),
    .sig_o(sig), .ok_o(ok), .cfe_o(cfe)
  );

  function automatic logic [14:0] m_compact(logic [14:0] a, logic [31:0] w);
    logic [14:0] r;
    for (int i = 0; i < 15; i++) r[(i + 1) % 15] = a[i];
    for (int i = 0; i < 32; i++) r[i % 15] ^= w[i];
    return r;
  endfunction

  function automatic logic [31:0] m_sig(logic unlock, logic [14:0] r);
    return {6'b001101, 10'd0, unlock, r};
  endfunction

  function automatic logic [31:0] rnd_instr();
    logic [31:0] w;
    do w = $urandom(); while (w[31:16] == 16'h3400);
    return w;
  endfunction

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  // Drive one word for one cycle; check the pulses before the clock edge.
  task automatic feed(logic [31:0] w, logic en, logic exp_sig, logic exp_ok, logic exp_cfe);
    instr_valid = 1'b1; instr = w; mon_en = en;
    #4;
    check("sig", sig, exp_sig);
    check("ok",  ok,  exp_ok);
    check("cfe", cfe, exp_cfe);
    @(posedge clk); #1;
    instr_valid = 1'b0; mon_en = 1'b1;
  endtask

  logic [31:0] body [64];
  logic        have_prev;
  logic        prev_bad;
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
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    check("inactive after reset", active, 1'b0);
    // Words before any signature are not checked.
    for (int i = 0; i < 5; i++) feed(rnd_instr(), 1'b1, 1'b0, 1'b0, 1'b0);
    check("still inactive", active, 1'b0);

    have_prev = 1'b0; prev_bad = 1'b0;
    for (int b = 0; b < 400; b++) begin
      len = 1 + ($urandom() % 20);
      r = 15'd0;
      for (int i = 0; i < len; i++) begin
        body[i] = rnd_instr();
        r = m_compact(r, body[i]);
      end
      // Signature opening this block: checks the previous block.
      feed(m_sig($urandom() % 2 == 1, r), 1'b1, 1'b1, have_prev && !prev_bad, have_prev && prev_bad);
      if (have_prev && !prev_bad) n_ok++;
      if (have_prev && prev_bad) n_cfe++;
      check("active", active, 1'b1);
      checks++; if (ref_sig !== r) begin failures++; $display("FAIL ref stored"); end
      have_prev = 1'b1;
      prev_bad  = 1'b0;
      case ($urandom() % 6)
        0: begin // drop one word (a jump into the middle of the block)
          for (int i = 1; i < len; i++) feed(body[i], 1'b1, 1'b0, 1'b0, 1'b0);
          prev_bad = 1'b1;
        end
        1: begin // one word changed
          body[len/2] ^= 32'h1 << ($urandom() % 30);
          for (int i = 0; i < len; i++) feed(body[i], 1'b1, 1'b0, 1'b0, 1'b0);
          prev_bad = 1'b1;
        end
        2: begin // unmonitored words in between must not disturb the check
          for (int i = 0; i < len; i++) begin
            feed(body[i], 1'b1, 1'b0, 1'b0, 1'b0);
            if (i == 0) begin
              feed(rnd_instr(), 1'b0, 1'b0, 1'b0, 1'b0);
              feed(m_sig(1'b0, 15'h1234), 1'b0, 1'b0, 1'b0, 1'b0);
            end
          end
        end
        3: begin // save the state half way, disturb it, restore it
          for (int i = 0; i < len; i++) begin
            if (i == len / 2) begin
              saved = '{active: active, ref_sig: ref_sig, acc: acc, locked: 1'b0};
              ctx_load = 1'b1; ctx_in = '{active: 1'b0, ref_sig: 15'h7fff, acc: 15'h5555, locked: 1'b0};
              instr_valid = 1'b1; instr = m_sig(1'b1, 15'h0); // ignored while loading
              #4 check("no sig during ctx load", sig, 1'b0);
              @(posedge clk); #1;
              check("idle state loaded", active, 1'b0);
              ctx_in = saved;
              @(posedge clk); #1;
              ctx_load = 1'b0; instr_valid = 1'b0;
            end
            feed(body[i], 1'b1, 1'b0, 1'b0, 1'b0);
          end
        end
        default: begin
          for (int i = 0; i < len; i++) feed(body[i], 1'b1, 1'b0, 1'b0, 1'b0);
        end
      endcase
      // An idle cycle now and then.
      if ($urandom() % 4 == 0) begin @(posedge clk); #1; end
    end
    check("passed checks seen", n_ok > 50, 1'b1);
    check("errors seen", n_cfe > 50, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
