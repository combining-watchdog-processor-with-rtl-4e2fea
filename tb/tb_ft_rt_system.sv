// tb_ft_rt_system: end-to-end testbench of the whole instruction path at
// its default size (4096-line cache, four-word lines).
//
// Two synthetic tasks are built in the memory model, each as a sequence of
// vertices (basic blocks) that start with a signature. The testbench
// computes every reference signature itself and chooses every
// cache-control bit (1 = the vertex is selected: load and lock its blocks,
// 0 = keep the cache locked). Task A is a loop with an if-then-else; task
// B lives at addresses that map onto some of task A's cache lines.
// A processor model fetches the path of task A: a few iterations, one with
// a jump into the middle of a vertex (a control-flow error the watchdog
// must report), one preempted by task B: kernel code runs unmonitored, the
// watchdog state of A is saved, B runs from an idle state, and A's state is
// restored before it resumes.
// Every fetch is compared with a reference model (direct-mapped cache with
// full locking and a one-block line buffer, lock state from the signature
// bits): the word, hit or miss, fill or bypass, the lock signal, the
// watchdog's pulses, and the latency (1 cycle per hit, LAT + 2 per miss).
// It also checks predictability: once a selected vertex has run, its
// fetches always hit until another task's code displaces it.
// Each mechanism must occur at least once.
module tb_ft_rt_system;
  import wdp_pkg::*;

  localparam int unsigned LAT = 10;
  localparam int unsigned AW  = 15;   // 128 KiB of memory
  localparam int unsigned NV_A = 6, NV_B = 3, NITER = 8;
  localparam int unsigned CLINES = 4096;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cpu_req_valid = 1'b0, cpu_req_ready;
  word_t cpu_req_addr = '0;
  logic cpu_rsp_valid;
  word_t cpu_rsp_instr;
  logic mem_req_valid, mem_req_ready, mem_rsp_valid;
  logic [27:0] mem_req_addr;
  logic [127:0] mem_rsp_line;
  logic mon_en = 1'b1, ctx_load = 1'b0, err_clr = 1'b0;
  wdp_ctx_t ctx_in = '0, ctx_out;
  logic cfe, cfe_pulse, cache_lock;
  logic ev_hit, ev_fill, ev_bypass, ev_lbuf, ev_sig, ev_ok, ev_lock, ev_unlock;
  logic wr_en = 1'b0;
  logic [AW-1:0] wr_addr = '0;
  logic [31:0] wr_data = '0;
  int unsigned n_mem;

  always #5 clk = ~clk;

  ft_rt_system dut (
    .clk(clk), .rst_n(rst_n),
    .cpu_req_valid_i(cpu_req_valid), .cpu_req_ready_o(cpu_req_ready),
    .cpu_req_addr_i(cpu_req_addr), .cpu_rsp_valid_o(cpu_rsp_valid),
    .cpu_rsp_instr_o(cpu_rsp_instr),
    .mem_req_valid_o(mem_req_valid), .mem_req_ready_i(mem_req_ready),
    .mem_req_addr_o(mem_req_addr), .mem_rsp_valid_i(mem_rsp_valid),
    .mem_rsp_line_i(mem_rsp_line),
    .wdp_mon_en_i(mon_en), .wdp_ctx_load_i(ctx_load), .wdp_ctx_i(ctx_in),
    .wdp_ctx_o(ctx_out), .wdp_err_clr_i(err_clr), .cfe_o(cfe),
    .cfe_pulse_o(cfe_pulse), .cache_lock_o(cache_lock),
    .ev_hit_o(ev_hit), .ev_fill_o(ev_fill), .ev_bypass_o(ev_bypass),
    .ev_lbuf_o(ev_lbuf), .ev_sig_o(ev_sig), .ev_ok_o(ev_ok),
    .ev_lock_o(ev_lock), .ev_unlock_o(ev_unlock)
  );

  main_memory_model #(.AW(AW), .WORDS(4), .LAT(LAT)) u_mem (
    .clk(clk), .rst_n(rst_n), .req_valid_i(mem_req_valid), .req_ready_o(mem_req_ready),
    .req_addr_i(mem_req_addr), .rsp_valid_o(mem_rsp_valid), .rsp_line_o(mem_rsp_line),
    .wr_en_i(wr_en), .wr_addr_i(wr_addr), .wr_data_i(wr_data), .n_req_o(n_mem)
  );

  int checks = 0, failures = 0;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h at %0t", what, got, exp, $time);
    end
  endtask

  // ---------------------------------------------------------------- program
  typedef struct {
    int unsigned base;   // byte address of the signature
    int unsigned len;    // body words after it
    logic        sel;    // cache-control bit
  } vtx_t;

  vtx_t        va [NV_A];
  vtx_t        vb [NV_B];
  logic [31:0] img [2**AW];
  localparam int unsigned KBASE = 32'h0000_8000;  // kernel code, no signatures

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

  task automatic build(output vtx_t v, input int unsigned base, input int unsigned len, input logic sel);
    logic [14:0] r = 15'd0;
    v.base = base; v.len = len; v.sel = sel;
    for (int i = 1; i <= int'(len); i++) begin
      img[AW'((base >> 2) + 32'(i))] = rnd_instr();
      r = m_compact(r, img[AW'((base >> 2) + 32'(i))]);
    end
    img[AW'(base >> 2)] = {6'b001101, 10'd0, sel, r};
  endtask

  // ---------------------------------------------------------- reference model
  logic        m_valid [CLINES];
  logic [15:0] m_tag   [CLINES];
  logic        m_lb_valid = 1'b0, m_lb_in = 1'b0;
  logic [27:0] m_lb = '0;
  logic        m_locked = 1'b0, m_active = 1'b0, m_dirty = 1'b0, m_cfe = 1'b0;

  int n_hit = 0, n_lbuf = 0, n_fill = 0, n_bypass = 0, n_sig = 0, n_ok = 0, n_cfe = 0;
  int n_lock = 0, n_unlock = 0, n_ctx = 0, n_unmon = 0, n_extrinsic = 0, n_warm_sel = 0;
  int cyc = 0;
  logic last_hit;

  always @(negedge clk) cyc++;

  // One fetch through the cache. kind: 0 body word, 1 signature.
  task automatic fetch(input word_t addr, input logic monitored, output logic was_hit);
    int   t_acc;
    logic is_sig, unl, eff_lock, bhit, ahit, hit, e_fill;
    logic [11:0] idx;
    word_t w;
    w      = img[AW'(addr >> 2)];
    is_sig = (w[31:16] == 16'h3400);
    unl    = w[15];
    idx    = addr[15:4];
    mon_en = monitored;
    cpu_req_valid = 1'b1; cpu_req_addr = addr;
    @(negedge clk);
    while (!cpu_req_ready) @(negedge clk);
    t_acc = cyc;
    @(posedge clk); #1 cpu_req_valid = 1'b0;
    @(negedge clk);
    while (!cpu_rsp_valid) @(negedge clk);
    bhit = m_lb_valid && m_lb == addr[31:4];
    ahit = !bhit && m_valid[idx] && m_tag[idx] == addr[31:16];
    hit  = ahit || bhit;
    eff_lock = (monitored && is_sig) ? !unl : m_locked;
    e_fill   = (!hit || (bhit && !m_lb_in)) && !eff_lock;
    check("instr", cpu_rsp_instr, w);
    check("hit", ev_hit, hit);
    check("lbuf", ev_lbuf, bhit);
    check("fill", ev_fill, e_fill);
    check("bypass", ev_bypass, !hit && eff_lock);
    check("lock", cache_lock, eff_lock);
    check("latency", cyc - t_acc, hit ? 1 : LAT + 2);
    check("sig", ev_sig, monitored && is_sig);
    check("ok", ev_ok, monitored && is_sig && m_active && !m_dirty);
    check("cfe", cfe_pulse, monitored && is_sig && m_active && m_dirty);
    check("lock evt", ev_lock, monitored && is_sig && !unl && !m_locked);
    check("unlock evt", ev_unlock, monitored && is_sig && unl && m_locked);
    n_hit += int'(hit); n_lbuf += int'(bhit); n_fill += int'(e_fill);
    n_bypass += int'(!hit && eff_lock);
    if (!monitored) n_unmon++;
    if (e_fill) begin m_valid[idx] = 1'b1; m_tag[idx] = addr[31:16]; m_lb_in = 1'b1; end
    else if (!hit) m_lb_in = 1'b0;
    if (!hit) begin m_lb_valid = 1'b1; m_lb = addr[31:4]; end
    if (monitored && is_sig) begin
      n_sig++;
      if (m_active && !m_dirty) n_ok++;
      if (m_active && m_dirty) begin n_cfe++; m_cfe = 1'b1; end
      if (!unl && !m_locked) n_lock++;
      if (unl && m_locked) n_unlock++;
      m_active = 1'b1; m_dirty = 1'b0; m_locked = !unl;
    end
    was_hit = hit;
    @(posedge clk); #1;
    check("cfe flag", cfe, m_cfe);
  endtask

  task automatic ctx_write(input wdp_ctx_t c);
    ctx_in = c; ctx_load = 1'b1;
    @(posedge clk); #1 ctx_load = 1'b0;
    m_active = c.active; m_locked = c.locked; m_dirty = 1'b0;
  endtask

  task automatic run_kernel();
    logic h;
    for (int i = 0; i < 6; i++) fetch(KBASE + 32'(i) * 4, 1'b0, h);
  endtask

  // Run vertex v from body word 'from'; stop after body word 'upto'.
  // skip_sig: enter past the signature (error injection).
  bit seen [NV_A];
  task automatic run_vertex(input vtx_t v, input int from, input int upto,
                            input logic skip_sig, input int vi, input logic count_warm);
    logic h;
    if (from == 0 && !skip_sig) begin
      fetch(v.base, 1'b1, h);
      if (count_warm && v.sel && seen[vi]) begin n_warm_sel++; check("selected vertex hits", h, 1); end
    end
    for (int i = (from == 0 ? 1 : from); i <= upto; i++) begin
      fetch(v.base + 32'(i) * 4, 1'b1, h);
      if (count_warm && v.sel && seen[vi]) begin n_warm_sel++; check("selected vertex hits", h, 1); end
    end
  endtask

  int unsigned addr_next;
  wdp_ctx_t saved;
  int pre_iter, err_iter, br;
  logic h;

  initial begin
    #5000000;
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < int'(CLINES); i++) m_valid[i] = 1'b0;
    for (int i = 0; i < (1 << AW); i++) img[i] = rnd_instr();
    // Task A at 0x1000: V0 entry, V1 loop head, V2 then, V3 else, V4 latch, V5 exit.
    addr_next = 32'h0000_1000;
    for (int v = 0; v < int'(NV_A); v++) begin
      build(va[v], addr_next, 6 + $urandom() % 20, (v == 0 || v == 1 || v == 3));
      addr_next += (va[v].len + 1) * 4;
    end
    // Task B, 64 KiB above task A, maps onto the cache lines of the part of
    // the loop head that runs after the preemption.
    addr_next = (32'h0001_0000 + va[1].base + (va[1].len / 2 + 1) * 4) & ~32'hF;
    for (int v = 0; v < int'(NV_B); v++) begin
      build(vb[v], addr_next, 8 + $urandom() % 10, 1'b1);
      addr_next += (vb[v].len + 1) * 4;
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < (1 << AW); i++) begin
      wr_en = 1'b1; wr_addr = AW'(i); wr_data = img[i];
      @(posedge clk); #1;
    end
    wr_en = 1'b0;
    check("unlocked after reset", cache_lock, 0);

    err_iter = 3; pre_iter = NITER - 2;
    run_vertex(va[0], 0, va[0].len, 0, 0, 1); seen[0] = 1;
    for (int it = 0; it < int'(NITER); it++) begin
      if (it == pre_iter) begin
        // Preemption half way through the loop head.
        run_vertex(va[1], 0, va[1].len / 2, 0, 1, 1);
        run_kernel();
        saved = ctx_out;
        check("saved active", saved.active, 1);
        check("saved lock", saved.locked, m_locked);
        ctx_write('{active: 1'b0, ref_sig: '0, acc: '0, locked: 1'b0});
        for (int v = 0; v < int'(NV_B); v++) run_vertex(vb[v], 0, vb[v].len, 0, 0, 0);
        run_kernel();
        ctx_write(saved);
        n_ctx++;
        // Task B displaced part of task A: count the extra misses.
        for (int i = va[1].len / 2 + 1; i <= int'(va[1].len); i++) begin
          fetch(va[1].base + 32'(i) * 4, 1'b1, h);
          if (!h) n_extrinsic++;
        end
      end else begin
        run_vertex(va[1], 0, va[1].len, 0, 1, it < pre_iter);
      end
      seen[1] = 1;
      br = (it % 3 == 1) ? 2 : 3;
      run_vertex(va[br], 0, va[br].len, 0, br, it < pre_iter); seen[br] = 1;
      if (it == err_iter) begin
        // Control-flow error: jump into the middle of the latch vertex.
        m_dirty = 1'b1;
        run_vertex(va[4], 3, va[4].len, 1, 4, 0);
      end else begin
        run_vertex(va[4], 0, va[4].len, 0, 4, it < pre_iter);
      end
      seen[4] = 1;
      if (it == err_iter + 1) begin
        check("error reported", cfe, 1);
        err_clr = 1'b1; @(posedge clk); #1 err_clr = 1'b0;
        m_cfe = 1'b0;
        check("error cleared", cfe, 0);
      end
    end
    run_vertex(va[5], 0, va[5].len, 0, 5, 0);
    // Closing signature so the exit vertex is checked too.
    fetch(va[0].base, 1'b1, h);
    repeat (3) @(posedge clk);

    check("hits", n_hit > 0, 1);
    check("line buffer hits", n_lbuf > 0, 1);
    check("fills", n_fill > 0, 1);
    check("bypasses", n_bypass > 0, 1);
    check("signatures", n_sig > 0, 1);
    check("passed checks", n_ok > 0, 1);
    check("control-flow errors", n_cfe, 1);
    check("lock switches", n_lock > 0, 1);
    check("unlock switches", n_unlock > 0, 1);
    check("context switches", n_ctx, 1);
    check("unmonitored fetches", n_unmon > 0, 1);
    check("inter-task misses", n_extrinsic > 0, 1);
    check("warm selected fetches", n_warm_sel > 0, 1);
    $display("hits=%0d lbuf=%0d fills=%0d bypasses=%0d sigs=%0d ok=%0d cfe=%0d lock=%0d unlock=%0d ctx=%0d unmon=%0d extrinsic=%0d warm_sel=%0d mem_reqs=%0d cycles=%0d",
             n_hit, n_lbuf, n_fill, n_bypass, n_sig, n_ok, n_cfe, n_lock, n_unlock, n_ctx,
             n_unmon, n_extrinsic, n_warm_sel, n_mem, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
