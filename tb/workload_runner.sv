// workload_runner: one run of a synthetic task set on the whole
// instruction path, for one cache size (CLINES lines), with fixed-priority
// preemptive scheduling. Used by tb_workload, which runs it at every
// evaluated cache size.
//
// Three synthetic tasks of about 1.6, 4.4 and 6.8 KB (12.8 KB in all) are
// built as loops of if-then-else structures, every vertex opened by a
// signature. For each task, vertices are selected (cache-control bit 1) at
// random, under the selection rules: the blocks of the selected vertices of
// one task never share a cache line with another block of the same task's
// selection. Jobs are released periodically; the shortest period has the
// highest priority (rate monotonic). A release preempts a lower-priority
// job: its watchdog context is saved and restored when it resumes.
//
// For every job the runner adds up the cache latency of its own fetches
// and checks it against the bound given by the timing model of the
// architecture: the hit time for every instruction, plus a miss penalty for
// each block of an unselected vertex each time the vertex runs, plus one per
// selected block for loading the selection, plus, per preemption suffered,
// the reload of its selected blocks and of the block in the line buffer.
// It also checks that the watchdog reports no control-flow error, that
// every signature check passes, that preemptions happen and that every
// task completes jobs. done_o rises when the run is over; checks_o and
// failures_o count its checks.
module workload_runner
  import wdp_pkg::*;
#(
  parameter int unsigned CLINES = 256,
  parameter int unsigned SEED   = 1
) (
  output logic done_o,
  output int   checks_o,
  output int   failures_o
);

  localparam int unsigned LAT = 10, AW = 15;
  localparam int unsigned NT = 3, D = 3, NV = 4 + 2 * D;
  localparam int unsigned HORIZON = 600000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cpu_req_valid = 1'b0, cpu_req_ready, cpu_rsp_valid;
  word_t cpu_req_addr = '0, cpu_rsp_instr;
  logic mem_req_valid, mem_req_ready, mem_rsp_valid;
  logic [27:0] mem_req_addr;
  logic [127:0] mem_rsp_line;
  logic ctx_load = 1'b0;
  wdp_ctx_t ctx_in = '0, ctx_out;
  logic cfe, cfe_pulse, cache_lock;
  logic ev_hit, ev_fill, ev_bypass, ev_lbuf, ev_sig, ev_ok, ev_lock, ev_unlock;
  logic wr_en = 1'b0;
  logic [AW-1:0] wr_addr = '0;
  logic [31:0] wr_data = '0;
  int unsigned n_mem;

  always #5 clk = ~clk;

  ft_rt_system #(.LINES(CLINES)) dut (
    .clk(clk), .rst_n(rst_n),
    .cpu_req_valid_i(cpu_req_valid), .cpu_req_ready_o(cpu_req_ready),
    .cpu_req_addr_i(cpu_req_addr), .cpu_rsp_valid_o(cpu_rsp_valid),
    .cpu_rsp_instr_o(cpu_rsp_instr),
    .mem_req_valid_o(mem_req_valid), .mem_req_ready_i(mem_req_ready),
    .mem_req_addr_o(mem_req_addr), .mem_rsp_valid_i(mem_rsp_valid),
    .mem_rsp_line_i(mem_rsp_line),
    .wdp_mon_en_i(1'b1), .wdp_ctx_load_i(ctx_load), .wdp_ctx_i(ctx_in),
    .wdp_ctx_o(ctx_out), .wdp_err_clr_i(1'b0), .cfe_o(cfe),
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
  logic done = 1'b0;
  assign done_o = done;
  assign checks_o = checks;
  assign failures_o = failures;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

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

  // Task layout. Vertex order in memory: 0 entry, 1 loop head,
  // 2+2d / 3+2d then/else of diamond d, NV-2 latch, NV-1 exit (empty body,
  // its signature closes the check of the last vertex).
  int unsigned vbase [NT][NV];
  int unsigned vlen  [NT][NV];
  logic        vsel  [NT][NV];
  int unsigned niter [NT];
  int unsigned period[NT];
  int unsigned bsel  [NT];     // selected blocks of each task
  logic [31:0] img   [2**AW];

  function automatic int unsigned nlines(int unsigned base, int unsigned len);
    return ((base + len * 4) >> 4) - (base >> 4) + 1;
  endfunction

  // ------------------------------------------------------------ job state
  int unsigned path [NT][$];     // fetch addresses of the current job
  int unsigned vvis [NT][$];     // misses the bound allows, per fetch
  int          pc   [NT];
  logic        busy [NT];
  int unsigned next_rel [NT];
  longint      spent [NT], bound [NT];
  int          npre [NT];
  wdp_ctx_t    saved [NT];
  int          jobs [NT], dl_miss [NT];
  int unsigned rel_time [NT];
  longint      worst [NT] = '{0, 0, 0}, wbound [NT] = '{0, 0, 0};
  int          running = -1;
  int          n_pre_total = 0, n_sig = 0, n_ok = 0, n_cfe = 0;
  int          n_hit = 0, n_miss = 0, n_starts = 0;
  int          cyc = 0;

  always @(negedge clk) cyc++;

  task automatic build_job(int t);
    int unsigned miss_allow;
    path[t].delete();
    miss_allow = bsel[t];
    // entry
    for (int i = 0; i <= int'(vlen[t][0]); i++) path[t].push_back(vbase[t][0] + 32'(i) * 4);
    if (!vsel[t][0]) miss_allow += nlines(vbase[t][0], vlen[t][0]);
    for (int it = 0; it < int'(niter[t]); it++) begin
      int vs [$];
      vs.push_back(1);
      for (int d = 0; d < int'(D); d++) vs.push_back(($urandom() % 2 == 0) ? 2 + 2 * d : 3 + 2 * d);
      vs.push_back(NV - 2);
      foreach (vs[k]) begin
        for (int i = 0; i <= int'(vlen[t][vs[k]]); i++) path[t].push_back(vbase[t][vs[k]] + 32'(i) * 4);
        if (!vsel[t][vs[k]]) miss_allow += nlines(vbase[t][vs[k]], vlen[t][vs[k]]);
      end
    end
    path[t].push_back(vbase[t][NV-1]);
    if (!vsel[t][NV-1]) miss_allow += 1;
    pc[t] = 0;
    spent[t] = 0;
    npre[t] = 0;
    bound[t] = longint'(path[t].size()) + longint'(miss_allow) * (LAT + 1);
  endtask

  // One fetch; returns its latency from acceptance to response.
  task automatic fetch(input word_t addr, output int lat);
    int t_acc;
    logic is_sig;
    is_sig = (img[AW'(addr >> 2)][31:16] == 16'h3400);
    cpu_req_valid = 1'b1; cpu_req_addr = addr;
    @(negedge clk);
    while (!cpu_req_ready) @(negedge clk);
    t_acc = cyc;
    @(posedge clk); #1 cpu_req_valid = 1'b0;
    @(negedge clk);
    while (!cpu_rsp_valid) @(negedge clk);
    lat = cyc - t_acc;
    checks++;
    if (cpu_rsp_instr !== img[AW'(addr >> 2)]) begin failures++; $display("FAIL instr at %0h", addr); end
    if (ev_hit) n_hit++; else n_miss++;
    if (is_sig) n_sig++;
    n_ok += int'(ev_ok);
    n_cfe += int'(cfe_pulse);
    @(posedge clk); #1;
  endtask

  task automatic ctx_write(input wdp_ctx_t c);
    ctx_in = c; ctx_load = 1'b1;
    @(posedge clk); #1 ctx_load = 1'b0;
  endtask


  int unsigned a;
  int unsigned tsize [NT] = '{400, 1100, 1700};
  logic [CLINES-1:0] used;
  logic [31:0] tagof [CLINES];
  logic ok_sel;
  int lat;
  int pick;

  initial begin
    void'($urandom(SEED));
    for (int i = 0; i < (1 << AW); i++) img[i] = rnd_instr();
    a = 32'h1000;
    for (int t = 0; t < int'(NT); t++) begin
      for (int v = 0; v < int'(NV); v++) begin
        vlen[t][v] = (v == int'(NV) - 1) ? 0 : tsize[t] / (NV - 1) - 4 + $urandom() % 8;
        vbase[t][v] = a;
        a += (vlen[t][v] + 1) * 4;
      end
      a = (a + 32'h100) & ~32'hFF;
    end
    // Selection per task: no two selected blocks of one task on one line.
    for (int t = 0; t < int'(NT); t++) begin
      used = '0; bsel[t] = 0;
      for (int v = 0; v < int'(NV); v++) begin
        vsel[t][v] = 1'b0;
        if (v == int'(NV) - 1 || $urandom() % 10 >= 6) continue;
        ok_sel = 1'b1;
        for (int unsigned l = vbase[t][v] >> 4; l <= (vbase[t][v] + vlen[t][v] * 4) >> 4; l++)
          if (used[l % CLINES] && tagof[l % CLINES] != l) ok_sel = 1'b0;
        if (ok_sel) begin
          vsel[t][v] = 1'b1;
          for (int unsigned l = vbase[t][v] >> 4; l <= (vbase[t][v] + vlen[t][v] * 4) >> 4; l++) begin
            if (!used[l % CLINES]) bsel[t]++;
            used[l % CLINES] = 1'b1; tagof[l % CLINES] = l;
          end
        end
      end
    end
    // Signatures.
    for (int t = 0; t < int'(NT); t++)
      for (int v = 0; v < int'(NV); v++) begin : sigs
        logic [14:0] r;
        r = 15'd0;
        for (int i = 1; i <= int'(vlen[t][v]); i++) r = m_compact(r, img[AW'((vbase[t][v] >> 2) + 32'(i))]);
        img[AW'(vbase[t][v] >> 2)] = {6'b001101, 10'd0, vsel[t][v], r};
      end
    niter  = '{3, 4, 4};
    period = '{8000, 40000, 120000};
    for (int t = 0; t < int'(NT); t++) begin
      busy[t] = 1'b0; next_rel[t] = 0; jobs[t] = 0; dl_miss[t] = 0;
      saved[t] = '0;
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < (1 << AW); i++) begin
      wr_en = 1'b1; wr_addr = AW'(i); wr_data = img[i];
      @(posedge clk); #1;
    end
    wr_en = 1'b0;
    cyc = 0;
    while (cyc < int'(HORIZON)) begin
      // Releases.
      for (int t = 0; t < int'(NT); t++)
        if (cyc >= int'(next_rel[t])) begin
          if (busy[t]) dl_miss[t]++;
          else begin
            build_job(t); busy[t] = 1'b1; rel_time[t] = next_rel[t];
            n_starts++;
            saved[t] = '{active: 1'b0, ref_sig: '0, acc: '0, locked: 1'b0};
          end
          next_rel[t] += period[t];
        end
      pick = -1;
      for (int t = int'(NT) - 1; t >= 0; t--) if (busy[t]) pick = t;
      if (pick < 0) begin @(posedge clk); #1; continue; end
      if (pick != running) begin
        if (running >= 0 && busy[running]) begin
          saved[running] = ctx_out;
          npre[running]++;
          n_pre_total++;
          bound[running] += longint'(bsel[running] + 1) * (LAT + 1);
        end
        ctx_write(saved[pick]);
        running = pick;
      end
      fetch(path[pick][pc[pick]], lat);
      spent[pick] += lat;
      pc[pick]++;
      if (pc[pick] == path[pick].size()) begin
        checks++;
        if (spent[pick] > bound[pick]) begin
          failures++;
          $display("FAIL task %0d job %0d: %0d cycles over bound %0d", pick, jobs[pick], spent[pick], bound[pick]);
        end
        if (spent[pick] > worst[pick]) worst[pick] = spent[pick];
        if (bound[pick] > wbound[pick]) wbound[pick] = bound[pick];
        jobs[pick]++;
        busy[pick] = 1'b0;
        running = -1;
      end
    end
    for (int t = 0; t < int'(NT); t++) begin
      check("jobs done", jobs[t] > 0, 1);
      $display("%4d lines, task %0d: %4d selected blocks, %3d jobs, %0d deadline misses, longest fetch time %0d (bound %0d)",
               CLINES, t, bsel[t], jobs[t], dl_miss[t], worst[t], wbound[t]);
    end
    check("preemptions", n_pre_total > 5, 1);
    // Every signature but the first of each job closes a check, and all pass.
    check("passed checks", n_ok, n_sig - n_starts);
    check("control-flow errors", n_cfe, 0);
    check("flag", cfe, 0);
    $display("%4d lines: hits=%0d misses=%0d sigs=%0d passed=%0d preemptions=%0d",
             CLINES, n_hit, n_miss, n_sig, n_ok, n_pre_total);
    done = 1'b1;
  end
endmodule
