// tb_icache_ctrl: self-checking testbench of the lockable instruction cache.
//
// A processor model keeps a fetch request pending at all times and walks a
// random address list over 4 KiB of code, four times the size of the
// 64-line cache used here, so lines conflict often. The lock input is
// toggled at random. A reference model of a direct-mapped cache with full
// locking (a miss fills its line only while unlocked, and the last block
// read from memory stays in a line buffer) predicts each hit or miss, the
// line-buffer hits (which also fill the line while unlocked), the fill or
// bypass pulse, the memory request count and the word
// returned; the testbench also checks the latency: one cycle for a hit,
// two cycles plus the memory latency for a miss.
module tb_icache_ctrl;
  localparam int unsigned LINES = 64, WORDS = 4, LAT = 6, N = 4000;
  localparam int unsigned AW = 12;

  logic clk = 1'b0, rst_n = 1'b0;
  logic req_valid = 1'b0, req_ready;
  logic [31:0] req_addr = '0;
  logic rsp_valid, rsp_hit, lock = 1'b0;
  logic [31:0] rsp_instr;
  logic mem_req_valid, mem_req_ready, mem_rsp_valid;
  logic [27:0] mem_req_addr;
  logic [127:0] mem_rsp_line;
  logic fill, bypass, lbuf_hit;
  logic wr_en = 1'b0;
  logic [AW-1:0] wr_addr = '0;
  logic [31:0] wr_data = '0;
  int unsigned n_mem;

  int checks = 0, failures = 0;
  int n_hit = 0, n_fill = 0, n_bypass = 0;

  always #5 clk = ~clk;

  icache_ctrl #(.LINES(LINES), .WORDS(WORDS)) dut (
    .clk(clk), .rst_n(rst_n),
    .req_valid_i(req_valid), .req_ready_o(req_ready), .req_addr_i(req_addr),
    .rsp_valid_o(rsp_valid), .rsp_instr_o(rsp_instr), .rsp_hit_o(rsp_hit),
    .lock_i(lock),
    .mem_req_valid_o(mem_req_valid), .mem_req_ready_i(mem_req_ready),
    .mem_req_addr_o(mem_req_addr), .mem_rsp_valid_i(mem_rsp_valid),
    .mem_rsp_line_i(mem_rsp_line), .fill_o(fill), .bypass_o(bypass), .lbuf_hit_o(lbuf_hit)
  );

  main_memory_model #(.AW(AW), .WORDS(WORDS), .LAT(LAT)) u_mem (
    .clk(clk), .rst_n(rst_n), .req_valid_i(mem_req_valid), .req_ready_o(mem_req_ready),
    .req_addr_i(mem_req_addr), .rsp_valid_o(mem_rsp_valid), .rsp_line_o(mem_rsp_line),
    .wr_en_i(wr_en), .wr_addr_i(wr_addr), .wr_data_i(wr_data), .n_req_o(n_mem)
  );

  function automatic logic [31:0] content(logic [31:0] a);
    return (a * 32'h9E37_79B1) ^ 32'h5A5A_0F0F;
  endfunction

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h at %0t", what, got, exp, $time);
    end
  endtask

  logic [31:0] addrs [N];
  int          p = 0;
  int          cyc = 0, acc_cyc = 0;
  logic [31:0] acc_addr;
  logic        m_valid [LINES];
  logic [21:0] m_tag   [LINES];
  int          n_miss_model = 0;
  logic        m_lb_valid = 1'b0;
  logic [27:0] m_lb;
  int          n_lbuf = 0, n_lbfill = 0;
  logic        m_lb_in = 1'b0;

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Monitor: sample in the middle of each cycle.
  always @(negedge clk) if (rst_n) begin
    cyc++;
    if (rsp_valid) begin : resp
      logic [5:0]  idx;
      logic [21:0] tag;
      logic        mhit, ahit, bhit;
      idx  = acc_addr[9:4];
      tag  = acc_addr[31:10];
      bhit = m_lb_valid && m_lb == acc_addr[31:4];
      ahit = !bhit && m_valid[idx] && m_tag[idx] == tag;
      mhit = ahit || bhit;
      check("lbuf hit", lbuf_hit, bhit);
      if (bhit) n_lbuf++;
      check("instr", rsp_instr, content(acc_addr));
      check("hit", rsp_hit, mhit);
      check("fill", fill, (!mhit || (bhit && !m_lb_in)) && !lock);
      check("bypass", bypass, !mhit && lock);
      check("latency", cyc - acc_cyc, mhit ? 1 : 2 + LAT);
      if (!mhit) n_miss_model++;
      if (mhit) n_hit++;
      if ((!mhit || (bhit && !m_lb_in)) && !lock) begin
        m_valid[idx] = 1'b1; m_tag[idx] = tag; n_fill++;
        if (bhit) n_lbfill++;
        m_lb_in = 1'b1;
      end else if (!mhit) m_lb_in = 1'b0;
      if (!mhit && lock) n_bypass++;
      if (!mhit) begin m_lb_valid = 1'b1; m_lb = acc_addr[31:4]; end
    end else begin
      check("no stray fill", fill | bypass, 0);
    end
    if (req_valid && req_ready) begin
      acc_cyc  = cyc;
      acc_addr = req_addr;
    end
  end

  initial begin
    for (int i = 0; i < int'(LINES); i++) m_valid[i] = 1'b0;
    // Mostly sequential runs with jumps, as code is fetched.
    addrs[0] = 32'h0000_1000;
    for (int i = 1; i < int'(N); i++)
      addrs[i] = ($urandom() % 8 == 0) ? (32'h0000_1000 + (($urandom() % 1024) << 2))
                                       : (32'h0000_1000 + ((addrs[i-1] + 4 - 32'h1000) & 32'hFFC));
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // Word a of the memory model holds the code word at byte address 4*a.
    for (int a = 0; a < (1 << AW); a++) begin
      wr_en = 1'b1; wr_addr = AW'(a); wr_data = content(32'(a) * 4);
      @(posedge clk); #1;
    end
    wr_en = 1'b0;
    req_valid = 1'b1; req_addr = addrs[0];
    while (p < int'(N)) begin
      @(posedge clk);
      if (req_ready) begin
        p++;
        #1;
        if (p < int'(N)) req_addr = addrs[p]; else req_valid = 1'b0;
      end else #1;
      if ($urandom() % 20 == 0) lock = ~lock;
    end
    repeat (LAT + 5) @(posedge clk);
    #1;
    check("memory requests", n_mem, n_miss_model);
    check("hits seen", n_hit > 1000, 1);
    check("fills seen", n_fill > 50, 1);
    check("line buffer hits seen", n_lbuf > 50, 1);
    check("fills from the line buffer seen", n_lbfill > 5, 1);
    check("bypasses seen", n_bypass > 50, 1);
    check("all answered", n_miss_model + n_hit, N);
    $display("hits=%0d (line buffer %0d) fills=%0d (from buffer %0d) bypasses=%0d",
             n_hit, n_lbuf, n_fill, n_lbfill, n_bypass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
