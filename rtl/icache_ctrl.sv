// icache_ctrl: direct-mapped instruction cache with full dynamic locking.
//
// The main processor fetches one instruction at a time (req_*), and the
// cache answers with rsp_valid_o/rsp_instr_o. A hit answers in the cycle
// after the request was accepted, and a new request can be accepted in that
// same cycle, so hits run at one instruction per clock. On a miss the
// controller asks main memory for the whole block (mem_req_*), waits for
// it (mem_rsp_*) and hands the requested word to the processor in the cycle
// the block arrives. In that cycle it looks at lock_i, which the watchdog
// processor drives from the cache-control bit of the signatures:
//   lock_i = 0  the block is written into its line, displacing what was
//               there (fill_o pulses);
//   lock_i = 1  the block is not stored in the cache, nothing is displaced
//               (bypass_o pulses).
// This is full locking: the lock applies to the whole cache. Either way the
// block is also kept in a one-block line buffer, so the following fetches
// from the same block hit there (lbuf_hit_o) and a block that is not locked
// in the cache costs one miss per visit rather than one per instruction, as
// the timing model of the architecture assumes (miss penalty once, then the
// hit time for each instruction of the block).
//
// Address split (byte addresses, word aligned):
//   [XLEN-1 : OFF_W+IDX_W] tag | [OFF_W+IDX_W-1 : OFF_W] line index |
//   [OFF_W-1 : 2] word in line | [1:0] byte, ignored.
//
// Timing: hit (cache or line buffer), 1 cycle from acceptance to response; miss, 2 cycles to
// issue the memory request plus the memory's latency. The processor must
// hold req_valid_i and req_addr_i until req_ready_o.
//
// The direct mapping, the four-instruction lines, the cache sizes and the
// lock behaviour follow the published architecture. The line buffer
// follows from its timing model. The handshake, the whole-line memory port
// and the cycle counts above are this design's choices.
module icache_ctrl
  import wdp_pkg::*;
#(
  parameter int unsigned LINES = 4096,
  parameter int unsigned WORDS = 4
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // fetch port of the main processor
  input  logic                          req_valid_i,
  output logic                          req_ready_o,
  input  word_t                         req_addr_i,
  output logic                          rsp_valid_o,
  output word_t                         rsp_instr_o,
  output logic                          rsp_hit_o,
  // lock state from the watchdog processor
  input  logic                          lock_i,
  // main memory port, one block per request
  output logic                          mem_req_valid_o,
  input  logic                          mem_req_ready_i,
  output logic [XLEN-$clog2(WORDS)-3:0] mem_req_addr_o,
  input  logic                          mem_rsp_valid_i,
  input  logic [WORDS*XLEN-1:0]         mem_rsp_line_i,
  // events
  output logic                          fill_o,
  output logic                          bypass_o,
  output logic                          lbuf_hit_o
);

  localparam int unsigned OFF_W = $clog2(WORDS) + 2;
  localparam int unsigned IDX_W = $clog2(LINES);
  localparam int unsigned TAG_W = XLEN - OFF_W - IDX_W;

  typedef enum logic [1:0] {S_IDLE, S_LOOKUP, S_MREQ, S_MWAIT} state_t;

  state_t                  state_q, state_d;
  word_t                   addr_q;
  logic                    accept, hit, arr_hit, lb_hit;
  logic                    lb_valid_q, lb_in_arr_q;
  logic [XLEN-OFF_W-1:0]   lb_tag_q;
  logic [WORDS*XLEN-1:0]   lb_line_q;
  logic                    rd_valid;
  logic [TAG_W-1:0]        rd_tag;
  logic [WORDS*XLEN-1:0]   rd_line;
  logic [IDX_W-1:0]        idx_q;
  logic [TAG_W-1:0]        tag_q;
  logic [$clog2(WORDS)-1:0] wsel_q;

  assign idx_q  = addr_q[OFF_W +: IDX_W];
  assign tag_q  = addr_q[XLEN-1 -: TAG_W];
  assign wsel_q = addr_q[2 +: $clog2(WORDS)];

  // The line buffer is looked at first: it may hold a block written into
  // the array in the same cycle as this lookup's array read.
  assign lb_hit      = (state_q == S_LOOKUP) && lb_valid_q &&
                       (lb_tag_q == addr_q[XLEN-1:OFF_W]);
  assign arr_hit     = (state_q == S_LOOKUP) && !lb_hit && rd_valid && (rd_tag == tag_q);
  assign hit         = arr_hit || lb_hit;
  assign lbuf_hit_o  = lb_hit;
  assign req_ready_o = (state_q == S_IDLE) || hit;
  assign accept      = req_valid_i && req_ready_o;

  icache_array #(
    .LINES (LINES),
    .WORDS (WORDS),
    .TAG_W (TAG_W),
    .XLEN  (XLEN)
  ) u_array (
    .clk        (clk),
    .rst_n      (rst_n),
    .rd_en_i    (accept),
    .rd_idx_i   (req_addr_i[OFF_W +: IDX_W]),
    .rd_valid_o (rd_valid),
    .rd_tag_o   (rd_tag),
    .rd_line_o  (rd_line),
    .wr_en_i    (fill_o),
    .wr_idx_i   (idx_q),
    .wr_tag_i   (tag_q),
    .wr_line_i  ((state_q == S_LOOKUP) ? lb_line_q : mem_rsp_line_i)
  );

  always_comb begin
    state_d         = state_q;
    rsp_valid_o     = 1'b0;
    rsp_instr_o     = rd_line[wsel_q*XLEN +: XLEN];
    rsp_hit_o       = 1'b0;
    mem_req_valid_o = 1'b0;
    fill_o          = 1'b0;
    bypass_o        = 1'b0;
    unique case (state_q)
      S_IDLE:   if (accept) state_d = S_LOOKUP;
      S_LOOKUP: begin
        if (hit) begin
          rsp_valid_o = 1'b1;
          rsp_hit_o   = 1'b1;
          if (lb_hit) begin
            rsp_instr_o = lb_line_q[wsel_q*XLEN +: XLEN];
            fill_o      = !lock_i && !lb_in_arr_q;
          end
          state_d     = accept ? S_LOOKUP : S_IDLE;
        end else begin
          state_d     = S_MREQ;
        end
      end
      S_MREQ: begin
        mem_req_valid_o = 1'b1;
        if (mem_req_ready_i) state_d = S_MWAIT;
      end
      S_MWAIT: begin
        if (mem_rsp_valid_i) begin
          rsp_valid_o = 1'b1;
          rsp_instr_o = mem_rsp_line_i[wsel_q*XLEN +: XLEN];
          fill_o      = !lock_i;
          bypass_o    = lock_i;
          state_d     = S_IDLE;
        end
      end
      default:  state_d = S_IDLE;
    endcase
  end

  assign mem_req_addr_o = addr_q[XLEN-1:OFF_W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      addr_q     <= '0;
      lb_valid_q <= 1'b0;
      lb_in_arr_q <= 1'b0;
      lb_tag_q   <= '0;
      lb_line_q  <= '0;
    end else begin
      state_q <= state_d;
      if (accept) addr_q <= req_addr_i;
      if (state_q == S_MWAIT && mem_rsp_valid_i) begin
        lb_valid_q <= 1'b1;
        lb_tag_q   <= addr_q[XLEN-1:OFF_W];
        lb_line_q  <= mem_rsp_line_i;
      end
      if (state_q == S_MWAIT && mem_rsp_valid_i) lb_in_arr_q <= fill_o;
      else if (fill_o)                           lb_in_arr_q <= 1'b1;
    end
  end

  // Bus rules.
  a_mem_req_hold: assert property (@(posedge clk) disable iff (!rst_n)
    mem_req_valid_o && !mem_req_ready_i |=> mem_req_valid_o && $stable(mem_req_addr_o));
  a_mem_rsp_expected: assert property (@(posedge clk) disable iff (!rst_n)
    mem_rsp_valid_i |-> state_q == S_MWAIT);
  a_cpu_req_hold: assert property (@(posedge clk) disable iff (!rst_n)
    req_valid_i && !req_ready_o |=> req_valid_i && $stable(req_addr_i));

endmodule
