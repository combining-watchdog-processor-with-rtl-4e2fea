// icache_array: storage of the direct-mapped instruction cache.
//
// LINES lines, each holding WORDS words (one main memory block) with its
// tag and a valid bit. Reading is synchronous: rd_en_i with rd_idx_i in
// one cycle gives rd_valid_o, rd_tag_o and rd_line_o in the next, and the
// outputs hold until the next read. wr_en_i writes a whole line with its
// tag and marks it valid at the clock edge. Reset clears the valid bits
// only; tags and data need no reset because an invalid line is never used.
//
// The published cache is direct mapped with lines of four instructions and
// 64 to 4096 lines; LINES defaults to the largest of those sizes. The
// separate read and write ports and the synchronous read are this design's
// choices.
module icache_array #(
  parameter int unsigned LINES = 4096,
  parameter int unsigned WORDS = 4,
  parameter int unsigned TAG_W = 18,
  parameter int unsigned XLEN  = 32
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      rd_en_i,
  input  logic [$clog2(LINES)-1:0]  rd_idx_i,
  output logic                      rd_valid_o,
  output logic [TAG_W-1:0]          rd_tag_o,
  output logic [WORDS*XLEN-1:0]     rd_line_o,
  input  logic                      wr_en_i,
  input  logic [$clog2(LINES)-1:0]  wr_idx_i,
  input  logic [TAG_W-1:0]          wr_tag_i,
  input  logic [WORDS*XLEN-1:0]     wr_line_i
);

  logic [TAG_W-1:0]      tag_mem  [LINES];
  logic [WORDS*XLEN-1:0] data_mem [LINES];
  logic [LINES-1:0]      valid_q;

  always_ff @(posedge clk) begin
    if (wr_en_i) begin
      tag_mem[wr_idx_i]  <= wr_tag_i;
      data_mem[wr_idx_i] <= wr_line_i;
    end
    if (rd_en_i) begin
      rd_tag_o  <= tag_mem[rd_idx_i];
      rd_line_o <= data_mem[rd_idx_i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q    <= '0;
      rd_valid_o <= 1'b0;
    end else begin
      if (wr_en_i) valid_q[wr_idx_i] <= 1'b1;
      if (rd_en_i) rd_valid_o        <= valid_q[rd_idx_i];
    end
  end

endmodule
