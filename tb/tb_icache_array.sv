// tb_icache_array: self-checking testbench of the cache storage.
//
// After reset every line must read as invalid. Random writes and reads are
// then compared with a shadow copy kept in the testbench; a read returns
// its line one cycle after rd_en_i and holds it while rd_en_i is low.
// Runs with 64 lines so that lines are rewritten often.
module tb_icache_array;
  localparam int unsigned LINES = 64, WORDS = 4, TAG_W = 22;
  logic clk = 1'b0, rst_n = 1'b0;
  logic rd_en = 1'b0, wr_en = 1'b0;
  logic [5:0] rd_idx = '0, wr_idx = '0;
  logic rd_valid;
  logic [TAG_W-1:0] rd_tag, wr_tag = '0;
  logic [127:0] rd_line, wr_line = '0;
  int checks = 0, failures = 0;

  logic             s_valid [LINES];
  logic [TAG_W-1:0] s_tag   [LINES];
  logic [127:0]     s_line  [LINES];
  logic             e_valid;
  logic [TAG_W-1:0] e_tag;
  logic [127:0]     e_line;

  always #5 clk = ~clk;

  icache_array #(.LINES(LINES), .WORDS(WORDS), .TAG_W(TAG_W), .XLEN(32)) dut (
    .clk(clk), .rst_n(rst_n), .rd_en_i(rd_en), .rd_idx_i(rd_idx),
    .rd_valid_o(rd_valid), .rd_tag_o(rd_tag), .rd_line_o(rd_line),
    .wr_en_i(wr_en), .wr_idx_i(wr_idx), .wr_tag_i(wr_tag), .wr_line_i(wr_line)
  );

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h at %0t", what, got, exp, $time);
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
    for (int i = 0; i < int'(LINES); i++) s_valid[i] = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < int'(LINES); i++) begin
      rd_en = 1'b1; rd_idx = 6'(i);
      @(posedge clk); #1;
      check("invalid after reset", rd_valid, 0);
    end
    rd_en = 1'b0;
    e_valid = 1'b0;
    for (int n = 0; n < 3000; n++) begin
      wr_en  = ($urandom() % 2) == 0;
      wr_idx = 6'($urandom());
      wr_tag = TAG_W'($urandom());
      wr_line = {$urandom(), $urandom(), $urandom(), $urandom()};
      rd_en  = ($urandom() % 3) != 0;
      do rd_idx = 6'($urandom()); while (wr_en && rd_idx == wr_idx);
      if (rd_en) begin
        e_valid = s_valid[rd_idx]; e_tag = s_tag[rd_idx]; e_line = s_line[rd_idx];
      end
      if (wr_en) begin
        s_valid[wr_idx] = 1'b1; s_tag[wr_idx] = wr_tag; s_line[wr_idx] = wr_line;
      end
      @(posedge clk); #1;
      check("valid", rd_valid, e_valid);
      if (e_valid) begin
        check("tag", rd_tag, e_tag);
        check("line", rd_line, e_line);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
