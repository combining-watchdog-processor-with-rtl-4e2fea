// main_memory_model: behavioural model of main memory for the testbenches.
//
// Holds 2**AW words. A block request (req_valid_i, line address) is taken
// when the model is idle (req_ready_o high); the whole block of WORDS words
// comes back on rsp_line_o with rsp_valid_o exactly LAT cycles after the
// request was taken (LAT >= 1). Addresses wrap modulo the memory size.
// The wr_* port writes single words and is used to load a program before
// fetching starts. Not synthesizable in intent; only a model.
module main_memory_model #(
  parameter int unsigned AW    = 14,
  parameter int unsigned WORDS = 4,
  parameter int unsigned LAT   = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    req_valid_i,
  output logic                    req_ready_o,
  input  logic [27:0]             req_addr_i,
  output logic                    rsp_valid_o,
  output logic [WORDS*32-1:0]     rsp_line_o,
  input  logic                    wr_en_i,
  input  logic [AW-1:0]           wr_addr_i,
  input  logic [31:0]             wr_data_i,
  output int unsigned             n_req_o
);

  logic [31:0] mem [2**AW];
  logic        busy;
  int unsigned cnt;
  logic [27:0] line_q;

  assign req_ready_o = !busy;

  always_ff @(posedge clk) begin
    if (wr_en_i) mem[wr_addr_i] <= wr_data_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy        <= 1'b0;
      cnt         <= 0;
      rsp_valid_o <= 1'b0;
      line_q      <= '0;
      n_req_o     <= 0;
    end else begin
      rsp_valid_o <= 1'b0;
      if (!busy && req_valid_i) begin
        busy    <= 1'b1;
        line_q  <= req_addr_i;
        cnt     <= 1;
        n_req_o <= n_req_o + 1;
        if (LAT == 1) begin
          busy        <= 1'b0;
          rsp_valid_o <= 1'b1;
          for (int w = 0; w < int'(WORDS); w++)
            rsp_line_o[w*32 +: 32] <= mem[AW'(req_addr_i * WORDS + w)];
        end
      end else if (busy) begin
        cnt <= cnt + 1;
        if (cnt + 1 == LAT) begin
          busy        <= 1'b0;
          rsp_valid_o <= 1'b1;
          for (int w = 0; w < int'(WORDS); w++)
            rsp_line_o[w*32 +: 32] <= mem[AW'(line_q * WORDS + w)];
        end
      end
    end
  end

endmodule
