// tb_workload: the synthetic task set of workload_runner run at each of the
// seven evaluated cache sizes, 64 to 4096 lines of four instructions, all
// at once (one instruction path and one memory model per size). Each run
// checks every job against its execution-time bound; this testbench adds
// up their checks and failures.
module tb_workload;
  localparam int unsigned NS = 7;
  localparam int unsigned SIZES [NS] = '{64, 128, 256, 512, 1024, 2048, 4096};

  logic done [NS];
  int   chk  [NS], fl [NS];
  int   checks = 0, failures = 0;
  bit   all_done;

  for (genvar g = 0; g < NS; g++) begin : g_run
    workload_runner #(.CLINES(SIZES[g]), .SEED(g + 1)) u_run (
      .done_o(done[g]), .checks_o(chk[g]), .failures_o(fl[g])
    );
  end

  initial begin
    #20000000;
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    do begin
      #1000;
      all_done = 1'b1;
      for (int i = 0; i < int'(NS); i++) if (done[i] !== 1'b1) all_done = 1'b0;
    end while (!all_done);
    for (int i = 0; i < int'(NS); i++) begin
      checks += chk[i];
      failures += fl[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
