// tb_nmpra_pipe_stage: self-checking testbench of a replicated pipeline
// register. Random thread selection, advance, stall and flush against a
// reference copy per thread: the selected copy is written only when it
// advances and is not stalled, the other copies hold, flush clears.
module tb_nmpra_pipe_stage;
  import nhse_pkg::*;

  localparam int N = 5, W = 64;

  logic           clk = 1'b0, rst_n = 1'b0;
  logic [2:0]     sel = '0;
  logic           adv = 1'b0;
  logic [N-1:0]   stall = '1, flush = '0;
  logic [W-1:0]   d = '0, q;
  logic [W-1:0]   ref_q [N];

  int checks = 0, failures = 0, cyc = 0, writes = 0, flushes = 0, holds = 0;

  nmpra_pipe_stage dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (cycle %0d)", what, cyc);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) ref_q[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 5000; it++) begin
      @(negedge clk);
      sel   = 3'($urandom_range(0, N - 1));
      adv   = ($urandom_range(0, 3) != 0);
      stall = N'($urandom) | ~(N'(1) << sel);   // mostly only the selected thread runs
      if ($urandom_range(0, 4) == 0) stall[sel] = 1'b1;
      flush = ($urandom_range(0, 9) == 0) ? N'($urandom) : '0;
      d     = {$urandom, $urandom};
      #1;
      check(q == ref_q[sel], "selected copy on q");
      // Reference update at the coming edge.
      for (int i = 0; i < N; i++) begin
        if (flush[i]) begin ref_q[i] = '0; flushes++; end
        else if (adv && !stall[i] && sel == 3'(i)) begin ref_q[i] = d; writes++; end
        else if (sel == 3'(i)) holds++;
      end
    end
    @(negedge clk);
    for (int i = 0; i < N; i++) begin
      sel = 3'(i); #1;
      check(q == ref_q[i], $sformatf("final copy of thread %0d", i));
    end
    check(writes > 1000 && flushes > 200 && holds > 500, "writes, flushes and holds exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
