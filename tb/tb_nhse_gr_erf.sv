// tb_nhse_gr_erf: self-checking testbench of the grERF bank. Writes random
// messages into random registers, keeps a reference copy, and checks the
// read-back and that each task's synchronisation event is high exactly while
// an active register names it as destination.
module tb_nhse_gr_erf;
  import nhse_pkg::*;

  localparam int N = 5, NE = 25;

  logic           clk = 1'b0, rst_n = 1'b0;
  logic           wr_en = 1'b0;
  logic [5:0]     wr_idx = '0, rd_idx = '0;
  erf_t           wr_data = '0, rd_data;
  logic [N-1:0]   syn_ev, exp_ev;
  erf_t           ref_erf [NE];

  int checks = 0, failures = 0, cyc = 0, hits = 0;

  nhse_gr_erf dut (.*);

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
    for (int e = 0; e < NE; e++) ref_erf[e] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 2000; it++) begin
      @(negedge clk);
      // Outputs after the previous write.
      exp_ev = '0;
      for (int e = 0; e < NE; e++)
        if (ref_erf[e].event_on && ref_erf[e].dst_id < N) exp_ev[ref_erf[e].dst_id] = 1'b1;
      @(negedge clk);
      check(syn_ev == exp_ev, $sformatf("syn_ev %b expected %b", syn_ev, exp_ev));
      if (syn_ev != 0) hits++;
      rd_idx = 6'($urandom_range(0, NE - 1)); #1;
      check(rd_data == ref_erf[rd_idx], "grERF read-back");
      // Next write: mostly clears, so events come and go.
      wr_en   = 1'b1;
      wr_idx  = 6'($urandom_range(0, NE + 2));
      wr_data = erf_t'($urandom);
      wr_data.event_on = ($urandom_range(0, 5) == 0);
      wr_data.dst_id   = 3'($urandom_range(0, N - 1));
      if (wr_idx < NE) ref_erf[wr_idx] = wr_data;
      @(negedge clk);
      wr_en = 1'b0;
    end
    check(hits > 200, "message events occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
