// tb_nhse_scheduler: self-checking testbench of the static dual-priority
// scheduler. Checks the 1 + 5 cycle latency from a ready change to the new
// thread running, the flush and start-again pulses, priority preemption in
// the Running State, the move of a preempted task to the interrupted-task
// queue and its resumption only when no active task is ready, promotion of
// long tasks and round robin with the configured quantum in the Idle State,
// the Waiting State and the task reset pulse.
module tb_nhse_scheduler;
  import nhse_pkg::*;

  localparam int N = 5;

  logic              clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0]      task_run = '0, task_deep_sleep = '0, task_need_reset = '0;
  logic [15:0]       cfg_ltq_limit = 16'd1000, cfg_rr_quantum = 16'd10;
  logic [ID_W-1:0]   sel_thread;
  logic              sel_valid;
  logic [N-1:0]      thread_stall, flush_pipe, thread_start_again, thread_reset_stall;
  sched_state_e      state;
  logic [N-1:0]      aq_mask, itq_mask, ltq_mask;

  int checks = 0, failures = 0, cyc = 0;

  nhse_scheduler dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (cycle %0d)", what, cyc);
    end
  endtask

  // Cycles until thread `t` runs (not stalled), counted from the current negedge.
  task automatic wait_run(input int t, output int n);
    n = 0;
    do begin
      @(negedge clk);
      n++;
    end while (thread_stall[t] && n < 500);
  endtask

  // Exactly one thread unstalled while a ready thread runs, none otherwise.
  always @(negedge clk) if (rst_n) begin
    if (sel_valid && state != SCH_SWITCH && !task_deep_sleep[sel_thread])
      assert ($countones(~thread_stall) == 1 && !thread_stall[sel_thread])
        else begin failures++; $display("FAIL: stall vector %b sel %0d", thread_stall, sel_thread); end
    else
      assert (thread_stall == '1)
        else begin failures++; $display("FAIL: thread unstalled while not running"); end
  end

  // Watchdog.
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n, flushes, starts;
  always @(posedge clk) begin
    flushes <= flushes + $countones(flush_pipe);
    starts  <= starts + $countones(thread_start_again);
  end

  initial begin
    int seq [$];
    int len [$];
    int prev, run_len;
    flushes = 0; starts = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(state == SCH_WAITING && !sel_valid, "waiting state with no task");

    // All tasks ready: SCPU0 (highest priority) runs 1 + 5 cycles later.
    task_run = '1;
    wait_run(0, n);
    check(n == 6, $sformatf("first dispatch after 6 cycles, got %0d", n));
    check(sel_thread == 0 && state == SCH_RUNNING, "SCPU0 running");
    check(thread_start_again == 5'b00001, "start-again pulse for SCPU0");
    check(aq_mask == 5'b11111, "all tasks active");

    // SCPU0 waits: SCPU1 runs, SCPU0's pipeline flush was requested.
    flushes = 0;
    task_deep_sleep[0] = 1'b1;
    wait_run(1, n);
    check(n == 6, $sformatf("task switch after 6 cycles, got %0d", n));
    check(flushes == 1, "one flush on the switch");
    check(aq_mask[0] == 1'b0, "sleeping task leaves the queues");

    // SCPU0 wakes and preempts SCPU1, which becomes an interrupted task.
    repeat (3) @(negedge clk);
    task_deep_sleep[0] = 1'b0;
    wait_run(0, n);
    check(n == 6, $sformatf("preemption after 6 cycles, got %0d", n));
    check(itq_mask[1] && !aq_mask[1], "preempted SCPU1 in ITQ");

    // SCPU0 sleeps again: active SCPU2 runs before interrupted SCPU1.
    task_deep_sleep[0] = 1'b1;
    wait_run(2, n);
    check(sel_thread == 2 && state == SCH_RUNNING, "active task before interrupted task");
    // Only SCPU1 (ITQ) remains ready: served in the Idle State.
    task_deep_sleep[4:2] = 3'b111;
    wait_run(1, n);
    @(negedge clk);
    check(sel_thread == 1 && state == SCH_IDLE, "interrupted task served in Idle State");

    // Waiting state.
    task_deep_sleep = '1;
    repeat (8) @(negedge clk);
    check(state == SCH_WAITING && !sel_valid && thread_stall == '1, "waiting state");

    // Long tasks: SCPU3 and SCPU4 only, limit 20, quantum 10.
    task_run = 5'b11000;
    task_deep_sleep = '0;
    cfg_ltq_limit = 16'd20;
    cfg_rr_quantum = 16'd10;
    wait_run(3, n);
    check(n == 6, "SCPU3 dispatched");
    run_len = 0;
    while (!thread_stall[3]) begin @(negedge clk); run_len++; end
    // promoted after 20 cycles; the scheduler responds one cycle later
    check(run_len == 21, $sformatf("SCPU3 promoted to LTQ after 20 + 1 cycles, got %0d", run_len));
    check(ltq_mask[3], "SCPU3 in LTQ");
    wait_run(4, n);
    run_len = 0;
    while (!thread_stall[4]) begin @(negedge clk); run_len++; end
    check(run_len == 21, $sformatf("SCPU4 promoted after 20 + 1 cycles, got %0d", run_len));
    check(ltq_mask == 5'b11000 && itq_mask == '0, "both tasks long");
    // Round robin: slices of 10 cycles (+1 response cycle) alternate.
    for (int k = 0; k < 6; k++) begin
      while (thread_stall[3] && thread_stall[4]) @(negedge clk);
      prev = sel_thread;
      check(state == SCH_IDLE, "round robin in Idle State");
      run_len = 0;
      while (!thread_stall[prev]) begin @(negedge clk); run_len++; end
      seq.push_back(prev);
      len.push_back(run_len);
    end
    for (int k = 1; k < 6; k++) begin
      check(seq[k] != seq[k-1], "round robin alternates");
      check(len[k] == 11, $sformatf("slice of 10 + 1 cycles, got %0d", len[k]));
    end

    // Task reset request: one pulse.
    @(negedge clk); task_need_reset[2] = 1'b1;
    @(negedge clk);
    check(thread_reset_stall == 5'b00100, "reset pulse for SCPU2");
    task_need_reset[2] = 1'b0;
    @(negedge clk);
    check(thread_reset_stall == '0, "reset pulse lasts one cycle");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
