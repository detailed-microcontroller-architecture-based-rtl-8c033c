// tb_nhse_lr: self-checking testbench of the local nHSE register block.
// Checks reset values, crTR/crEV read-back, the timer event with a wait and
// its wake-up latency (count + 1 cycle), the fixed recurrence of a periodic
// task, the watchdog reset request and its reload by `wait`, deadline alarms
// with and without their enable, interrupt and message wake-ups, and the
// mutex request forwarded to the global block.
module tb_nhse_lr;
  import nhse_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        cop2_we = 1'b0, cop2_wait = 1'b0;
  logic [4:0]  cop2_addr = '0;
  logic [31:0] cop2_wdata = '0, cop2_rdata;
  logic        int_ev = 1'b0, mutex_ev = 1'b0, syn_ev = 1'b0, task_reset = 1'b0;
  logic        mtx_req_valid, mtx_req_release;
  logic [4:0]  mtx_req_idx;
  logic        task_run, task_need_reset, task_deep_sleep;

  int checks = 0, failures = 0;
  int cyc = 0;

  nhse_lr dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (cycle %0d)", what, cyc);
    end
  endtask

  task automatic wr(input logic [4:0] a, input logic [31:0] d);
    @(negedge clk);
    cop2_we = 1'b1; cop2_addr = a; cop2_wdata = d;
    @(negedge clk);
    cop2_we = 1'b0;
  endtask

  task automatic rd(input logic [4:0] a, output logic [31:0] d);
    @(negedge clk);
    cop2_addr = a;
    @(negedge clk);
    d = cop2_rdata;
  endtask

  task automatic do_wait();
    @(negedge clk);
    cop2_wait = 1'b1;
    @(negedge clk);
    cop2_wait = 1'b0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    int t0, t1, t2;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // Reset values.
    rd(LR_CRTR, d); check(d == 32'h80, "crTR reset value has only the run bit");
    rd(LR_CREV, d); check(d == 32'h80, "crEV bit 7 mirrors the run bit");
    check(task_run && !task_deep_sleep && !task_need_reset, "reset outputs");

    // Timer event wakes a waiting task after the count plus one cycle.
    wr(LR_CRTR, 32'h81);                 // run, timer event enabled
    @(negedge clk); cop2_we = 1'b1; cop2_addr = LR_MRTEV; cop2_wdata = 10;
    t0 = cyc;                            // counter loads at the next edge
    @(negedge clk); cop2_we = 1'b0; cop2_wait = 1'b1;
    @(negedge clk); cop2_wait = 1'b0;
    check(task_deep_sleep, "wait without pending event sleeps");
    while (task_deep_sleep) @(negedge clk);
    t1 = cyc;
    check(t1 - t0 == 12, $sformatf("timer wake: load + 10 counts + 1, got %0d", t1 - t0));
    rd(LR_CREV, d); check(d[EV_T] == 1'b1, "TEv set");
    rd(LR_MRTEV, d); check(d == 10, "mrTEV read back");

    // Fixed recurrence: clear TEv, wait again; wake-ups are 11 cycles apart.
    wr(LR_CREV, 32'h0);
    do_wait();
    check(task_deep_sleep, "sleeping for the next period");
    while (task_deep_sleep) @(negedge clk);
    t2 = cyc;
    check(t2 - t1 == 11, $sformatf("recurrence of 11 cycles, got %0d", t2 - t1));
    wr(LR_CRTR, 32'h80);                 // timer event off
    wr(LR_CREV, 32'h0);

    // Watchdog expiry raises TaskNeedReset and WDEv.
    wr(LR_CRTR, 32'h82);
    wr(LR_MRWDEV, 5);
    repeat (6) @(negedge clk);
    check(task_need_reset, "watchdog expired -> TaskNeedReset");
    rd(LR_CREV, d); check(d[EV_WD], "WDEv set");
    @(negedge clk); task_reset = 1'b1;
    @(negedge clk); task_reset = 1'b0;
    check(!task_need_reset, "task_reset clears TaskNeedReset");
    rd(LR_WDEV_CNT, d); check(d <= 5 && d >= 2, $sformatf("watchdog reloaded after reset, %0d", d));

    // The watchdog is reloaded at every wait: no reset request.
    wr(LR_CRTR, 32'h80);
    wr(LR_CREV, 32'h0);
    wr(LR_CRTR, 32'h92);                 // watchdog and interrupt events enabled
    wr(LR_MRWDEV, 8);
    @(negedge clk); int_ev = 1'b1;       // pending interrupt: wait does not sleep
    @(negedge clk); int_ev = 1'b0;
    for (int k = 0; k < 6; k++) begin
      do_wait();
      check(!task_deep_sleep, "wait with pending event does not sleep");
      repeat (2) @(negedge clk);
    end
    check(!task_need_reset, "watchdog reloaded by wait never expires");
    rd(LR_CREV, d); check(d[EV_INT] && !d[EV_WD], "IntEv set, no WDEv");
    wr(LR_CRTR, 32'h80);
    wr(LR_CREV, 32'h0);

    // Deadline alarms: enabled D1 fires, disabled D2 does not.
    wr(LR_CRTR, 32'h84);
    wr(LR_CRD1, 7);
    wr(LR_CRD2, 4);
    repeat (9) @(negedge clk);
    rd(LR_CREV, d); check(d[EV_D1] && !d[EV_D2], "D1Ev set, D2Ev masked");
    rd(LR_D2_CNT, d); check(d == 0, "deadline 2 counter reached zero");
    wr(LR_CRTR, 32'h80);
    wr(LR_CREV, 32'h0);

    // Disabled interrupt is not recorded.
    @(negedge clk); int_ev = 1'b1;
    @(negedge clk); int_ev = 1'b0;
    rd(LR_CREV, d); check(d[6:0] == 0, "masked interrupt not recorded");

    // Message (sync) event wakes the task one cycle later.
    wr(LR_CRTR, 32'hC0);
    do_wait();
    check(task_deep_sleep, "sleeping on message");
    repeat (3) @(negedge clk);
    check(task_deep_sleep, "still sleeping without event");
    syn_ev = 1'b1;
    @(negedge clk);
    check(!task_deep_sleep, "woken one cycle after syn_ev");
    syn_ev = 1'b0;
    rd(LR_CREV, d); check(d[EV_SYN], "SynEv set");
    wr(LR_CREV, 32'h0);

    // Mutex event wake-up.
    wr(LR_CRTR, 32'hA0);
    do_wait();
    check(task_deep_sleep, "sleeping on mutex");
    mutex_ev = 1'b1;
    @(negedge clk); mutex_ev = 1'b0;
    check(!task_deep_sleep, "woken by mutex event");
    wr(LR_CREV, 32'h0);

    // Mutex acquire / release requests.
    @(negedge clk); cop2_we = 1'b1; cop2_addr = LR_MTX_ACQ; cop2_wdata = 3;
    @(negedge clk); cop2_we = 1'b0;
    check(mtx_req_valid && !mtx_req_release && mtx_req_idx == 3, "acquire request");
    @(negedge clk);
    check(!mtx_req_valid, "request is a single pulse");
    @(negedge clk); cop2_we = 1'b1; cop2_addr = LR_MTX_REL; cop2_wdata = 17;
    @(negedge clk); cop2_we = 1'b0;
    check(mtx_req_valid && mtx_req_release && mtx_req_idx == 17, "release request");

    // Run bit cleared.
    wr(LR_CRTR, 32'h00);
    check(!task_run, "run bit cleared");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
