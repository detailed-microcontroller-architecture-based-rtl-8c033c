// tb_nhse_top: end-to-end testbench of the five-task nHSE/nMPRA top at its
// default parameters.
//
// A small model of the processor core runs one scripted program per SCPU as
// five concurrent processes. A program issues a COP2 write, COP2 read, wait
// instruction or slow-bus access only in a cycle in which the scheduler has
// its thread running, exactly as the shared pipeline would; `spin` models
// plain computation. Every running cycle the model also pushes a new value
// through the replicated pipeline registers and checks that each thread finds
// its own pipeline contents again when it is resumed.
//
// Programs: SCPU0 configures the scheduler and interrupt routing, then runs
// periodically from its timer (period checked). SCPU1 takes a mutex, computes
// long enough to become a long task, releases the mutex and then hangs with
// the watchdog armed, so it is reset. SCPU2 fails to take the mutex and
// waits for the mutex event. SCPU3 waits for an interrupt, sends a message to
// SCPU4 and checks a deadline alarm. SCPU4 waits for the message and then
// computes as a long task. Each mechanism is counted and must occur.
module tb_nhse_top;
  import nhse_pkg::*;

  localparam int N = 5;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          cop2_we = 1'b0, cop2_wait = 1'b0;
  logic [4:0]    cop2_addr = '0;
  logic [31:0]   cop2_wdata = '0, cop2_rdata;
  logic          bus_sel = 1'b0, bus_we = 1'b0;
  logic [7:0]    bus_addr = '0;
  logic [31:0]   bus_wdata = '0, bus_rdata;
  logic          bus_ack;
  logic [7:0]    irq = '0;
  logic          pipe_adv = 1'b0;
  logic [31:0]   pc_d = '0, pc_q;
  logic [63:0]   if_id_d = '0, if_id_q;
  logic [127:0]  id_ex_d = '0, id_ex_q, ex_m_d = '0, ex_m_q, m_wb_d = '0, m_wb_q;
  logic [ID_W-1:0] sel_thread;
  logic          sel_valid;
  logic [N-1:0]  thread_stall, flush_pipe, thread_start_again, thread_reset_stall;
  sched_state_e  sched_state;
  logic [N-1:0]  aq_mask, itq_mask, ltq_mask, task_deep_sleep;

  nhse_top dut (.*);

  int checks = 0, failures = 0, cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (cycle %0d)", what, cyc);
    end
  endtask

  // ---------------------------------------------------------------- core model
  logic running;
  assign running = sel_valid && !thread_stall[sel_thread];

  // Wait for a cycle in which thread t runs (at a negedge).
  task automatic slot(input int t);
    do @(negedge clk); while (!(running && sel_thread == 3'(t)));
  endtask

  task automatic cop2_wr(input int t, input lr_reg_e a, input logic [31:0] d);
    slot(t);
    cop2_we = 1'b1; cop2_addr = a; cop2_wdata = d;
    @(posedge clk); #1;
    cop2_we = 1'b0;
  endtask

  task automatic cop2_rd(input int t, input lr_reg_e a, output logic [31:0] d);
    slot(t);
    cop2_addr = a;
    @(negedge clk);
    d = cop2_rdata;
  endtask

  task automatic wait_instr(input int t);
    slot(t);
    cop2_wait = 1'b1;
    @(posedge clk); #1;
    cop2_wait = 1'b0;
  endtask

  task automatic bus_wr(input int t, input gr_region_e r, input int idx, input logic [31:0] d);
    slot(t);
    bus_sel = 1'b1; bus_we = 1'b1; bus_addr = {r, 6'(idx)}; bus_wdata = d;
    @(posedge clk); #1;
    bus_sel = 1'b0; bus_we = 1'b0;
  endtask

  task automatic bus_rd(input int t, input gr_region_e r, input int idx, output logic [31:0] d);
    slot(t);
    bus_sel = 1'b1; bus_we = 1'b0; bus_addr = {r, 6'(idx)};
    @(posedge clk); #1;
    bus_sel = 1'b0;
    @(negedge clk);
    d = bus_rdata;
  endtask

  // Plain computation for n running cycles. A bus access that follows a
  // mutex request is separated from it by two such cycles, as the access
  // travels down the pipeline to the memory stage while the request is
  // handled by the local and then the global block (one cycle each).
  task automatic spin(input int t, input int n);
    for (int k = 0; k < n; k++) slot(t);
  endtask

  // ------------------------------------------------ replicated pipeline model
  logic [31:0] pc_ref [N];
  int          step = 0, resumes = 0, resume_ok = 0;
  int          was_stalled [N];

  function automatic logic [31:0] pat(input int t, input int s);
    return {4'(t), 28'(s)};
  endfunction

  always @(negedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) begin pc_ref[i] = '0; was_stalled[i] = 1; end
      pipe_adv = 1'b0;
    end else begin
      if (running) begin
        check(pc_q == pc_ref[sel_thread] && if_id_q == {2{pc_ref[sel_thread]}}
              && m_wb_q == {4{pc_ref[sel_thread]}},
              $sformatf("thread %0d pipeline contents %h, expected %h", sel_thread, pc_q,
                        pc_ref[sel_thread]));
        if (was_stalled[sel_thread] != 0 && pc_ref[sel_thread] != 0) begin
          resumes++;
          if (pc_q == pc_ref[sel_thread]) resume_ok++;
        end
      end
      for (int i = 0; i < N; i++) was_stalled[i] = thread_stall[i] ? 1 : 0;
      step++;
      pipe_adv = running;
      pc_d     = pat(int'(sel_thread), step);
      if_id_d  = {2{pc_d}};
      id_ex_d  = {4{pc_d}};
      ex_m_d   = {4{pc_d}};
      m_wb_d   = {4{pc_d}};
      for (int i = 0; i < N; i++) begin
        if (thread_reset_stall[i]) pc_ref[i] = '0;
        else if (running && sel_thread == 3'(i)) pc_ref[i] = pc_d;
      end
    end
  end

  // ------------------------------------------------------- mechanism counters
  int n_switch = 0, n_itq = 0, n_ltq = 0, n_rr = 0, n_wait_cyc = 0, n_reset = 0;
  int n_flush = 0, n_idle_cyc = 0;
  int last_started = -1;
  logic [N-1:0] itq_prev = '0, ltq_prev = '0;

  always @(posedge clk) if (rst_n) begin
    n_flush <= n_flush + $countones(flush_pipe);
    n_reset <= n_reset + $countones(thread_reset_stall);
    n_itq   <= n_itq + $countones(itq_mask & ~itq_prev);
    n_ltq   <= n_ltq + $countones(ltq_mask & ~ltq_prev);
    itq_prev <= itq_mask;
    ltq_prev <= ltq_mask;
    if (sched_state == SCH_WAITING) n_wait_cyc <= n_wait_cyc + 1;
    if (sched_state == SCH_IDLE)    n_idle_cyc <= n_idle_cyc + 1;
    if (thread_start_again != '0) begin
      n_switch <= n_switch + 1;
      for (int i = 0; i < N; i++)
        if (thread_start_again[i]) begin
          if (last_started >= 0 && last_started != i && ltq_mask[i] && ltq_mask[last_started])
            n_rr <= n_rr + 1;
          last_started <= i;
        end
    end
  end

  // Wake-ups of SCPU0 by its timer: period check.
  int   t0_wakes = 0, t0_last = -1, t0_period_bad = 0;
  logic sleep0_q = 1'b0;
  always @(posedge clk) begin
    sleep0_q <= task_deep_sleep[0];
    if (sleep0_q && !task_deep_sleep[0]) begin
      // The first wake-up follows the configuration; later ones are periodic.
      if (t0_wakes >= 2 && cyc - t0_last != 151) t0_period_bad++;
      t0_last = cyc;
      t0_wakes++;
    end
  end

  // Response of the scheduler to SCPU0's wake-up: 1 + 5 cycles, plus at most
  // 5 more when a switch is already under way.
  int t0_lat_min = 1000, t0_lat_max = 0;
  always @(posedge clk) begin
    if (thread_start_again[0] && t0_last >= 0 && cyc - t0_last < 100) begin
      if (cyc - t0_last < t0_lat_min) t0_lat_min = cyc - t0_last;
      if (cyc - t0_last > t0_lat_max) t0_lat_max = cyc - t0_last;
    end
  end

  // Bus protocol: every access is acknowledged in the next cycle.
  logic bus_sel_q = 1'b0;
  always @(posedge clk) begin
    bus_sel_q <= bus_sel;
    if (rst_n) assert (bus_ack == bus_sel_q)
      else begin failures++; $display("FAIL: bus_ack not one cycle after bus_sel"); end
  end

  // ----------------------------------------------------------------- programs
  int done = 0;
  int mutex_wake = 0, int_wake = 0, syn_wake = 0, d1_seen = 0;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout (done=%0d)", done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Interrupt line 1 (attached to SCPU3 by SCPU0).
  initial begin
    repeat (150) @(negedge clk);
    irq[1] = 1'b1;
    repeat (3) @(negedge clk);
    irq[1] = 1'b0;
  end

  initial begin
    logic [31:0] d;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    fork
      // SCPU0: configuration, then periodic task.
      begin
        bus_wr(0, GR_SCHED, 0, 32'd40);        // long-task limit
        bus_wr(0, GR_SCHED, 1, 32'd12);        // round-robin quantum
        bus_wr(0, GR_INTID, 1, 32'd3);         // irq1 -> SCPU3
        bus_rd(0, GR_SCHED, 0, d);
        check(d == 40, "SCPU0 configured the scheduler");
        cop2_wr(0, LR_MRTEV, 32'd150);
        cop2_wr(0, LR_CRTR, 32'h81);
        for (int k = 0; k < 8; k++) begin
          cop2_wr(0, LR_CREV, 32'h0);
          wait_instr(0);
        end
        cop2_rd(0, LR_CREV, d);
        check(d[EV_T], "SCPU0 woken by its timer");
        cop2_wr(0, LR_CRTR, 32'h80);
        wait_instr(0);
        done++;
      end
      // SCPU1: mutex owner, long task, then watchdog reset.
      begin
        cop2_wr(1, LR_MTX_ACQ, 32'd4);
        spin(1, 2);
        bus_rd(1, GR_MUTEX, 4, d);
        check(d == 32'h8000_0001, $sformatf("SCPU1 owns mutex 4 (%h)", d));
        spin(1, 300);
        cop2_wr(1, LR_MTX_REL, 32'd4);
        cop2_wr(1, LR_MRWDEV, 32'd30);
        cop2_wr(1, LR_CRTR, 32'h82);
        // Hangs: never reaches its wait; the watchdog resets it.
        wait (thread_reset_stall[1]);
        @(negedge clk);
        cop2_rd(1, LR_CREV, d);
        check(d[EV_WD], "SCPU1 watchdog event recorded");
        cop2_wr(1, LR_CRTR, 32'h80);
        wait_instr(1);
        done++;
      end
      // SCPU2: waits for the mutex held by SCPU1.
      begin
        cop2_wr(2, LR_CRTR, 32'hA0);
        cop2_wr(2, LR_MTX_ACQ, 32'd4);
        spin(2, 2);
        bus_rd(2, GR_MUTEX, 4, d);
        check(d == 32'h8000_0001, "SCPU2 refused: mutex 4 still owned by SCPU1");
        wait_instr(2);
        cop2_rd(2, LR_CREV, d);
        if (d[EV_MUTEX]) mutex_wake++;
        cop2_wr(2, LR_MTX_ACQ, 32'd4);
        spin(2, 2);
        bus_rd(2, GR_MUTEX, 4, d);
        check(d == 32'h8000_0002, "SCPU2 owns mutex 4 after the release");
        cop2_wr(2, LR_MTX_REL, 32'd4);
        cop2_wr(2, LR_CREV, 32'h0);
        cop2_wr(2, LR_CRTR, 32'h80);
        wait_instr(2);
        done++;
      end
      // SCPU3: interrupt service, message to SCPU4, deadline alarm.
      begin
        erf_t e;
        cop2_wr(3, LR_CRTR, 32'h90);
        wait_instr(3);
        cop2_rd(3, LR_CREV, d);
        if (d[EV_INT]) int_wake++;
        cop2_wr(3, LR_CREV, 32'h0);
        e = '0; e.event_on = 1'b1; e.src_id = 3'd3; e.dst_id = 3'd4; e.message = 25'hABC;
        bus_wr(3, GR_ERF, 3, 32'(e));
        cop2_wr(3, LR_CRD1, 32'd20);
        cop2_wr(3, LR_CRTR, 32'h84);
        spin(3, 25);
        cop2_rd(3, LR_CREV, d);
        if (d[EV_D1]) d1_seen++;
        cop2_wr(3, LR_CRTR, 32'h80);
        wait_instr(3);
        done++;
      end
      // SCPU4: waits for the message, then a long computation.
      begin
        erf_t e;
        cop2_wr(4, LR_CRTR, 32'hC0);
        wait_instr(4);
        cop2_rd(4, LR_CREV, d);
        if (d[EV_SYN]) syn_wake++;
        bus_rd(4, GR_ERF, 3, d);
        e = erf_t'(d);
        check(e.event_on && e.src_id == 3 && e.dst_id == 4 && e.message == 25'hABC,
              "SCPU4 received the message of SCPU3");
        bus_wr(4, GR_ERF, 3, 32'h0);
        cop2_wr(4, LR_CRTR, 32'h80);
        cop2_wr(4, LR_CREV, 32'h0);
        spin(4, 150);
        wait_instr(4);
        done++;
      end
    join
    repeat (20) @(negedge clk);
    check(sched_state == SCH_WAITING && !sel_valid, "all tasks asleep: Waiting State");

    $display("mechanisms: switches=%0d flushes=%0d to_ITQ=%0d to_LTQ=%0d rr=%0d idle=%0d waiting=%0d resets=%0d",
             n_switch, n_flush, n_itq, n_ltq, n_rr, n_idle_cyc, n_wait_cyc, n_reset);
    $display("SCPU0 wake-up to dispatch: %0d..%0d cycles", t0_lat_min, t0_lat_max);
    $display("wake-ups: timer=%0d mutex=%0d int=%0d syn=%0d d1=%0d; pipeline resumes=%0d",
             t0_wakes, mutex_wake, int_wake, syn_wake, d1_seen, resumes);
    check(n_switch > 10,  "task switches happened");
    check(n_flush > 10,   "pipeline flush requests happened");
    check(n_itq > 0,      "a preempted task entered the ITQ");
    check(n_ltq >= 2,     "long tasks were promoted to the LTQ");
    check(n_rr > 0,       "round robin between long tasks happened");
    check(n_idle_cyc > 0, "Idle State used");
    check(n_wait_cyc > 0, "Waiting State used");
    check(n_reset == 1,   "exactly one watchdog reset");
    check(t0_wakes >= 8,  "periodic timer wake-ups");
    check(t0_period_bad == 0, "timer recurrence of 151 cycles");
    check(t0_lat_min == 6 && t0_lat_max <= 11,
          $sformatf("wake-up to dispatch %0d..%0d cycles", t0_lat_min, t0_lat_max));
    check(mutex_wake == 1 && int_wake == 1 && syn_wake == 1 && d1_seen == 1,
          "woken by mutex, interrupt and message events; deadline alarm seen");
    check(resumes > 10 && resume_ok == resumes, "pipeline contents kept across switches");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
