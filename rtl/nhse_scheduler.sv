// nhse_scheduler: static dual-priority hardware scheduler for N semi-CPUs.
//
// Each ready task (run bit set, not in deep sleep, not waiting for a reset)
// belongs to one of three classes:
//   AQ  active tasks, scheduled by static priority (SCPU0 highest) in the
//       Running State;
//   ITQ interrupted tasks, scheduled by priority only in the Idle State
//       (no AQ task ready);
//   LTQ long tasks, scheduled round robin only in the Idle State (no AQ or
//       ITQ task ready).
// With no ready task at all the scheduler sits in the Waiting State, which
// lasts as long as needed. A task entering the ready set joins AQ. A task that
// runs for cfg_ltq_limit cycles without going to deep sleep is promoted to
// LTQ; a task in deep sleep (wait instruction) leaves the ready set instead and
// so is never promoted. An AQ task that loses the processor while still ready
// is moved to ITQ. In the LTQ the running task keeps the processor for
// cfg_rr_quantum cycles before the next LTQ task in index order takes over.
//
// Both limits count running cycles; the switch decision follows in the next
// cycle, so a task keeps the processor for limit + 1 cycles.
//
// Timing: the decision is registered one cycle after the inputs change (the
// 1-cycle response); the task switch then takes SWITCH_CYCLES (5) cycles in
// which every thread is stalled. A running thread that stops being ready
// (wait instruction, run bit cleared, reset request) is stalled in the same
// cycle, before the scheduler has responded: in the first switch cycle the outgoing
// thread's pipeline is flushed, and in the first cycle of the new task
// thread_start_again pulses and sel_thread names it. An event therefore
// reaches its task after 1 + 5 cycles. thread_reset_stall pulses for one
// cycle for a task whose watchdog asked for a reset.
//
// The classes, states, 1-cycle response and 5-cycle switch follow the design
// description; the exact promotion and demotion rules, the flush/start-again
// timing within the switch and the round-robin order are this design's
// choices, since the source describes the scheduler only in outline.
module nhse_scheduler
  import nhse_pkg::*;
#(
  parameter int unsigned N_TASKS       = N_TASKS_DEF,
  parameter int unsigned SWITCH_CYCLES = SWITCH_CYCLES_DEF,
  parameter int unsigned CNT_W         = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N_TASKS-1:0]   task_run,
  input  logic [N_TASKS-1:0]   task_deep_sleep,
  input  logic [N_TASKS-1:0]   task_need_reset,
  input  logic [CNT_W-1:0]     cfg_ltq_limit,
  input  logic [CNT_W-1:0]     cfg_rr_quantum,
  output logic [ID_W-1:0]      sel_thread,
  output logic                 sel_valid,
  output logic [N_TASKS-1:0]   thread_stall,
  output logic [N_TASKS-1:0]   flush_pipe,
  output logic [N_TASKS-1:0]   thread_start_again,
  output logic [N_TASKS-1:0]   thread_reset_stall,
  output sched_state_e         state,
  output logic [N_TASKS-1:0]   aq_mask,
  output logic [N_TASKS-1:0]   itq_mask,
  output logic [N_TASKS-1:0]   ltq_mask
);

  localparam int unsigned SW_W = $clog2(SWITCH_CYCLES + 1);

  logic [N_TASKS-1:0] ready;
  logic [N_TASKS-1:0] aq_q, itq_q, ltq_q;
  logic [CNT_W-1:0]   exec_cnt [N_TASKS];
  logic [CNT_W-1:0]   slice_cnt;

  logic [ID_W-1:0]    cur, tgt;
  logic               cur_valid, tgt_valid;
  logic [SW_W-1:0]    sw_cnt;
  sched_state_e       state_q;

  // Candidate selection.
  logic [ID_W-1:0]    cand;
  logic               cand_valid, cand_idle;

  assign ready = task_run & ~task_deep_sleep & ~task_need_reset;

  always_comb begin
    logic [N_TASKS-1:0] aq_r, itq_r, ltq_r;
    logic               found;
    int unsigned        idx;
    // A task that has just become ready counts as active at once.
    aq_r       = (aq_q | ~(aq_q | itq_q | ltq_q)) & ready;
    itq_r      = itq_q & ready;
    ltq_r      = ltq_q & ready;
    cand       = '0;
    cand_valid = 1'b0;
    cand_idle  = 1'b0;
    found      = 1'b0;
    idx        = 0;
    if (|aq_r) begin
      // Running State: highest priority active task.
      for (int i = N_TASKS - 1; i >= 0; i--)
        if (aq_r[i]) cand = ID_W'(i);
      cand_valid = 1'b1;
    end else if (|itq_r) begin
      // Idle State: highest priority interrupted task.
      for (int i = N_TASKS - 1; i >= 0; i--)
        if (itq_r[i]) cand = ID_W'(i);
      cand_valid = 1'b1;
      cand_idle  = 1'b1;
    end else if (|ltq_r) begin
      // Idle State: round robin among long tasks.
      cand_valid = 1'b1;
      cand_idle  = 1'b1;
      if (cur_valid && ltq_r[cur] && slice_cnt < cfg_rr_quantum) begin
        cand = cur;
      end else begin
        for (int k = 1; k <= N_TASKS; k++) begin
          idx = (32'(cur) + k) % N_TASKS;
          if (!found && ltq_r[idx]) begin
            cand  = ID_W'(idx);
            found = 1'b1;
          end
        end
      end
    end
  end

  // Main sequencer.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q            <= SCH_WAITING;
      cur                <= '0;
      cur_valid          <= 1'b0;
      tgt                <= '0;
      tgt_valid          <= 1'b0;
      sw_cnt             <= '0;
      slice_cnt          <= '0;
      flush_pipe         <= '0;
      thread_start_again <= '0;
    end else begin
      flush_pipe         <= '0;
      thread_start_again <= '0;
      if (state_q == SCH_SWITCH) begin
        if (sw_cnt == SW_W'(SWITCH_CYCLES - 1)) begin
          cur       <= tgt;
          cur_valid <= tgt_valid;
          slice_cnt <= '0;
          if (tgt_valid) begin
            thread_start_again[tgt] <= 1'b1;
            state_q <= ltq_q[tgt] || itq_q[tgt] ? SCH_IDLE : SCH_RUNNING;
          end else begin
            state_q <= SCH_WAITING;
          end
        end
        sw_cnt <= sw_cnt + 1'b1;
      end else if (cand_valid != cur_valid || (cand_valid && cand != cur)) begin
        // 1-cycle response: start the task switch.
        state_q   <= SCH_SWITCH;
        tgt       <= cand;
        tgt_valid <= cand_valid;
        sw_cnt    <= '0;
        if (cur_valid) flush_pipe[cur] <= 1'b1;
        cur_valid <= 1'b0;
      end else begin
        if (cur_valid) begin
          slice_cnt <= slice_cnt + 1'b1;
          state_q   <= cand_idle ? SCH_IDLE : SCH_RUNNING;
        end
      end
    end
  end

  // Task classes and execution time counters.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      aq_q  <= '0;
      itq_q <= '0;
      ltq_q <= '0;
      for (int i = 0; i < N_TASKS; i++) exec_cnt[i] <= '0;
    end else begin
      for (int i = 0; i < N_TASKS; i++) begin
        if (!ready[i]) begin
          aq_q[i]     <= 1'b0;
          itq_q[i]    <= 1'b0;
          ltq_q[i]    <= 1'b0;
          exec_cnt[i] <= '0;
        end else if (!aq_q[i] && !itq_q[i] && !ltq_q[i]) begin
          aq_q[i] <= 1'b1;
        end else if (cur_valid && state_q != SCH_SWITCH && ID_W'(i) == cur) begin
          if (exec_cnt[i] != '1) exec_cnt[i] <= exec_cnt[i] + 1'b1;
          if (!ltq_q[i] && exec_cnt[i] + 1'b1 >= cfg_ltq_limit) begin
            // Long task: promoted to the LTQ.
            aq_q[i]  <= 1'b0;
            itq_q[i] <= 1'b0;
            ltq_q[i] <= 1'b1;
          end else if (aq_q[i] && cand_valid && cand != cur) begin
            // Preempted while still ready: interrupted task.
            aq_q[i]  <= 1'b0;
            itq_q[i] <= 1'b1;
          end
        end
      end
    end
  end

  // Task reset requests: one-cycle pulse per request.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) thread_reset_stall <= '0;
    else        thread_reset_stall <= task_need_reset & ~thread_reset_stall;
  end

  always_comb begin
    for (int i = 0; i < N_TASKS; i++)
      thread_stall[i] = !(cur_valid && state_q != SCH_SWITCH && cur == ID_W'(i) && ready[i]);
  end

  // At most one thread runs, and only the selected one.
  a_one_runner: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0(~thread_stall) && (thread_stall == '1 || !thread_stall[cur]));

  assign sel_thread = cur;
  assign sel_valid  = cur_valid;
  assign state      = state_q;
  assign aq_mask    = aq_q;
  assign itq_mask   = itq_q;
  assign ltq_mask   = ltq_q;

endmodule
