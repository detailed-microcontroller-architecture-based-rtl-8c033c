// nhse_top: the hardware scheduler engine (nHSE) and the multiple pipeline
// register architecture (nMPRA) of a five-thread real-time microcontroller.
//
// The processor core is shared by N_TASKS semi-CPUs (SCPU0..SCPU4). Each SCPU
// has its own copy of the program counter and of every pipeline register
// (nmpra_pipe_stage), so switching tasks is only a change of the select
// signal. The core's shared logic (ROM, RAM, ALU, control, COP0) is outside
// this module: its stage results come in on the *_d ports and the selected
// thread's pipeline registers go out on the *_q ports.
//
// Each SCPU owns a local register block (nhse_lr, coprocessor 2). The core's
// decode stage drives the cop2_* port for the selected thread; the access is
// routed to that thread's block and its read data is returned one cycle
// later. The global block (nhse_gr) sits on the slow bus (bus_* port, 1-cycle
// response), holds the mutex, interrupt-attach and message registers, and
// contains the static scheduler that selects the running thread
// (sel_thread) and drives the per-thread stall, flush, start-again and reset
// controls. The local blocks report run, deep sleep (wait instruction) and
// watchdog reset requests to the scheduler; the global block returns
// interrupt, mutex and message events to them.
//
// Timing: an event that wakes a task is seen by the scheduler one cycle after
// it sets crEV; the scheduler responds in one cycle and switches in five.
// COP2 accesses and the wait instruction are accepted only while the
// selected thread is not stalled. The pipeline register widths are
// parameters (they belong to the core, which is not part of this block).
module nhse_top
  import nhse_pkg::*;
#(
  parameter int unsigned N_TASKS   = N_TASKS_DEF,
  parameter int unsigned N_IRQ     = 8,
  parameter int unsigned CNT_W     = 32,
  parameter int unsigned MTX_IDX_W = 5,
  parameter int unsigned W_PC      = 32,
  parameter int unsigned W_IF_ID   = 64,
  parameter int unsigned W_ID_EX   = 128,
  parameter int unsigned W_EX_M    = 128,
  parameter int unsigned W_M_WB    = 128
) (
  input  logic               clk,
  input  logic               rst_n,
  // COP2 access of the selected thread (from the decode stage)
  input  logic               cop2_we,
  input  logic [4:0]         cop2_addr,
  input  logic [31:0]        cop2_wdata,
  input  logic               cop2_wait,
  output logic [31:0]        cop2_rdata,
  // slow bus to nHSE_gr (from the memory stage / memory controller)
  input  logic               bus_sel,
  input  logic               bus_we,
  input  logic [7:0]         bus_addr,
  input  logic [31:0]        bus_wdata,
  output logic [31:0]        bus_rdata,
  output logic               bus_ack,
  // interrupt lines of the peripherals
  input  logic [N_IRQ-1:0]   irq,
  // replicated pipeline registers
  input  logic               pipe_adv,
  input  logic [W_PC-1:0]    pc_d,
  output logic [W_PC-1:0]    pc_q,
  input  logic [W_IF_ID-1:0] if_id_d,
  output logic [W_IF_ID-1:0] if_id_q,
  input  logic [W_ID_EX-1:0] id_ex_d,
  output logic [W_ID_EX-1:0] id_ex_q,
  input  logic [W_EX_M-1:0]  ex_m_d,
  output logic [W_EX_M-1:0]  ex_m_q,
  input  logic [W_M_WB-1:0]  m_wb_d,
  output logic [W_M_WB-1:0]  m_wb_q,
  // scheduler controls and status
  output logic [ID_W-1:0]    sel_thread,
  output logic               sel_valid,
  output logic [N_TASKS-1:0] thread_stall,
  output logic [N_TASKS-1:0] flush_pipe,
  output logic [N_TASKS-1:0] thread_start_again,
  output logic [N_TASKS-1:0] thread_reset_stall,
  output sched_state_e       sched_state,
  output logic [N_TASKS-1:0] aq_mask,
  output logic [N_TASKS-1:0] itq_mask,
  output logic [N_TASKS-1:0] ltq_mask,
  output logic [N_TASKS-1:0] task_deep_sleep
);

  logic [N_TASKS-1:0]   lr_we, lr_wait;
  logic [31:0]          lr_rdata [N_TASKS];
  logic [N_TASKS-1:0]   int_ev, mutex_ev, syn_ev;
  logic [N_TASKS-1:0]   mtx_req_valid, mtx_req_release;
  logic [MTX_IDX_W-1:0] mtx_req_idx [N_TASKS];
  logic [N_TASKS-1:0]   task_run, task_need_reset;
  logic [N_TASKS-1:0]   pipe_flush;
  logic                 cop2_ok;

  // COP2 accesses go to the local block of the running thread only.
  assign cop2_ok = sel_valid && !thread_stall[sel_thread];

  for (genvar i = 0; i < N_TASKS; i++) begin : g_lr
    assign lr_we[i]   = cop2_ok && cop2_we   && sel_thread == ID_W'(i);
    assign lr_wait[i] = cop2_ok && cop2_wait && sel_thread == ID_W'(i);

    nhse_lr #(.CNT_W(CNT_W), .MTX_IDX_W(MTX_IDX_W)) u_lr (
      .clk, .rst_n,
      .cop2_we(lr_we[i]), .cop2_addr, .cop2_wdata, .cop2_wait(lr_wait[i]),
      .cop2_rdata(lr_rdata[i]),
      .int_ev(int_ev[i]), .mutex_ev(mutex_ev[i]), .syn_ev(syn_ev[i]),
      .task_reset(thread_reset_stall[i]),
      .mtx_req_valid(mtx_req_valid[i]), .mtx_req_release(mtx_req_release[i]),
      .mtx_req_idx(mtx_req_idx[i]),
      .task_run(task_run[i]), .task_need_reset(task_need_reset[i]),
      .task_deep_sleep(task_deep_sleep[i]));
  end

  assign cop2_rdata = (32'(sel_thread) < N_TASKS) ? lr_rdata[sel_thread] : '0;

  nhse_gr #(.N_TASKS(N_TASKS), .N_IRQ(N_IRQ), .MTX_IDX_W(MTX_IDX_W)) u_gr (
    .clk, .rst_n,
    .bus_sel, .bus_we, .bus_addr, .bus_wdata, .bus_rdata, .bus_ack,
    .irq,
    .mtx_req_valid, .mtx_req_release, .mtx_req_idx,
    .task_run, .task_deep_sleep, .task_need_reset,
    .int_ev, .mutex_ev, .syn_ev,
    .sel_thread, .sel_valid, .thread_stall, .flush_pipe, .thread_start_again,
    .thread_reset_stall, .sched_state, .aq_mask, .itq_mask, .ltq_mask);

  // The copies of a preempted thread are kept, so its instructions in flight
  // resume where they stopped; only a thread reset clears them. flush_pipe
  // is passed to the core, which owns the instruction fetch.
  assign pipe_flush = thread_reset_stall;

  nmpra_pipe_stage #(.N_TASKS(N_TASKS), .W(W_PC)) u_pc (
    .clk, .rst_n, .sel(sel_thread), .adv(pipe_adv), .stall(thread_stall),
    .flush(pipe_flush), .d(pc_d), .q(pc_q));
  nmpra_pipe_stage #(.N_TASKS(N_TASKS), .W(W_IF_ID)) u_if_id (
    .clk, .rst_n, .sel(sel_thread), .adv(pipe_adv), .stall(thread_stall),
    .flush(pipe_flush), .d(if_id_d), .q(if_id_q));
  nmpra_pipe_stage #(.N_TASKS(N_TASKS), .W(W_ID_EX)) u_id_ex (
    .clk, .rst_n, .sel(sel_thread), .adv(pipe_adv), .stall(thread_stall),
    .flush(pipe_flush), .d(id_ex_d), .q(id_ex_q));
  nmpra_pipe_stage #(.N_TASKS(N_TASKS), .W(W_EX_M)) u_ex_m (
    .clk, .rst_n, .sel(sel_thread), .adv(pipe_adv), .stall(thread_stall),
    .flush(pipe_flush), .d(ex_m_d), .q(ex_m_q));
  nmpra_pipe_stage #(.N_TASKS(N_TASKS), .W(W_M_WB)) u_m_wb (
    .clk, .rst_n, .sel(sel_thread), .adv(pipe_adv), .stall(thread_stall),
    .flush(pipe_flush), .d(m_wb_d), .q(m_wb_q));

endmodule
