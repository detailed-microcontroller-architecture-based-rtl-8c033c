// nhse_lr: local nHSE register block of one semi-CPU (SCPUi), seen by that
// SCPU as coprocessor 2.
//
// What it holds (after the register tables and the nHSE_lr block diagram):
//   crTR  control register: bits 0..6 enable the timer, watchdog, deadline 1,
//         deadline 2, interrupt, mutex and synchronisation events; bit 7
//         (lr_run_sCPUi) lets the SCPU execute.
//   crEV  event register: the same bits 0..6 record events that occurred;
//         bit 7 reads back as a copy of crTR bit 7.
//   mrTEV, mrWDEV, crD1, crD2: reload values of the timer, the watchdog and
//         the two deadline alarms, and four down counters with zero detectors.
// Every time the task begins to execute again (wake-up from `wait`, run bit
// set, or task reset) the four counters are loaded from their registers and
// count down; reaching zero raises the matching event if it is enabled.
// An expired, enabled watchdog also raises TaskNeedReset, held until the
// scheduler answers with `task_reset`.
//
// The `wait` instruction (cop2_wait) puts the task to sleep when no enabled
// event is pending; TaskDeepSleep tells the scheduler the task is only
// waiting for an event (so it is not promoted to the long task queue). The
// first enabled event wakes it. Writes of a mutex index to LR_MTX_ACQ /
// LR_MTX_REL are passed to the global block as an atomic acquire/release.
//
// Timing: COP2 writes take effect at the next clock edge, cop2_rdata is
// registered (valid the cycle after cop2_addr), so together with the fetch
// a local register access takes two machine cycles. A wake-up is seen on
// task_deep_sleep one cycle after the event input.
//
// Own choices (not given by the design description): the COP2 register
// numbers (nhse_pkg::lr_reg_e); crEV bits are written directly by software
// and set by hardware; writing a reload register also loads its counter;
// the watchdog is also reloaded at each `wait` (the end
// of a successful task run); the timer counts whenever the run bit is set,
// the watchdog and deadlines only while the task is awake; one count per
// clock; the run bit's reset value is a parameter.
module nhse_lr
  import nhse_pkg::*;
#(
  parameter int unsigned CNT_W        = 32,
  parameter int unsigned MTX_IDX_W    = 5,
  parameter bit          RUN_AT_RESET = 1'b1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // COP2 access from the SCPU's decode stage
  input  logic                 cop2_we,
  input  logic [4:0]           cop2_addr,
  input  logic [31:0]          cop2_wdata,
  input  logic                 cop2_wait,
  output logic [31:0]          cop2_rdata,
  // events from nHSE_gr (one cycle pulses, syn_ev a level)
  input  logic                 int_ev,
  input  logic                 mutex_ev,
  input  logic                 syn_ev,
  // from the scheduler: the SCPU has been reset
  input  logic                 task_reset,
  // atomic mutex request to nHSE_gr
  output logic                 mtx_req_valid,
  output logic                 mtx_req_release,
  output logic [MTX_IDX_W-1:0] mtx_req_idx,
  // to the scheduler
  output logic                 task_run,
  output logic                 task_need_reset,
  output logic                 task_deep_sleep
);

  logic [7:0]       crtr;
  logic [6:0]       crev;
  logic [CNT_W-1:0] mrtev, mrwdev, crd1, crd2;
  logic             sleeping, need_reset;

  logic [CNT_W-1:0] tev_cnt, wdev_cnt, d1_cnt, d2_cnt;
  logic             t_exp, wd_exp, d1_exp, d2_exp;

  logic             wr_crtr, wr_crev;
  logic             run_rise, pending, wake, start;
  logic             ld_tev, ld_wdev, ld_d1, ld_d2;
  logic [6:0]       ev_src, ev_new, crev_base;

  assign wr_crtr  = cop2_we && cop2_addr == LR_CRTR;
  assign wr_crev  = cop2_we && cop2_addr == LR_CREV;
  assign run_rise = wr_crtr && cop2_wdata[7] && !crtr[EV_RUN];

  // Event sources in crTR/crEV bit order.
  assign ev_src = {syn_ev, mutex_ev, int_ev, d2_exp, d1_exp, wd_exp, t_exp};
  assign ev_new = ev_src & crtr[6:0];
  assign crev_base = wr_crev ? cop2_wdata[6:0] : crev;
  // An enabled event is pending (including one arriving in this cycle).
  assign pending = |((crev | ev_new) & crtr[6:0]);
  assign wake    = sleeping && pending;
  // The task begins to execute again: reload all counters.
  assign start   = wake || task_reset || run_rise;
  // Writing a reload register also loads its counter.
  assign ld_tev  = cop2_we && cop2_addr == LR_MRTEV;
  assign ld_wdev = cop2_we && cop2_addr == LR_MRWDEV;
  assign ld_d1   = cop2_we && cop2_addr == LR_CRD1;
  assign ld_d2   = cop2_we && cop2_addr == LR_CRD2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      crtr       <= {RUN_AT_RESET, 7'b0};
      crev       <= '0;
      mrtev      <= '0;
      mrwdev     <= '0;
      crd1       <= '0;
      crd2       <= '0;
      sleeping   <= 1'b0;
      need_reset <= 1'b0;
    end else begin
      if (wr_crtr) crtr <= cop2_wdata[7:0];
      if (cop2_we && cop2_addr == LR_MRTEV)  mrtev  <= cop2_wdata[CNT_W-1:0];
      if (cop2_we && cop2_addr == LR_MRWDEV) mrwdev <= cop2_wdata[CNT_W-1:0];
      if (cop2_we && cop2_addr == LR_CRD1)   crd1   <= cop2_wdata[CNT_W-1:0];
      if (cop2_we && cop2_addr == LR_CRD2)   crd2   <= cop2_wdata[CNT_W-1:0];

      crev <= crev_base | ev_new;

      if (task_reset) begin
        sleeping   <= 1'b0;
        need_reset <= 1'b0;
      end else begin
        if (wd_exp && crtr[EV_WD]) need_reset <= 1'b1;
        if (wake) sleeping <= 1'b0;
        else if (cop2_wait && !pending) sleeping <= 1'b1;
      end
    end
  end

  // Counter registers with their zero detectors.
  nhse_down_counter #(.W(CNT_W)) u_tev (
    .clk, .rst_n, .load(start || ld_tev), .load_val(ld_tev ? cop2_wdata[CNT_W-1:0] : mrtev), .en(crtr[EV_RUN]),
    .cnt(tev_cnt), .expired(t_exp));
  nhse_down_counter #(.W(CNT_W)) u_wdev (
    .clk, .rst_n, .load(start || cop2_wait || ld_wdev),
    .load_val(ld_wdev ? cop2_wdata[CNT_W-1:0] : mrwdev),
    .en(crtr[EV_RUN] && !sleeping),
    .cnt(wdev_cnt), .expired(wd_exp));
  nhse_down_counter #(.W(CNT_W)) u_d1 (
    .clk, .rst_n, .load(start || ld_d1), .load_val(ld_d1 ? cop2_wdata[CNT_W-1:0] : crd1), .en(crtr[EV_RUN] && !sleeping),
    .cnt(d1_cnt), .expired(d1_exp));
  nhse_down_counter #(.W(CNT_W)) u_d2 (
    .clk, .rst_n, .load(start || ld_d2), .load_val(ld_d2 ? cop2_wdata[CNT_W-1:0] : crd2), .en(crtr[EV_RUN] && !sleeping),
    .cnt(d2_cnt), .expired(d2_exp));

  // Registered read port.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cop2_rdata <= '0;
    end else begin
      unique case (cop2_addr)
        LR_CRTR:     cop2_rdata <= {24'b0, crtr};
        LR_CREV:     cop2_rdata <= {24'b0, crtr[EV_RUN], crev};
        LR_MRTEV:    cop2_rdata <= 32'(mrtev);
        LR_MRWDEV:   cop2_rdata <= 32'(mrwdev);
        LR_CRD1:     cop2_rdata <= 32'(crd1);
        LR_CRD2:     cop2_rdata <= 32'(crd2);
        LR_TEV_CNT:  cop2_rdata <= 32'(tev_cnt);
        LR_WDEV_CNT: cop2_rdata <= 32'(wdev_cnt);
        LR_D1_CNT:   cop2_rdata <= 32'(d1_cnt);
        LR_D2_CNT:   cop2_rdata <= 32'(d2_cnt);
        default:     cop2_rdata <= '0;
      endcase
    end
  end

  // Atomic mutex request, issued one cycle after the mtc2.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mtx_req_valid   <= 1'b0;
      mtx_req_release <= 1'b0;
      mtx_req_idx     <= '0;
    end else begin
      mtx_req_valid   <= cop2_we && (cop2_addr == LR_MTX_ACQ || cop2_addr == LR_MTX_REL);
      mtx_req_release <= cop2_addr == LR_MTX_REL;
      mtx_req_idx     <= cop2_wdata[MTX_IDX_W-1:0];
    end
  end

  assign task_run        = crtr[EV_RUN];
  assign task_need_reset = need_reset;
  assign task_deep_sleep = sleeping;

endmodule
