// nhse_pkg: types and constants shared by the nHSE (hardware scheduler engine)
// and nMPRA (replicated pipeline register) blocks.
//
// The bit positions of crTR/crEV follow the register tables of the design
// description: bit 0 timer, 1 watchdog, 2 deadline 1, 3 deadline 2,
// 4 interrupt, 5 mutex, 6 synchronisation (message) event, 7 run bit.
// The COP2 register numbers, the slow-bus address map and the scheduler
// configuration defaults are choices of this implementation.
package nhse_pkg;

  // Number of semi-CPUs (hardware tasks) and width of a task id (grINT_ID: TaskId2..0).
  localparam int unsigned N_TASKS_DEF = 5;
  localparam int unsigned ID_W        = 3;

  // crTR / crEV bit positions.
  typedef enum logic [2:0] {
    EV_T     = 3'd0,
    EV_WD    = 3'd1,
    EV_D1    = 3'd2,
    EV_D2    = 3'd3,
    EV_INT   = 3'd4,
    EV_MUTEX = 3'd5,
    EV_SYN   = 3'd6,
    EV_RUN   = 3'd7
  } ev_bit_e;

  // COP2 register numbers of one nHSE_lr block (rd field of mtc2/mfc2).
  typedef enum logic [4:0] {
    LR_CRTR     = 5'd0,   // control register crTR
    LR_CREV     = 5'd1,   // event register crEV
    LR_MRTEV    = 5'd2,   // timer reload value
    LR_MRWDEV   = 5'd3,   // watchdog reload value
    LR_CRD1     = 5'd4,   // deadline 1 reload value
    LR_CRD2     = 5'd5,   // deadline 2 reload value
    LR_TEV_CNT  = 5'd6,   // timer counter (read only)
    LR_WDEV_CNT = 5'd7,   // watchdog counter (read only)
    LR_D1_CNT   = 5'd8,   // deadline 1 counter (read only)
    LR_D2_CNT   = 5'd9,   // deadline 2 counter (read only)
    LR_MTX_ACQ  = 5'd10,  // write: acquire the mutex whose index is written
    LR_MTX_REL  = 5'd11   // write: release the mutex whose index is written
  } lr_reg_e;

  // Slow-bus word address of nHSE_gr: region in [7:6], index in [5:0].
  typedef enum logic [1:0] {
    GR_MUTEX = 2'd0,
    GR_INTID = 2'd1,
    GR_ERF   = 2'd2,
    GR_SCHED = 2'd3
  } gr_region_e;

  // Scheduler configuration / status registers (GR_SCHED region).
  localparam logic [5:0] SCH_LTQ_LIMIT  = 6'd0;
  localparam logic [5:0] SCH_RR_QUANTUM = 6'd1;
  localparam logic [5:0] SCH_STATUS     = 6'd2;

  // Scheduler states (Running, Idle and Waiting states of the scheduler,
  // plus the task-switch sequence).
  typedef enum logic [1:0] {
    SCH_WAITING = 2'd0,
    SCH_RUNNING = 2'd1,
    SCH_IDLE    = 2'd2,
    SCH_SWITCH  = 2'd3
  } sched_state_e;

  // Cycles of a task switch and default scheduler configuration.
  localparam int unsigned SWITCH_CYCLES_DEF = 5;
  localparam int unsigned LTQ_LIMIT_DEF     = 1024;
  localparam int unsigned RR_QUANTUM_DEF    = 64;

  // grERF field layout: event bit | source id | destination id | message.
  localparam int unsigned ERF_MSG_W = 32 - 1 - 2 * ID_W;

  typedef struct packed {
    logic                 event_on;
    logic [ID_W-1:0]      src_id;
    logic [ID_W-1:0]      dst_id;
    logic [ERF_MSG_W-1:0] message;
  } erf_t;

endpackage
