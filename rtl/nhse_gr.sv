// nhse_gr: global nHSE block, a peripheral on the slow bus shared by all
// semi-CPUs. It holds the grMutex, grINT_ID and grERF register banks and the
// static hardware scheduler, and turns the global registers into per-task
// events (interrupt, mutex, synchronisation) for the local nHSE_lr blocks.
//
// Slow-bus port: one word access per request; bus_addr[7:6] selects the
// region (nhse_pkg::gr_region_e) and bus_addr[5:0] the register in it. Reads
// and writes complete in one machine cycle: bus_ack and bus_rdata are valid
// in the cycle after bus_sel. grMutex is read-only on the bus (mutexes are
// taken and released through the local blocks); grINT_ID and grERF are
// read/write. The scheduler region holds the long-task limit (0), the
// round-robin quantum (1) and a read-only status word (2:
// {ltq[7:0], itq[7:0], aq[7:0], 2'b0, state[1:0], sel_valid, sel_thread[2:0]}).
// Only SCPU0, the highest-priority task, may write the scheduler
// configuration: a write while another thread is selected is ignored.
//
// The register banks, the scheduler inside this block and the SCPU0-only
// configuration follow the design description; the address map, the bus
// handshake and the configuration registers are this design's choices.
module nhse_gr
  import nhse_pkg::*;
#(
  parameter int unsigned N_TASKS       = N_TASKS_DEF,
  parameter int unsigned N_MUTEX       = N_TASKS * N_TASKS,
  parameter int unsigned N_ERF         = N_TASKS * N_TASKS,
  parameter int unsigned N_IRQ         = 8,
  parameter int unsigned MTX_IDX_W     = 5,
  parameter int unsigned SWITCH_CYCLES = SWITCH_CYCLES_DEF,
  parameter int unsigned SCH_CNT_W     = 16,
  parameter int unsigned LTQ_LIMIT     = LTQ_LIMIT_DEF,
  parameter int unsigned RR_QUANTUM    = RR_QUANTUM_DEF
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // slow bus slave
  input  logic                 bus_sel,
  input  logic                 bus_we,
  input  logic [7:0]           bus_addr,
  input  logic [31:0]          bus_wdata,
  output logic [31:0]          bus_rdata,
  output logic                 bus_ack,
  // interrupt lines
  input  logic [N_IRQ-1:0]     irq,
  // from the local blocks
  input  logic [N_TASKS-1:0]   mtx_req_valid,
  input  logic [N_TASKS-1:0]   mtx_req_release,
  input  logic [MTX_IDX_W-1:0] mtx_req_idx [N_TASKS],
  input  logic [N_TASKS-1:0]   task_run,
  input  logic [N_TASKS-1:0]   task_deep_sleep,
  input  logic [N_TASKS-1:0]   task_need_reset,
  // events to the local blocks
  output logic [N_TASKS-1:0]   int_ev,
  output logic [N_TASKS-1:0]   mutex_ev,
  output logic [N_TASKS-1:0]   syn_ev,
  // scheduler outputs to the pipeline
  output logic [ID_W-1:0]      sel_thread,
  output logic                 sel_valid,
  output logic [N_TASKS-1:0]   thread_stall,
  output logic [N_TASKS-1:0]   flush_pipe,
  output logic [N_TASKS-1:0]   thread_start_again,
  output logic [N_TASKS-1:0]   thread_reset_stall,
  output sched_state_e         sched_state,
  output logic [N_TASKS-1:0]   aq_mask,
  output logic [N_TASKS-1:0]   itq_mask,
  output logic [N_TASKS-1:0]   ltq_mask
);

  gr_region_e       region;
  logic [5:0]       idx;
  logic [31:0]      mtx_rdata, int_rdata;
  erf_t             erf_rdata;
  logic [SCH_CNT_W-1:0] ltq_limit, rr_quantum;
  logic             wr;

  assign region = gr_region_e'(bus_addr[7:6]);
  assign idx    = bus_addr[5:0];
  assign wr     = bus_sel && bus_we;

  nhse_gr_mutex #(.N_TASKS(N_TASKS), .N_MUTEX(N_MUTEX), .MTX_IDX_W(MTX_IDX_W)) u_mutex (
    .clk, .rst_n,
    .req_valid(mtx_req_valid), .req_release(mtx_req_release), .req_idx(mtx_req_idx),
    .rd_idx(idx[MTX_IDX_W-1:0]), .rd_data(mtx_rdata), .mutex_ev);

  nhse_gr_int #(.N_TASKS(N_TASKS), .N_IRQ(N_IRQ), .IDX_W(6)) u_int (
    .clk, .rst_n, .irq,
    .wr_en(wr && region == GR_INTID), .wr_idx(idx), .wr_id(bus_wdata[ID_W-1:0]),
    .rd_idx(idx), .rd_data(int_rdata), .int_ev);

  nhse_gr_erf #(.N_TASKS(N_TASKS), .N_ERF(N_ERF), .IDX_W(6)) u_erf (
    .clk, .rst_n,
    .wr_en(wr && region == GR_ERF), .wr_idx(idx), .wr_data(erf_t'(bus_wdata)),
    .rd_idx(idx), .rd_data(erf_rdata), .syn_ev);

  nhse_scheduler #(.N_TASKS(N_TASKS), .SWITCH_CYCLES(SWITCH_CYCLES), .CNT_W(SCH_CNT_W)) u_sched (
    .clk, .rst_n, .task_run, .task_deep_sleep, .task_need_reset,
    .cfg_ltq_limit(ltq_limit), .cfg_rr_quantum(rr_quantum),
    .sel_thread, .sel_valid, .thread_stall, .flush_pipe, .thread_start_again,
    .thread_reset_stall, .state(sched_state), .aq_mask, .itq_mask, .ltq_mask);

  // Scheduler configuration, writable by SCPU0 only.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ltq_limit  <= SCH_CNT_W'(LTQ_LIMIT);
      rr_quantum <= SCH_CNT_W'(RR_QUANTUM);
    end else if (wr && region == GR_SCHED && sel_valid && sel_thread == '0) begin
      if (idx == SCH_LTQ_LIMIT)  ltq_limit  <= bus_wdata[SCH_CNT_W-1:0];
      if (idx == SCH_RR_QUANTUM) rr_quantum <= bus_wdata[SCH_CNT_W-1:0];
    end
  end

  // Registered bus response.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bus_rdata <= '0;
      bus_ack   <= 1'b0;
    end else begin
      bus_ack <= bus_sel;
      if (bus_sel && !bus_we) begin
        unique case (region)
          GR_MUTEX: bus_rdata <= mtx_rdata;
          GR_INTID: bus_rdata <= int_rdata;
          GR_ERF:   bus_rdata <= 32'(erf_rdata);
          GR_SCHED: begin
            unique case (idx)
              SCH_LTQ_LIMIT:  bus_rdata <= 32'(ltq_limit);
              SCH_RR_QUANTUM: bus_rdata <= 32'(rr_quantum);
              SCH_STATUS:     bus_rdata <= {8'(ltq_mask), 8'(itq_mask), 8'(aq_mask),
                                            2'b00, sched_state, sel_valid, sel_thread};
              default:        bus_rdata <= '0;
            endcase
          end
        endcase
      end
    end
  end

  // Slow-bus handshake: every access is acknowledged in the next cycle.
  a_bus_ack: assert property (@(posedge clk) disable iff (!rst_n) bus_sel |=> bus_ack);

  initial begin
    assert (N_TASKS <= 8) else $error("nhse_gr: at most 8 tasks fit a 3-bit task id");
  end

endmodule
