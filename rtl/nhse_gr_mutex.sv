// nhse_gr_mutex: the grMutex registers of the global nHSE block.
//
// Each mutex register holds a "taken" flag (bit 31) and the id of the task
// that owns it (bits 4..0), as in the grMutex register table. Tasks acquire
// and release mutexes atomically through their local COP2 block, without
// using the processor data path: one request port per task. A free mutex is
// given to the requesting task; a request for a taken mutex fails and the
// task is remembered as a waiter. Only the owner can release a mutex; a
// release by any other task is ignored. On release every waiter of that
// mutex receives a one-cycle mutex event (mutex_ev) so that a task blocked in
// `wait` on the mutex event is woken and can try again. The status of a
// mutex is read through the slow bus (rd_idx -> rd_data, combinational; the
// bus port of nHSE_gr registers it).
//
// Timing: a request is handled in the clock edge after it is presented
// (1 machine cycle); mutex_ev follows the release by one cycle.
// Requests from several tasks in the same cycle are served in task-index
// order (lower index first): this and the waiter/event rule are this
// design's choices. N_MUTEX defaults to N_TASKS squared, after the rule that
// the number of mutex registers is the number of tasks to the power of two.
module nhse_gr_mutex
  import nhse_pkg::*;
#(
  parameter int unsigned N_TASKS   = N_TASKS_DEF,
  parameter int unsigned N_MUTEX   = N_TASKS * N_TASKS,
  parameter int unsigned MTX_IDX_W = 5
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N_TASKS-1:0]   req_valid,
  input  logic [N_TASKS-1:0]   req_release,
  input  logic [MTX_IDX_W-1:0] req_idx [N_TASKS],
  input  logic [MTX_IDX_W-1:0] rd_idx,
  output logic [31:0]          rd_data,
  output logic [N_TASKS-1:0]   mutex_ev
);

  logic [N_MUTEX-1:0]  taken_q, taken_d;
  logic [ID_W-1:0]     owner_q [N_MUTEX];
  logic [ID_W-1:0]     owner_d [N_MUTEX];
  logic [N_TASKS-1:0]  waiters_q [N_MUTEX];
  logic [N_TASKS-1:0]  waiters_d [N_MUTEX];
  logic [N_TASKS-1:0]  ev_d;

  always_comb begin
    int unsigned m;
    taken_d   = taken_q;
    owner_d   = owner_q;
    waiters_d = waiters_q;
    ev_d      = '0;
    for (int t = 0; t < N_TASKS; t++) begin
      m = 32'(req_idx[t]);
      if (req_valid[t] && m < N_MUTEX) begin
        if (!req_release[t]) begin
          if (!taken_d[m]) begin
            taken_d[m] = 1'b1;
            owner_d[m] = ID_W'(t);
          end else if (owner_d[m] != ID_W'(t)) begin
            waiters_d[m][t] = 1'b1;
          end
        end else if (taken_d[m] && owner_d[m] == ID_W'(t)) begin
          taken_d[m]   = 1'b0;
          ev_d         = ev_d | waiters_d[m];
          waiters_d[m] = '0;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      taken_q  <= '0;
      mutex_ev <= '0;
      for (int m = 0; m < N_MUTEX; m++) begin
        owner_q[m]   <= '0;
        waiters_q[m] <= '0;
      end
    end else begin
      taken_q   <= taken_d;
      owner_q   <= owner_d;
      waiters_q <= waiters_d;
      mutex_ev  <= ev_d;
    end
  end

  always_comb begin
    rd_data = '0;
    if (32'(rd_idx) < N_MUTEX) begin
      rd_data[31]  = taken_q[rd_idx];
      rd_data[4:0] = 5'(owner_q[rd_idx]);
    end
  end

endmodule
