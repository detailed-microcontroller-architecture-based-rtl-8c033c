// nhse_gr_erf: the grERF event/message registers of the global nHSE block.
//
// Each register holds, from bit 31 down: an event bit, the source task id,
// the destination task id and a message (nhse_pkg::erf_t), after the grERF
// register table. A task sends a message by writing a register with the
// event bit set and the destination id of the receiver; the receiver sees
// its synchronisation event (syn_ev, a level held while any active event
// names it as destination), is woken from `wait` if SynEv is enabled, reads
// the register over the slow bus and clears the event bit by writing it back.
// All fields are read/write over the slow bus (combinational read; nHSE_gr
// registers it).
//
// Timing: syn_ev is registered, one cycle after the write. N_ERF defaults to
// N_TASKS squared (number of tasks to the power of two); the exact bit
// positions of the fields are this design's choice.
module nhse_gr_erf
  import nhse_pkg::*;
#(
  parameter int unsigned N_TASKS = N_TASKS_DEF,
  parameter int unsigned N_ERF   = N_TASKS * N_TASKS,
  parameter int unsigned IDX_W   = 6
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               wr_en,
  input  logic [IDX_W-1:0]   wr_idx,
  input  erf_t               wr_data,
  input  logic [IDX_W-1:0]   rd_idx,
  output erf_t               rd_data,
  output logic [N_TASKS-1:0] syn_ev
);

  localparam int unsigned AW = (N_ERF > 1) ? $clog2(N_ERF) : 1;

  erf_t               erf [N_ERF];
  logic [N_TASKS-1:0] ev_d;

  always_comb begin
    ev_d = '0;
    for (int e = 0; e < N_ERF; e++)
      if (erf[e].event_on && 32'(erf[e].dst_id) < N_TASKS)
        ev_d[erf[e].dst_id] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      syn_ev <= '0;
      for (int e = 0; e < N_ERF; e++) erf[e] <= '0;
    end else begin
      syn_ev <= ev_d;
      if (wr_en && 32'(wr_idx) < N_ERF) erf[wr_idx[AW-1:0]] <= wr_data;
    end
  end

  assign rd_data = (32'(rd_idx) < N_ERF) ? erf[rd_idx[AW-1:0]] : '0;

endmodule
