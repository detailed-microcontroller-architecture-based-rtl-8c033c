// nhse_gr_int: the grINT_ID registers of the global nHSE block.
//
// One register per interrupt source holds the id (bits 2..0) of the semi-CPU
// that executes that source's interrupt routine, as in the grINT_ID register
// table. A rising edge on an interrupt line raises a one-cycle interrupt event
// (int_ev) for the attached task, which its local block turns into the IntEv
// bit of crEV and, if enabled, a wake-up. The registers are written and read
// through the slow bus (combinational read; nHSE_gr registers it).
//
// Timing: int_ev follows the sampled rising edge by one cycle. The number of
// interrupt sources, edge detection and the reset value 0 (all interrupts
// attached to SCPU0) are this design's choices.
module nhse_gr_int
  import nhse_pkg::*;
#(
  parameter int unsigned N_TASKS = N_TASKS_DEF,
  parameter int unsigned N_IRQ   = 8,
  parameter int unsigned IDX_W   = 6
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [N_IRQ-1:0]   irq,
  input  logic               wr_en,
  input  logic [IDX_W-1:0]   wr_idx,
  input  logic [ID_W-1:0]    wr_id,
  input  logic [IDX_W-1:0]   rd_idx,
  output logic [31:0]        rd_data,
  output logic [N_TASKS-1:0] int_ev
);

  localparam int unsigned AW = (N_IRQ > 1) ? $clog2(N_IRQ) : 1;

  logic [ID_W-1:0]  int_id [N_IRQ];
  logic [N_IRQ-1:0] irq_q;
  logic [N_TASKS-1:0] ev_d;

  always_comb begin
    ev_d = '0;
    for (int j = 0; j < N_IRQ; j++)
      if (irq[j] && !irq_q[j] && 32'(int_id[j]) < N_TASKS)
        ev_d[int_id[j]] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      irq_q  <= '0;
      int_ev <= '0;
      for (int j = 0; j < N_IRQ; j++) int_id[j] <= '0;
    end else begin
      irq_q  <= irq;
      int_ev <= ev_d;
      if (wr_en && 32'(wr_idx) < N_IRQ) int_id[wr_idx[AW-1:0]] <= wr_id;
    end
  end

  always_comb begin
    rd_data = '0;
    if (32'(rd_idx) < N_IRQ) rd_data[ID_W-1:0] = int_id[rd_idx[AW-1:0]];
  end

endmodule
