// nmpra_pipe_stage: one pipeline register boundary of the nMPRA processor,
// replicated once per semi-CPU ("independent pipeline registers").
//
// Each SCPU has its own copy of the register. The shared combinational logic
// in front of the boundary (ALU, control, memories) works for the selected
// thread only: its result `d` is written into the selected thread's copy
// (the demultiplexer) and the selected copy drives `q` (the multiplexer).
// Copies of the other threads hold their contents, so a preempted thread
// resumes with its pipeline state intact and a task switch needs no context
// save. A copy is written only when the selected thread is not stalled and
// `adv` (the processor's own pipeline advance) is high. flush[i] clears
// thread i's copy (a bubble) and has priority over a write.
//
// Timing: `q` is combinational from `sel`; a write lands at the clock edge.
// Replication per thread and per-thread stall/flush follow the design
// description; the width of each boundary belongs to the processor core and
// is a parameter here.
module nmpra_pipe_stage
  import nhse_pkg::*;
#(
  parameter int unsigned N_TASKS = N_TASKS_DEF,
  parameter int unsigned W       = 64
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [ID_W-1:0]    sel,
  input  logic               adv,
  input  logic [N_TASKS-1:0] stall,
  input  logic [N_TASKS-1:0] flush,
  input  logic [W-1:0]       d,
  output logic [W-1:0]       q
);

  logic [W-1:0] regs [N_TASKS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_TASKS; i++) regs[i] <= '0;
    end else begin
      for (int i = 0; i < N_TASKS; i++) begin
        if (flush[i])
          regs[i] <= '0;
        else if (adv && !stall[i] && sel == ID_W'(i))
          regs[i] <= d;
      end
    end
  end

  assign q = (32'(sel) < N_TASKS) ? regs[sel] : '0;

endmodule
