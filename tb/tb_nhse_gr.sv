// tb_nhse_gr: self-checking testbench of the global nHSE block. Drives the
// slow bus and the local-block inputs and checks the address decode and the
// 1-cycle bus response, interrupt routing through grINT_ID, message events
// through grERF, mutex status read over the bus, the scheduler status word,
// and that only SCPU0 can write the scheduler configuration.
module tb_nhse_gr;
  import nhse_pkg::*;

  localparam int N = 5, NI = 8;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          bus_sel = 1'b0, bus_we = 1'b0;
  logic [7:0]    bus_addr = '0;
  logic [31:0]   bus_wdata = '0, bus_rdata;
  logic          bus_ack;
  logic [NI-1:0] irq = '0;
  logic [N-1:0]  mtx_req_valid = '0, mtx_req_release = '0;
  logic [4:0]    mtx_req_idx [N];
  logic [N-1:0]  task_run = '0, task_deep_sleep = '0, task_need_reset = '0;
  logic [N-1:0]  int_ev, mutex_ev, syn_ev;
  logic [ID_W-1:0] sel_thread;
  logic          sel_valid;
  logic [N-1:0]  thread_stall, flush_pipe, thread_start_again, thread_reset_stall;
  sched_state_e  sched_state;
  logic [N-1:0]  aq_mask, itq_mask, ltq_mask;

  int checks = 0, failures = 0, cyc = 0;

  nhse_gr dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (cycle %0d)", what, cyc);
    end
  endtask

  task automatic bus_write(input gr_region_e r, input int idx, input logic [31:0] d);
    @(negedge clk);
    bus_sel = 1'b1; bus_we = 1'b1; bus_addr = {r, 6'(idx)}; bus_wdata = d;
    @(negedge clk);
    check(bus_ack, "write acknowledged after one cycle");
    bus_sel = 1'b0; bus_we = 1'b0;
  endtask

  task automatic bus_read(input gr_region_e r, input int idx, output logic [31:0] d);
    @(negedge clk);
    bus_sel = 1'b1; bus_we = 1'b0; bus_addr = {r, 6'(idx)};
    @(negedge clk);
    check(bus_ack, "read acknowledged after one cycle");
    d = bus_rdata;
    bus_sel = 1'b0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    erf_t e;
    for (int t = 0; t < N; t++) mtx_req_idx[t] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // Scheduler: all tasks run, SCPU0 selected.
    task_run = '1;
    repeat (7) @(negedge clk);
    check(sel_valid && sel_thread == 0 && !thread_stall[0], "SCPU0 running");
    bus_read(GR_SCHED, 2, d);
    check(d[2:0] == 3'd0 && d[3] && d[5:4] == SCH_RUNNING && d[15:8] == 8'h1f,
          $sformatf("status word %h", d));

    // Configuration by SCPU0 is accepted.
    bus_write(GR_SCHED, 0, 32'd30);
    bus_read(GR_SCHED, 0, d);
    check(d == 30, "LTQ limit written by SCPU0");
    bus_read(GR_SCHED, 1, d);
    check(d == RR_QUANTUM_DEF, "RR quantum default");

    // Interrupt attach and routing.
    bus_write(GR_INTID, 2, 32'd3);
    bus_write(GR_INTID, 5, 32'd4);
    bus_read(GR_INTID, 2, d);
    check(d == 3, "grINT_ID2 read back");
    @(negedge clk); irq[2] = 1'b1;
    @(negedge clk);
    check(int_ev == 5'b01000, "irq2 -> SCPU3 event");
    irq[5] = 1'b1;
    @(negedge clk);
    check(int_ev == 5'b10000, "irq5 -> SCPU4 event");
    irq = '0;

    // Message to SCPU2.
    e = '0; e.event_on = 1'b1; e.src_id = 3'd0; e.dst_id = 3'd2; e.message = 25'h12345;
    bus_write(GR_ERF, 7, 32'(e));
    @(negedge clk);
    check(syn_ev == 5'b00100, "message event for SCPU2");
    bus_read(GR_ERF, 7, d);
    check(d == 32'(e), "grERF7 read back");
    e.event_on = 1'b0;
    bus_write(GR_ERF, 7, 32'(e));
    @(negedge clk);
    check(syn_ev == '0, "message event cleared");

    // Mutex acquired through the local request port, read over the bus.
    @(negedge clk);
    mtx_req_valid[3] = 1'b1; mtx_req_idx[3] = 5'd9;
    @(negedge clk);
    mtx_req_valid[3] = 1'b0;
    bus_read(GR_MUTEX, 9, d);
    check(d == 32'h8000_0003, $sformatf("grMutex9 taken by SCPU3, %h", d));
    bus_write(GR_MUTEX, 9, 32'h0);
    bus_read(GR_MUTEX, 9, d);
    check(d == 32'h8000_0003, "grMutex is read-only on the bus");

    // SCPU0 sleeps: SCPU1 runs and its configuration write is ignored.
    task_deep_sleep[0] = 1'b1;
    repeat (7) @(negedge clk);
    check(sel_thread == 1 && !thread_stall[1], "SCPU1 running");
    bus_write(GR_SCHED, 1, 32'd5);
    bus_read(GR_SCHED, 1, d);
    check(d == RR_QUANTUM_DEF, "configuration write by SCPU1 ignored");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
