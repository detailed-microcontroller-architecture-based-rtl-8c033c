// tb_nhse_gr_int: self-checking testbench of the grINT_ID bank. Attaches each
// interrupt line to a random task, raises random interrupt edges and checks
// that exactly the attached tasks receive a one-cycle interrupt event one
// cycle later, that a held line gives only one event, and the read-back.
module tb_nhse_gr_int;
  import nhse_pkg::*;

  localparam int N = 5, NI = 8;

  logic           clk = 1'b0, rst_n = 1'b0;
  logic [NI-1:0]  irq = '0, irq_prev = '0;
  logic           wr_en = 1'b0;
  logic [5:0]     wr_idx = '0, rd_idx = '0;
  logic [2:0]     wr_id = '0;
  logic [31:0]    rd_data;
  logic [N-1:0]   int_ev, exp_ev;
  int             attach [NI];

  int checks = 0, failures = 0, cyc = 0, fired = 0;

  nhse_gr_int dut (.*);

  always #50 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (cycle %0d)", what, cyc);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // Reset: every line attached to SCPU0.
    for (int j = 0; j < NI; j++) begin
      rd_idx = 6'(j); #1;
      check(rd_data == 0, "reset attachment is SCPU0");
    end
    for (int round = 0; round < 20; round++) begin
      for (int j = 0; j < NI; j++) begin
        @(negedge clk);
        attach[j] = $urandom_range(0, N - 1);
        wr_en = 1'b1; wr_idx = 6'(j); wr_id = 3'(attach[j]);
      end
      @(negedge clk);
      wr_en = 1'b0;
      for (int j = 0; j < NI; j++) begin
        rd_idx = 6'(j); #1;
        check(rd_data == 32'(attach[j]), $sformatf("grINT_ID%0d read-back", j));
      end
      for (int k = 0; k < 30; k++) begin
        @(negedge clk);
        irq_prev = irq;
        irq = NI'($urandom);
        exp_ev = '0;
        for (int j = 0; j < NI; j++)
          if (irq[j] && !irq_prev[j]) exp_ev[attach[j]] = 1'b1;
        @(negedge clk);
        check(int_ev == exp_ev, $sformatf("int_ev %b expected %b", int_ev, exp_ev));
        if (exp_ev != 0) fired++;
        irq_prev = irq;
        // Held lines: no new event.
        @(negedge clk);
        check(int_ev == '0, "held interrupt gives a single event");
      end
    end
    check(fired > 100, "interrupts fired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
