// tb_nhse_gr_mutex: self-checking testbench of the grMutex bank. Runs random
// acquire/release requests from all tasks against a reference model of the
// rules (a free mutex goes to the requester, only the owner releases, failed
// requesters get a mutex event on release, lower task index first within a
// cycle) and compares the bus read-back and the events every cycle.
module tb_nhse_gr_mutex;
  import nhse_pkg::*;

  localparam int N  = 5;
  localparam int NM = 25;

  logic           clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0]   req_valid = '0, req_release = '0;
  logic [4:0]     req_idx [N];
  logic [4:0]     rd_idx = '0;
  logic [31:0]    rd_data;
  logic [N-1:0]   mutex_ev;

  int checks = 0, failures = 0, cyc = 0;
  int acquires = 0, refused = 0, bad_release = 0, events = 0;

  // Reference model.
  bit             m_taken [NM];
  int             m_owner [NM];
  bit [N-1:0]     m_wait  [NM];
  bit [N-1:0]     m_ev;

  nhse_gr_mutex dut (.*);

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
    for (int t = 0; t < N; t++) req_idx[t] = '0;
    for (int m = 0; m < NM; m++) begin m_taken[m] = 0; m_owner[m] = 0; m_wait[m] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      // Check outputs produced by the previous requests.
      check(mutex_ev == m_ev, $sformatf("mutex events %b, expected %b", mutex_ev, m_ev));
      for (int m = 0; m < NM; m++) begin
        rd_idx = 5'(m);
        #1;
        check(rd_data == {m_taken[m], 26'b0, 5'(m_owner[m])},
              $sformatf("mutex %0d reads %h", m, rd_data));
      end
      // New random requests on a few mutexes so that conflicts happen.
      m_ev = '0;
      for (int t = 0; t < N; t++) begin
        req_valid[t]   = ($urandom_range(0, 2) == 0);
        req_release[t] = $urandom_range(0, 1);
        req_idx[t]     = 5'($urandom_range(0, 3) == 0 ? $urandom_range(0, 31) : $urandom_range(0, 2));
        if (req_valid[t] && req_idx[t] < NM) begin
          int m;
          m = int'(req_idx[t]);
          if (!req_release[t]) begin
            if (!m_taken[m]) begin m_taken[m] = 1; m_owner[m] = t; acquires++; end
            else if (m_owner[m] != t) begin m_wait[m][t] = 1'b1; refused++; end
          end else if (m_taken[m] && m_owner[m] == t) begin
            m_taken[m] = 0;
            m_ev |= m_wait[m];
            if (m_wait[m] != 0) events++;
            m_wait[m] = '0;
          end else if (m_taken[m]) begin
            bad_release++;
          end
        end
      end
    end
    check(acquires > 100 && refused > 100 && bad_release > 50 && events > 50,
          $sformatf("coverage: %0d acquires, %0d refused, %0d foreign releases, %0d events",
                    acquires, refused, bad_release, events));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
