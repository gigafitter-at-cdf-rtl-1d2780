// tb_gf_error_reg: self-checking test of the error register.
//
// Random one-clock error reports, clears, end-event acknowledgements and
// severity masks are applied; each clock the sticky status, the per-event
// error field and the SVT_ERROR output are compared with a model.
module tb_gf_error_reg;
  import gf_pkg::*;
  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;

  logic [ERR_W-1:0] err_in = '0, severity = '0, status, event_err;
  logic             clear = 0, ee_sent = 0, svt_error;

  gf_error_reg dut (.clk, .rst_n, .err_in, .severity, .clear, .ee_sent, .status,
                    .event_err, .svt_error);

  int checks = 0, failures = 0, n_sev = 0;
  logic [ERR_W-1:0] m_status = '0, m_event = '0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      check(status == m_status, "status");
      check(event_err == m_event, "event_err");
      check(svt_error == |(m_status & severity), "svt_error");
      if (svt_error) n_sev++;
      err_in   = '0;
      if ($urandom_range(0, 9) == 0) err_in[$urandom_range(0, 4)] = 1'b1;
      clear    = ($urandom_range(0, 49) == 0);
      ee_sent  = ($urandom_range(0, 19) == 0);
      if (i % 100 == 0) severity = ERR_W'($urandom_range(0, 31));
      m_status = (clear ? '0 : m_status) | err_in;
      m_event  = (ee_sent ? '0 : m_event) | err_in;
    end
    checks++;
    if (n_sev == 0) begin failures++; $display("no severe error seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
