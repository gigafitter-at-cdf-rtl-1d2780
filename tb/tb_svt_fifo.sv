// tb_svt_fifo: self-checking test of the SVT FIFO at its default size
// (23-bit words, 64 deep, almost-full 16 places before full).
//
// Random writes and reads, including writes while full, are compared each
// clock with a queue model: the show-ahead head word, empty, full, the
// almost-full (HOLD) threshold, the word count, and the one-clock overflow
// pulse on a write that had to be dropped.
module tb_svt_fifo;
  localparam int W = 23, DEPTH = 64, AFM = 16;
  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;

  logic         wr_en = 0, rd_en = 0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic         empty, full, almost_full, overflow;
  logic [6:0]   count;

  svt_fifo dut (.clk, .rst_n, .wr_en, .wr_data, .rd_en, .rd_data, .empty, .full,
                .almost_full, .count, .overflow);

  int checks = 0, failures = 0, n_ovf = 0, n_full = 0;
  logic [W-1:0] q [$];
  logic exp_ov = 0;

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
    for (int i = 0; i < 20000; i++) begin
      int phase;
      @(negedge clk);
      // outputs of the previous clock edge
      check(empty == (q.size() == 0), "empty");
      check(full == (q.size() == DEPTH), "full");
      check(almost_full == (q.size() >= DEPTH - AFM), "almost_full");
      check(count == 7'(q.size()), "count");
      check(overflow == exp_ov, "overflow");
      if (q.size() > 0) check(rd_data == q[0], "head word");
      if (full) n_full++;
      // new stimulus; phases fill the FIFO and drain it
      phase = (i / 500) % 3;
      wr_en   = $urandom_range(0, 99) < ((phase == 0) ? 90 : (phase == 1) ? 50 : 20);
      rd_en   = $urandom_range(0, 99) < ((phase == 0) ? 20 : (phase == 1) ? 50 : 90);
      wr_data = W'($urandom);
      // model update for the coming edge
      begin
        bit do_rd, do_wr;
        do_rd = rd_en && q.size() > 0;
        do_wr = wr_en && (q.size() < DEPTH || do_rd);
        exp_ov = wr_en && !do_wr;
        if (exp_ov) n_ovf++;
        if (do_rd) void'(q.pop_front());
        if (do_wr) q.push_back(wr_data);
      end
    end
    checks++;
    if (n_ovf == 0 || n_full == 0) begin failures++; $display("never full or overflowed"); end
    $display("full cycles=%0d overflows=%0d", n_full, n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
