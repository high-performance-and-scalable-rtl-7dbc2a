// tb_async_fifo: unit test of the dual-clock FIFO (DEPTH 8, WIDTH 16).
//
// With both clocks equal it checks the crossing delay: a word written at
// one edge makes rempty fall after the second following read edge, not
// before. It checks that wfull rises after DEPTH words and that a further
// write is dropped. Then it streams 3000 random words between unrelated
// clocks (write faster than read, then read faster than write) with random
// push and pop enables, comparing every word read with a reference queue.
module tb_async_fifo;
  localparam int W = 16, D = 8;

  logic wclk = 0, rclk = 0, rst_n = 0;
  int   whalf = 5, rhalf = 5;
  always #(whalf) wclk = ~wclk;
  always #(rhalf) rclk = ~rclk;

  logic         wr_en = 0, rd_en = 0, wfull, rempty;
  logic [W-1:0] wdata = '0, rdata;

  async_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [W-1:0] ref_q [$];
  bit streaming = 0;
  int n_read = 0;

  always @(posedge wclk) if (rst_n && wr_en && !wfull) ref_q.push_back(wdata);
  always @(posedge rclk) begin
    if (rst_n && rd_en && !rempty) begin
      check(ref_q.size() > 0 && rdata == ref_q[0], $sformatf("word %0d", n_read));
      if (ref_q.size() > 0) void'(ref_q.pop_front());
      n_read++;
    end
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge rclk);
    rst_n = 1;
    check(rempty && !wfull, "empty after reset");
    // crossing delay with equal clocks
    @(negedge wclk); wr_en = 1; wdata = 16'hA5A5;
    @(negedge wclk); wr_en = 0;
    check(rempty, "not visible right after the write edge");
    @(negedge rclk);
    check(rempty, "not visible one read edge after the write edge");
    @(negedge rclk);
    check(!rempty && rdata == 16'hA5A5, "visible two edges after the write");
    @(negedge rclk); rd_en = 1;
    @(negedge rclk); rd_en = 0;
    check(rempty, "empty again after the pop");
    // fill up
    for (int i = 0; i < D; i++) begin
      check(!wfull, $sformatf("room for word %0d", i));
      wr_en = 1; wdata = 16'(i + 1);
      @(negedge wclk);
    end
    check(wfull, "full after DEPTH words");
    wdata = 16'hFFFF;
    @(negedge wclk);
    wr_en = 0;
    check(ref_q.size() == D, "write while full is dropped");
    rd_en = 1;
    wait (ref_q.size() == 0);
    @(negedge rclk); rd_en = 0;
    // random streaming between unrelated clocks
    for (int phase = 0; phase < 2; phase++) begin
      whalf = (phase == 1) ? 9 : 3;
      rhalf = (phase == 1) ? 4 : 7;
      for (int i = 0; i < 1500; i++) begin
        @(negedge wclk);
        wr_en = ($urandom_range(0, 3) != 0);
        wdata = 16'($urandom);
        rd_en = ($urandom_range(0, 3) != 0);
      end
      wr_en = 0;
      rd_en = 1;
      wait (ref_q.size() == 0);
      repeat (4) @(negedge rclk);
      check(rempty, "drained");
      rd_en = 0;
    end
    check(n_read > 1500, $sformatf("%0d words streamed", n_read));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
