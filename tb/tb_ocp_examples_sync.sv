// tb_ocp_examples_sync: the transfer examples of tb_ocp_examples (simple
// transfers, bursts, tagged transfers and the idle-link read round trip),
// run with both system blocks in synchronous mode (M_ASYNC = S_ASYNC = 0)
// and one clock for both cores and the OCP interface. The responses and
// their order must be the same as in asynchronous mode; the round trip
// must shrink to 8 clocks, because each of the four FIFOs then passes a
// word in one clock instead of three.
module tb_ocp_examples_sync;
  import ocp_pkg::*;

  localparam int RT_CLOCKS = 8;    // see the timing note in ocp_top
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              breq_valid = 0, breq_ready, wd_valid = 0, wd_ready, rsp_valid;
  logic              rsp_ready = 1;
  burst_req_t        breq = '0;
  logic [DATA_W-1:0] wd_data = '0;
  resp_t             rsp;

  ocp_top #(.M_ASYNC(1'b0), .S_ASYNC(1'b0)) dut (.m_clk(clk), .ocp_clk(clk), .s_clk(clk), .rst_n, .breq_valid, .breq_ready,
               .breq, .wd_valid, .wd_ready, .wd_data, .rsp_valid, .rsp_ready, .rsp);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  burst_req_t  dq [$];
  logic [31:0] wq [$];
  resp_t       got [$];

  always @(negedge clk) begin
    breq_valid = rst_n && dq.size() > 0;
    breq       = (dq.size() > 0) ? dq[0] : '0;
    wd_valid   = rst_n && wq.size() > 0;
    wd_data    = (wq.size() > 0) ? wq[0] : '0;
  end
  always @(posedge clk) begin
    if (rst_n) begin
      if (breq_valid && breq_ready) begin void'(dq.pop_front()); take_cyc = cyc; end
      if (wd_valid && wd_ready) void'(wq.pop_front());
      if (rsp_valid && rsp_ready) begin got.push_back(rsp); rsp_cyc = cyc; end
    end
  end

  // OCP request monitor: clock of each accepted read request and MReqLast
  int cyc = 0, take_cyc = 0, rsp_cyc = 0;
  int rd_cyc [$];
  logic rd_last [$];
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && dut.bus.MCmd == CMD_RD && dut.bus.SCmdAccept) begin
      rd_cyc.push_back(cyc);
      rd_last.push_back(dut.bus.MReqLast);
    end
  end

  function automatic burst_req_t d(input mcmd_e c, input logic [31:0] a, input int len,
                                    input logic [TAG_W-1:0] t, input logic io);
    return '{cmd: c, addr: a, len: BLEN_W'(len), tag: t, inorder: io};
  endfunction

  task automatic settle();
    wait (dq.size() == 0 && wq.size() == 0);
    repeat (40) @(posedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // ---- 1. simple transfers
    dq.push_back(d(CMD_WR, 32'h40, 1, 0, 1)); wq.push_back(32'h11223344);
    dq.push_back(d(CMD_WR, 32'h44, 1, 0, 1)); wq.push_back(32'haabbccdd);
    dq.push_back(d(CMD_RD, 32'h40, 1, 0, 1));
    dq.push_back(d(CMD_RD, 32'h44, 1, 0, 1));
    dq.push_back(d(CMD_WRNP, 32'h48, 1, 0, 1)); wq.push_back(32'h12345678);
    settle();
    check(got.size() == 3, $sformatf("simple: 3 responses (WR posted), got %0d", got.size()));
    if (got.size() == 3) begin
      check(got[0].resp == RESP_DVA && got[0].data == 32'h11223344 && got[0].last, "simple: RD 0x40");
      check(got[1].resp == RESP_DVA && got[1].data == 32'haabbccdd && got[1].last, "simple: RD 0x44");
      check(got[2].resp == RESP_DVA && got[2].data == 32'h0, "simple: WRNP answered with DVA");
    end
    got.delete(); rd_cyc.delete(); rd_last.delete();
    // ---- 2. bursts
    dq.push_back(d(CMD_WR, 32'h0, 4, 0, 1));
    for (int i = 0; i < 4; i++) wq.push_back(32'hD000_0000 + i);
    settle();
    dq.push_back(d(CMD_RD, 32'h0, 4, 0, 1));
    settle();
    check(rd_cyc.size() == 4, "burst: four read requests");
    if (rd_cyc.size() == 4) begin
      check(rd_cyc[3] - rd_cyc[0] == 3, $sformatf("burst: requests pipelined over %0d clocks",
                                                  rd_cyc[3] - rd_cyc[0] + 1));
      check(!rd_last[0] && !rd_last[1] && !rd_last[2] && rd_last[3], "burst: MReqLast on the 4th");
    end
    check(got.size() == 4, "burst: four responses");
    foreach (got[i]) begin
      check(got[i].data == 32'hD000_0000 + i, $sformatf("burst: word %0d", i));
      check(got[i].last == (i == 3), $sformatf("burst: SRespLast on word %0d", i));
    end
    got.delete();
    // ---- 3. tagged transfers
    dq.push_back(d(CMD_RD, 32'h0C, 1, 0, 0));                             // RD1, ID0
    dq.push_back(d(CMD_WR, 32'h20, 1, 0, 1)); wq.push_back(32'hD2D2_0002); // WR2, in order
    dq.push_back(d(CMD_RD, 32'h20, 1, 1, 0));                             // RD3, ID1
    dq.push_back(d(CMD_RD, 32'h44, 1, 0, 1));                             // RD4, in order
    settle();

    check(got.size() == 3, "tagged: three responses");
    if (got.size() == 3) begin
      check(got[0].inorder && got[0].data == 32'haabbccdd, "tagged: RD4 answered first");
      check(!got[1].inorder && got[1].tag == 1 && got[1].data == 32'hD2D2_0002,
            "tagged: RD3 (ID1) second, with WR2's data");
      check(!got[2].inorder && got[2].tag == 0 && got[2].data == 32'hD000_0003,
            "tagged: RD1 (ID0) last");
    end
    // ---- 4. round trip of one read on an idle link
    got.delete();
    dq.push_back(d(CMD_RD, 32'h40, 1, 0, 1));
    wait (got.size() == 1);
    $display("read round trip: %0d clocks from descriptor to response", rsp_cyc - take_cyc);
    check(rsp_cyc - take_cyc == RT_CLOCKS, "read round trip on an idle link");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
