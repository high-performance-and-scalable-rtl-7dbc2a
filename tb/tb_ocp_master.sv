// tb_ocp_master: unit test of the OCP master.
//
// The testbench feeds burst descriptors and write data words and plays the
// OCP slave with its own SCmdAccept, SDataAccept and response driving.
// First a 4-word read burst with SCmdAccept always high must go out on
// four consecutive clocks (the burst is pipelined without gaps) with
// INCR addresses, constant length and tag, and MReqLast on the last word.
// Then 40 random bursts run with random accepts; every accepted request
// beat and every accepted data word is compared with a list worked out
// from the descriptors, and no data word may be accepted before its
// request. Finally responses with random fields are offered while the core
// accepts only some of the time; each one must reach the core unchanged,
// exactly once.
module tb_ocp_master;
  import ocp_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  ocp_if bus (.clk(clk), .rst_n(rst_n));

  logic              breq_valid, breq_ready, wd_valid, wd_ready, rsp_valid;
  logic              rsp_ready = 0;
  burst_req_t        breq;
  logic [DATA_W-1:0] wd_data;
  resp_t             rsp;

  ocp_master dut (.bus, .breq_valid, .breq_ready, .breq, .wd_valid, .wd_ready, .wd_data,
                  .rsp_valid, .rsp_ready, .rsp);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  typedef struct {
    mcmd_e cmd; logic [31:0] addr; int len; logic [TAG_W-1:0] tag; logic inorder; logic last;
  } beat_t;

  burst_req_t  descs [$];
  logic [31:0] words [$];
  beat_t       exp_beats [$];
  logic [31:0] exp_words [$];

  task automatic add(input mcmd_e cmd, input logic [31:0] addr, input int len,
                     input logic [TAG_W-1:0] tag, input logic inorder);
    descs.push_back('{cmd: cmd, addr: addr, len: BLEN_W'(len), tag: tag, inorder: inorder});
    for (int i = 0; i < len; i++) begin
      exp_beats.push_back('{cmd, addr + 4 * i, len, tag, inorder, i == len - 1});
      if (cmd != CMD_RD) begin
        logic [31:0] v;
        v = $urandom;
        words.push_back(v);
        exp_words.push_back(v);
      end
    end
  endtask

  // core-side drivers
  int di = 0, wi = 0;
  assign breq_valid = rst_n && di < descs.size();
  assign breq       = (di < descs.size()) ? descs[di] : '{cmd: CMD_IDLE, default: '0};
  assign wd_valid   = rst_n && wi < words.size();
  assign wd_data    = (wi < words.size()) ? words[wi] : '0;

  // slave-side behaviour
  bit random_accept = 0;
  always @(negedge clk) begin
    bus.SCmdAccept  = random_accept ? ($urandom_range(0, 2) != 0) : 1'b1;
    bus.SDataAccept = random_accept ? ($urandom_range(0, 2) != 0) : 1'b1;
  end

  int n_req = 0, n_data = 0, n_wr_req = 0, first_cyc = -1, last_cyc = -1, cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (breq_valid && breq_ready) di <= di + 1;
      if (wd_valid && wd_ready) wi <= wi + 1;
      if (bus.MCmd != CMD_IDLE && bus.SCmdAccept) begin
        beat_t e;
        if (exp_beats.size() == 0) check(0, "request beyond the expected list");
        else begin
          e = exp_beats.pop_front();
          check(bus.MCmd == e.cmd && bus.MAddr == e.addr && bus.MBurstLength == BLEN_W'(e.len) &&
                bus.MTagID == e.tag && bus.MTagInOrder == e.inorder && bus.MReqLast == e.last &&
                bus.MBurstSeq == SEQ_INCR && bus.MBurstPrecise,
                $sformatf("request %0d: cmd %0d addr %h", n_req, bus.MCmd, bus.MAddr));
        end
        if (n_req == 0) first_cyc <= cyc;
        if (n_req == 3) last_cyc <= cyc;
        n_req <= n_req + 1;
        if (bus.MCmd != CMD_RD) n_wr_req <= n_wr_req + 1;
      end
      if (bus.MDataValid && bus.SDataAccept) begin
        check(n_data < n_wr_req, "data word accepted before its request");
        if (exp_words.size() == 0) check(0, "data beyond the expected list");
        else check(bus.MData == exp_words.pop_front(), $sformatf("data word %0d", n_data));
        n_data <= n_data + 1;
      end
    end
  end

  // response phase
  resp_t offered [$];
  int    n_rsp_ok = 0;
  initial begin
    bus.SResp = RESP_NULL; bus.SData = '0; bus.STagID = '0; bus.STagInOrder = 0; bus.SRespLast = 0;
  end
  always @(posedge clk) begin
    if (rst_n && rsp_valid && rsp_ready) begin
      check(offered.size() > 0 && rsp == offered[0], "response passed through unchanged");
      check(bus.MRespAccept, "MRespAccept follows the core's ready");
      if (offered.size() > 0) void'(offered.pop_front());
      n_rsp_ok <= n_rsp_ok + 1;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // pipelined burst
    add(CMD_RD, 32'h100, 4, 1, 0);
    wait (n_req == 4);
    @(posedge clk);
    check(last_cyc - first_cyc == 3, $sformatf("4-word burst took %0d clocks", last_cyc - first_cyc + 1));
    // a write burst and a non-posted write, then random bursts with random accepts
    add(CMD_WR, 32'h0, 3, 0, 0);
    add(CMD_WRNP, 32'h40, 1, 0, 1);
    random_accept = 1;
    for (int n = 0; n < 40; n++) begin
      int k;
      k = $urandom_range(0, 2);
      add(k == 0 ? CMD_WR : k == 1 ? CMD_WRNP : CMD_RD, 32'($urandom_range(0, 255)) << 2,
          $urandom_range(1, 15), TAG_W'($urandom_range(0, NUM_TAGS - 1)), 1'($urandom_range(0, 1)));
    end
    wait (exp_beats.size() == 0 && exp_words.size() == 0);
    repeat (5) @(posedge clk);
    check(!bus.MDataValid && bus.MCmd == CMD_IDLE, "bus idle at the end");
    // responses
    for (int n = 0; n < 20; n++) begin
      resp_t r;
      r.resp = (n % 4 == 3) ? RESP_ERR : RESP_DVA;
      r.data = $urandom; r.tag = TAG_W'(n); r.inorder = n[1]; r.last = n[2];
      offered.push_back(r);
      @(negedge clk);
      {bus.SResp, bus.SData, bus.STagID, bus.STagInOrder, bus.SRespLast} = r;
      rsp_ready = ($urandom_range(0, 1) != 0);
      while (!rsp_ready) begin
        @(negedge clk);
        rsp_ready = ($urandom_range(0, 1) != 0);
      end
      @(posedge clk);
    end
    @(negedge clk);
    bus.SResp = RESP_NULL;
    rsp_ready = 1;
    repeat (3) @(posedge clk);
    check(n_rsp_ok == 20, "all responses reached the core once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
