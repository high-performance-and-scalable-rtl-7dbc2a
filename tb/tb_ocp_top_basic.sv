// tb_ocp_top_basic: end-to-end test of the OCP interface without the data
// handshake (DATA_HS = 0), the basic transfer style in which a write word
// travels on MData together with its request and is taken with
// SCmdAccept.
//
// The traffic, the three unrelated clocks, the per-class address regions
// and the response checks are those of tb_ocp_top. The mechanism counters
// differ: MDataValid and SDataAccept must stay low throughout, and
// SCmdAccept must fall at least once while a write is offered (the slave's
// write-data queue is then full), besides the stalls, bursts, transfer
// types and reordering counted as in tb_ocp_top.
module tb_ocp_top_basic;
  import ocp_pkg::*;

  localparam int N_RANDOM  = 300;
  localparam int REGION    = 64;          // words per request class
  localparam int MAX_LEN   = 8;

  logic m_clk = 0, ocp_clk = 0, s_clk = 0, rst_n = 0;
  always #5  m_clk   = ~m_clk;
  always #4  ocp_clk = ~ocp_clk;
  always #11 s_clk   = ~s_clk;

  logic              breq_valid, breq_ready, wd_valid, wd_ready, rsp_valid;
  logic              rsp_ready = 0;
  burst_req_t        breq;
  logic [DATA_W-1:0] wd_data;
  resp_t             rsp;

  ocp_top #(.DATA_HS(1'b0)) dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---- stimulus lists, built before the run
  typedef struct {
    logic [31:0] seq;
    logic        read;
    logic [31:0] data;
    logic        last;
  } exp_t;

  burst_req_t  descs [$];
  logic [31:0] wwords [$];
  exp_t        expq [3][$];
  logic [31:0] model [3*REGION];
  int          n_expected = 0;
  int          seqno = 0;

  function automatic int cls_of(input logic inorder, input logic [TAG_W-1:0] tag);
    return inorder ? 2 : int'(tag);
  endfunction

  task automatic add_burst(input mcmd_e cmd, input int cls, input int off, input int len,
                           input logic [TAG_W-1:0] tag);
    burst_req_t d;
    exp_t e;
    d.cmd = cmd;
    d.addr = 32'((cls * REGION + off) * WORD_BYTES);
    d.len = BLEN_W'(len);
    d.tag = tag;
    d.inorder = (cls == 2);
    descs.push_back(d);
    for (int i = 0; i < len; i++) begin
      int w;
      w = cls * REGION + off + i;
      e.seq = seqno;
      e.last = (i == len - 1);
      if (cmd == CMD_RD) begin
        e.read = 1;
        e.data = model[w];
        expq[cls].push_back(e);
        n_expected++;
      end else begin
        logic [31:0] v;
        v = $urandom;
        wwords.push_back(v);
        model[w] = v;
        if (cmd == CMD_WRNP) begin
          e.read = 0;
          e.data = '0;
          expq[cls].push_back(e);
          n_expected++;
        end
      end
    end
    seqno++;
  endtask

  // ---- drivers (m_clk domain)
  int di = 0, wi = 0, cyc = 0;
  always @(posedge m_clk) begin
    if (rst_n) begin
      if (breq_valid && breq_ready) di <= di + 1;
      if (wd_valid && wd_ready)     wi <= wi + 1;
      // long stretches of slow acceptance let the response FIFOs fill
      rsp_ready <= ($urandom_range(0, 9) < (((cyc / 300) % 2 == 1) ? 1 : 7));
      cyc <= cyc + 1;
    end
  end
  assign breq_valid = rst_n && (di < descs.size());
  assign breq       = (di < descs.size()) ? descs[di] : '{cmd: CMD_IDLE, default: '0};
  assign wd_valid   = rst_n && (wi < wwords.size());
  assign wd_data    = (wi < wwords.size()) ? wwords[wi] : '0;

  // ---- response checker
  int n_got = 0, max_seq = -1, n_reorder = 0, n_last = 0, n_inorder_rsp = 0;
  int n_tag_rsp [NUM_TAGS];
  always @(posedge m_clk) begin
    if (rst_n && rsp_valid && rsp_ready) begin
      int c;
      exp_t e;
      c = cls_of(rsp.inorder, rsp.tag);
      n_got <= n_got + 1;
      if (expq[c].size() == 0) begin
        check(0, $sformatf("unexpected response class %0d", c));
      end else begin
        e = expq[c].pop_front();
        check(rsp.resp == RESP_DVA, "response code DVA");
        check(rsp.data == e.data, $sformatf("class %0d seq %0d data %h expected %h",
                                            c, e.seq, rsp.data, e.data));
        check(rsp.last == e.last, $sformatf("class %0d seq %0d SRespLast", c, e.seq));
        if (int'(e.seq) < max_seq) n_reorder <= n_reorder + 1;
        else max_seq <= int'(e.seq);
        if (rsp.last) n_last <= n_last + 1;
        if (rsp.inorder) n_inorder_rsp <= n_inorder_rsp + 1;
        else n_tag_rsp[rsp.tag] <= n_tag_rsp[rsp.tag] + 1;
      end
    end
  end

  // ---- bus activity counters (OCP clock domain)
  int n_cmd_stall = 0, n_resp_stall = 0, n_burst_last = 0;
  int n_wr_posted = 0, n_wrnp = 0, n_rd = 0, n_data_hs = 0, n_wr_stall = 0;
  always @(posedge ocp_clk) begin
    if (rst_n) begin
      if (dut.bus.MCmd != CMD_IDLE && !dut.bus.SCmdAccept) n_cmd_stall <= n_cmd_stall + 1;
      if (dut.bus.MDataValid || dut.bus.SDataAccept)       n_data_hs <= n_data_hs + 1;
      if (dut.bus.MCmd != CMD_IDLE && dut.bus.MCmd != CMD_RD && !dut.bus.SCmdAccept)
        n_wr_stall <= n_wr_stall + 1;
      if (dut.bus.SResp != RESP_NULL && !dut.bus.MRespAccept) n_resp_stall <= n_resp_stall + 1;
      if (dut.bus.MCmd != CMD_IDLE && dut.bus.SCmdAccept) begin
        if (dut.bus.MReqLast && dut.bus.MBurstLength > 1) n_burst_last <= n_burst_last + 1;
        if (dut.bus.MCmd == CMD_WR)   n_wr_posted <= n_wr_posted + 1;
        if (dut.bus.MCmd == CMD_WRNP) n_wrnp <= n_wrnp + 1;
        if (dut.bus.MCmd == CMD_RD)   n_rd <= n_rd + 1;
      end
    end
  end

  // ---- watchdog
  initial begin
    repeat (400000) @(posedge m_clk);
    failures++;
    $display("FAIL: watchdog expired, %0d of %0d responses", n_got, n_expected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic mech(input string name, input int count);
    $display("  %-28s %0d", name, count);
    check(count > 0, {"mechanism never happened: ", name});
  endtask

  initial begin
    foreach (n_tag_rsp[t]) n_tag_rsp[t] = 0;
    // fill every word of every region with non-posted write bursts
    for (int c = 0; c < 3; c++)
      for (int off = 0; off < REGION; off += MAX_LEN)
        add_burst(CMD_WRNP, c, off, MAX_LEN, TAG_W'(c % NUM_TAGS));
    // random traffic
    for (int n = 0; n < N_RANDOM; n++) begin
      automatic int c   = $urandom_range(0, 2);
      automatic int len = ($urandom_range(0, 2) == 0) ? 1 : $urandom_range(2, MAX_LEN);
      automatic int off = $urandom_range(0, REGION - len);
      automatic int k   = $urandom_range(0, 3);
      automatic mcmd_e cmd = (k == 0) ? CMD_WR : (k == 1) ? CMD_WRNP : CMD_RD;
      automatic logic [TAG_W-1:0] tag = (c == 2) ? TAG_W'($urandom_range(0, NUM_TAGS - 1)) : TAG_W'(c);
      add_burst(cmd, c, off, len, tag);
    end
    repeat (5) @(posedge s_clk);
    rst_n = 1;
    wait (n_got == n_expected && di == descs.size() && wi == wwords.size());
    repeat (50) @(posedge s_clk);
    check(n_got == n_expected, "response count");
    check(!rsp_valid, "no response left over (posted WR gets none)");
    $display("tb_ocp_top_basic: %0d bursts, %0d responses", descs.size(), n_got);
    mech("SCmdAccept stall", n_cmd_stall);
    mech("write request stalled", n_wr_stall);
    check(n_data_hs == 0, "no data handshake activity");
    mech("MRespAccept stall", n_resp_stall);
    mech("burst MReqLast", n_burst_last);
    mech("SRespLast", n_last);
    mech("posted WR", n_wr_posted);
    mech("WRNP", n_wrnp);
    mech("RD", n_rd);
    mech("in-order response", n_inorder_rsp);
    mech("tag 0 response", n_tag_rsp[0]);
    mech("tag 1 response", n_tag_rsp[1]);
    mech("reordered response", n_reorder);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
