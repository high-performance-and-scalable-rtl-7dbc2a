// tb_ocp_sys_master: test of the system master across two clocks.
//
// The core side runs on clk (period 14), the OCP side on ocp_clk (period
// 10). The testbench plays an OCP slave with random SCmdAccept and
// SDataAccept backed by a memory: it pairs each accepted write request
// with its data word in order, executes requests in order and answers RD
// and WRNP with DVA (WR is posted). The core side writes random bursts and
// reads them back; every response that reaches the core side is compared
// with the expected data, and the count of responses with the count of RD
// and WRNP words sent.
module tb_ocp_sys_master;
  import ocp_pkg::*;

  logic clk = 0, ocp_clk = 0, rst_n = 0;
  always #7 clk = ~clk;
  always #5 ocp_clk = ~ocp_clk;

  ocp_if bus (.clk(ocp_clk), .rst_n(rst_n));

  logic              breq_valid, breq_ready, wd_valid, wd_ready, rsp_valid;
  logic              rsp_ready = 0;
  burst_req_t        breq;
  logic [DATA_W-1:0] wd_data;
  resp_t             rsp;

  ocp_sys_master dut (.clk, .rst_n, .bus, .breq_valid, .breq_ready, .breq, .wd_valid,
                      .wd_ready, .wd_data, .rsp_valid, .rsp_ready, .rsp);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- core side stimulus
  burst_req_t  descs [$];
  logic [31:0] words [$];
  logic [31:0] exp_data [$];
  logic [31:0] model [128];
  int di = 0, wi = 0;
  assign breq_valid = rst_n && di < descs.size();
  assign breq       = (di < descs.size()) ? descs[di] : '{cmd: CMD_IDLE, default: '0};
  assign wd_valid   = rst_n && wi < words.size();
  assign wd_data    = (wi < words.size()) ? words[wi] : '0;

  task automatic add(input mcmd_e cmd, input int word, input int len);
    descs.push_back('{cmd: cmd, addr: 32'(word * 4), len: BLEN_W'(len), tag: '0, inorder: 1'b1});
    for (int i = 0; i < len; i++) begin
      if (cmd == CMD_RD) exp_data.push_back(model[word + i]);
      else begin
        logic [31:0] v;
        v = $urandom;
        words.push_back(v);
        model[word + i] = v;
        if (cmd == CMD_WRNP) exp_data.push_back(32'h0);
      end
    end
  endtask

  int n_rsp = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (breq_valid && breq_ready) di <= di + 1;
      if (wd_valid && wd_ready) wi <= wi + 1;
      if (rsp_valid && rsp_ready) begin
        check(exp_data.size() > 0 && rsp.resp == RESP_DVA && rsp.data == exp_data[0],
              $sformatf("response %0d data %h", n_rsp, rsp.data));
        if (exp_data.size() > 0) void'(exp_data.pop_front());
        n_rsp <= n_rsp + 1;
      end
      rsp_ready <= ($urandom_range(0, 3) != 0);
    end
  end

  // ---- OCP slave model (ocp_clk)
  typedef struct { mcmd_e cmd; logic [31:0] addr; logic last; } sreq_t;
  sreq_t       sreqs [$];
  logic [31:0] sdata [$];
  logic [31:0] smem [128];
  resp_t       sresp [$];
  always @(negedge ocp_clk) begin
    bus.SCmdAccept  = ($urandom_range(0, 2) != 0);
    bus.SDataAccept = ($urandom_range(0, 2) != 0);
  end
  always @(posedge ocp_clk) begin
    if (rst_n) begin
      if (bus.MCmd != CMD_IDLE && bus.SCmdAccept) sreqs.push_back('{bus.MCmd, bus.MAddr, bus.MReqLast});
      if (bus.MDataValid && bus.SDataAccept) sdata.push_back(bus.MData);
      if (bus.SResp != RESP_NULL && bus.MRespAccept) void'(sresp.pop_front());
      if (sreqs.size() > 0 && (sreqs[0].cmd == CMD_RD || sdata.size() > 0)) begin
        sreq_t r;
        resp_t o;
        r = sreqs.pop_front();
        o = '{resp: RESP_DVA, data: '0, tag: '0, inorder: 1'b1, last: r.last};
        if (r.cmd == CMD_RD) o.data = smem[r.addr[8:2]];
        else smem[r.addr[8:2]] = sdata.pop_front();
        if (r.cmd != CMD_WR) sresp.push_back(o);
      end
    end
  end
  always_comb begin
    bus.SResp = (sresp.size() > 0) ? sresp[0].resp : RESP_NULL;
    bus.SData = (sresp.size() > 0) ? sresp[0].data : '0;
    bus.STagID = '0;
    bus.STagInOrder = 1'b1;
    bus.SRespLast = (sresp.size() > 0) ? sresp[0].last : 1'b0;
  end

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total;
    for (int i = 0; i < 128; i += 8) add(CMD_WR, i, 8);
    for (int n = 0; n < 150; n++) begin
      int k, len, w;
      k = $urandom_range(0, 2);
      len = $urandom_range(1, 8);
      w = $urandom_range(0, 128 - len);
      add(k == 0 ? CMD_WR : k == 1 ? CMD_WRNP : CMD_RD, w, len);
    end
    total = exp_data.size();
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (n_rsp == total);
    repeat (20) @(posedge clk);
    check(n_rsp == total && !rsp_valid, $sformatf("%0d responses, %0d expected", n_rsp, total));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
