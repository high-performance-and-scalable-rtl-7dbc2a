// tb_ocp_sys_slave: test of the system slave across two clocks.
//
// The OCP side runs on ocp_clk (period 8), the target core side on clk
// (period 18). The testbench plays the OCP master, issuing bursts of
// WRNP, WR and RD with random tags and in-order flags back to back, and
// plays the target core as a memory with a one-clock response. Each
// request class (tag 0, tag 1, in-order) has its own address region, so
// its reads are predictable; responses are sorted by class using STagID
// and STagInOrder and compared in order with a reference, including
// SRespLast. It also checks that in-order requests are never overtaken by
// later in-order requests, and that some responses overtake older ones of
// another class.
module tb_ocp_sys_slave;
  import ocp_pkg::*;

  localparam int REGION = 32;
  logic clk = 0, ocp_clk = 0, rst_n = 0;
  always #9 clk = ~clk;
  always #4 ocp_clk = ~ocp_clk;

  ocp_if bus (.clk(ocp_clk), .rst_n(rst_n));

  logic     op_valid, op_ready, cr_valid, cr_ready;
  core_op_t op;
  resp_t    cr;

  ocp_sys_slave dut (.clk, .rst_n, .bus, .op_valid, .op_ready, .op, .cr_valid, .cr_ready, .cr);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- target core model (clk)
  logic [31:0] mem [3 * REGION];
  assign op_ready = !cr_valid || cr_ready;
  initial cr_valid = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (cr_valid && cr_ready) cr_valid <= 0;
      if (op_valid && op_ready) begin
        if (op.write) mem[op.addr[8:2]] <= op.data;
        if (op.need_resp) begin
          cr_valid <= 1;
          cr <= '{resp: RESP_DVA, data: op.write ? 32'h0 : mem[op.addr[8:2]],
                  tag: op.tag, inorder: op.inorder, last: op.last};
        end
      end
    end
  end

  // ---- OCP master model (ocp_clk)
  typedef struct { logic [31:0] data; logic last; int seq; } exp_t;
  exp_t        expq [3][$];
  logic [31:0] model [3 * REGION];
  logic [31:0] wq [$];
  int          n_exp = 0, seqno = 0;

  initial begin
    bus.MCmd = CMD_IDLE; bus.MAddr = '0; bus.MBurstLength = 1; bus.MBurstSeq = SEQ_INCR;
    bus.MBurstPrecise = 1; bus.MReqLast = 1; bus.MTagID = '0; bus.MTagInOrder = 0;
    bus.MData = '0; bus.MDataValid = 0; bus.MRespAccept = 0;
  end

  always @(negedge ocp_clk) begin
    bus.MRespAccept = ($urandom_range(0, 3) != 0);
    bus.MDataValid = (wq.size() > 0);
    bus.MData = (wq.size() > 0) ? wq[0] : '0;
  end
  always @(posedge ocp_clk) if (rst_n && bus.MDataValid && bus.SDataAccept) void'(wq.pop_front());

  task automatic burst(input mcmd_e cmd, input int cls, input int off, input int len,
                       input logic [TAG_W-1:0] tag);
    for (int i = 0; i < len; i++) begin
      int w;
      bit acc;
      w = cls * REGION + off + i;
      if (cmd == CMD_RD) begin
        expq[cls].push_back('{model[w], i == len - 1, seqno});
        n_exp++;
      end else begin
        logic [31:0] v;
        v = $urandom;
        model[w] = v;
        wq.push_back(v);
        if (cmd == CMD_WRNP) begin
          expq[cls].push_back('{32'h0, i == len - 1, seqno});
          n_exp++;
        end
      end
      @(negedge ocp_clk);
      bus.MCmd = cmd; bus.MAddr = 32'(w * 4); bus.MBurstLength = BLEN_W'(len);
      bus.MReqLast = (i == len - 1); bus.MTagID = tag; bus.MTagInOrder = (cls == 2);
      do begin
        #1 acc = bus.SCmdAccept;
        @(posedge ocp_clk);
        if (!acc) @(negedge ocp_clk);
      end while (!acc);
      seqno++;
    end
  endtask

  int n_got = 0, max_seq = -1, n_over = 0, last_io_seq = -1;
  always @(posedge ocp_clk) begin
    if (rst_n && bus.SResp != RESP_NULL && bus.MRespAccept) begin
      int c;
      exp_t e;
      c = bus.STagInOrder ? 2 : int'(bus.STagID);
      if (expq[c].size() == 0) check(0, "unexpected response");
      else begin
        e = expq[c].pop_front();
        check(bus.SResp == RESP_DVA && bus.SData == e.data && bus.SRespLast == e.last,
              $sformatf("class %0d seq %0d data %h expected %h", c, e.seq, bus.SData, e.data));
        if (c == 2) begin
          check(e.seq > last_io_seq, "in-order responses keep their order");
          last_io_seq = e.seq;
        end
        if (e.seq < max_seq) n_over++;
        else max_seq = e.seq;
      end
      n_got++;
    end
  end

  initial begin
    #3000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 3; c++)
      for (int off = 0; off < REGION; off += 8) burst(CMD_WRNP, c, off, 8, TAG_W'(c % 2));
    for (int n = 0; n < 120; n++) begin
      int c, len, k;
      c = $urandom_range(0, 2);
      len = $urandom_range(1, 6);
      k = $urandom_range(0, 2);
      burst(k == 0 ? CMD_WR : k == 1 ? CMD_WRNP : CMD_RD, c, $urandom_range(0, REGION - len),
            len, c == 2 ? TAG_W'($urandom_range(0, 1)) : TAG_W'(c));
    end
    @(negedge ocp_clk);
    bus.MCmd = CMD_IDLE;
    wait (n_got == n_exp);
    repeat (30) @(posedge ocp_clk);
    check(n_got == n_exp, "response count");
    check(n_over > 0, $sformatf("%0d responses overtook older requests", n_over));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
