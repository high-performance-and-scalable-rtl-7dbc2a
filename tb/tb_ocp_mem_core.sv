// tb_ocp_mem_core: unit test of the target memory core (MEM_WORDS 64).
//
// It writes and reads random word addresses through the operation stream
// with random response acceptance and compares each response with a
// reference array: DVA code, read data (zero for writes), tag, in-order
// and last flags, and that writes without need_resp give no response.
// It also checks the one-clock response latency and that op_ready falls
// while a response waits for acceptance.
module tb_ocp_mem_core;
  import ocp_pkg::*;

  localparam int MW = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic     op_valid = 0, op_ready, rsp_valid, rsp_ready = 0;
  core_op_t op = '0;
  resp_t    rsp;

  ocp_mem_core #(.MEM_WORDS(MW)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [31:0] model [MW];
  resp_t       exp_q [$];

  always @(posedge clk) begin
    if (rst_n && rsp_valid && rsp_ready) begin
      check(exp_q.size() > 0 && rsp == exp_q[0], $sformatf("response data %h", rsp.data));
      if (exp_q.size() > 0) void'(exp_q.pop_front());
    end
  end

  task automatic issue(input core_op_t o);
    int w;
    resp_t e;
    @(negedge clk);
    op = o; op_valid = 1;
    #1;
    while (!op_ready) begin @(negedge clk); #1; end
    @(posedge clk);
    w = int'(o.addr[2 +: $clog2(MW)]);
    if (o.need_resp) begin
      e.resp = RESP_DVA; e.data = o.write ? 32'h0 : model[w];
      e.tag = o.tag; e.inorder = o.inorder; e.last = o.last;
      exp_q.push_back(e);
    end
    if (o.write) model[w] = o.data;
    #1 op_valid = 0;
  endtask

  initial begin
    #500000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    core_op_t o;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // fill the memory
    rsp_ready = 1;
    for (int i = 0; i < MW; i++) begin
      o = '0; o.write = 1; o.need_resp = 0; o.addr = 32'(4 * i); o.data = $urandom;
      issue(o);
    end
    check(exp_q.size() == 0 && !rsp_valid, "posted writes give no response");
    // latency: response one clock after the read is taken
    o = '0; o.addr = 32'h8; o.need_resp = 1; o.tag = 1; o.last = 1;
    issue(o);
    check(rsp_valid && rsp.data == model[2] && rsp.tag == 1 && rsp.last, "read answered one clock later");
    @(negedge clk);
    // backpressure: a waiting response blocks further operations
    rsp_ready = 0;
    o.addr = 32'h10;
    fork issue(o); join_none
    repeat (3) @(negedge clk);
    check(rsp_valid && !op_ready, "op_ready low while a response waits");
    rsp_ready = 1;
    wait (exp_q.size() == 0);
    // random mix with random acceptance
    fork
      forever begin @(negedge clk); rsp_ready = ($urandom_range(0, 2) != 0); end
    join_none
    for (int n = 0; n < 500; n++) begin
      o.write = $urandom_range(0, 1);
      o.need_resp = o.write ? 1'($urandom_range(0, 1)) : 1'b1;
      o.addr = 32'($urandom_range(0, MW - 1) * 4);
      o.data = $urandom;
      o.tag = TAG_W'($urandom);
      o.inorder = 1'($urandom);
      o.last = 1'($urandom);
      issue(o);
    end
    wait (exp_q.size() == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
