// tb_ocp_slave: unit test of the OCP slave with WR responses enabled.
//
// The testbench acts as the OCP master on one side and as the target core
// on the other (a memory array with a one-cycle response). Phase A replays
// the tagged-transfer example: RD1 (tag 0, out of order), WR2 (in order),
// RD3 (tag 1, out of order, same address as WR2) and RD4 (in order) must
// reach the core as WR2, RD4, RD3, RD1 and answer with DVA2, DVA4, DVA3
// (ID1, reading WR2's data), DVA1 (ID0). Phase B stalls the core while a
// 12-word in-order write burst arrives, so the slave must drop SCmdAccept
// and SDataAccept; the core is then released and the burst read back with
// random response acceptance, checking data, tags and SRespLast.
module tb_ocp_slave;
  import ocp_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  ocp_if bus (.clk(clk), .rst_n(rst_n));

  logic     op_valid, op_ready, cr_valid, cr_ready;
  core_op_t op;
  resp_t    cr;

  ocp_slave #(.WRITE_RESP_EN(1'b1)) dut (
    .bus, .op_valid, .op_ready, .op, .cr_valid, .cr_ready, .cr
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- master side drivers
  initial begin
    bus.MCmd = CMD_IDLE; bus.MAddr = '0; bus.MBurstLength = 1; bus.MBurstSeq = SEQ_INCR;
    bus.MBurstPrecise = 1; bus.MReqLast = 1; bus.MTagID = '0; bus.MTagInOrder = 0;
    bus.MData = '0; bus.MDataValid = 0; bus.MRespAccept = 1;
  end

  task automatic send_req(input mcmd_e cmd, input logic [31:0] addr, input int len,
                          input logic last, input logic [TAG_W-1:0] tag, input logic inord);
    bit acc;
    @(negedge clk);
    bus.MCmd = cmd; bus.MAddr = addr; bus.MBurstLength = BLEN_W'(len);
    bus.MReqLast = last; bus.MTagID = tag; bus.MTagInOrder = inord;
    do begin
      #1 acc = bus.SCmdAccept;
      @(posedge clk);
      if (!acc) @(negedge clk);
    end while (!acc);
  endtask

  task automatic bus_idle();
    @(negedge clk);
    bus.MCmd = CMD_IDLE;
  endtask

  logic [31:0] wq [$];
  initial begin : data_phase
    forever begin
      bit acc;
      @(negedge clk);
      if (wq.size() > 0) begin
        bus.MData = wq[0]; bus.MDataValid = 1;
        #1 acc = bus.SDataAccept;
        if (acc) begin
          @(posedge clk);
          void'(wq.pop_front());
        end
      end else begin
        bus.MDataValid = 0;
      end
    end
  end

  // ---- target core model
  logic [31:0] mem [256];
  core_op_t    seen [$];
  bit          core_stall = 0;
  initial begin
    cr_valid = 0;
    cr = '{resp: RESP_NULL, default: '0};
    for (int i = 0; i < 256; i++) mem[i] = 32'hC0DE_0000 + i;
  end
  assign op_ready = !core_stall && (!cr_valid || cr_ready);
  always @(posedge clk) begin
    if (cr_valid && cr_ready) cr_valid <= 0;
    if (rst_n && op_valid && op_ready) begin
      seen.push_back(op);
      if (op.write) mem[op.addr[9:2]] <= op.data;
      if (op.need_resp) begin
        cr_valid   <= 1;
        cr.resp    <= RESP_DVA;
        cr.data    <= op.write ? 32'h0 : mem[op.addr[9:2]];
        cr.tag     <= op.tag;
        cr.inorder <= op.inorder;
        cr.last    <= op.last;
      end
    end
  end

  // ---- response monitor
  resp_t got [$];
  int n_cmd_stall = 0, n_data_stall = 0;
  always @(posedge clk) begin
    if (rst_n && bus.SResp != RESP_NULL && bus.MRespAccept) got.push_back(resp_t'{
        bus.SResp, bus.SData, bus.STagID, bus.STagInOrder, bus.SRespLast});
    if (bus.MCmd != CMD_IDLE && !bus.SCmdAccept) n_cmd_stall++;
    if (bus.MDataValid && !bus.SDataAccept) n_data_stall++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [31:0] A1 = 32'h10, A2 = 32'h20, A4 = 32'h40, D2 = 32'hD2D2_0002;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // ---- phase A: tagged transfer example
    send_req(CMD_RD, A1, 1, 1, 0, 0);
    wq.push_back(D2);
    send_req(CMD_WR, A2, 1, 1, 0, 1);
    send_req(CMD_RD, A2, 1, 1, 1, 0);
    send_req(CMD_RD, A4, 1, 1, 0, 1);
    bus_idle();
    wait (got.size() == 4);
    check(seen.size() == 4, "phase A: four operations reach the core");
    check(seen[0].write && seen[0].addr == A2 && seen[0].data == D2, "phase A: WR2 first");
    check(!seen[1].write && seen[1].addr == A4, "phase A: RD4 second");
    check(!seen[2].write && seen[2].addr == A2 && seen[2].tag == 1, "phase A: RD3 (ID1) third");
    check(!seen[3].write && seen[3].addr == A1 && seen[3].tag == 0, "phase A: RD1 (ID0) last");
    check(got[0].resp == RESP_DVA && got[0].inorder, "DVA2 in order");
    check(got[1].data == 32'hC0DE_0010 && got[1].inorder, "DVA4 data");
    check(got[2].data == D2 && got[2].tag == 1 && !got[2].inorder, "DVA3 ID1 reads WR2 data");
    check(got[3].data == 32'hC0DE_0004 && got[3].tag == 0 && !got[3].inorder, "DVA1 ID0 data");
    foreach (got[i]) check(got[i].last, "single transfers carry SRespLast");
    got.delete(); seen.delete();

    // ---- phase B: stalled core, 12-word write burst, then read back
    core_stall = 1;
    fork begin repeat (60) @(posedge clk); core_stall = 0; end join_none
    for (int i = 0; i < 12; i++) wq.push_back(32'hB000_0000 + i * 3);
    for (int i = 0; i < 12; i++) send_req(CMD_WRNP, 32'h100 + 4 * i, 12, i == 11, 1, 1);
    bus_idle();
    check(n_cmd_stall > 0, "SCmdAccept dropped while the core stalled");
    check(n_data_stall > 0, "SDataAccept dropped while the core stalled");
    fork
      forever begin @(negedge clk); bus.MRespAccept = ($urandom_range(0, 2) != 0); end
    join_none
    for (int i = 0; i < 12; i++) send_req(CMD_RD, 32'h100 + 4 * i, 12, i == 11, 0, 0);
    bus_idle();
    wait (got.size() == 24);
    for (int i = 0; i < 12; i++) begin
      check(got[i].inorder && got[i].data == 0 && got[i].last == (i == 11),
            $sformatf("write burst response %0d", i));
      check(!got[12 + i].inorder && got[12 + i].tag == 0 &&
            got[12 + i].data == 32'hB000_0000 + i * 3 && got[12 + i].last == (i == 11),
            $sformatf("read burst response %0d data %h", i, got[12 + i].data));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
