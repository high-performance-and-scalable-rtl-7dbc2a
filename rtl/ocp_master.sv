// ocp_master: OCP master port of the initiating core, in the OCP clock domain.
//
// The core hands over one burst at a time as a descriptor (command, start
// address, length in words, tag ID, in-order flag). The master issues one
// OCP request per word on consecutive clocks while SCmdAccept allows,
// stepping the byte address by the word size (INCR bursts), holding
// MBurstLength, MBurstSeq = INCR, MBurstPrecise = 1, MTagID and MTagInOrder
// constant over the burst, and raising MReqLast on the last word. A burst
// of length 1 is a simple transfer. A new descriptor is taken in the cycle
// the last word of the previous one is accepted, so bursts follow each
// other without an idle cycle.
//
// Writes use the data handshake: a write request is offered only when the
// core has a data word ready and the internal data queue has room; when
// the request is accepted the word moves into that queue, and the data
// phase (MData, MDataValid) drains it, one word per SDataAccept. The data
// phase therefore starts one cycle after its request at the earliest.
//
// With DATA_HS = 0 there is no data handshake: the write word travels on
// MData in the request phase itself, taken with SCmdAccept, and
// MDataValid stays low (the basic transfer style).
//
// Responses (SResp not NULL) are passed to the core unchanged with their
// tag, in-order and last flags; MRespAccept is the core's ready.
//
// Core side: valid/ready streams, all in the OCP clock domain. The
// descriptor form, the queue depth and the one-cycle data lag are this
// design's choices; the OCP signals and their meaning follow the OCP interface paper
// and the OCP specification.
module ocp_master
  import ocp_pkg::*;
#(
  parameter int unsigned DQ_DEPTH = 4,
  parameter bit          DATA_HS  = 1'b1
) (
  ocp_if.master                bus,
  // burst descriptors from the core
  input  logic                 breq_valid,
  output logic                 breq_ready,
  input  burst_req_t           breq,
  // write data words from the core, one per written word
  input  logic                 wd_valid,
  output logic                 wd_ready,
  input  logic [DATA_W-1:0]    wd_data,
  // responses to the core
  output logic                 rsp_valid,
  input  logic                 rsp_ready,
  output resp_t                rsp
);
  logic              active;
  burst_req_t        cur;
  logic [BLEN_W-1:0] beat;       // words of the current burst already accepted

  logic is_write, offer, accept, last_beat;
  logic dq_full, dq_empty;

  assign is_write  = (cur.cmd == CMD_WR) || (cur.cmd == CMD_WRNP);
  assign last_beat = (beat == cur.len - 1'b1);
  assign offer     = active && (!is_write || (wd_valid && (!DATA_HS || !dq_full)));
  assign accept    = offer && bus.SCmdAccept;
  assign breq_ready = !active || (accept && last_beat);
  assign wd_ready   = accept && is_write;

  always_ff @(posedge bus.clk or negedge bus.rst_n) begin
    if (!bus.rst_n) begin
      active <= 1'b0;
      cur    <= '{cmd: CMD_IDLE, default: '0};
      beat   <= '0;
    end else if (breq_valid && breq_ready) begin
      active <= 1'b1;
      cur    <= breq;
      beat   <= '0;
    end else if (accept) begin
      if (last_beat) active <= 1'b0;
      beat <= beat + 1'b1;
      cur.addr <= cur.addr + ADDR_W'(WORD_BYTES);
    end
  end

  // request phase
  assign bus.MCmd          = offer ? cur.cmd : CMD_IDLE;
  assign bus.MAddr         = cur.addr;
  assign bus.MBurstLength  = cur.len;
  assign bus.MBurstSeq     = SEQ_INCR;
  assign bus.MBurstPrecise = 1'b1;
  assign bus.MReqLast      = last_beat;
  assign bus.MTagID        = cur.tag;
  assign bus.MTagInOrder   = cur.inorder;

  // write data phase
  logic [DATA_W-1:0] dq_head;
  sync_fifo #(.WIDTH(DATA_W), .DEPTH(DQ_DEPTH)) u_dq (
    .clk   (bus.clk),
    .rst_n (bus.rst_n),
    .wr_en (wd_ready && DATA_HS),
    .wdata (wd_data),
    .rd_en (bus.SDataAccept),
    .rdata (dq_head),
    .full  (dq_full),
    .empty (dq_empty)
  );
  assign bus.MData      = DATA_HS ? dq_head : wd_data;
  assign bus.MDataValid = DATA_HS && !dq_empty;

  // response phase
  assign rsp_valid       = (bus.SResp != RESP_NULL);
  assign rsp.resp        = bus.SResp;
  assign rsp.data        = bus.SData;
  assign rsp.tag         = bus.STagID;
  assign rsp.inorder     = bus.STagInOrder;
  assign rsp.last        = bus.SRespLast;
  assign bus.MRespAccept = rsp_ready;

  a_no_zero_len: assert property (@(posedge bus.clk) disable iff (!bus.rst_n)
    (breq_valid && breq_ready) |-> (breq.len != '0 && breq.cmd != CMD_IDLE))
    else $error("ocp_master: burst descriptor with zero length or IDLE command");
endmodule
