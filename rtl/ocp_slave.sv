// ocp_slave: OCP slave port of the target core, in the OCP clock domain.
//
// With DATA_HS = 1 (data handshake) requests and write data arrive in
// separate phases, as below. With DATA_HS = 0 the write word comes on
// MData with its request, and a write is accepted only when both queues
// have room; SDataAccept then stays low.
//
// Requests are taken into an arrival queue whenever it has room
// (SCmdAccept = not full); write data words are taken into a data queue
// whenever it has room (SDataAccept = not full). When both queues are
// full enough the slave drops SCmdAccept or SDataAccept ("not ready") and
// the master holds its request or data.
//
// A dispatcher pairs each arriving request with its write data (writes
// wait for their word, which may arrive later) and sorts it into one of
// NUM_TAGS+1 queues: one queue for requests marked MTagInOrder, and one
// queue per tag ID for out-of-order requests. A scheduler then passes one
// operation per cycle to the target core: the in-order queue first, since
// its requests may not be reordered or delayed. Out-of-order requests are
// held back until one of them has waited OOO_HOLD cycles; then the head of
// the highest non-empty tag queue is served. Requests of one tag, and
// therefore the words of a burst, stay in order; requests of different
// tags may overtake each other. The hold
// models that out-of-order traffic may be delayed in favour of ordered
// traffic, and the tag priority gives the priority-based transfer.
//
// The target core returns one response per operation that needs one: every
// RD, every WRNP, and every WR only when WRITE_RESP_EN is set (otherwise WR
// is posted). Responses are driven on SResp (DVA), SData, STagID,
// STagInOrder and SRespLast (the MReqLast of the request) in the order the
// core returns them, and held until MRespAccept.
//
// Following the OCP interface paper: the signals, in-order precedence over tagged
// traffic, ordering by tag ID and the DVA responses. This design's own
// choices: the queue structure and depths, the hold time, the tag
// priority order (higher ID first, as in the tagged-transfer example) and
// the core-side valid/ready streams. The scheduler's output may change
// while op_ready is low; it feeds a FIFO write port, not a held bus.
// The 16-bit arrival stamps wrap, so a tagged request left waiting for
// more than 65536 - OOO_HOLD cycles may wait a further 65536 cycles.
module ocp_slave
  import ocp_pkg::*;
#(
  parameter int unsigned ARR_DEPTH     = 4,
  parameter int unsigned WD_DEPTH      = 2,
  parameter int unsigned Q_DEPTH       = 4,
  parameter int unsigned OOO_HOLD      = 8,
  parameter bit          WRITE_RESP_EN = 1'b0,
  parameter bit          DATA_HS       = 1'b1
) (
  ocp_if.slave           bus,
  // operations to the target core
  output logic           op_valid,
  input  logic           op_ready,
  output core_op_t       op,
  // responses from the target core
  input  logic           cr_valid,
  output logic           cr_ready,
  input  resp_t          cr
);
  localparam int unsigned NQ   = NUM_TAGS + 1;   // queue NUM_TAGS is the in-order queue
  localparam int unsigned IOQ  = NUM_TAGS;
  localparam int unsigned TS_W = 16;
  localparam int unsigned QW   = $clog2(NQ);

  typedef struct packed {
    core_op_t        op;
    logic [TS_W-1:0] ts;
  } qent_t;

  logic [TS_W-1:0] now;
  always_ff @(posedge bus.clk or negedge bus.rst_n) begin
    if (!bus.rst_n) now <= '0;
    else            now <= now + 1'b1;
  end

  // ---- request and write data capture
  req_beat_t         arr_in, arr_head;
  logic              arr_full, arr_empty, arr_pop;
  logic [DATA_W-1:0] wd_head;
  logic              wd_full, wd_empty, wd_pop;

  assign arr_in.cmd     = bus.MCmd;
  assign arr_in.addr    = bus.MAddr;
  assign arr_in.tag     = bus.MTagID;
  assign arr_in.inorder = bus.MTagInOrder;
  assign arr_in.last    = bus.MReqLast;
  logic req_is_wr;
  assign req_is_wr       = (bus.MCmd == CMD_WR) || (bus.MCmd == CMD_WRNP);
  assign bus.SCmdAccept  = !arr_full && (DATA_HS || !wd_full);
  assign bus.SDataAccept = DATA_HS && !wd_full;

  sync_fifo #(.WIDTH($bits(req_beat_t)), .DEPTH(ARR_DEPTH)) u_arr (
    .clk (bus.clk), .rst_n (bus.rst_n),
    .wr_en (bus.MCmd != CMD_IDLE && bus.SCmdAccept), .wdata (arr_in),
    .rd_en (arr_pop), .rdata (arr_head),
    .full (arr_full), .empty (arr_empty)
  );

  sync_fifo #(.WIDTH(DATA_W), .DEPTH(WD_DEPTH)) u_wd (
    .clk (bus.clk), .rst_n (bus.rst_n),
    .wr_en (DATA_HS ? bus.MDataValid : (req_is_wr && bus.SCmdAccept)), .wdata (bus.MData),
    .rd_en (wd_pop), .rdata (wd_head),
    .full (wd_full), .empty (wd_empty)
  );

  // ---- dispatch into the in-order queue or a tag queue
  logic [NQ-1:0] q_push, q_pop, q_full, q_empty;
  qent_t         q_in, q_head [NQ];
  logic          head_wr, head_ready;
  logic [QW-1:0] tgt;

  assign head_wr = (arr_head.cmd == CMD_WR) || (arr_head.cmd == CMD_WRNP);
  assign tgt     = arr_head.inorder ? QW'(IOQ) : QW'(arr_head.tag);

  always_comb begin
    head_ready = !arr_empty && (!head_wr || !wd_empty) && !q_full[tgt];
    arr_pop    = head_ready;
    wd_pop     = head_ready && head_wr;
    q_push     = '0;
    q_push[tgt] = head_ready;
    q_in.ts            = now;
    q_in.op.write      = head_wr;
    q_in.op.need_resp  = (arr_head.cmd == CMD_RD) || (arr_head.cmd == CMD_WRNP) ||
                         ((arr_head.cmd == CMD_WR) && WRITE_RESP_EN);
    q_in.op.addr       = arr_head.addr;
    q_in.op.data       = head_wr ? wd_head : '0;
    q_in.op.tag        = arr_head.tag;
    q_in.op.inorder    = arr_head.inorder;
    q_in.op.last       = arr_head.last;
  end

  for (genvar q = 0; q < NQ; q++) begin : g_q
    sync_fifo #(.WIDTH($bits(qent_t)), .DEPTH(Q_DEPTH)) u_q (
      .clk (bus.clk), .rst_n (bus.rst_n),
      .wr_en (q_push[q]), .wdata (q_in),
      .rd_en (q_pop[q]), .rdata (q_head[q]),
      .full (q_full[q]), .empty (q_empty[q])
    );
  end

  // ---- scheduler: in-order queue first; once any out-of-order request
  // has waited OOO_HOLD cycles, the highest non-empty tag queue
  logic [NQ-1:0] aged;
  logic          ooo_open;
  logic [QW-1:0] pick;

  always_comb begin
    for (int q = 0; q < NQ; q++)
      aged[q] = !q_empty[q] && ((now - q_head[q].ts) >= TS_W'(OOO_HOLD));
    ooo_open = |aged[NUM_TAGS-1:0];
    pick = QW'(IOQ);
    if (q_empty[IOQ] && ooo_open) begin
      for (int q = 0; q < NUM_TAGS; q++) begin
        if (!q_empty[q]) pick = QW'(q);     // later (higher) tag IDs win
      end
    end
    op_valid = !q_empty[pick] && (pick == QW'(IOQ) || ooo_open);
    op       = q_head[pick].op;
    q_pop    = '0;
    q_pop[pick] = op_valid && op_ready;
  end

  // ---- response phase
  assign bus.SResp       = cr_valid ? cr.resp : RESP_NULL;
  assign bus.SData       = cr.data;
  assign bus.STagID      = cr.tag;
  assign bus.STagInOrder = cr.inorder;
  assign bus.SRespLast   = cr.last;
  assign cr_ready        = bus.MRespAccept;

  a_incr_only: assert property (@(posedge bus.clk) disable iff (!bus.rst_n)
    (bus.MCmd != CMD_IDLE) |-> (bus.MBurstSeq == SEQ_INCR && bus.MBurstPrecise))
    else $error("ocp_slave: only precise INCR bursts are supported");
endmodule
