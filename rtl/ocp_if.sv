// ocp_if: the OCP signal bundle between one OCP master and one OCP slave.
//
// Three phases share the OCP clock. The request phase (MCmd, MAddr, burst
// and tag fields, MReqLast) completes when SCmdAccept is high while MCmd is
// not IDLE. The write data phase (MData, MDataValid) completes when
// SDataAccept is high while MDataValid is high; it follows its request and
// may lag it ("datahandshake"). The response phase (SResp, SData, STagID,
// STagInOrder, SRespLast) completes when MRespAccept is high while SResp is
// not NULL. The signal names follow the OCP specification. The assertions
// state the handshake rule of each phase: whatever is offered is held until
// it is taken.
interface ocp_if
  import ocp_pkg::*;
(
  input logic clk,
  input logic rst_n
);
  // request phase
  mcmd_e             MCmd;
  logic [ADDR_W-1:0] MAddr;
  logic [BLEN_W-1:0] MBurstLength;
  bseq_e             MBurstSeq;
  logic              MBurstPrecise;
  logic              MReqLast;
  logic [TAG_W-1:0]  MTagID;
  logic              MTagInOrder;
  logic              SCmdAccept;
  // write data phase
  logic [DATA_W-1:0] MData;
  logic              MDataValid;
  logic              SDataAccept;
  // response phase
  sresp_e            SResp;
  logic [DATA_W-1:0] SData;
  logic [TAG_W-1:0]  STagID;
  logic              STagInOrder;
  logic              SRespLast;
  logic              MRespAccept;

  modport master (
    input  clk, rst_n,
    output MCmd, MAddr, MBurstLength, MBurstSeq, MBurstPrecise, MReqLast,
           MTagID, MTagInOrder, MData, MDataValid, MRespAccept,
    input  SCmdAccept, SDataAccept, SResp, SData, STagID, STagInOrder, SRespLast
  );

  modport slave (
    input  clk, rst_n,
    input  MCmd, MAddr, MBurstLength, MBurstSeq, MBurstPrecise, MReqLast,
           MTagID, MTagInOrder, MData, MDataValid, MRespAccept,
    output SCmdAccept, SDataAccept, SResp, SData, STagID, STagInOrder, SRespLast
  );

  // A request that is not accepted stays on the bus unchanged.
  a_req_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (MCmd != CMD_IDLE && !SCmdAccept) |=>
      (MCmd == $past(MCmd) && MAddr == $past(MAddr) && MTagID == $past(MTagID) &&
       MReqLast == $past(MReqLast) && MBurstLength == $past(MBurstLength)))
    else $error("ocp_if: request changed before SCmdAccept");

  // Write data that is not accepted stays valid and unchanged.
  a_data_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (MDataValid && !SDataAccept) |=> (MDataValid && MData == $past(MData)))
    else $error("ocp_if: write data changed before SDataAccept");

  // A response that is not accepted stays on the bus unchanged.
  a_resp_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (SResp != RESP_NULL && !MRespAccept) |=>
      (SResp == $past(SResp) && SData == $past(SData) && STagID == $past(STagID) &&
       SRespLast == $past(SRespLast)))
    else $error("ocp_if: response changed before MRespAccept");

  // Only INCR bursts are used, and their length is never zero.
  a_burst: assert property (@(posedge clk) disable iff (!rst_n)
    (MCmd != CMD_IDLE) |-> (MBurstSeq == SEQ_INCR && MBurstLength != '0))
    else $error("ocp_if: unsupported burst");

endinterface
