// ocp_pkg: shared widths, encodings and record types of the OCP interface.
//
// The command and response codes are those of the Open Core Protocol: the
// simulation traces of the design print MCmd 3'h1 for a write, 3'h2 for a
// read and SResp 2'h1 for DVA; WRNP (3'h5), the other SResp codes and the
// INCR burst code (3'h0) are taken from the OCP specification. Data and
// address are 32 bits wide, as in the traces. Two tag IDs (ID0, ID1) are
// used, as in the tagged transfer example. The burst length field width
// (4 bits) and the record types are this design's own choices.
package ocp_pkg;

  localparam int unsigned ADDR_W   = 32;
  localparam int unsigned DATA_W   = 32;
  localparam int unsigned BLEN_W   = 4;
  localparam int unsigned NUM_TAGS = 2;
  localparam int unsigned TAG_W    = (NUM_TAGS > 1) ? $clog2(NUM_TAGS) : 1;
  // byte address step of one word in an INCR burst
  localparam int unsigned WORD_BYTES = DATA_W / 8;

  typedef enum logic [2:0] {
    CMD_IDLE = 3'h0,
    CMD_WR   = 3'h1,
    CMD_RD   = 3'h2,
    CMD_WRNP = 3'h5
  } mcmd_e;

  typedef enum logic [1:0] {
    RESP_NULL = 2'h0,
    RESP_DVA  = 2'h1,
    RESP_FAIL = 2'h2,
    RESP_ERR  = 2'h3
  } sresp_e;

  typedef enum logic [2:0] {
    SEQ_INCR = 3'h0
  } bseq_e;

  // One burst as the initiating core asks for it.
  typedef struct packed {
    mcmd_e             cmd;
    logic [ADDR_W-1:0] addr;
    logic [BLEN_W-1:0] len;      // words in the burst, 1 = single transfer
    logic [TAG_W-1:0]  tag;
    logic              inorder;  // 1: must keep order with other in-order requests
  } burst_req_t;

  // One OCP request beat as the slave records it.
  typedef struct packed {
    mcmd_e             cmd;
    logic [ADDR_W-1:0] addr;
    logic [TAG_W-1:0]  tag;
    logic              inorder;
    logic              last;     // MReqLast
  } req_beat_t;

  // One operation passed from the OCP slave to the target core.
  typedef struct packed {
    logic              write;
    logic              need_resp;
    logic [ADDR_W-1:0] addr;
    logic [DATA_W-1:0] data;
    logic [TAG_W-1:0]  tag;
    logic              inorder;
    logic              last;
  } core_op_t;

  // One response, on the OCP response phase and on the core side.
  typedef struct packed {
    sresp_e            resp;
    logic [DATA_W-1:0] data;
    logic [TAG_W-1:0]  tag;
    logic              inorder;
    logic              last;     // SRespLast
  } resp_t;

endpackage
