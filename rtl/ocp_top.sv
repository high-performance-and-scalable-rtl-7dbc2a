// ocp_top: two cores joined by one point-to-point OCP interface.
//
// The initiating core sits outside, on its own system clock m_clk, and
// talks to the system master through three valid/ready streams: burst
// descriptors, write data words and responses. The system master crosses
// them into the OCP clock domain (ocp_clk), where its OCP master and the
// system slave's OCP slave exchange the OCP request, write data and
// response phases. The system slave crosses the resulting memory
// operations into the clock of the target core (s_clk), a word memory,
// and carries its responses back. The three clocks may be unrelated, or
// the same clock when a core has no clock of its own. M_ASYNC and S_ASYNC
// pick the transfer mode of each system block: 1 for asynchronous mode
// (dual-clock FIFOs, any clocks), 0 for synchronous mode (single-clock
// FIFOs; that core's clock must then be ocp_clk). The chain of system
// master, OCP master, OCP slave and system slave, the two clocks of each
// system block and the transfer types follow the OCP interface paper this
// design is built from; the core-side streams, queue depths, scheduling
// details and the memory used as target core are this design's choices.
//
// The interface supports simple transfers (WR, RD, WRNP), precise INCR
// bursts with MReqLast/SRespLast, write data handshake, and tagged
// transfers in which requests marked in-order are served first and
// out-of-order requests may be reordered between tag IDs. WR is posted
// (no response) unless WRITE_RESP_EN is set; RD and WRNP always get DVA.
// DATA_HS = 1 sends write data in its own handshaked phase; DATA_HS = 0
// sends it with the request, the basic transfer style.
// Timing: with one clock for all three domains, a single read on an idle
// link returns its response 16 clocks after its descriptor is taken: four
// FIFO crossings (descriptor, operation, core response, OCP response) of
// three clocks each (write, two synchronizer stages, including the load
// or access at the far side), plus request accept, dispatch, scheduling
// and the memory's registered response, one clock each.
// With unrelated clocks each crossing adds up to one clock of the
// receiving domain. In synchronous mode a FIFO passes a word in one clock,
// so with both blocks synchronous the same read takes 8 clocks. A burst
// streams one word per OCP clock in either mode.
module ocp_top
  import ocp_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH    = 8,
  parameter int unsigned Q_DEPTH       = 4,
  parameter int unsigned OOO_HOLD      = 8,
  parameter bit          WRITE_RESP_EN = 1'b0,
  parameter bit          DATA_HS       = 1'b1,
  parameter int unsigned MEM_WORDS     = 256,
  parameter bit          M_ASYNC       = 1'b1,
  parameter bit          S_ASYNC       = 1'b1
) (
  input  logic              m_clk,
  input  logic              ocp_clk,
  input  logic              s_clk,
  input  logic              rst_n,
  input  logic              breq_valid,
  output logic              breq_ready,
  input  burst_req_t        breq,
  input  logic              wd_valid,
  output logic              wd_ready,
  input  logic [DATA_W-1:0] wd_data,
  output logic              rsp_valid,
  input  logic              rsp_ready,
  output resp_t             rsp
);
  ocp_if bus (.clk(ocp_clk), .rst_n(rst_n));

  logic     op_valid, op_ready, cr_valid, cr_ready;
  core_op_t op;
  resp_t    cr;

  ocp_sys_master #(
    .FIFO_DEPTH (FIFO_DEPTH), .DATA_HS (DATA_HS), .ASYNC (M_ASYNC)
  ) u_sys_master (
    .clk (m_clk), .rst_n (rst_n), .bus (bus),
    .breq_valid, .breq_ready, .breq,
    .wd_valid, .wd_ready, .wd_data,
    .rsp_valid, .rsp_ready, .rsp
  );

  ocp_sys_slave #(
    .FIFO_DEPTH (FIFO_DEPTH), .Q_DEPTH (Q_DEPTH),
    .OOO_HOLD (OOO_HOLD), .WRITE_RESP_EN (WRITE_RESP_EN),
    .DATA_HS (DATA_HS), .ASYNC (S_ASYNC)
  ) u_sys_slave (
    .clk (s_clk), .rst_n (rst_n), .bus (bus),
    .op_valid, .op_ready, .op,
    .cr_valid, .cr_ready, .cr
  );

  ocp_mem_core #(.MEM_WORDS(MEM_WORDS)) u_core (
    .clk (s_clk), .rst_n (rst_n),
    .op_valid, .op_ready, .op,
    .rsp_valid (cr_valid), .rsp_ready (cr_ready), .rsp (cr)
  );
endmodule
