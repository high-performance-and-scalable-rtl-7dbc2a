// ocp_sys_slave: system slave, the bus-side wrapper of the target core.
//
// It holds the OCP slave, which runs on the OCP clock, and two dual-clock
// FIFOs that carry the slave's operations to the target core's own clock
// (clk) and the core's responses back. When the target core has no clock
// of its own, the OCP clock is connected to clk as well. ASYNC = 1
// (asynchronous mode) uses dual-clock FIFOs; ASYNC = 0 (synchronous mode,
// clk must be the OCP clock) uses single-clock FIFOs, which save the two
// synchronizer clocks on each crossing. The core-side streams are
// valid/ready in the clk domain. The split into a core-clock side and an
// OCP-clock side and the two modes follow the OCP interface paper; the FIFO
// depth and the slave's queue parameters are this design's choices.
module ocp_sys_slave
  import ocp_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH    = 8,
  parameter int unsigned Q_DEPTH       = 4,
  parameter int unsigned OOO_HOLD      = 8,
  parameter bit          WRITE_RESP_EN = 1'b0,
  parameter bit          DATA_HS       = 1'b1,
  parameter bit          ASYNC         = 1'b1
) (
  input  logic     clk,          // clock of the target core
  input  logic     rst_n,
  ocp_if.slave     bus,          // OCP side, clocked by bus.clk
  output logic     op_valid,
  input  logic     op_ready,
  output core_op_t op,
  input  logic     cr_valid,
  output logic     cr_ready,
  input  resp_t    cr
);
  logic     o_valid, o_full, o_empty;
  core_op_t o_op;
  logic     c_full, c_empty;
  resp_t    c_head;
  logic     c_pop;

  ocp_slave #(
    .Q_DEPTH       (Q_DEPTH),
    .OOO_HOLD      (OOO_HOLD),
    .WRITE_RESP_EN (WRITE_RESP_EN),
    .DATA_HS       (DATA_HS)
  ) u_slave (
    .bus      (bus),
    .op_valid (o_valid),
    .op_ready (!o_full),
    .op       (o_op),
    .cr_valid (!c_empty),
    .cr_ready (c_pop),
    .cr       (c_head)
  );


  if (ASYNC) begin : g_async
    async_fifo #(.WIDTH($bits(core_op_t)), .DEPTH(FIFO_DEPTH)) u_op (
      .wclk (bus.clk), .rclk (clk), .rst_n (rst_n),
      .wr_en (o_valid), .wdata (o_op), .wfull (o_full),
      .rd_en (op_ready), .rdata (op), .rempty (o_empty)
    );

    async_fifo #(.WIDTH($bits(resp_t)), .DEPTH(FIFO_DEPTH)) u_cr (
      .wclk (clk), .rclk (bus.clk), .rst_n (rst_n),
      .wr_en (cr_valid), .wdata (cr), .wfull (c_full),
      .rd_en (c_pop), .rdata (c_head), .rempty (c_empty)
    );
  end else begin : g_sync
    // Synchronous mode: clk and bus.clk are the same clock.
    sync_fifo #(.WIDTH($bits(core_op_t)), .DEPTH(FIFO_DEPTH)) u_op (
      .clk (bus.clk), .rst_n (rst_n),
      .wr_en (o_valid), .wdata (o_op), .full (o_full),
      .rd_en (op_ready), .rdata (op), .empty (o_empty)
    );

    sync_fifo #(.WIDTH($bits(resp_t)), .DEPTH(FIFO_DEPTH)) u_cr (
      .clk (bus.clk), .rst_n (rst_n),
      .wr_en (cr_valid), .wdata (cr), .full (c_full),
      .rd_en (c_pop), .rdata (c_head), .empty (c_empty)
    );
  end
  assign op_valid = !o_empty;

  assign cr_ready = !c_full;
endmodule
