// ocp_sys_master: system master, the bus-side wrapper of the initiating core.
//
// The core runs on its own system clock (clk); the OCP interface runs on
// the common OCP clock. Three dual-clock FIFOs carry the core's burst
// descriptors and write data words into the OCP clock domain and the
// responses back out, and the OCP master drives the OCP signals. When the
// core has no clock of its own, the OCP clock is connected to clk as well.
// ASYNC selects the transfer mode: with ASYNC = 1 (asynchronous mode) the
// FIFOs are dual-clock and a descriptor reaches the OCP master three to four
// OCP clocks after it is written; with ASYNC = 0 (synchronous mode, clk must
// be the OCP clock) they are single-clock FIFOs and it arrives one clock
// later. All core-side streams are valid/ready in the clk domain. The split
// into a core-clock side and an OCP-clock side and the two modes follow the
// OCP interface paper; the FIFO depth is this design's choice.
module ocp_sys_master
  import ocp_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 8,
  parameter bit          DATA_HS    = 1'b1,
  parameter bit          ASYNC      = 1'b1
) (
  input  logic              clk,        // system clock of the core
  input  logic              rst_n,
  ocp_if.master             bus,        // OCP side, clocked by bus.clk
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
  logic              b_full, b_empty, b_pop;
  burst_req_t        b_head;
  logic              d_full, d_empty, d_pop;
  logic [DATA_W-1:0] d_head;
  logic              r_full, r_empty, r_push;
  resp_t             r_in;

  assign breq_ready = !b_full;
  assign wd_ready   = !d_full;
  assign rsp_valid  = !r_empty;

  if (ASYNC) begin : g_async
    async_fifo #(.WIDTH($bits(burst_req_t)), .DEPTH(FIFO_DEPTH)) u_breq (
      .wclk (clk), .rclk (bus.clk), .rst_n (rst_n),
      .wr_en (breq_valid), .wdata (breq), .wfull (b_full),
      .rd_en (b_pop), .rdata (b_head), .rempty (b_empty)
    );

    async_fifo #(.WIDTH(DATA_W), .DEPTH(FIFO_DEPTH)) u_wdata (
      .wclk (clk), .rclk (bus.clk), .rst_n (rst_n),
      .wr_en (wd_valid), .wdata (wd_data), .wfull (d_full),
      .rd_en (d_pop), .rdata (d_head), .rempty (d_empty)
    );

    async_fifo #(.WIDTH($bits(resp_t)), .DEPTH(FIFO_DEPTH)) u_rsp (
      .wclk (bus.clk), .rclk (clk), .rst_n (rst_n),
      .wr_en (r_push), .wdata (r_in), .wfull (r_full),
      .rd_en (rsp_ready), .rdata (rsp), .rempty (r_empty)
    );
  end else begin : g_sync
    // Synchronous mode: clk and bus.clk are the same clock.
    sync_fifo #(.WIDTH($bits(burst_req_t)), .DEPTH(FIFO_DEPTH)) u_breq (
      .clk (bus.clk), .rst_n (rst_n),
      .wr_en (breq_valid), .wdata (breq), .full (b_full),
      .rd_en (b_pop), .rdata (b_head), .empty (b_empty)
    );

    sync_fifo #(.WIDTH(DATA_W), .DEPTH(FIFO_DEPTH)) u_wdata (
      .clk (bus.clk), .rst_n (rst_n),
      .wr_en (wd_valid), .wdata (wd_data), .full (d_full),
      .rd_en (d_pop), .rdata (d_head), .empty (d_empty)
    );

    sync_fifo #(.WIDTH($bits(resp_t)), .DEPTH(FIFO_DEPTH)) u_rsp (
      .clk (bus.clk), .rst_n (rst_n),
      .wr_en (r_push), .wdata (r_in), .full (r_full),
      .rd_en (rsp_ready), .rdata (rsp), .empty (r_empty)
    );
  end

  logic r_valid_ocp;
  assign r_push = r_valid_ocp && !r_full;

  ocp_master #(.DATA_HS(DATA_HS)) u_master (
    .bus        (bus),
    .breq_valid (!b_empty),
    .breq_ready (b_pop),
    .breq       (b_head),
    .wd_valid   (!d_empty),
    .wd_ready   (d_pop),
    .wd_data    (d_head),
    .rsp_valid  (r_valid_ocp),
    .rsp_ready  (!r_full),
    .rsp        (r_in)
  );
endmodule
