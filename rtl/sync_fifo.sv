// sync_fifo: single-clock first-word-fall-through FIFO.
//
// The head word is on rdata whenever empty is low; a pop (rd_en) removes it
// at the clock edge. A push (wr_en) while full and a pop while empty are
// ignored. DEPTH must be a power of two. Storage is a register array with
// one extra pointer bit to tell full from empty. Reset is asynchronous and
// active low. Used as the queues inside the OCP master and slave; a
// generic building block of this design, not taken from the paper.
module sync_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wdata,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rdata,
  output logic             full,
  output logic             empty
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wptr, rptr;

  assign empty = (wptr == rptr);
  assign full  = (wptr[AW] != rptr[AW]) && (wptr[AW-1:0] == rptr[AW-1:0]);
  assign rdata = mem[rptr[AW-1:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (wr_en && !full)  wptr <= wptr + 1'b1;
      if (rd_en && !empty) rptr <= rptr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en && !full) mem[wptr[AW-1:0]] <= wdata;
  end

  initial begin
    if (DEPTH < 2 || (DEPTH & (DEPTH - 1)) != 0)
      $fatal(1, "sync_fifo: DEPTH must be a power of two and at least 2");
  end
endmodule
