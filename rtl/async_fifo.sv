// async_fifo: dual-clock FIFO that carries words from a write clock domain
// to a read clock domain.
//
// This is the FIFO buffer that gives flow control when a core and the OCP
// interface run at different frequencies. It is the classic Gray-code
// design: each side keeps a binary pointer with one extra bit, publishes it
// in Gray code, and reads the other side's Gray pointer through a two-flop
// synchronizer. Full is judged in the write domain and empty in the read
// domain from these delayed copies, so both are pessimistic but never
// wrong. The read side is first-word-fall-through: rdata shows the head
// word while rempty is low, and rd_en pops it. A word written at one write
// clock edge makes rempty fall after the second read clock edge that
// follows it (with equal clocks; up to one read clock more when the clocks
// are unrelated). Freed space reaches wfull with the same delay. DEPTH must
// be a power of two.
// The reset is one asynchronous active-low input shared by both domains and
// must be held for a few cycles of the slower clock. The OCP interface
// paper asks only for a FIFO buffer between differently clocked parts; the
// Gray-code structure, depth and read style are this design's choices.
module async_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 8
) (
  input  logic             wclk,
  input  logic             rclk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wdata,
  output logic             wfull,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rdata,
  output logic             rempty
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer seen in the write domain
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer seen in the read domain
  logic [AW:0] wbin_nx, rbin_nx;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // ---- write domain
  assign wbin_nx = wbin + {{AW{1'b0}}, (wr_en && !wfull)};
  assign wfull   = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});

  always_ff @(posedge wclk or negedge rst_n) begin
    if (!rst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      wbin     <= wbin_nx;
      wgray    <= bin2gray(wbin_nx);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end

  always_ff @(posedge wclk) begin
    if (wr_en && !wfull) mem[wbin[AW-1:0]] <= wdata;
  end

  // ---- read domain
  assign rbin_nx = rbin + {{AW{1'b0}}, (rd_en && !rempty)};
  assign rempty  = (rgray == wgray_r2);
  assign rdata   = mem[rbin[AW-1:0]];

  always_ff @(posedge rclk or negedge rst_n) begin
    if (!rst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      rbin     <= rbin_nx;
      rgray    <= bin2gray(rbin_nx);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end

  initial begin
    if (DEPTH < 4 || (DEPTH & (DEPTH - 1)) != 0)
      $fatal(1, "async_fifo: DEPTH must be a power of two and at least 4");
  end
endmodule
