// ocp_mem_core: target core behind the system slave, a word-addressed memory.
//
// It takes one operation per clock from the system slave (valid/ready) and
// executes it at once: a write stores the data word, a read fetches one.
// Operations that need a response produce one on the response stream in
// the next cycle, carrying the read data (zero for writes), the tag,
// in-order and last flags of the operation and the code DVA. The memory
// holds MEM_WORDS 32-bit words; the byte address is divided by four and
// taken modulo MEM_WORDS. The OCP interface paper leaves the core open; its size and
// the single-cycle behaviour are this design's choices. The memory is not
// reset: a word reads back what was last written to it.
module ocp_mem_core
  import ocp_pkg::*;
#(
  parameter int unsigned MEM_WORDS = 256
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     op_valid,
  output logic     op_ready,
  input  core_op_t op,
  output logic     rsp_valid,
  input  logic     rsp_ready,
  output resp_t    rsp
);
  localparam int unsigned IW = $clog2(MEM_WORDS);

  logic [DATA_W-1:0] mem [MEM_WORDS];
  logic [IW-1:0]     idx;
  logic              take;

  assign idx      = op.addr[$clog2(WORD_BYTES) +: IW];
  assign op_ready = !rsp_valid || rsp_ready;
  assign take     = op_valid && op_ready;

  always_ff @(posedge clk) begin
    if (take && op.write) mem[idx] <= op.data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsp_valid <= 1'b0;
      rsp       <= '{resp: RESP_NULL, default: '0};
    end else if (op_ready) begin
      rsp_valid <= take && op.need_resp;
      if (take && op.need_resp) begin
        rsp.resp    <= RESP_DVA;
        rsp.data    <= op.write ? '0 : mem[idx];
        rsp.tag     <= op.tag;
        rsp.inorder <= op.inorder;
        rsp.last    <= op.last;
      end
    end
  end
endmodule
