// weight_bram: on-chip store for the K x K weights of every input channel of
// the current partition, for one output channel (word c*K*K + tap).
//
// The DMA side writes one word per cycle; the compute side reads one word
// per cycle, broadcast to all processing elements (they share the filter and
// differ in the output column). Depth 288 words is the weight BRAM of the
// source's sizing example; the one-read, one-write organisation is this
// design's choice.
// Timing: synchronous read, data one cycle after rd_en, held otherwise.
module weight_bram
  import imac_pkg::*;
#(
  parameter int unsigned DEPTH = 288,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  fp32_t         wr_data,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output fp32_t         rd_data
);

  fp32_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en && (32'(wr_addr) < DEPTH)) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= (32'(rd_addr) < DEPTH) ? mem[rd_addr] : FP32_ZERO;
  end

endmodule
