// output_bram: on-chip store for the partial sums of one output channel
// (H x W single-precision words, row by row), before bias and activation.
//
// Each processing element adds its OutBuffer result to the word stored
// here, so that results accumulate over the input channels and over the
// partitions of a layer. Like the input BRAM it is split into LANES banks,
// word i in bank i mod LANES: the PEs read and write the LANES consecutive
// words base .. base+LANES-1 in one cycle, each lane with its own write
// enable (lanes past the end of a row stay idle). The same read port serves
// the DMA readout, which takes lane 0.
// Timing: synchronous read, data one cycle after rd_en, held until the next
// rd_en; writes take effect at the clock edge (a read in the same cycle
// returns the old word). Depth 50,176 words holds one 224x224 output
// channel; the source gives no depth, so this size and the banking are this
// design's choice.
module output_bram
  import imac_pkg::*;
#(
  parameter int unsigned DEPTH = 50176,
  parameter int unsigned LANES = 8,
  localparam int unsigned AW    = $clog2(DEPTH),
  localparam int unsigned LB    = $clog2(LANES),
  localparam int unsigned ROWS  = (DEPTH + LANES - 1) / LANES,
  localparam int unsigned RW    = $clog2(ROWS)
) (
  input  logic          clk,
  // lane write port
  input  logic [AW-1:0] wr_base,
  input  logic [LANES-1:0] wr_en,
  input  fp32_t         wr_data [LANES],
  // lane read port
  input  logic          rd_en,
  input  logic [AW-1:0] rd_base,
  output fp32_t         rd_data [LANES]
);

  fp32_t mem [LANES][ROWS];

  fp32_t         bank_q [LANES];
  logic [LB-1:0] rot_q;

  initial assert (LANES == (1 << LB)) else $error("LANES must be a power of two");

  for (genvar b = 0; b < LANES; b++) begin : g_bank
    logic [LB-1:0] woff, roff;
    logic [AW:0]   waddr, raddr;
    always_comb begin
      woff  = LB'(b) - wr_base[LB-1:0];
      waddr = {1'b0, wr_base} + (AW+1)'(woff);
      roff  = LB'(b) - rd_base[LB-1:0];
      raddr = {1'b0, rd_base} + (AW+1)'(roff);
    end
    always_ff @(posedge clk) begin
      if (wr_en[woff] && (32'(waddr) < DEPTH))
        mem[b][RW'(waddr >> LB)] <= wr_data[woff];
      if (rd_en)
        bank_q[b] <= (32'(raddr) < DEPTH) ? mem[b][RW'(raddr >> LB)] : FP32_ZERO;
    end
  end

  always_ff @(posedge clk) begin
    if (rd_en) rot_q <= rd_base[LB-1:0];
  end

  always_comb begin
    for (int p = 0; p < LANES; p++) begin
      rd_data[p] = bank_q[LB'(rot_q + LB'(p))];
    end
  end

  // lanes of one write land in distinct banks by construction; keep the
  // write inside the memory
  always_ff @(posedge clk) begin
    if (|wr_en) assert (32'(wr_base) < DEPTH) else $error("output_bram write past the end");
  end

endmodule
