// input_bram: on-chip store for the input feature maps of one partition
// (NCH channels of H x W single-precision words, channel after channel, row
// by row).
//
// The DMA side writes one word per cycle at a linear address. The compute
// side reads LANES words per cycle at the consecutive addresses
// rd_base .. rd_base+LANES-1, one per processing element: the eight PEs work
// on eight neighbouring output columns, so for each kernel tap they need
// eight neighbouring input words. The memory is split into LANES banks,
// word i in bank i mod LANES, so any LANES consecutive words sit in distinct
// banks and are read in one cycle; a rotation puts them back in lane order.
// rd_base is signed: at a padded border the window starts before the map,
// and lanes whose address falls outside the memory return zero (the
// im2col unit masks padding lanes anyway).
// Timing: synchronous read, data one cycle after rd_en, held until the next
// rd_en. Size: the source's example input BRAM of 50,176 words (one 224x224
// channel); the banking is this design's own.
module input_bram
  import imac_pkg::*;
#(
  parameter int unsigned DEPTH = 50176,
  parameter int unsigned LANES = 8,
  localparam int unsigned AW    = $clog2(DEPTH),
  localparam int unsigned LB    = $clog2(LANES),
  localparam int unsigned ROWS  = (DEPTH + LANES - 1) / LANES,
  localparam int unsigned RW    = $clog2(ROWS)
) (
  input  logic                 clk,
  // DMA write port
  input  logic                 wr_en,
  input  logic [AW-1:0]        wr_addr,
  input  fp32_t                wr_data,
  // lane read port
  input  logic                 rd_en,
  input  logic signed [AW+1:0] rd_base,
  output fp32_t                rd_data [LANES]
);

  fp32_t mem [LANES][ROWS];

  fp32_t         bank_q  [LANES];
  logic [LB-1:0] rot_q;

  initial assert (LANES == (1 << LB)) else $error("LANES must be a power of two");

  always_ff @(posedge clk) begin
    if (wr_en && (32'(wr_addr) < DEPTH))
      mem[wr_addr[LB-1:0]][RW'(wr_addr >> LB)] <= wr_data;
  end

  for (genvar b = 0; b < LANES; b++) begin : g_bank
    logic [LB-1:0]        off;
    logic signed [AW+1:0] addr;
    logic [AW+1:0]        row;
    logic                 ok;
    always_comb begin
      off  = LB'(b) - rd_base[LB-1:0];
      addr = rd_base + (AW+2)'(off);
      row  = (AW+2)'(addr >>> LB);
      ok   = (addr >= 0) && (addr < (AW+2)'(DEPTH));
    end
    always_ff @(posedge clk) begin
      if (rd_en) begin
        bank_q[b]  <= ok ? mem[b][RW'(row)] : FP32_ZERO;
      end
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

endmodule
