// imac_top: the iMAC (im2col + MAC) convolution accelerator. It computes one
// output channel of a convolution layer, for the slice of input channels that
// fits its memories, from input feature maps and weights that a DMA streams
// in; the host CPU adds bias and applies the activation itself.
//
// Instead of receiving im2col-unrolled inputs (nine times the data for a
// 3x3 kernel), the accelerator receives each input map once and unrolls it
// on chip: the im2col unit turns every output window into a sequence of
// K*K taps, the input BRAM delivers the taps of LANES neighbouring output
// columns in one cycle, and LANES processing elements multiply them by the
// broadcast weight, sum the window in their OutBuffers and add the sum into
// the output BRAM. Input channels are walked one after the other, so the
// output BRAM ends up holding the sum over all of them; a layer with more
// input channels than fit is done in several runs (partitions) that keep
// adding into the output BRAM, the first one with FIRST set.
//
// Use: write HEIGHT, WIDTH, NCH, KSIZE, PAD, then CTRL = ARM|FIRST; stream
// NCH*K*K weights (channel by channel, taps row by row) and then NCH*H*W
// input words (channel by channel, row by row) into s_*. Computing starts by
// itself after the last input word; poll STATUS.DONE (or watch done), then
// write CTRL = READOUT to stream the output channel, row by row, out of m_*.
// Throughput: one tap per cycle for all LANES PEs, i.e. about
// NCH * Ho * ceil(Wo/LANES) * K*K cycles per run (NCH * ceil(H*W/LANES) for
// 1x1 kernels, where im2col is bypassed), plus one cycle per channel and
// seven of pipeline latency. Stride 1 only.
// Defaults: 8 PEs and 32-bit floats as in the source's implementation,
// 50,176-word input and 288-word weight BRAMs as in its sizing example, and
// a 50,176-word output BRAM (one 224x224 output channel), which is this
// design's choice.
module imac_top
  import imac_pkg::*;
#(
  parameter int unsigned NUM_PE    = 8,
  parameter int unsigned IN_DEPTH  = 50176,
  parameter int unsigned W_DEPTH   = 288,
  parameter int unsigned OUT_DEPTH = 50176,
  localparam int unsigned IN_AW  = $clog2(IN_DEPTH),
  localparam int unsigned W_AW   = $clog2(W_DEPTH),
  localparam int unsigned OUT_AW = $clog2(OUT_DEPTH)
) (
  input  logic        clk,
  input  logic        rst_n,
  // host register port
  input  logic        reg_we,
  input  logic [2:0]  reg_addr,
  input  logic [31:0] reg_wdata,
  output logic [31:0] reg_rdata,
  // DMA stream in (weights, then input feature maps)
  input  logic        s_valid,
  output logic        s_ready,
  input  logic [31:0] s_data,
  // DMA stream out (output channel)
  output logic        m_valid,
  input  logic        m_ready,
  output logic [31:0] m_data,
  output logic        m_last,
  // run finished (same as STATUS.DONE)
  output logic        done
);

  conv_cfg_t cfg;

  // loader
  logic              ld_arm, ld_busy, ld_w_done, ld_in_done;
  logic [W_AW:0]     ld_n_weights;
  logic [IN_AW:0]    ld_n_inputs;
  logic              wb_wr_en, ib_wr_en;
  logic [W_AW-1:0]   wb_wr_addr;
  logic [IN_AW-1:0]  ib_wr_addr;
  fp32_t             ld_data;

  // im2col unit
  logic              fu_start, fu_busy, fu_done, fu_ovr;
  logic [IN_AW-1:0]  fu_ch_base;
  logic [W_AW-1:0]   fu_w_base;
  logic              tap_valid, tap_first, tap_last, tap_bypass;
  logic signed [IN_AW+1:0] tap_in_base;
  logic [NUM_PE-1:0] tap_pad, tap_en;
  logic [W_AW-1:0]   tap_w_addr;
  logic [OUT_AW-1:0] tap_out_base;

  // memories
  fp32_t             ib_rd [NUM_PE];
  fp32_t             wb_rd;
  fp32_t             ob_rd [NUM_PE];
  fp32_t             ob_wr [NUM_PE];
  logic [NUM_PE-1:0] ob_wr_en;
  logic              ob_rd_en;
  logic [OUT_AW-1:0] ob_rd_base;

  // PEs
  logic              pe_rd_en   [NUM_PE];
  logic [OUT_AW-1:0] pe_rd_base [NUM_PE];
  logic [OUT_AW-1:0] pe_wr_base [NUM_PE];
  logic [NUM_PE-1:0] pe_busy;

  // readout
  logic              ro_start, ro_busy, ro_rd_en, computing;
  logic [OUT_AW:0]   ro_n;
  logic [OUT_AW-1:0] ro_rd_addr;

  imac_ctrl #(.IN_AW(IN_AW), .OUT_AW(OUT_AW), .W_AW(W_AW)) u_ctrl (
    .clk, .rst_n,
    .reg_we, .reg_addr, .reg_wdata, .reg_rdata,
    .cfg,
    .ld_arm, .ld_n_weights, .ld_n_inputs, .ld_busy, .ld_in_done,
    .fu_start, .fu_ch_base, .fu_w_base, .fu_ovr, .fu_busy, .fu_done,
    .pe_busy(|pe_busy),
    .ro_start, .ro_n, .ro_busy,
    .done, .computing
  );

  stream_loader #(.IN_AW(IN_AW), .W_AW(W_AW)) u_loader (
    .clk, .rst_n,
    .arm(ld_arm), .n_weights(ld_n_weights), .n_inputs(ld_n_inputs),
    .s_valid, .s_ready, .s_data,
    .wb_wr_en, .wb_wr_addr, .ib_wr_en, .ib_wr_addr, .wr_data(ld_data),
    .busy(ld_busy), .w_done(ld_w_done), .in_done(ld_in_done)
  );

  weight_bram #(.DEPTH(W_DEPTH)) u_weight_bram (
    .clk,
    .wr_en(wb_wr_en), .wr_addr(wb_wr_addr), .wr_data(ld_data),
    .rd_en(tap_valid), .rd_addr(tap_w_addr), .rd_data(wb_rd)
  );

  input_bram #(.DEPTH(IN_DEPTH), .LANES(NUM_PE)) u_input_bram (
    .clk,
    .wr_en(ib_wr_en), .wr_addr(ib_wr_addr), .wr_data(ld_data),
    .rd_en(tap_valid), .rd_base(tap_in_base), .rd_data(ib_rd)
  );

  im2col_fu #(.LANES(NUM_PE), .IN_AW(IN_AW), .OUT_AW(OUT_AW), .W_AW(W_AW)) u_im2col (
    .clk, .rst_n,
    .start(fu_start), .cfg, .ch_base(fu_ch_base), .w_base(fu_w_base),
    .busy(fu_busy), .done(fu_done),
    .tap_valid, .in_base(tap_in_base), .pad_mask(tap_pad), .lane_en(tap_en),
    .w_addr(tap_w_addr), .tap_first, .tap_last, .out_base(tap_out_base),
    .bypass(tap_bypass)
  );

  for (genvar p = 0; p < NUM_PE; p++) begin : g_pe
    logic pe_wr_en_p;
    imac_pe #(.OUT_AW(OUT_AW)) u_pe (
      .clk, .rst_n,
      .tap_valid, .tap_pad(tap_pad[p]), .tap_en(tap_en[p]),
      .tap_first, .tap_last, .tap_ovr(fu_ovr), .tap_out_base,
      .in_data(ib_rd[p]), .w_data(wb_rd),
      .ob_rd_en(pe_rd_en[p]), .ob_rd_base(pe_rd_base[p]), .ob_rd_data(ob_rd[p]),
      .ob_wr_en(pe_wr_en_p), .ob_wr_base(pe_wr_base[p]), .ob_wr_data(ob_wr[p]),
      .busy(pe_busy[p])
    );
    assign ob_wr_en[p] = pe_wr_en_p;
  end

  // the output BRAM read port serves the PEs while computing, else the readout
  always_comb begin
    ob_rd_en   = computing ? pe_rd_en[0] : ro_rd_en;
    ob_rd_base = computing ? pe_rd_base[0] : ro_rd_addr;
  end

  output_bram #(.DEPTH(OUT_DEPTH), .LANES(NUM_PE)) u_output_bram (
    .clk,
    .wr_base(pe_wr_base[0]), .wr_en(ob_wr_en), .wr_data(ob_wr),
    .rd_en(ob_rd_en), .rd_base(ob_rd_base), .rd_data(ob_rd)
  );

  stream_unloader #(.OUT_AW(OUT_AW)) u_unloader (
    .clk, .rst_n,
    .start(ro_start), .n(ro_n),
    .rd_en(ro_rd_en), .rd_addr(ro_rd_addr), .rd_data(ob_rd[0]),
    .m_valid, .m_ready, .m_data, .m_last, .busy(ro_busy)
  );

endmodule
