// imac_pe: one iMAC processing element. It takes one unrolled input word per
// cycle from the im2col unit, multiplies it by the broadcast weight and
// accumulates the K*K products of a window; the window sum is then added to
// the word already held in the output BRAM, accumulating across input
// channels.
//
// The stages, with the names of the source's PE diagram:
//   s0  tap tags registered while the input and weight BRAMs read
//   s1  Im2colBuffer  <- input word, or 0 for a zero-padding tap; weight
//   s2  MulBuffer     <- Im2colBuffer x weight            (fp32_mul)
//   s3  OutBuffer     <- MulBuffer (first tap) or OutBuffer + MulBuffer
//   s4  on the last tap: read the output BRAM word at the PE's position
//   s5  write OutBuffer + output word back (OutBuffer alone when the
//       overwrite flag marks the first input channel of a layer)
// A new tap can enter every cycle. Two reads of the same output word are at
// least two cycles apart (the im2col unit leaves one idle cycle between
// channels), so the s4 read always sees the s5 write before it.
// All LANES PEs run in lockstep; the read and write addresses are the same
// for all of them and the top takes them from PE 0, the lane offset is
// added inside the output BRAM.
// The datapath order follows the source's PE diagram; the stage timing and
// the overwrite flag are this design's choices.
module imac_pe
  import imac_pkg::*;
#(
  parameter int unsigned OUT_AW = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  // tap, at the cycle it is issued to the BRAMs
  input  logic              tap_valid,
  input  logic              tap_pad,
  input  logic              tap_en,
  input  logic              tap_first,
  input  logic              tap_last,
  input  logic              tap_ovr,
  input  logic [OUT_AW-1:0] tap_out_base,
  // BRAM data, one cycle after the tap
  input  fp32_t             in_data,
  input  fp32_t             w_data,
  // output BRAM read-modify-write
  output logic              ob_rd_en,
  output logic [OUT_AW-1:0] ob_rd_base,
  input  fp32_t             ob_rd_data,
  output logic              ob_wr_en,
  output logic [OUT_AW-1:0] ob_wr_base,
  output fp32_t             ob_wr_data,
  // status
  output logic              busy
);

  typedef struct packed {
    logic              valid;
    logic              pad;
    logic              en;
    logic              first;
    logic              last;
    logic              ovr;
    logic [OUT_AW-1:0] base;
  } tag_t;

  tag_t  t0, t1, t2, t3;
  fp32_t im2col_buf, w_buf, mul_buf, out_buf;
  fp32_t mul_y, acc_y, sum_y;

  // s4/s5 state
  logic              d_valid, d_en, d_ovr;
  logic [OUT_AW-1:0] d_base;
  fp32_t             d_val;

  fp32_mul u_mul (.a(im2col_buf), .b(w_buf), .y(mul_y));
  fp32_add u_acc (.a(out_buf), .b(mul_buf), .y(acc_y));
  fp32_add u_out (.a(d_val), .b(ob_rd_data), .y(sum_y));

  always_comb begin
    ob_rd_en   = t3.valid && t3.last;
    ob_rd_base = t3.base;
    ob_wr_en   = d_valid && d_en;
    ob_wr_base = d_base;
    ob_wr_data = d_ovr ? d_val : sum_y;
    busy       = t0.valid || t1.valid || t2.valid || t3.valid || d_valid;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t0 <= '0; t1 <= '0; t2 <= '0; t3 <= '0;
      im2col_buf <= FP32_ZERO;
      w_buf      <= FP32_ZERO;
      mul_buf    <= FP32_ZERO;
      out_buf    <= FP32_ZERO;
      d_valid    <= 1'b0;
      d_en       <= 1'b0;
      d_ovr      <= 1'b0;
      d_base     <= '0;
      d_val      <= FP32_ZERO;
    end else begin
      // s0: tags travel with the BRAM read
      t0 <= '{valid: tap_valid, pad: tap_pad, en: tap_en, first: tap_first,
              last: tap_last, ovr: tap_ovr, base: tap_out_base};
      // s1: Im2colBuffer
      t1 <= t0;
      if (t0.valid) begin
        im2col_buf <= t0.pad ? FP32_ZERO : in_data;
        w_buf      <= w_data;
      end
      // s2: MulBuffer
      t2 <= t1;
      if (t1.valid) mul_buf <= mul_y;
      // s3: OutBuffer
      t3 <= t2;
      if (t2.valid) out_buf <= t2.first ? mul_buf : acc_y;
      // s4: output word read issued by ob_rd_en; keep the window sum
      d_valid <= ob_rd_en;
      if (ob_rd_en) begin
        d_en   <= t3.en;
        d_ovr  <= t3.ovr;
        d_base <= t3.base;
        d_val  <= out_buf;
      end
    end
  end

  // the read of s4 never targets the word s5 is writing in the same cycle
  a_no_rmw_overlap: assert property (@(posedge clk) disable iff (!rst_n)
    ob_rd_en && ob_wr_en |-> ob_rd_base != ob_wr_base)
    else $error("output BRAM read of a word being written");

endmodule
