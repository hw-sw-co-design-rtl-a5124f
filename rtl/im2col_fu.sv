// im2col_fu: the im2col functional unit. It unrolls the input feature map of
// one input channel on the fly, so that the unrolled (replicated) columns are
// never stored: for every output position the K x K window of inputs is
// produced tap by tap, straight into the PEs' Im2colBuffers.
//
// One start walks one input channel. The LANES processing elements take
// LANES neighbouring output columns of one output row (a column group). For
// each group the unit issues K*K taps, one per cycle, in the order
// (kr, kc) = (0,0), (0,1), ... (K-1,K-1); for each tap it gives the input
// address of lane 0 (the lanes read consecutive words), a mask of the lanes
// whose input lies in the zero padding, the mask of lanes that hold a real
// output column, the weight address, first/last-tap flags and the output
// address of lane 0. Groups run along a row, then rows down the map.
// Output size is (H+2*PAD-K+1) x (W+2*PAD-K+1), stride 1.
// With K = 1 and no padding nothing needs unrolling (im2col bypass): the map
// is walked as one linear vector, LANES words per cycle, regardless of rows.
// Timing: start is taken when idle; the first tap appears one cycle later,
// then one tap per cycle with no gaps; done pulses with the last tap.
// The tap order, the column-group mapping of PEs and the bypass walk are
// this design's choices; the source shows the result for two PEs on a 5x5
// map with a 3x3 kernel and padding 1.
module im2col_fu
  import imac_pkg::*;
#(
  parameter int unsigned LANES   = 8,
  parameter int unsigned IN_AW   = 16,   // input BRAM address width
  parameter int unsigned OUT_AW  = 16,   // output BRAM address width
  parameter int unsigned W_AW    = 9     // weight BRAM address width
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  conv_cfg_t              cfg,
  input  logic [IN_AW-1:0]       ch_base,   // first word of this channel
  input  logic [W_AW-1:0]        w_base,    // first weight of this channel
  output logic                   busy,
  output logic                   done,
  // one tap per cycle
  output logic                   tap_valid,
  output logic signed [IN_AW+1:0] in_base,
  output logic [LANES-1:0]       pad_mask,
  output logic [LANES-1:0]       lane_en,
  output logic [W_AW-1:0]        w_addr,
  output logic                   tap_first,
  output logic                   tap_last,
  output logic [OUT_AW-1:0]      out_base,
  output logic                   bypass
);

  localparam int SW = 20;  // signed working width for addresses

  logic [15:0] r, c0, kr, kc;
  logic [SW-1:0] lin;

  logic signed [SW-1:0] h, w, k, pd, ho, wo, ir, icb, hw;
  logic          byp;
  logic          last_tap, last_grp, last_row, last_all;
  logic signed [SW-1:0] n_base;
  logic [LANES-1:0] n_pad, n_en;
  logic [SW-1:0] n_waddr, n_out;

  always_comb begin
    h   = SW'(cfg.height);
    w   = SW'(cfg.width);
    k   = SW'(cfg.ksize);
    pd  = SW'(cfg.pad);
    ho  = h + 2 * pd - k + 1;
    wo  = w + 2 * pd - k + 1;
    hw  = h * w;
    byp = (cfg.ksize == 4'd1) && (cfg.pad == 4'd0);

    ir  = SW'(r) + SW'(kr) - pd;
    icb = SW'(c0) + SW'(kc) - pd;

    if (byp) begin
      n_base  = SW'(ch_base) + SW'(lin);
      n_waddr = SW'(w_base);
      n_out   = lin;
      for (int p = 0; p < LANES; p++) begin
        n_en[p]  = (SW'(lin) + SW'(p)) < hw;
        n_pad[p] = !n_en[p];
      end
      last_tap = 1'b1;
      last_all = (SW'(lin) + SW'(LANES)) >= hw;
      last_grp = 1'b0;
      last_row = 1'b0;
    end else begin
      n_base  = SW'(ch_base) + ir * w + icb;
      n_waddr = SW'(w_base) + SW'(kr) * k + SW'(kc);
      n_out   = SW'(r) * wo + SW'(c0);
      for (int p = 0; p < LANES; p++) begin
        n_en[p]  = (SW'(c0) + SW'(p)) < wo;
        n_pad[p] = (ir < 0) || (ir >= h) || (icb + SW'(p) < 0) || (icb + SW'(p) >= w);
      end
      last_tap = (SW'(kr) == k - 1) && (SW'(kc) == k - 1);
      last_grp = (SW'(c0) + SW'(LANES)) >= wo;
      last_row = (SW'(r) == ho - 1);
      last_all = last_tap && last_grp && last_row;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      done      <= 1'b0;
      tap_valid <= 1'b0;
      r  <= '0; c0 <= '0; kr <= '0; kc <= '0; lin <= '0;
      in_base   <= '0;
      pad_mask  <= '0;
      lane_en   <= '0;
      w_addr    <= '0;
      tap_first <= 1'b0;
      tap_last  <= 1'b0;
      out_base  <= '0;
      bypass    <= 1'b0;
    end else begin
      done      <= 1'b0;
      tap_valid <= busy;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          r  <= '0; c0 <= '0; kr <= '0; kc <= '0; lin <= '0;
        end
      end else begin
        in_base   <= (IN_AW+2)'(n_base);
        pad_mask  <= n_pad;
        lane_en   <= n_en;
        w_addr    <= W_AW'(n_waddr);
        tap_first <= byp || (kr == 16'd0 && kc == 16'd0);
        tap_last  <= last_tap;
        out_base  <= OUT_AW'(n_out);
        bypass    <= byp;
        if (last_all) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
        if (byp) begin
          lin <= lin + SW'(LANES);
        end else if (SW'(kc) != k - 1) begin
          kc <= kc + 16'd1;
        end else begin
          kc <= '0;
          if (SW'(kr) != k - 1) begin
            kr <= kr + 16'd1;
          end else begin
            kr <= '0;
            if (!last_grp) begin
              c0 <= c0 + 16'(LANES);
            end else begin
              c0 <= '0;
              r  <= r + 16'd1;
            end
          end
        end
      end
    end
  end

endmodule
