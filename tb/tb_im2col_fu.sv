// tb_im2col_fu: checks the im2col unit's tap stream.
// First with two lanes on the 5x5 example (values 1..25 at addresses 0..24,
// 3x3 kernel, padding 1): the input words the lanes select for the first
// column group must be the nine pairs of the worked example,
// (0,0) (0,0) (0,0) (0,1) (1,2) (2,3) (0,6) (6,7) (7,8).
// Then, for several sizes, kernels, paddings and lane counts, every tap is
// compared with a loop nest written here (rows, column groups, kernel rows,
// kernel columns), lane by lane: padding mask, input address of real lanes,
// lane enables, weight address, first/last flags and output address. The
// taps must come one per cycle without gaps and done must pulse with the
// last one. The 1x1 bypass walk is checked the same way.
module tb_im2col_fu;
  import imac_pkg::*;

  localparam int L = 2;   // lanes of the small instance
  localparam int L8 = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // two instances: 2 lanes and 8 lanes
  logic start2 = 1'b0, start8 = 1'b0;
  conv_cfg_t cfg;
  logic [15:0] ch_base = '0;
  logic [8:0]  w_base = '0;
  logic busy2, done2, tv2, tf2, tl2, byp2, busy8, done8, tv8, tf8, tl8, byp8;
  logic signed [17:0] ib2, ib8;
  logic [L-1:0] pm2, le2;
  logic [L8-1:0] pm8, le8;
  logic [8:0] wa2, wa8;
  logic [15:0] ob2, ob8;

  im2col_fu #(.LANES(L)) u2 (.clk, .rst_n, .start(start2), .cfg, .ch_base, .w_base,
    .busy(busy2), .done(done2), .tap_valid(tv2), .in_base(ib2), .pad_mask(pm2), .lane_en(le2),
    .w_addr(wa2), .tap_first(tf2), .tap_last(tl2), .out_base(ob2), .bypass(byp2));
  im2col_fu #(.LANES(L8)) u8 (.clk, .rst_n, .start(start8), .cfg, .ch_base, .w_base,
    .busy(busy8), .done(done8), .tap_valid(tv8), .in_base(ib8), .pad_mask(pm8), .lane_en(le8),
    .w_addr(wa8), .tap_first(tf8), .tap_last(tl8), .out_base(ob8), .bypass(byp8));

  // generic check of one channel walk on the 8-lane instance (or 2-lane)
  task automatic walk(int H, int W, int K, int PD, int CB, int WB, bit use8);
    int lanes, ho, wo, n_exp, n_got;
    int exp_ir[$], exp_c0[$], exp_r[$], exp_t[$];
    lanes = use8 ? L8 : L;
    ho = H + 2 * PD - K + 1;
    wo = W + 2 * PD - K + 1;
    cfg = '{height: 16'(H), width: 16'(W), nch: 16'd1, ksize: 4'(K), pad: 4'(PD), first: 1'b1};
    ch_base = 16'(CB); w_base = 9'(WB);
    @(negedge clk);
    if (use8) start8 = 1'b1; else start2 = 1'b1;
    @(negedge clk);
    start8 = 1'b0; start2 = 1'b0;
    n_got = 0;
    if (K == 1 && PD == 0) n_exp = (H * W + lanes - 1) / lanes;
    else n_exp = ho * ((wo + lanes - 1) / lanes) * K * K;
    // expected walk
    begin
      int idx = 0;
      if (K == 1 && PD == 0) begin
        for (int g = 0; g < H * W; g += lanes) begin
          @(posedge clk); #1;
          check(use8 ? tv8 : tv2, "bypass tap valid");
          for (int p = 0; p < lanes; p++) begin
            bit en, pd;
            int a;
            en = use8 ? le8[p] : le2[p];
            pd = use8 ? pm8[p] : pm2[p];
            a  = int'(use8 ? ib8 : ib2) + p;
            check(en == (g + p < H * W) && pd == !(g + p < H * W), "bypass lane masks");
            if (g + p < H * W) check(a == CB + g + p, "bypass address");
          end
          check((use8 ? wa8 : wa2) == 9'(WB) && (use8 ? (tf8 && tl8) : (tf2 && tl2)) &&
                (use8 ? byp8 : byp2), "bypass flags");
          check((use8 ? ob8 : ob2) == 16'(g), "bypass out address");
          check((use8 ? done8 : done2) == (g + lanes >= H * W), "bypass done");
          n_got++;
        end
      end else begin
        for (int r = 0; r < ho; r++)
          for (int c0 = 0; c0 < wo; c0 += lanes)
            for (int kr = 0; kr < K; kr++)
              for (int kc = 0; kc < K; kc++) begin
                bit last;
                @(posedge clk); #1;
                check(use8 ? tv8 : tv2, $sformatf("tap valid r%0d c%0d", r, c0));
                for (int p = 0; p < lanes; p++) begin
                  int iy, ix;
                  bit en, pd, epd;
                  int a;
                  iy = r + kr - PD;
                  ix = c0 + p + kc - PD;
                  epd = (iy < 0 || iy >= H || ix < 0 || ix >= W);
                  en = use8 ? le8[p] : le2[p];
                  pd = use8 ? pm8[p] : pm2[p];
                  a  = int'(use8 ? ib8 : ib2) + p;
                  check(en == (c0 + p < wo), "lane enable");
                  check(pd == epd, $sformatf("pad mask r%0d c%0d k%0d%0d lane %0d", r, c0, kr, kc, p));
                  if (!epd) check(a == CB + iy * W + ix, "input address");
                end
                last = (kr == K - 1 && kc == K - 1);
                check((use8 ? wa8 : wa2) == 9'(WB + kr * K + kc), "weight address");
                check((use8 ? tf8 : tf2) == (kr == 0 && kc == 0), "first flag");
                check((use8 ? tl8 : tl2) == last, "last flag");
                check((use8 ? ob8 : ob2) == 16'(r * wo + c0), "output address");
                check((use8 ? done8 : done2) == (last && r == ho - 1 && c0 + lanes >= wo), "done");
                n_got++;
              end
      end
      @(posedge clk); #1;
      check(!(use8 ? tv8 : tv2) && !(use8 ? busy8 : busy2), "idle after the walk");
      check(n_got == n_exp, "tap count");
    end
  endtask

  initial begin
    int ex [9][2] = '{'{0,0},'{0,0},'{0,0},'{0,1},'{1,2},'{2,3},'{0,6},'{6,7},'{7,8}};
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // worked example: 5x5 map holding 1..25, 2 lanes, first column group
    cfg = '{height: 16'd5, width: 16'd5, nch: 16'd1, ksize: 4'd3, pad: 4'd1, first: 1'b1};
    ch_base = '0; w_base = '0;
    @(negedge clk);
    start2 = 1'b1;
    @(negedge clk);
    start2 = 1'b0;
    for (int t = 0; t < 9; t++) begin
      @(posedge clk); #1;
      for (int p = 0; p < 2; p++) begin
        int v;
        v = pm2[p] ? 0 : int'(ib2) + p + 1;
        check(v == ex[t][p], $sformatf("worked example tap %0d lane %0d: %0d expected %0d", t, p, v, ex[t][p]));
      end
    end
    wait (!busy2);
    repeat (2) @(posedge clk);

    walk(5, 5, 3, 1, 0, 0, 1'b0);
    walk(5, 5, 3, 1, 100, 18, 1'b1);
    walk(7, 13, 3, 1, 50, 9, 1'b1);
    walk(6, 17, 5, 2, 7, 25, 1'b1);
    walk(6, 9, 3, 0, 0, 0, 1'b1);
    walk(4, 10, 1, 0, 33, 4, 1'b1);
    walk(3, 5, 1, 0, 0, 0, 1'b0);
    walk(4, 4, 1, 1, 0, 2, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
