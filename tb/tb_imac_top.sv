// tb_imac_top: end-to-end test of the iMAC accelerator at its default size
// (8 PEs, 50,176-word input and output BRAMs, 288-word weight BRAM).
//
// The bench plays the host and the DMA: it writes the layer registers, arms
// a run, streams weights and input maps (with random gaps), waits for DONE,
// streams the output channel back (with random back-pressure) and compares
// every word with a reference convolution computed here in double precision
// and rounded to single precision after each operation, in the same order
// as the hardware: taps in row-major order per window, input channels in
// order, partitions in order.
// Runs: the 5x5 example with 3x3 all-ones weights and padding 1 (first
// outputs 16 and 27); a 3x3 layer split into two partitions; a 1x1 layer
// (im2col bypass) with a map that is not a multiple of 8 words; a 5x5
// kernel; and one full output channel of a 224x224x3 first layer, done as
// three one-channel partitions (the largest map the input BRAM holds).
// It also checks the cycle count of every run against
// NCH*(taps per channel + 1) + 7 and that each mechanism (zero padding,
// bypass, partial column groups, overwrite, accumulate, several partitions,
// start on input arrival, stream back-pressure) occurred.
module tb_imac_top;
  import imac_pkg::*;
  import tb_fp_pkg::*;

  localparam int P = 8;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        reg_we = 1'b0;
  logic [2:0]  reg_addr = '0;
  logic [31:0] reg_wdata = '0, reg_rdata;
  logic        s_valid = 1'b0, s_ready;
  logic [31:0] s_data = '0;
  logic        m_valid, m_ready = 1'b0, m_last;
  logic [31:0] m_data;
  logic        done;

  int checks = 0, failures = 0;
  longint cyc = 0;

  imac_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- mechanism counters ----
  int n_pad = 0, n_bypass = 0, n_partial = 0, n_ovr = 0, n_acc = 0;
  int n_autostart = 0, n_backpressure = 0, n_in_gap = 0, n_multi_part = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.tap_valid && |dut.tap_pad) n_pad++;
    if (dut.tap_valid && dut.tap_bypass) n_bypass++;
    if (dut.tap_valid && !(&dut.tap_en)) n_partial++;
    if (dut.ob_wr_en[0] && dut.g_pe[0].u_pe.d_ovr) n_ovr++;
    if (dut.ob_wr_en[0] && !dut.g_pe[0].u_pe.d_ovr) n_acc++;
    if (dut.ld_in_done && dut.fu_start) n_autostart++;
    if (m_valid && !m_ready) n_backpressure++;
    if (s_ready && !s_valid) n_in_gap++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic wr(logic [2:0] a, logic [31:0] d);
    @(negedge clk);
    reg_we = 1'b1; reg_addr = a; reg_wdata = d;
    @(negedge clk);
    reg_we = 1'b0;
  endtask

  task automatic push(logic [31:0] d, int gap_pct);
    while (($urandom % 100) < gap_pct) begin
      s_valid = 1'b0;
      @(negedge clk);
    end
    s_valid = 1'b1; s_data = d;
    @(posedge clk);
    while (!s_ready) @(posedge clk);
    @(negedge clk);
    s_valid = 1'b0;
  endtask

  // layer data: ifm[(c*H + y)*W + x], wt[c*K*K + kr*K + kc]
  logic [31:0] ifm [], wt [], refo [];

  // one partition: channels c0 .. c0+nch-1
  task automatic run_partition(int H, int W, int K, int PD, int c0, int nch, bit first,
                               int gap_pct);
    longint t_in, t_done;
    int ho, wo, taps, exp_c, got_c;
    logic [31:0] acc, prod;
    ho = H + 2 * PD - K + 1;
    wo = W + 2 * PD - K + 1;
    wr(REG_HEIGHT, H); wr(REG_WIDTH, W); wr(REG_NCH, nch);
    wr(REG_KSIZE, K); wr(REG_PAD, PD);
    wr(REG_CTRL, {30'd0, first, 1'b1});
    for (int i = 0; i < nch * K * K; i++) push(wt[c0 * K * K + i], gap_pct);
    for (int i = 0; i < nch * H * W; i++) push(ifm[c0 * H * W + i], gap_pct);
    // wait for the automatic start and for DONE
    t_in = -1;
    while (!done) begin
      @(posedge clk);
      if (dut.ld_in_done) t_in = cyc;
    end
    t_done = cyc;
    if (K == 1 && PD == 0) taps = (H * W + P - 1) / P;
    else taps = ho * ((wo + P - 1) / P) * K * K;
    exp_c = nch * (taps + 1) + 7;
    got_c = int'(t_done - t_in);
    check(t_in >= 0 && got_c == exp_c, $sformatf("cycles %0d expected %0d", got_c, exp_c));
    wr(REG_STATUS, 0);
    check(reg_rdata[0] == 1'b1, "STATUS.DONE");
    // reference, in the hardware's order of operations
    for (int c = c0; c < c0 + nch; c++)
      for (int y = 0; y < ho; y++)
        for (int x = 0; x < wo; x++) begin
          for (int t = 0; t < K * K; t++) begin
            int iy, ix;
            logic [31:0] v;
            iy = y + t / K - PD;
            ix = x + t % K - PD;
            v = (iy < 0 || iy >= H || ix < 0 || ix >= W) ? 32'd0 : ifm[(c * H + iy) * W + ix];
            prod = r2f(f2r(v) * f2r(wt[c * K * K + t]));
            acc = (t == 0) ? prod : r2f(f2r(acc) + f2r(prod));
          end
          if (first && c == 0) refo[y * wo + x] = acc;
          else refo[y * wo + x] = r2f(f2r(refo[y * wo + x]) + f2r(acc));
        end
  endtask

  task automatic readout(int n, int ready_pct);
    int got;
    wr(REG_CTRL, 32'd4);
    got = 0;
    while (got < n) begin
      m_ready = (($urandom % 100) < ready_pct);
      @(posedge clk);
      if (m_valid && m_ready) begin
        check(m_data == refo[got], $sformatf("out[%0d] = %h expected %h", got, m_data, refo[got]));
        check(m_last == (got == n - 1), $sformatf("m_last at %0d", got));
        got++;
      end
      @(negedge clk);
    end
    m_ready = 1'b0;
    repeat (3) @(posedge clk);
    check(!m_valid, "no extra output word");
  endtask

  task automatic make_layer(int H, int W, int K, int C, int span);
    ifm  = new[C * H * W];
    wt   = new[C * K * K];
    refo = new[(H + 2 * K) * (W + 2 * K)];
    foreach (ifm[i]) ifm[i] = rand_f(span);
    foreach (wt[i]) wt[i] = rand_f(span);
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // 1) the 5x5 worked example: values 1..25, 3x3 weights of 1.0, padding 1
    ifm = new[25]; wt = new[9]; refo = new[25];
    foreach (ifm[i]) ifm[i] = r2f(real'(i + 1));
    foreach (wt[i]) wt[i] = 32'h3f80_0000;
    run_partition(5, 5, 3, 1, 0, 1, 1'b1, 0);
    check(refo[0] == 32'h4180_0000 && refo[1] == 32'h41d8_0000, "reference 16, 27");
    readout(25, 100);

    // 2) 3x3 layer, 5 input channels split 3 + 2, 10 x 13 map
    make_layer(10, 13, 3, 5, 6);
    run_partition(10, 13, 3, 1, 0, 3, 1'b1, 20);
    run_partition(10, 13, 3, 1, 3, 2, 1'b0, 20);
    n_multi_part++;
    readout(10 * 13, 60);

    // 3) 1x1 layer, im2col bypass, 6 x 7 map, 4 channels
    make_layer(6, 7, 1, 4, 6);
    run_partition(6, 7, 1, 0, 0, 4, 1'b1, 10);
    readout(42, 50);

    // 4) 5x5 kernel, padding 2, 9 x 9 map, 2 channels
    make_layer(9, 9, 5, 2, 6);
    run_partition(9, 9, 5, 2, 0, 2, 1'b1, 10);
    readout(81, 70);

    // 5) full-size run: one output channel of a 224x224x3 first layer,
    //    3x3, padding 1, one input channel per partition
    make_layer(224, 224, 3, 3, 4);
    for (int c = 0; c < 3; c++) run_partition(224, 224, 3, 1, c, 1, c == 0, 0);
    n_multi_part++;
    readout(224 * 224, 90);

    check(n_pad > 0, "zero padding taps occurred");
    check(n_bypass > 0, "im2col bypass occurred");
    check(n_partial > 0, "partial column groups occurred");
    check(n_ovr > 0, "first-partition overwrite occurred");
    check(n_acc > 0, "accumulation into the output BRAM occurred");
    check(n_autostart > 0, "start on input arrival occurred");
    check(n_backpressure > 0, "output back-pressure occurred");
    check(n_in_gap > 0, "input stream gaps occurred");
    check(n_multi_part > 0, "multi-partition layers ran");
    $display("mechanisms: pad=%0d bypass=%0d partial=%0d overwrite=%0d accumulate=%0d autostart=%0d backpressure=%0d in_gap=%0d",
             n_pad, n_bypass, n_partial, n_ovr, n_acc, n_autostart, n_backpressure, n_in_gap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
