// tb_imac_workloads: runs, at the accelerator's default size, one output
// channel of each layer shape that the design is meant for, split into
// partitions the way the host program does it (as many input channels per
// run as the input and weight BRAMs hold), and then a second output channel
// of the first shape to show that FIRST restarts the output BRAM:
//   - 112x112 map, 12 input channels, 3x3 kernel: 4 channels per run, 3 runs
//     (the BRAM sizing example of the design's description);
//   - Tiny-Darknet layer shapes (224x224x3 input network): 56x56x32 1x1
//     (2 runs of 16), 28x28x32 3x3 (1 run), 14x14x64 3x3 (2 runs of 32),
//     14x14x128 1x1 (1 run).
// Every output word is compared with a reference convolution computed in
// the hardware's order of operations; cycle counts are checked per run.
module tb_imac_workloads;
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
    repeat (6_000_000) @(posedge clk);
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

  task automatic layer(int H, int W, int K, int PD, int C, int span);
    int per, ho, wo;
    ho = H + 2 * PD - K + 1;
    wo = W + 2 * PD - K + 1;
    per = 50176 / (H * W);
    if (288 / (K * K) < per) per = 288 / (K * K);
    make_layer(H, W, K, C, span);
    for (int c0 = 0; c0 < C; c0 += per) begin
      int n;
      n = (C - c0 < per) ? C - c0 : per;
      run_partition(H, W, K, PD, c0, n, c0 == 0, 0);
      n_runs++;
    end
    readout(ho * wo, 100);
    n_layers++;
  endtask

  int n_runs = 0, n_layers = 0;

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    layer(112, 112, 3, 1, 12, 3);
    // a second output channel of the same layer: new weights, same inputs
    foreach (wt[i]) wt[i] = rand_f(3);
    for (int c0 = 0; c0 < 12; c0 += 4) begin
      run_partition(112, 112, 3, 1, c0, 4, c0 == 0, 0);
      n_runs++;
    end
    readout(112 * 112, 100);
    layer(56, 56, 1, 0, 32, 4);
    layer(28, 28, 3, 1, 32, 4);
    layer(14, 14, 3, 1, 64, 3);
    layer(14, 14, 1, 0, 128, 3);
    check(n_runs == 3 + 3 + 2 + 1 + 2 + 1, $sformatf("runs %0d", n_runs));
    check(n_pad > 0 && n_bypass > 0 && n_ovr > 0 && n_acc > 0 && n_autostart == n_runs,
          "mechanisms occurred");
    $display("runs=%0d layers=%0d", n_runs, n_layers);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
