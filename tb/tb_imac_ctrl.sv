// tb_imac_ctrl: plays the loader, the im2col unit and the PEs around the
// controller. It checks register write and read-back, that ARM asks the
// loader for NCH*K*K weights and NCH*H*W inputs, that computing starts in
// the very cycle the last input word is in (no host command), that the
// channels are walked in order with the right input and weight base
// addresses and with the overwrite flag only on channel 0 of a FIRST run,
// that DONE waits for the PE pipelines to drain and is readable in STATUS,
// that configuration writes are ignored while a run is busy, and that
// READOUT asks for (H+2P-K+1)*(W+2P-K+1) words.
module tb_imac_ctrl;
  import imac_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic reg_we = 1'b0;
  logic [2:0] reg_addr = '0;
  logic [31:0] reg_wdata = '0, reg_rdata;
  conv_cfg_t cfg;
  logic ld_arm, ld_busy = 1'b0, ld_in_done = 1'b0;
  logic [9:0] ld_n_weights;
  logic [16:0] ld_n_inputs;
  logic fu_start, fu_ovr, fu_busy = 1'b0, fu_done = 1'b0;
  logic [15:0] fu_ch_base;
  logic [8:0] fu_w_base;
  logic pe_busy = 1'b0;
  logic ro_start, ro_busy = 1'b0;
  logic [16:0] ro_n;
  logic done, computing;
  int checks = 0, failures = 0;

  imac_ctrl dut (.*);

  always #50 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  task automatic wr(logic [2:0] a, logic [31:0] d);
    @(negedge clk);
    reg_we = 1'b1; reg_addr = a; reg_wdata = d;
    #1;
    if (a == REG_CTRL && d[0]) check(ld_arm, "ARM reaches the loader");
    if (a == REG_CTRL && d[2]) check(ro_start, "READOUT reaches the unloader");
    @(negedge clk);
    reg_we = 1'b0;
  endtask

  logic [31:0] rv [8];
  // sample every register (the read port is combinational)
  task automatic rd_all();
    logic [2:0] keep;
    keep = reg_addr;
    for (int i = 1; i < 7; i++) begin
      reg_addr = 3'(i);
      #1;
      rv[i] = reg_rdata;
    end
    reg_addr = keep;
  endtask

  // im2col unit model: busy for 'walk' cycles after each start
  int walk = 5;
  int starts = 0;
  always @(posedge clk) begin
    if (fu_start) begin
      check(!fu_busy, "start only when the im2col unit is idle");
      starts <= starts + 1;
      fork
        begin
          @(negedge clk);
          fu_busy = 1'b1;
          repeat (walk) @(negedge clk);
          fu_busy = 1'b0;
        end
      join_none
    end
  end

  task automatic run(int H, int W, int K, int PD, int C, bit first);
    int n;
    wr(REG_HEIGHT, H); wr(REG_WIDTH, W); wr(REG_NCH, C); wr(REG_KSIZE, K); wr(REG_PAD, PD);
    rd_all();
    check(rv[REG_HEIGHT] == H && rv[REG_WIDTH] == W && rv[REG_NCH] == C &&
          rv[REG_KSIZE] == K && rv[REG_PAD] == PD, "register read-back");
    @(negedge clk);
    reg_we = 1'b1; reg_addr = REG_CTRL; reg_wdata = {30'd0, first, 1'b1};
    #1;
    check(ld_arm && ld_n_weights == 10'(C * K * K) && ld_n_inputs == 17'(C * H * W),
          $sformatf("arm with counts %0d %0d", ld_n_weights, ld_n_inputs));
    @(negedge clk);
    reg_we = 1'b0;
    ld_busy = 1'b1;
    rd_all();
    check(rv[REG_STATUS] == 32'd2, "STATUS busy, not done");
    // a configuration write while busy is ignored
    wr(REG_HEIGHT, H + 7);
    rd_all();
    check(rv[REG_HEIGHT] == H, "HEIGHT locked while busy");
    repeat (4) @(negedge clk);
    check(!fu_start, "no start before the inputs are in");
    ld_in_done = 1'b1; ld_busy = 1'b0;
    #1;
    check(fu_start, "start in the cycle the inputs are in");
    @(negedge clk);
    ld_in_done = 1'b0;
    starts = 0;
    for (int c = 0; c < C; c++) begin
      // during the walk of channel c
      @(negedge clk);
      #1;
      check(fu_busy && fu_ch_base == 16'(c * H * W) && fu_w_base == 9'(c * K * K) &&
            fu_ovr == (first && c == 0), $sformatf("channel %0d bases %0d %0d ovr %0d", c, fu_ch_base, fu_w_base, fu_ovr));
      wait (!fu_busy);
      if (c == C - 1) pe_busy = 1'b1;
      @(negedge clk);
    end
    repeat (4) @(negedge clk);
    rd_all();
    check(!done && rv[REG_STATUS] == 32'd2, "DONE waits for the PEs");
    pe_busy = 1'b0;
    n = 0;
    while (!done && n < 10) begin
      @(negedge clk);
      n++;
    end
    check(done && n <= 3, "DONE after the PEs drain");
    rd_all();
    check(rv[REG_STATUS] == 32'd1, "STATUS done");
    wr(REG_CTRL, 32'd4);
    #1;
    check(ro_n == 17'((H + 2 * PD - K + 1) * (W + 2 * PD - K + 1)), "readout count");
    ro_busy = 1'b1;
    repeat (3) @(negedge clk);
    rd_all();
    check(rv[REG_STATUS] == 32'd5, "STATUS readout busy");
    ro_busy = 1'b0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run(5, 5, 3, 1, 1, 1'b1);
    run(10, 13, 3, 1, 3, 1'b1);
    run(10, 13, 3, 1, 2, 1'b0);
    walk = 3;
    run(6, 7, 1, 0, 4, 1'b1);
    walk = 9;
    run(9, 9, 5, 2, 2, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
