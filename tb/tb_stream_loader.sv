// tb_stream_loader: arms transfers of various weight and input counts
// (including no weights), streams random words with random gaps and checks
// that the first n_weights words go to the weight BRAM port at addresses
// 0, 1, ..., the next n_inputs to the input BRAM port at 0, 1, ..., that
// w_done and in_done pulse once, in the cycle after the last word of their
// part, and that no word is accepted outside an armed transfer.
module tb_stream_loader;
  import imac_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, arm = 1'b0;
  logic [9:0] n_weights = '0;
  logic [16:0] n_inputs = '0;
  logic s_valid = 1'b0, s_ready;
  fp32_t s_data = '0, wr_data;
  logic wb_wr_en, ib_wr_en, busy, w_done, in_done;
  logic [8:0] wb_wr_addr;
  logic [15:0] ib_wr_addr;
  int checks = 0, failures = 0;
  longint cyc = 0;

  stream_loader dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

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

  int nw_seen, ni_seen, wd_cnt, id_cnt;
  longint t_last_w, t_last_i, t_wd, t_id;
  fp32_t sent [$];

  always @(posedge clk) if (rst_n) begin
    if (wb_wr_en) begin
      check(wb_wr_addr == 9'(nw_seen) && wr_data == sent[0], "weight write");
      void'(sent.pop_front());
      nw_seen++;
      t_last_w = cyc;
    end
    if (ib_wr_en) begin
      check(ib_wr_addr == 16'(ni_seen) && wr_data == sent[0], "input write");
      void'(sent.pop_front());
      ni_seen++;
      t_last_i = cyc;
    end
    if (w_done) begin wd_cnt++; t_wd = cyc; end
    if (in_done) begin id_cnt++; t_id = cyc; end
  end

  task automatic xfer(int nw, int ni);
    nw_seen = 0; ni_seen = 0; wd_cnt = 0; id_cnt = 0;
    @(negedge clk);
    // nothing accepted before arming
    s_valid = 1'b1;
    #1 check(!s_ready, "not ready before arm");
    s_valid = 1'b0;
    arm = 1'b1; n_weights = 10'(nw); n_inputs = 17'(ni);
    @(negedge clk);
    arm = 1'b0;
    for (int i = 0; i < nw + ni; i++) begin
      while (($urandom % 3) == 0) begin
        s_valid = 1'b0;
        @(negedge clk);
      end
      s_valid = 1'b1; s_data = $urandom;
      sent.push_back(s_data);
      @(negedge clk);
    end
    s_valid = 1'b0;
    repeat (3) @(negedge clk);
    check(nw_seen == nw && ni_seen == ni, $sformatf("counts %0d/%0d", nw_seen, ni_seen));
    check(wd_cnt == 1 && id_cnt == 1, "one done pulse each");
    if (nw > 0) check(t_wd == t_last_w + 1, "w_done timing");
    check(t_id == t_last_i + 1, "in_done timing");
    check(!busy && !s_ready, "idle after transfer");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    xfer(9, 25);
    xfer(27, 300);
    xfer(0, 17);
    xfer(288, 1000);
    xfer(1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
