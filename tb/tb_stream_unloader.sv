// tb_stream_unloader: serves the unloader's reads from a memory model with
// one cycle of latency that holds its data between reads (as the output
// BRAM does), applies random back-pressure and checks that exactly n words
// come out, in address order, with m_last on the final one only; with
// m_ready held high it must send one word per cycle.
module tb_stream_unloader;
  import imac_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [16:0] n = '0;
  logic rd_en, m_valid, m_ready = 1'b0, m_last, busy;
  logic [15:0] rd_addr;
  fp32_t rd_data = '0, m_data;
  int checks = 0, failures = 0;
  longint cyc = 0;

  stream_unloader dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  fp32_t mem [1024];
  always @(posedge clk) if (rd_en) rd_data <= mem[rd_addr[9:0]];

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

  task automatic unload(int cnt, int ready_pct);
    int got;
    longint t0, t1;
    @(negedge clk);
    start = 1'b1; n = 17'(cnt);
    @(negedge clk);
    start = 1'b0;
    got = 0;
    t0 = -1;
    while (got < cnt) begin
      m_ready = ($urandom % 100) < ready_pct;
      @(posedge clk);
      if (m_valid && m_ready) begin
        if (t0 < 0) t0 = cyc;
        t1 = cyc;
        check(m_data == mem[got], $sformatf("word %0d", got));
        check(m_last == (got == cnt - 1), "m_last");
        got++;
      end
      @(negedge clk);
    end
    m_ready = 1'b0;
    repeat (4) @(posedge clk);
    check(!m_valid && !busy, "idle after the last word");
    if (ready_pct == 100) check(t1 - t0 == longint'(cnt - 1), "one word per cycle");
  endtask

  initial begin
    foreach (mem[i]) mem[i] = $urandom;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    unload(25, 100);
    unload(100, 50);
    unload(1, 30);
    unload(1000, 80);
    unload(300, 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
