// tb_imac_pe: drives one processing element with windows of 1, 4, 9 or 25
// taps (random data, random zero-padding taps, random gaps between taps),
// serves its output BRAM reads from a small memory model with one cycle of
// read latency, and checks every write: the window's products summed in tap
// order, then added to the stored word, or stored alone when the overwrite
// flag is set; lanes marked disabled must not write. Sums are worked out in
// double precision and rounded to single after each operation. The write
// must come 5 cycles after the window's last tap.
module tb_imac_pe;
  import imac_pkg::*;
  import tb_fp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic tap_valid = 1'b0, tap_pad = 1'b0, tap_en = 1'b0, tap_first = 1'b0, tap_last = 1'b0, tap_ovr = 1'b0;
  logic [15:0] tap_out_base = '0;
  fp32_t in_data = '0, w_data = '0, ob_rd_data = '0, ob_wr_data;
  logic ob_rd_en, ob_wr_en, busy;
  logic [15:0] ob_rd_base, ob_wr_base;
  int checks = 0, failures = 0;
  longint cyc = 0;

  imac_pe dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  fp32_t mem [64];
  // data that go with a tap arrive one cycle after it
  fp32_t nx_in = '0, nx_w = '0;
  always @(posedge clk) begin
    in_data <= nx_in;
    w_data  <= nx_w;
    if (ob_rd_en) ob_rd_data <= mem[ob_rd_base[5:0]];
  end

  typedef struct {int base; fp32_t acc; bit ovr; bit en; longint t_last;} win_t;
  win_t pending [$];

  always @(posedge clk) if (rst_n && ob_wr_en) begin
    win_t w;
    fp32_t e;
    checks++;
    if (pending.size() == 0) begin
      failures++;
      $display("FAIL unexpected write");
    end else begin
      w = pending.pop_front();
      e = w.ovr ? w.acc : r2f(f2r(mem[w.base]) + f2r(w.acc));
      if (!(ob_wr_base == 16'(w.base) && ob_wr_data == e && w.en && cyc == w.t_last + 5)) begin
        failures++;
        if (failures < 10) $display("FAIL write base %0d data %h expected base %0d data %h (t %0d vs %0d)",
                                    ob_wr_base, ob_wr_data, w.base, e, cyc, w.t_last + 5);
      end
      mem[w.base] = ob_wr_data;
    end
  end

  initial begin
    int prev_base = -1;
    foreach (mem[i]) mem[i] = rand_f(5);
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 600; n++) begin
      int k, b;
      bit ovr, en;
      fp32_t acc;
      k = (n % 4 == 0) ? 1 : (n % 4 == 1) ? 2 : (n % 4 == 2) ? 3 : 5;
      do b = $urandom_range(63, 0); while (b == prev_base);
      prev_base = b;
      ovr = ($urandom % 4) == 0;
      en  = ($urandom % 8) != 0;
      for (int t = 0; t < k * k; t++) begin
        bit pd;
        fp32_t x, wv, prod;
        @(negedge clk);
        while (($urandom % 4) == 0) begin
          tap_valid = 1'b0;
          @(negedge clk);
        end
        pd = ($urandom % 5) == 0;
        x  = rand_f(6);
        wv = rand_f(6);
        tap_valid = 1'b1; tap_pad = pd; tap_en = en; tap_ovr = ovr;
        tap_first = (t == 0); tap_last = (t == k * k - 1); tap_out_base = 16'(b);
        nx_in = x; nx_w = wv;
        prod = r2f(f2r(pd ? 32'd0 : x) * f2r(wv));
        acc = (t == 0) ? prod : r2f(f2r(acc) + f2r(prod));
        if (t == k * k - 1 && en) begin
          @(posedge clk);
          pending.push_back('{base: b, acc: acc, ovr: ovr, en: en, t_last: cyc});
        end
      end
      @(negedge clk);
      tap_valid = 1'b0;
    end
    repeat (10) @(posedge clk);
    checks++;
    if (pending.size() != 0 || busy) begin
      failures++;
      $display("FAIL %0d writes missing", pending.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
