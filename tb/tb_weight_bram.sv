// tb_weight_bram: writes all 288 weight words, reads them back in random
// order with one cycle of latency, interleaving overwrites, and compares
// with an array model.
module tb_weight_bram;
  import imac_pkg::*;

  localparam int DEPTH = 288, AW = $clog2(DEPTH);

  logic clk = 1'b0, wr_en = 1'b0, rd_en = 1'b0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0;
  fp32_t wr_data = '0, rd_data;
  fp32_t model [DEPTH];
  int checks = 0, failures = 0;

  weight_bram dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a;
    @(negedge clk);
    for (int i = 0; i < DEPTH; i++) begin
      model[i] = $urandom;
      wr_en = 1'b1; wr_addr = AW'(i); wr_data = model[i];
      @(negedge clk);
    end
    wr_en = 1'b0;
    for (int n = 0; n < 2000; n++) begin
      a = $urandom_range(DEPTH - 1, 0);
      rd_en = 1'b1; rd_addr = AW'(a);
      // overwrite some other word in the same cycle
      wr_en = ($urandom % 4) == 0;
      wr_addr = AW'(($urandom_range(DEPTH - 2, 0) + a + 1) % DEPTH);
      wr_data = $urandom;
      @(negedge clk);
      if (wr_en) model[wr_addr] = wr_data;
      rd_en = 1'b0; wr_en = 1'b0;
      checks++;
      if (rd_data !== model[a]) begin
        failures++;
        if (failures < 10) $display("FAIL addr %0d: %h expected %h", a, rd_data, model[a]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
