// tb_input_bram: fills a small banked input BRAM (200 words, 8 lanes) with
// random words, then reads LANES consecutive words from random signed base
// addresses, including bases before the start and past the end, and
// compares every lane with a plain array model (out-of-range lanes read 0).
// Also checks that the read data hold while rd_en is low.
module tb_input_bram;
  import imac_pkg::*;

  localparam int DEPTH = 200, LANES = 8, AW = $clog2(DEPTH);

  logic clk = 1'b0;
  logic wr_en = 1'b0, rd_en = 1'b0;
  logic [AW-1:0] wr_addr = '0;
  fp32_t wr_data = '0;
  logic signed [AW+1:0] rd_base = '0;
  fp32_t rd_data [LANES];
  fp32_t model [DEPTH];
  int checks = 0, failures = 0;

  input_bram #(.DEPTH(DEPTH), .LANES(LANES)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int b;
    fp32_t held [LANES];
    @(negedge clk);
    for (int i = 0; i < DEPTH; i++) begin
      model[i] = $urandom;
      wr_en = 1'b1; wr_addr = AW'(i); wr_data = model[i];
      @(negedge clk);
    end
    wr_en = 1'b0;
    for (int n = 0; n < 500; n++) begin
      b = int'($urandom_range(DEPTH + 20, 0)) - 15;
      rd_en = 1'b1; rd_base = (AW+2)'(b);
      @(negedge clk);
      rd_en = 1'b0;
      for (int p = 0; p < LANES; p++) begin
        fp32_t e;
        e = (b + p >= 0 && b + p < DEPTH) ? model[b + p] : 32'd0;
        checks++;
        if (rd_data[p] !== e) begin
          failures++;
          if (failures < 10) $display("FAIL base %0d lane %0d: %h expected %h", b, p, rd_data[p], e);
        end
      end
      held = rd_data;
      rd_base = (AW+2)'(3);
      @(negedge clk);
      checks++;
      if (rd_data != held) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
