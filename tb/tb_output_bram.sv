// tb_output_bram: random lane writes (random base, random lane enables) and
// lane reads at random bases into a small banked output BRAM (203 words, 8
// lanes), compared with an array model, including a read of a word in the
// cycle it is written (old value expected) and reads past the end (0).
module tb_output_bram;
  import imac_pkg::*;

  localparam int DEPTH = 203, LANES = 8, AW = $clog2(DEPTH);

  logic clk = 1'b0;
  logic [AW-1:0] wr_base = '0, rd_base = '0;
  logic [LANES-1:0] wr_en = '0;
  fp32_t wr_data [LANES];
  logic rd_en = 1'b0;
  fp32_t rd_data [LANES];
  fp32_t model [DEPTH];
  int checks = 0, failures = 0;

  output_bram #(.DEPTH(DEPTH), .LANES(LANES)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int b, rb;
    fp32_t expv [LANES];
    foreach (wr_data[p]) wr_data[p] = '0;
    @(negedge clk);
    // fill
    for (int i = 0; i < DEPTH; i += LANES) begin
      wr_base = AW'(i);
      for (int p = 0; p < LANES; p++) begin
        wr_data[p] = $urandom;
        wr_en[p] = (i + p < DEPTH);
        if (i + p < DEPTH) model[i + p] = wr_data[p];
      end
      @(negedge clk);
    end
    wr_en = '0;
    for (int n = 0; n < 3000; n++) begin
      b  = $urandom_range(DEPTH - LANES, 0);
      rb = (n % 5 == 0) ? b : int'($urandom_range(DEPTH - 1, 0));
      rd_en = 1'b1; rd_base = AW'(rb);
      for (int p = 0; p < LANES; p++)
        expv[p] = (rb + p < DEPTH) ? model[rb + p] : 32'd0;
      wr_base = AW'(b);
      for (int p = 0; p < LANES; p++) begin
        wr_en[p] = $urandom % 2;
        wr_data[p] = $urandom;
      end
      @(negedge clk);
      for (int p = 0; p < LANES; p++) if (wr_en[p]) model[b + p] = wr_data[p];
      rd_en = 1'b0; wr_en = '0;
      for (int p = 0; p < LANES; p++) begin
        checks++;
        if (rd_data[p] !== expv[p]) begin
          failures++;
          if (failures < 10) $display("FAIL base %0d lane %0d: %h expected %h", rb, p, rd_data[p], expv[p]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
