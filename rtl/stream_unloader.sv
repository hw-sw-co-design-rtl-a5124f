// stream_unloader: the accelerator's DMA output port. On start it reads the
// first n words of the output BRAM, in address order, and sends them as a
// word stream (valid/ready) with m_last on the final word, for the DMA to
// move the output channel to main memory.
//
// The output BRAM reads synchronously and holds its read data until the next
// read, so one read may be in flight while the output register waits for
// m_ready; with m_ready held high a word leaves every cycle. The stream
// handshake is this design's choice.
module stream_unloader
  import imac_pkg::*;
#(
  parameter int unsigned OUT_AW = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [OUT_AW:0]   n,
  // output BRAM read
  output logic              rd_en,
  output logic [OUT_AW-1:0] rd_addr,
  input  fp32_t             rd_data,
  // stream out
  output logic              m_valid,
  input  logic              m_ready,
  output fp32_t             m_data,
  output logic              m_last,
  output logic              busy
);

  logic [OUT_AW:0] issued, n_q;
  logic            active, pend, pend_last, load;

  always_comb begin
    load    = pend && (!m_valid || m_ready);
    rd_en   = active && (issued != n_q) && (!pend || load);
    rd_addr = OUT_AW'(issued);
    busy    = active || pend || m_valid;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      issued    <= '0;
      n_q       <= '0;
      active    <= 1'b0;
      pend      <= 1'b0;
      pend_last <= 1'b0;
      m_valid   <= 1'b0;
      m_data    <= FP32_ZERO;
      m_last    <= 1'b0;
    end else begin
      if (start && !busy) begin
        active <= (n != '0);
        issued <= '0;
        n_q    <= n;
      end
      if (m_valid && m_ready) m_valid <= 1'b0;
      if (load) begin
        m_valid <= 1'b1;
        m_data  <= rd_data;
        m_last  <= pend_last;
      end
      if (rd_en) begin
        issued    <= issued + 1'b1;
        pend      <= 1'b1;
        pend_last <= (issued + 1'b1 == n_q);
        if (issued + 1'b1 == n_q) active <= 1'b0;
      end else if (load) begin
        pend <= 1'b0;
      end
    end
  end

endmodule
