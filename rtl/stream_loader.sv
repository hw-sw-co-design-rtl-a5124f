// stream_loader: the accelerator's DMA input port. It takes a word stream
// (valid/ready, one word per cycle) and writes it into the weight BRAM and
// then the input BRAM, at consecutive addresses from 0.
//
// arm starts a transfer of n_weights weights followed by n_inputs input
// feature map words, the order in which the host transfers them (weights
// first, then the input maps). w_done pulses when the last weight is
// written, in_done when the last input word is written: the controller then
// starts computing without any further command from the host. Words are
// accepted (s_ready high) only while a transfer is armed. The stream
// handshake and the counts-from-registers scheme are this design's choice.
// Timing: one word per cycle while s_valid is high; in_done is registered,
// in the cycle after the last word is accepted.
module stream_loader
  import imac_pkg::*;
#(
  parameter int unsigned IN_AW = 16,
  parameter int unsigned W_AW  = 9
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             arm,
  input  logic [W_AW:0]    n_weights,
  input  logic [IN_AW:0]   n_inputs,
  // stream in
  input  logic             s_valid,
  output logic             s_ready,
  input  fp32_t            s_data,
  // BRAM write ports
  output logic             wb_wr_en,
  output logic [W_AW-1:0]  wb_wr_addr,
  output logic             ib_wr_en,
  output logic [IN_AW-1:0] ib_wr_addr,
  output fp32_t            wr_data,
  // status
  output logic             busy,
  output logic             w_done,
  output logic             in_done
);

  typedef enum logic [1:0] {L_IDLE, L_WEIGHTS, L_INPUTS} lstate_t;

  lstate_t        state;
  logic [IN_AW:0] cnt;
  logic [IN_AW:0] n_in_q;
  logic           take;

  always_comb begin
    s_ready    = (state != L_IDLE);
    take       = s_valid && s_ready;
    wb_wr_en   = take && (state == L_WEIGHTS);
    ib_wr_en   = take && (state == L_INPUTS);
    wb_wr_addr = W_AW'(cnt);
    ib_wr_addr = IN_AW'(cnt);
    wr_data    = s_data;
    busy       = (state != L_IDLE);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= L_IDLE;
      cnt     <= '0;
      n_in_q  <= '0;
      w_done  <= 1'b0;
      in_done <= 1'b0;
    end else begin
      w_done  <= 1'b0;
      in_done <= 1'b0;
      case (state)
        L_IDLE: if (arm) begin
          cnt    <= '0;
          n_in_q <= n_inputs;
          if (n_weights != '0) state <= L_WEIGHTS;
          else begin
            state  <= L_INPUTS;
            w_done <= 1'b1;
          end
        end
        L_WEIGHTS: if (take) begin
          if (cnt == (IN_AW+1)'(n_weights) - 1'b1) begin
            cnt    <= '0;
            w_done <= 1'b1;
            state  <= L_INPUTS;
          end else cnt <= cnt + 1'b1;
        end
        L_INPUTS: if (take) begin
          if (cnt == n_in_q - 1'b1) begin
            cnt     <= '0;
            in_done <= 1'b1;
            state   <= L_IDLE;
          end else cnt <= cnt + 1'b1;
        end
        default: state <= L_IDLE;
      endcase
    end
  end

endmodule
