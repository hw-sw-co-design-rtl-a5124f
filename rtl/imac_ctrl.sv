// imac_ctrl: control of the iMAC accelerator: the host's register port and
// the sequence of one accelerator run.
//
// The host writes the layer slice (height, width, input channels of this
// partition, kernel size, padding) into registers and then sets ARM in the
// CTRL register, with FIRST set for the first partition of an output
// channel. The stream loader then expects NCH*K*K weights and NCH*H*W input
// words; as soon as the last input word has arrived the controller starts
// computing on its own (no start command), walking the input channels one
// after another through the im2col unit. The first channel of a FIRST run
// overwrites the output BRAM, every other channel adds to it. When the last
// tap has left the PE pipelines, DONE is set in STATUS, which is what the
// host polls. Setting READOUT in CTRL streams the (H+2P-K+1)x(W+2P-K+1)
// output words to the DMA. Bias addition and activation stay with the host
// CPU, which does them for the previous output channel while this one is
// computed.
// Register map (imac_pkg): 0 CTRL (write: bit0 ARM, bit1 FIRST,
// bit2 READOUT), 1 STATUS (read: bit0 DONE, bit1 BUSY, bit2 READOUT busy),
// 2 HEIGHT, 3 WIDTH, 4 NCH, 5 KSIZE, 6 PAD. Registers are read
// combinationally. The register layout is this design's choice; the
// load-then-start-automatically sequence and the polled done flag follow
// the source's host program.
module imac_ctrl
  import imac_pkg::*;
#(
  parameter int unsigned IN_AW  = 16,
  parameter int unsigned OUT_AW = 16,
  parameter int unsigned W_AW   = 9
) (
  input  logic              clk,
  input  logic              rst_n,
  // host register port
  input  logic              reg_we,
  input  logic [2:0]        reg_addr,
  input  logic [31:0]       reg_wdata,
  output logic [31:0]       reg_rdata,
  // layer configuration
  output conv_cfg_t         cfg,
  // stream loader
  output logic              ld_arm,
  output logic [W_AW:0]     ld_n_weights,
  output logic [IN_AW:0]    ld_n_inputs,
  input  logic              ld_busy,
  input  logic              ld_in_done,
  // im2col unit
  output logic              fu_start,
  output logic [IN_AW-1:0]  fu_ch_base,
  output logic [W_AW-1:0]   fu_w_base,
  output logic              fu_ovr,
  input  logic              fu_busy,
  input  logic              fu_done,
  // processing elements
  input  logic              pe_busy,
  // stream unloader
  output logic              ro_start,
  output logic [OUT_AW:0]   ro_n,
  input  logic              ro_busy,
  // status
  output logic              done,
  output logic              computing
);

  typedef enum logic [1:0] {C_IDLE, C_LOAD, C_RUN, C_DRAIN} cstate_t;

  cstate_t     state;
  logic [15:0] ch;      // channels issued so far
  logic [15:0] ch_cur;  // channel the im2col unit is walking
  logic        issue;
  logic [31:0] hw, kk, ho, wo;

  always_comb begin
    hw           = 32'(cfg.height) * 32'(cfg.width);
    kk           = 32'(cfg.ksize) * 32'(cfg.ksize);
    ho           = 32'(cfg.height) + 2 * 32'(cfg.pad) - 32'(cfg.ksize) + 1;
    wo           = 32'(cfg.width) + 2 * 32'(cfg.pad) - 32'(cfg.ksize) + 1;
    ld_n_weights = (W_AW+1)'(32'(cfg.nch) * kk);
    ld_n_inputs  = (IN_AW+1)'(32'(cfg.nch) * hw);
    ro_n         = (OUT_AW+1)'(ho * wo);
    ld_arm       = reg_we && (reg_addr == REG_CTRL) && reg_wdata[0] && (state == C_IDLE) && !ro_busy;
    ro_start     = reg_we && (reg_addr == REG_CTRL) && reg_wdata[2] && (state == C_IDLE) && !ro_busy;
    // the first channel starts when the inputs are in, the next ones as
    // soon as the im2col unit has issued the last tap of the previous one
    issue        = ((state == C_LOAD) && ld_in_done) ||
                   ((state == C_RUN) && !fu_busy && (ch != 16'd0) && (ch != cfg.nch));
    fu_start     = issue;
    fu_ch_base   = IN_AW'(32'(ch_cur) * hw);
    fu_w_base    = W_AW'(32'(ch_cur) * kk);
    fu_ovr       = cfg.first && (ch_cur == 16'd0);
    computing    = (state == C_RUN) || (state == C_DRAIN);
    unique case (reg_addr)
      REG_STATUS: reg_rdata = {29'd0, ro_busy, state != C_IDLE, done};
      REG_HEIGHT: reg_rdata = {16'd0, cfg.height};
      REG_WIDTH:  reg_rdata = {16'd0, cfg.width};
      REG_NCH:    reg_rdata = {16'd0, cfg.nch};
      REG_KSIZE:  reg_rdata = {28'd0, cfg.ksize};
      REG_PAD:    reg_rdata = {28'd0, cfg.pad};
      default:    reg_rdata = {31'd0, cfg.first};
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= C_IDLE;
      ch    <= '0;
      ch_cur <= '0;
      done  <= 1'b0;
      cfg   <= '{height: 16'd1, width: 16'd1, nch: 16'd1, ksize: 4'd1, pad: 4'd0, first: 1'b1};
    end else begin
      if (reg_we && state == C_IDLE) begin
        case (reg_addr)
          REG_CTRL:   cfg.first  <= reg_wdata[1];
          REG_HEIGHT: cfg.height <= reg_wdata[15:0];
          REG_WIDTH:  cfg.width  <= reg_wdata[15:0];
          REG_NCH:    cfg.nch    <= reg_wdata[15:0];
          REG_KSIZE:  cfg.ksize  <= reg_wdata[3:0];
          REG_PAD:    cfg.pad    <= reg_wdata[3:0];
          default: ;
        endcase
      end
      unique case (state)
        C_IDLE: if (ld_arm) begin
          state <= C_LOAD;
          done  <= 1'b0;
          ch    <= '0;
        end
        C_LOAD: if (ld_in_done) begin
          state  <= C_RUN;
          ch     <= 16'd1;
          ch_cur <= '0;
        end
        C_RUN: begin
          if (issue) begin
            ch     <= ch + 16'd1;
            ch_cur <= ch;
          end
          if (!fu_busy && !fu_start && ch == cfg.nch) state <= C_DRAIN;
        end
        C_DRAIN: if (!pe_busy && !fu_busy) begin
          state <= C_IDLE;
          done  <= 1'b1;
        end
        default: state <= C_IDLE;
      endcase
    end
  end

  // the loader only runs inside an armed run
  a_load_in_run: assert property (@(posedge clk) disable iff (!rst_n) ld_busy |-> state == C_LOAD)
    else $error("loader active outside LOAD");

endmodule
