// corr_ctrl: background detection-and-correction engine.
//
// When the error address generator reports a group g, the engine walks the
// tag words downwards starting from the higher word of that group (2g+1),
// one word per RD/WR pair, as in the original correction timeline. The
// first RD takes place in the IDLE cycle in which the group address
// arrives, so RD directly follows the PAR and ENC stages:
//   RD   read the word through read port b, recompute its parity (error
//        computation) and correct the tag with the per-word Hamming code;
//        the results are registered.
//   WR   if the word was corrupted, write back the corrected tag with fresh
//        parity and check bits and, if the line is valid, search the MSHR
//        for {corrected tag, set} (MRA); a matching miss is a false miss and
//        the MSHR cancels it. Then either move to the next lower word (RD)
//        or stop.
//   PROP two idle cycles while the repaired cells propagate through the
//        parity chains (PAR) and the encoder (ENC), so that the next group
//        address seen in IDLE is fresh.
// The walk stops at the first clean word below the starting word, or after
// word 0. The starting word itself may be clean, since a group is flagged
// when either of its two words is corrupted. Correction time for a run of
// corrupted words: the last WR ends 2 (PAR, ENC) + 2*K clock edges after the upset,
// K being the number of words read.
//
// busy_o is high outside IDLE. fix_o pulses in the WR cycle of a repaired
// word and done_o in the last WR cycle of a walk. The single-cycle RD/WR/PROP
// timing and the exact stop rule are this design's choices; the order of the
// walk (higher to lower address) follows the original scheme.
module corr_ctrl #(
  parameter int SETS  = cache_pkg::SETS,
  parameter int WAYS  = cache_pkg::WAYS,
  parameter int TAG_W = cache_pkg::TAG_W,
  parameter int R     = cache_pkg::hamming_r(TAG_W),
  localparam int N  = SETS * WAYS,
  localparam int AW = $clog2(N),
  localparam int GW = AW - 1,
  localparam int SW = $clog2(SETS),
  localparam int LW = TAG_W + SW
) (
  input  logic             clk,
  input  logic             rst_n,
  // from the error address generator
  input  logic [GW-1:0]    grp_addr_i,
  input  logic             grp_valid_i,
  // tag memory read port
  output logic [AW-1:0]    rd_addr_o,
  input  logic [TAG_W-1:0] rd_tag_i,
  input  logic             rd_par_i,
  input  logic [R-1:0]     rd_chk_i,
  input  logic             rd_line_valid_i,
  // tag memory write port
  output logic             wr_en_o,
  output logic [AW-1:0]    wr_addr_o,
  output logic [TAG_W-1:0] wr_tag_o,
  output logic             wr_par_o,
  output logic [R-1:0]     wr_chk_o,
  // MSHR search (MRA)
  output logic             cancel_en_o,
  output logic [LW-1:0]    cancel_line_o,
  // status
  output logic             busy_o,
  output logic             fix_o,
  output logic             done_o
);
  import cache_pkg::*;

  corr_state_e      state;
  logic [AW-1:0]    cur, top;
  logic [1:0]       prop_cnt;
  logic [TAG_W-1:0] fix_tag, dec_tag;
  logic             rd_err, line_valid, dec_err;
  logic [R-1:0]     new_chk;
  logic             stop;

  hamming_dec #(.K(TAG_W), .R(R)) u_dec (
    .data_i(rd_tag_i), .chk_i(rd_chk_i), .data_o(dec_tag), .err_o(dec_err));
  hamming_enc #(.K(TAG_W), .R(R)) u_enc (.data_i(fix_tag), .chk_o(new_chk));

  assign stop = (!rd_err && cur != top) || cur == '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= C_IDLE;
      cur        <= '0;
      top        <= '0;
      prop_cnt   <= '0;
      fix_tag    <= '0;
      rd_err     <= 1'b0;
      line_valid <= 1'b0;
    end else begin
      unique case (state)
        C_IDLE: if (grp_valid_i) begin
          // the first word is read in this cycle (RD right after ENC)
          cur        <= {grp_addr_i, 1'b1};
          top        <= {grp_addr_i, 1'b1};
          rd_err     <= par_err(rd_tag_i, rd_par_i);
          fix_tag    <= dec_tag;
          line_valid <= rd_line_valid_i;
          state      <= C_WR;
        end
        C_RD: begin
          rd_err     <= par_err(rd_tag_i, rd_par_i);
          fix_tag    <= dec_tag;
          line_valid <= rd_line_valid_i;
          state      <= C_WR;
        end
        C_WR: begin
          if (stop) begin
            prop_cnt <= 2'd1;
            state    <= C_PROP;
          end else begin
            cur   <= cur - 1'b1;
            state <= C_RD;
          end
        end
        C_PROP: begin
          if (prop_cnt == 2'd0) state <= C_IDLE;
          else prop_cnt <= prop_cnt - 1'b1;
        end
        default: state <= C_IDLE;
      endcase
    end
  end

  function automatic logic par_err(input logic [TAG_W-1:0] t, input logic p);
    return ^{t, p};
  endfunction

  assign rd_addr_o     = (state == C_IDLE) ? {grp_addr_i, 1'b1} : cur;
  assign wr_en_o       = (state == C_WR) && rd_err;
  assign wr_addr_o     = cur;
  assign wr_tag_o      = fix_tag;
  assign wr_par_o      = ^fix_tag;
  assign wr_chk_o      = new_chk;
  assign cancel_en_o   = (state == C_WR) && rd_err && line_valid;
  assign cancel_line_o = {fix_tag, cur[AW-1 -: SW]};
  assign busy_o        = (state != C_IDLE);
  assign fix_o         = wr_en_o;
  assign done_o        = (state == C_WR) && stop;

  // unused: the decoder's error flag (parity decides whether a word is fixed)
  logic unused;
  assign unused = dec_err;
endmodule
