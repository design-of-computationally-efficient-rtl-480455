// softmax: probabilities from CLASSES fixed-point scores.
//
// start captures the scores (class c at bits [c*IN_W +: IN_W], signed, with
// IN_FRAC fraction bits). Phase 1 feeds the scores one by one to a
// softmax_lookup, storing each exp value while the lookup accumulates their
// sum (two cycles per class). Phase 2 divides each stored exp, scaled by
// 2^(PROB_W-1), by the sum with one sequential divider (65 cycles per class
// at the default 64-bit width). probs holds class c at [c*PROB_W +: PROB_W]
// as an unsigned fraction in which 2^(PROB_W-1) means 1.0. done rises when
// all classes are divided and stays high until the next start.
// Lookup followed by division is the source design's structure; the
// formats and the sequencing are this design's own. No maximum is
// subtracted before the lookup.
module softmax #(
  parameter int CLASSES  = 4,
  parameter int IN_W     = 12,
  parameter int IN_FRAC  = 8,
  parameter int OUT_FRAC = 16,
  parameter int PROB_W   = 16,
  localparam int CW      = (CLASSES > 1) ? $clog2(CLASSES) : 1
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       start,
  input  logic [CLASSES*IN_W-1:0]    scores,
  output logic [CLASSES*PROB_W-1:0]  probs,
  output logic                       done
);
  localparam int EW = 64;

  typedef enum logic [2:0] {S_IDLE, S_LOOK, S_LWAIT, S_DIV, S_DWAIT, S_DONE} state_e;
  state_e state;

  logic [CLASSES*IN_W-1:0] sc_r;
  logic [EW-1:0]           exps [CLASSES];
  logic [CW-1:0]           cls;
  logic                    cls_last;
  logic                    lk_clr, lk_en, lk_fin;
  logic [EW-1:0]           lk_ret, lk_sum;
  logic                    dv_start, dv_done;
  logic [EW-1:0]           dv_q;

  assign lk_clr   = (state == S_IDLE) && start;
  assign lk_en    = (state == S_LOOK);
  assign dv_start = (state == S_DIV);

  index_counter #(.MAX(CLASSES)) u_cls (
    .clk, .rst, .clr(lk_clr),
    .en((state == S_LWAIT && lk_fin) || (state == S_DWAIT && dv_done)),
    .count(cls), .last(cls_last));

  softmax_lookup #(.IN_W(IN_W), .IN_FRAC(IN_FRAC), .OUT_FRAC(OUT_FRAC), .OUT_W(EW)) u_lut (
    .clk, .rst, .clr(lk_clr), .en(lk_en),
    .I(sc_r[int'(cls)*IN_W +: IN_W]), .ret(lk_ret), .sum(lk_sum), .fin(lk_fin));

  divider #(.W(EW)) u_div (
    .clk, .rst, .start(dv_start),
    .dividend(exps[cls] << (PROB_W - 1)), .divisor(lk_sum),
    .quotient(dv_q), .remainder(), .done(dv_done), .busy());

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      done  <= 1'b0;
      probs <= '0;
    end else begin
      unique case (state)
        S_IDLE:  if (start) begin
                   state <= S_LOOK;
                   done  <= 1'b0;
                 end
        S_LOOK:  state <= S_LWAIT;
        S_LWAIT: if (lk_fin) state <= cls_last ? S_DIV : S_LOOK;
        S_DIV:   state <= S_DWAIT;
        S_DWAIT: if (dv_done) begin
                   probs[int'(cls)*PROB_W +: PROB_W] <=
                       (dv_q > EW'(2**PROB_W - 1)) ? '1 : dv_q[PROB_W-1:0];
                   state <= cls_last ? S_DONE : S_DIV;
                 end
        S_DONE:  begin
                   done  <= 1'b1;
                   state <= S_IDLE;
                 end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (start && state == S_IDLE) sc_r <= scores;
    if (state == S_LWAIT && lk_fin) exps[cls] <= lk_ret;
  end
endmodule
