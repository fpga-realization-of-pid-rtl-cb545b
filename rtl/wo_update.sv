// wo_update: back-propagation at the output layer and update of the hidden-to-output
// weights (the "hidden layer weight computation" stage, which also produces delta(3)).
//
// Steps, each registered on the clock edge where its enable is high:
//   en_dyu : s = sign(y(k)-y(k-1)) * sign(u(k)-u(k-1))   (sign(du)=+1 when du = 0)
//            - the plant's unknown gain dy/du is replaced by its sign
//   en_d3  : delta3[o] = e(k) * s * x[o] * 2K[o](1-K[o])  for o = sel_o
//   en_term: term = XITE * delta3[o] * O[h]               for weight (o,h) = (sel_o, sel_h)
//   en_new : wo_new = wo(k-1) + term + ALFA*(wo(k-1) - wo(k-2))
// wo_cur/wo_prev are the stored weights of the last two updates (flat index o*5 + h);
// the controller writes wo_new back after en_new. The learning rate and momentum
// (0.2, 0.05) are the values printed in the source design's waveforms. The update rule
// is the usual gradient-descent-with-momentum rule of a BP-network PID tuner; the source
// design names this block without giving its equations, so the rule and the
// output-based derivative 2K(1-K) of the output sigmoid are this design's choices.
module wo_update
  import bpid_pkg::*;
#(
  parameter fx_t XITE = XITE_DEF,
  parameter fx_t ALFA = ALFA_DEF
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              en_dyu,
  input  logic              en_d3,
  input  logic              en_term,
  input  logic              en_new,
  input  logic [1:0]        sel_o,
  input  logic [2:0]        sel_h,
  input  fx_t               errk,
  input  fx_t               yk,
  input  fx_t               y_1,
  input  fx_t               u,
  input  fx_t               u_1,
  input  fx_t               x     [NO],   // x1, x2, x3
  input  fx_t               kout  [NO],   // Kp, Ki, Kd
  input  fx_t               hout  [NH],
  input  fx_t               wo_cur  [NWO],
  input  fx_t               wo_prev [NWO],
  output logic signed [1:0] dyu,
  output fx_t               delta3 [NO],
  output fx_t               wo_new
);

  logic signed [1:0] sdy, sdu, dyu_c;
  fx_t ex, ex_s, k_sel, dk, d3_c, term, term_c, cur, prev, new_c;
  logic [$clog2(NWO)-1:0] widx;

  always_comb begin
    sdy   = (yk > y_1) ? 2'sd1 : (yk < y_1) ? -2'sd1 : 2'sd0;
    sdu   = (u < u_1) ? -2'sd1 : 2'sd1;
    dyu_c = sdy * sdu;
  end

  always_comb begin
    ex    = fx_mul(errk, x[sel_o]);
    ex_s  = (dyu == 2'sd0) ? '0 : (dyu < 0) ? fx_sub('0, ex) : ex;
    k_sel = kout[sel_o];
    dk    = fx_add(fx_mul(k_sel, fx_sub(FX_ONE, k_sel)), fx_mul(k_sel, fx_sub(FX_ONE, k_sel)));
    d3_c  = fx_mul(ex_s, dk);
  end

  always_comb begin
    widx   = $bits(widx)'(int'(sel_o) * NH + int'(sel_h));
    term_c = fx_mul(XITE, fx_mul(delta3[sel_o], hout[sel_h]));
    cur    = wo_cur[widx];
    prev   = wo_prev[widx];
    new_c  = fx_add(fx_add(cur, term), fx_mul(ALFA, fx_sub(cur, prev)));
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      dyu    <= '0;
      delta3 <= '{default: '0};
      term   <= '0;
      wo_new <= '0;
    end else begin
      if (en_dyu)  dyu <= dyu_c;
      if (en_d3)   delta3[sel_o] <= d3_c;
      if (en_term) term <= term_c;
      if (en_new)  wo_new <= new_c;
    end
  end

endmodule
