// wi_update: back-propagation into the hidden layer and update of the input-to-hidden
// weights (the "input layer weight adjustment" stage).
//
// Steps, each registered on the clock edge where its enable is high:
//   en_seg : segma[h]  = sum over o of delta3[o] * wo(o,h)     for h = sel_h
//   en_d2  : delta2[h] = (1 - O[h]^2) * segma[h]
//   en_term: term = XITE * delta2[h] * xi[i]                   for weight (h,i) = (sel_h, sel_i)
//   en_new : wi_new = wi(k-1) + term + ALFA*(wi(k-1) - wi(k-2))
// xi = {r(k), y(k), e(k), 1} are the four network inputs; weights are flat, index h*4 + i.
// The controller writes wi_new back after en_new. The source design names this stage
// and its place in the schedule (after the hidden-to-output weights); the equations, and
// the output-based derivative 1 - O^2 for the hidden sigmoid, are this design's choices.
module wi_update
  import bpid_pkg::*;
#(
  parameter fx_t XITE = XITE_DEF,
  parameter fx_t ALFA = ALFA_DEF
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       en_seg,
  input  logic       en_d2,
  input  logic       en_term,
  input  logic       en_new,
  input  logic [2:0] sel_h,
  input  logic [1:0] sel_i,
  input  fx_t        delta3  [NO],
  input  fx_t        wo      [NWO],
  input  fx_t        hout    [NH],
  input  fx_t        xi      [NI],
  input  fx_t        wi_cur  [NWI],
  input  fx_t        wi_prev [NWI],
  output fx_t        delta2  [NH],
  output fx_t        wi_new
);

  fx_t segma, seg_c, oh, d2_c, term, term_c, cur, prev, new_c;
  logic [$clog2(NWI)-1:0] widx;

  always_comb begin
    seg_c = '0;
    for (int o = 0; o < NO; o++)
      seg_c = fx_add(seg_c, fx_mul(delta3[o], wo[o * NH + int'(sel_h)]));
    oh   = hout[sel_h];
    d2_c = fx_mul(fx_sub(FX_ONE, fx_mul(oh, oh)), segma);
  end

  always_comb begin
    widx   = $bits(widx)'(int'(sel_h) * NI + int'(sel_i));
    term_c = fx_mul(XITE, fx_mul(delta2[sel_h], xi[sel_i]));
    cur    = wi_cur[widx];
    prev   = wi_prev[widx];
    new_c  = fx_add(fx_add(cur, term), fx_mul(ALFA, fx_sub(cur, prev)));
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      segma  <= '0;
      delta2 <= '{default: '0};
      term   <= '0;
      wi_new <= '0;
    end else begin
      if (en_seg)  segma <= seg_c;
      if (en_d2)   delta2[sel_h] <= d2_c;
      if (en_term) term <= term_c;
      if (en_new)  wi_new <= new_c;
    end
  end

endmodule
