// hidden_input: net input of one hidden neuron, the five neurons taken in turn.
//
//   hide_input = w(s,1)*r(k) + w(s,2)*y(k) + w(s,3)*e(k) + w(s,4)*1,  s = sel
//
// As in the source design the four weights of a neuron arrive as two 48-bit words:
// wi1[s] = {w(s,1), w(s,2)} and wi2[s] = {w(s,3), w(s,4)}, high half first. Two
// 5-to-1 multiplexers pick the words of neuron `sel` (0..4), four multipliers form the
// products (each cut to Q4.20) and one adder sums them. One neuron is computed per `en`
// pulse so the multipliers are shared by all five. The result is registered on the
// clock edge where `en` is high; `valid` is high for the following cycle.
module hidden_input
  import bpid_pkg::*;
(
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  input  logic [2:0]    sel,
  input  fx_t           rink,
  input  fx_t           yk,
  input  fx_t           errk,
  input  logic [47:0]   wi1 [NH],
  input  logic [47:0]   wi2 [NH],
  output fx_t           hide_input,
  output logic          valid
);

  logic [47:0] w1, w2;
  fx_t         sum;

  always_comb begin
    w1 = '0;
    w2 = '0;
    for (int s = 0; s < NH; s++) begin
      if (sel == 3'(s)) begin
        w1 = wi1[s];
        w2 = wi2[s];
      end
    end
  end

  assign sum = fx_add(fx_add(fx_mul(rink, fx_t'(w1[47:24])), fx_mul(yk, fx_t'(w1[23:0]))),
                      fx_add(fx_mul(errk, fx_t'(w2[47:24])), fx_t'(w2[23:0])));

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      hide_input <= '0;
      valid      <= 1'b0;
    end else begin
      valid <= en;
      if (en) hide_input <= sum;
    end
  end

endmodule
