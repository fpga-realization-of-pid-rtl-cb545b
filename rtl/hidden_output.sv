// hidden_output: output of one hidden neuron through the piecewise-linear sigmoid.
//
// A 5-to-1 multiplexer picks hidden net input hide[sel] (sel = 0..4), pwl_sigmoid maps
// it to f(x) = -1 / 0.95x / +1, and the result is registered as `houtput` on the clock
// edge where `en` is high; `valid` is high for the following cycle. One neuron per
// `en` pulse, so one comparator chain serves all five, as in the source design.
module hidden_output
  import bpid_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       en,
  input  logic [2:0] sel,
  input  fx_t        hide [NH],
  output fx_t        houtput,
  output logic       valid
);

  fx_t x, y;

  always_comb begin
    x = '0;
    for (int s = 0; s < NH; s++)
      if (sel == 3'(s)) x = hide[s];
  end

  pwl_sigmoid u_act (.x(x), .y(y));

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      houtput <= '0;
      valid   <= 1'b0;
    end else begin
      valid <= en;
      if (en) houtput <= y;
    end
  end

endmodule
