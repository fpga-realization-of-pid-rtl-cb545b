// output_output: output-layer activation, giving one PID gain per `en` pulse.
//
//   K = (f(net) + 1) / 2,   f = the piecewise-linear sigmoid of the hidden layer
//
// so K runs from 0 (net <= -1) through 0.5 + 0.475 net to 1 (net >= 1). PID gains must
// not be negative, so the output layer needs a non-negative sigmoid; building it from
// the same comparator chain as the hidden layer is this design's choice. K is registered
// on the clock edge where `en` is high; `valid` is high for the following cycle.
module output_output
  import bpid_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic en,
  input  fx_t  net,
  output fx_t  kout,
  output logic valid
);

  fx_t f;

  pwl_sigmoid u_act (.x(net), .y(f));

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      kout  <= '0;
      valid <= 1'b0;
    end else begin
      valid <= en;
      if (en) kout <= fx_add(f, FX_ONE) >>> 1;
    end
  end

endmodule
