// output_input: net input of one output neuron (Kp, Ki or Kd), taken in turn.
//
//   net = sum over h of wo(sel,h) * O(h),   h = 0..4, sel = 0..2
//
// wo is the flat hidden-to-output weight array, index sel*5 + h; O are the five stored
// hidden outputs. Like the hidden-layer input block it shares its multipliers between
// the neurons: one neuron per `en` pulse, registered on that clock edge, with `valid`
// high for the following cycle. The source design names this block and says it works
// like the hidden-layer input block; the structure here is this design's reading of that.
module output_input
  import bpid_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       en,
  input  logic [1:0] sel,
  input  fx_t        hout [NH],
  input  fx_t        wo   [NWO],
  output fx_t        net,
  output logic       valid
);

  fx_t sum;

  always_comb begin
    sum = '0;
    for (int h = 0; h < NH; h++)
      sum = fx_add(sum, fx_mul(wo[int'(sel) * NH + h], hout[h]));
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      net   <= '0;
      valid <= 1'b0;
    end else begin
      valid <= en;
      if (en) net <= sum;
    end
  end

endmodule
