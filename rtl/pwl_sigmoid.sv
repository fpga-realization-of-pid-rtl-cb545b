// pwl_sigmoid: piecewise-linear replacement for the symmetric (tanh-like) sigmoid.
//
//   f(x) =  1        for x >= 1
//           0.95 x   for -1 < x < 1
//          -1        for x <= -1
//
// Built as in the source design: four comparisons (x < -1, x == -1, x < 1, x == 1)
// form a 5-bit code and a one-hot multiplexer picks -1, the scaled input or +1. Only
// the first comparison that holds sets its bit, as in a chain of IF blocks. The slope
// is 3891/4096, which gives 0.5 -> 24'h079980 exactly as the published simulation does.
// Purely combinational; Q4.20 in and out.
module pwl_sigmoid
  import bpid_pkg::*;
(
  input  fx_t x,
  output fx_t y
);

  logic [4:0] code;
  fx_t        scaled;

  always_comb begin
    code = 5'b00000;
    if (x < FX_MONE)       code = 5'b00001;
    else if (x == FX_MONE) code = 5'b00010;
    else if (x < FX_ONE)   code = 5'b00100;
    else if (x == FX_ONE)  code = 5'b01000;
    else                   code = 5'b10000;
  end

  assign scaled = fx_mul(x, ACT_GAIN);

  always_comb begin
    unique case (code)
      5'b00001, 5'b00010: y = FX_MONE;
      5'b00100:           y = scaled;
      default:            y = FX_ONE;
    endcase
  end

endmodule
