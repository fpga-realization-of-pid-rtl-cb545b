// bpid_pkg: shared types, sizes and fixed-point helpers of the BP-network PID controller.
//
// Every datapath value is a signed 24-bit fixed-point number with 4 integer bits (sign
// included) and 20 fraction bits ("Q4.20"), so 1.0 is 24'h100000 and -1.0 is 24'hF00000.
// The format and the network size (4 inputs, 5 hidden neurons, 3 outputs) follow the
// source design. Products keep the full 48-bit result and are brought back to Q4.20 by an
// arithmetic right shift of 20 (rounding towards minus infinity), which reproduces the
// hidden-layer values of the published simulation bit for bit. Saturation instead of
// wrap-around on overflow is this design's own choice.
package bpid_pkg;

  localparam int W  = 24;  // word width
  localparam int FW = 20;  // fraction bits

  localparam int NI = 4;   // input-layer neurons: r(k), y(k), e(k), 1
  localparam int NH = 5;   // hidden-layer neurons
  localparam int NO = 3;   // output-layer neurons: Kp, Ki, Kd

  localparam int NWI = NI * NH;  // input-to-hidden weights, index h*NI + i
  localparam int NWO = NH * NO;  // hidden-to-output weights, index o*NH + h

  typedef logic signed [W-1:0]   fx_t;
  typedef logic signed [2*W-1:0] fx2_t;  // full product, Q8.40

  localparam fx_t FX_ONE  = 24'sh100000;
  localparam fx_t FX_MONE = 24'shF00000;
  localparam fx_t FX_HALF = 24'sh080000;
  localparam fx_t FX_MAX  = 24'sh7FFFFF;
  localparam fx_t FX_MIN  = 24'sh800000;

  // Slope of the piecewise-linear sigmoid: 0.95 rounded down to 12 fraction bits,
  // 3891/4096 = 0.949951171875.
  localparam fx_t ACT_GAIN = 24'sh0F3300;

  // Learning rate (0.2) and momentum factor (0.05) as printed in the published waveforms.
  localparam fx_t XITE_DEF = 24'sh033333;
  localparam fx_t ALFA_DEF = 24'sh00CCCC;

  // Clamp a wide signed value into the Q4.20 range.
  function automatic fx_t fx_sat(input logic signed [63:0] v);
    if (v > 64'sd8388607)       return FX_MAX;
    else if (v < -64'sd8388608) return FX_MIN;
    else                        return fx_t'(v);
  endfunction

  // Saturating Q4.20 multiply, result floor(a*b / 2^20).
  function automatic fx_t fx_mul(input fx_t a, input fx_t b);
    fx2_t p;
    p = a * b;
    return fx_sat(64'(p >>> FW));
  endfunction

  // Saturating Q4.20 add and subtract.
  function automatic fx_t fx_add(input fx_t a, input fx_t b);
    return fx_sat(64'(a) + 64'(b));
  endfunction

  function automatic fx_t fx_sub(input fx_t a, input fx_t b);
    return fx_sat(64'(a) - 64'(b));
  endfunction

  // States of the closed-loop controller. st0-st2: start of a control cycle (count,
  // shift history, plant and input layer); st3-st10: network forward pass and PID law;
  // st11-st15: hidden-to-output weight update; st16-st20: input-to-hidden weight update.
  typedef enum logic [4:0] {
    S_IDLE, S_ST0, S_ST1, S_ST2, S_ST3, S_ST4, S_ST5, S_ST6, S_ST7, S_ST8, S_ST9, S_ST10,
    S_ST11, S_ST12, S_ST13, S_ST14, S_ST15, S_ST16, S_ST17, S_ST18, S_ST19, S_ST20, S_STOP
  } state_t;

endpackage
