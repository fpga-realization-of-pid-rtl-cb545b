// input_layer: plant model and input-layer quantities of the BP-network PID loop.
//
// Because the whole closed loop runs inside the chip, this block also evaluates the
// controlled plant, the nonlinear first-order model
//
//   y(k) = a(k) * y(k-1) / (1 + y(k-1)^2) + u(k-1)
//
// and then e(k) = r(k) - y(k) and the three PID error terms
//   x1 = e(k) - e(k-1),  x2 = e(k),  x3 = e(k) - 2 e(k-1) + e(k-2).
// The datapath follows the source design: both products are kept at full width (Q8.40),
// the dividend is shifted left by 30 bits before the division so that the integer
// quotient carries 30 fraction bits, and the quotient is cut to Q4.20 before u(k-1) is
// added. The division is bit-serial (seq_divider, this design's choice; the quotient is
// truncated towards zero): the operands are taken on the `start` edge and `done` is
// high in the 79th cycle after it, with all outputs registered. r(k), u(k-1), e(k-1)
// and e(k-2) must stay stable until then.
module input_layer
  import bpid_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic start,
  input  fx_t  rink,    // reference r(k)
  input  fx_t  ak,      // plant coefficient a(k)
  input  fx_t  uk_1,    // u(k-1)
  input  fx_t  yk_1,    // y(k-1)
  input  fx_t  errk_1,  // e(k-1)
  input  fx_t  errk_2,  // e(k-2)
  output fx_t  yk,
  output fx_t  errk,
  output fx_t  x1,
  output fx_t  x2,
  output fx_t  x3,
  output logic busy,
  output logic done
);

  localparam int DW = 2 * W;   // divisor: 1 + y(k-1)^2, 40 fraction bits
  localparam int NW = DW + 30; // dividend: a*y(k-1) << 30

  fx2_t                 p_num, p_sq;
  logic        [DW-1:0] den;
  logic signed [NW-1:0] dividend;
  logic signed [NW-1:0] q30;      // quotient, 30 fraction bits
  logic                   div_done;
  fx_t                    frac, y_c, e_c;

  assign p_num    = ak * yk_1;
  assign p_sq     = yk_1 * yk_1;
  assign den      = DW'(p_sq) + (DW'(1) << 40);
  assign dividend = NW'(p_num) <<< 30;

  seq_divider #(.NW(NW), .DW(DW)) u_div (
    .clk  (clk),
    .rst(rst),
    .start(start),
    .num  (dividend),
    .den  (den),
    .quo  (q30),
    .busy (busy),
    .done (div_done)
  );

  assign frac = fx_sat(64'(q30 >>> 10));
  assign y_c  = fx_add(frac, uk_1);
  assign e_c  = fx_sub(rink, y_c);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      yk   <= '0;
      errk <= '0;
      x1   <= '0;
      x2   <= '0;
      x3   <= '0;
      done <= 1'b0;
    end else begin
      done <= div_done;
      if (div_done) begin
        yk   <= y_c;
        errk <= e_c;
        x1   <= fx_sub(e_c, errk_1);
        x2   <= e_c;
        x3   <= fx_add(fx_sub(fx_sub(e_c, errk_1), errk_1), errk_2);
      end
    end
  end

endmodule
