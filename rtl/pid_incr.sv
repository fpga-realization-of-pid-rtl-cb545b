// pid_incr: incremental (velocity-form) PID law with network-tuned gains.
//
//   du(k) = Kp*x1 + Ki*x2 + Kd*x3     x1 = e(k)-e(k-1), x2 = e(k), x3 = e(k)-2e(k-1)+e(k-2)
//   u(k)  = clamp(u(k-1) + du(k), -U_LIM, U_LIM)
//
// Kp, Ki, Kd are the three network outputs. Both du and u are registered on the clock
// edge where `en` is high; `valid` is high for the following cycle. `sat` reports
// whether the last u was clamped. The error terms and the use of the three outputs as
// PID gains follow the source design; the clamp and its default (the largest Q4.20
// value) are this design's own.
module pid_incr
  import bpid_pkg::*;
#(
  parameter fx_t U_LIM = FX_MAX
) (
  input  logic clk,
  input  logic rst,
  input  logic en,
  input  fx_t  kp,
  input  fx_t  ki,
  input  fx_t  kd,
  input  fx_t  x1,
  input  fx_t  x2,
  input  fx_t  x3,
  input  fx_t  u_prev,
  output fx_t  du,
  output fx_t  u,
  output logic sat,
  output logic valid
);

  fx_t du_c, u_c;
  logic signed [63:0] u_raw;
  logic sat_c;

  assign du_c  = fx_add(fx_add(fx_mul(kp, x1), fx_mul(ki, x2)), fx_mul(kd, x3));
  assign u_raw = 64'(u_prev) + 64'(du_c);

  always_comb begin
    sat_c = 1'b1;
    if (u_raw > 64'(U_LIM))       u_c = U_LIM;
    else if (u_raw < -64'(U_LIM)) u_c = -U_LIM;
    else begin
      u_c   = fx_t'(u_raw);
      sat_c = 1'b0;
    end
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      du    <= '0;
      u     <= '0;
      sat   <= 1'b0;
      valid <= 1'b0;
    end else begin
      valid <= en;
      if (en) begin
        du  <= du_c;
        u   <= u_c;
        sat <= sat_c;
      end
    end
  end

endmodule
