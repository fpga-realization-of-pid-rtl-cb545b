// tb_pid_incr: checks the incremental PID law du = Kp x1 + Ki x2 + Kd x3,
// u = clamp(u(k-1) + du) with random gains and errors, with U_LIM lowered to 2.0 so
// that the clamp (and its `sat` flag) is exercised in both directions.
module tb_pid_incr;
  import bpid_pkg::*;
  import tb_fx_pkg::*;

  localparam fx_t LIM = 24'sh200000;

  logic clk = 0, rst = 1, en = 0;
  fx_t kp, ki, kd, x1, x2, x3, u_prev, du, u;
  logic sat, valid;
  int checks = 0, failures = 0, nsat_hi = 0, nsat_lo = 0;

  pid_incr #(.U_LIM(LIM)) dut (.clk, .rst, .en, .kp, .ki, .kd, .x1, .x2, .x3, .u_prev,
                               .du, .u, .sat, .valid);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint d, s, ue;
    bit se;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 400; n++) begin
      kp = fx_t'(rnd(20) & 64'hFFFFF); ki = fx_t'(rnd(20) & 64'hFFFFF); kd = fx_t'(rnd(20) & 64'hFFFFF);
      x1 = fx_t'(rnd(21)); x2 = fx_t'(rnd(21)); x3 = fx_t'(rnd(21));
      u_prev = fx_t'(rnd(21));
      d  = radd(radd(rmul(sx24(kp), sx24(x1)), rmul(sx24(ki), sx24(x2))), rmul(sx24(kd), sx24(x3)));
      s  = sx24(u_prev) + d;
      se = 1;
      if (s > sx24(LIM)) begin ue = sx24(LIM); nsat_hi++; end
      else if (s < -sx24(LIM)) begin ue = -sx24(LIM); nsat_lo++; end
      else begin ue = s; se = 0; end
      en = 1;
      @(posedge clk);
      #1 en = 0;
      checks++;
      if (!valid || sx24(du) != d || sx24(u) != ue || sat != se) begin
        failures++;
        $display("FAIL du=%h/%h u=%h/%h sat=%b/%b", du, 24'(d), u, 24'(ue), sat, se);
      end
    end
    checks++;
    if (nsat_hi == 0 || nsat_lo == 0) begin
      failures++;
      $display("FAIL clamp not exercised hi=%0d lo=%0d", nsat_hi, nsat_lo);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
