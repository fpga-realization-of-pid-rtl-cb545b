// tb_wo_update: checks the output-layer back-propagation steps against a reference:
// sign of dy/du (all sign cases, including du = 0 and dy = 0), delta3 for each output,
// and the new weight wo(k-1) + XITE*delta3*O + ALFA*(wo(k-1) - wo(k-2)) for random
// weights. Every step's result must be visible one clock after its enable.
module tb_wo_update;
  import bpid_pkg::*;
  import tb_fx_pkg::*;

  localparam longint XI = 64'sh033333, AL = 64'sh00CCCC;

  logic clk = 0, rst = 1, en_dyu = 0, en_d3 = 0, en_term = 0, en_new = 0;
  logic [1:0] sel_o = '0;
  logic [2:0] sel_h = '0;
  fx_t errk, yk, y_1, u, u_1, wo_new;
  fx_t x [NO];
  fx_t kout [NO];
  fx_t hout [NH];
  fx_t wo_cur [NWO];
  fx_t wo_prev [NWO];
  fx_t delta3 [NO];
  logic signed [1:0] dyu;
  int checks = 0, failures = 0;

  wo_update dut (.clk, .rst, .en_dyu, .en_d3, .en_term, .en_new, .sel_o, .sel_h, .errk,
                 .yk, .y_1, .u, .u_1, .x, .kout, .hout, .wo_cur, .wo_prev, .dyu, .delta3, .wo_new);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input longint got, input longint expv);
    checks++;
    if (got != expv) begin
      failures++;
      $display("FAIL %s got=%0d exp=%0d", what, got, expv);
    end
  endtask

  task automatic pulse(ref logic sig);
    sig = 1;
    @(posedge clk);
    #1 sig = 0;
  endtask

  initial begin
    longint s, sy, su, d3e [NO], ex, kk, dk, t, ne;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 200; n++) begin
      errk = fx_t'(rnd(20)); yk = fx_t'(rnd(20)); u = fx_t'(rnd(21));
      y_1 = (n % 7 == 0) ? yk : fx_t'(rnd(20));
      u_1 = (n % 5 == 0) ? u : fx_t'(rnd(21));
      for (int o = 0; o < NO; o++) begin
        x[o] = fx_t'(rnd(20));
        kout[o] = fx_t'(rnd(20) & 64'hFFFFF);
      end
      for (int h = 0; h < NH; h++) hout[h] = fx_t'(rnd(20));
      for (int w = 0; w < NWO; w++) begin
        wo_cur[w] = fx_t'(rnd(20));
        wo_prev[w] = fx_t'(rnd(20));
      end
      sy = (sx24(yk) > sx24(y_1)) ? 1 : (sx24(yk) < sx24(y_1)) ? -1 : 0;
      su = (sx24(u) < sx24(u_1)) ? -1 : 1;
      s  = sy * su;
      pulse(en_dyu);
      check("dyu", longint'(dyu), s);
      for (int o = 0; o < NO; o++) begin
        ex = rmul(sx24(errk), sx24(x[o]));
        ex = (s == 0) ? 0 : (s < 0) ? rsub(0, ex) : ex;
        kk = sx24(kout[o]);
        dk = radd(rmul(kk, rsub(ONE, kk)), rmul(kk, rsub(ONE, kk)));
        d3e[o] = rmul(ex, dk);
        sel_o = 2'(o);
        pulse(en_d3);
        check("delta3", sx24(delta3[o]), d3e[o]);
      end
      for (int m = 0; m < 3; m++) begin
        int o, h, wi;
        o = $urandom_range(NO - 1, 0);
        h = $urandom_range(NH - 1, 0);
        wi = o * NH + h;
        sel_o = 2'(o); sel_h = 3'(h);
        t  = rmul(XI, rmul(d3e[o], sx24(hout[h])));
        ne = radd(radd(sx24(wo_cur[wi]), t), rmul(AL, rsub(sx24(wo_cur[wi]), sx24(wo_prev[wi]))));
        pulse(en_term);
        pulse(en_new);
        check("wo_new", sx24(wo_new), ne);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
