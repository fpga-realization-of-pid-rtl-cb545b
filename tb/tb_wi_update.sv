// tb_wi_update: checks the hidden-layer back-propagation steps against a reference:
// segma[h] = sum over o of delta3[o]*wo(o,h), delta2[h] = (1 - O[h]^2)*segma[h], and the
// new weight wi(k-1) + XITE*delta2[h]*xi[i] + ALFA*(wi(k-1) - wi(k-2)), for random data.
// Each step's result must be visible one clock after its enable.
module tb_wi_update;
  import bpid_pkg::*;
  import tb_fx_pkg::*;

  localparam longint XI = 64'sh033333, AL = 64'sh00CCCC;

  logic clk = 0, rst = 1, en_seg = 0, en_d2 = 0, en_term = 0, en_new = 0;
  logic [2:0] sel_h = '0;
  logic [1:0] sel_i = '0;
  fx_t delta3 [NO];
  fx_t wo [NWO];
  fx_t hout [NH];
  fx_t xi [NI];
  fx_t wi_cur [NWI];
  fx_t wi_prev [NWI];
  fx_t delta2 [NH];
  fx_t wi_new;
  int checks = 0, failures = 0;

  wi_update dut (.clk, .rst, .en_seg, .en_d2, .en_term, .en_new, .sel_h, .sel_i, .delta3,
                 .wo, .hout, .xi, .wi_cur, .wi_prev, .delta2, .wi_new);

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
    longint sg, d2e [NH], oh, t, ne;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 150; n++) begin
      for (int o = 0; o < NO; o++) delta3[o] = fx_t'(rnd(19));
      for (int w = 0; w < NWO; w++) wo[w] = fx_t'(rnd(21));
      for (int h = 0; h < NH; h++) hout[h] = fx_t'(rnd(20));
      for (int i = 0; i < NI; i++) xi[i] = fx_t'(rnd(20));
      for (int w = 0; w < NWI; w++) begin
        wi_cur[w] = fx_t'(rnd(20));
        wi_prev[w] = fx_t'(rnd(20));
      end
      for (int h = 0; h < NH; h++) begin
        sg = 0;
        for (int o = 0; o < NO; o++) sg = radd(sg, rmul(sx24(delta3[o]), sx24(wo[o * NH + h])));
        oh = sx24(hout[h]);
        d2e[h] = rmul(rsub(ONE, rmul(oh, oh)), sg);
        sel_h = 3'(h);
        pulse(en_seg);
        pulse(en_d2);
        check("delta2", sx24(delta2[h]), d2e[h]);
      end
      for (int m = 0; m < 4; m++) begin
        int h, i, w;
        h = $urandom_range(NH - 1, 0);
        i = $urandom_range(NI - 1, 0);
        w = h * NI + i;
        sel_h = 3'(h); sel_i = 2'(i);
        t  = rmul(XI, rmul(d2e[h], sx24(xi[i])));
        ne = radd(radd(sx24(wi_cur[w]), t), rmul(AL, rsub(sx24(wi_cur[w]), sx24(wi_prev[w]))));
        pulse(en_term);
        pulse(en_new);
        check("wi_new", sx24(wi_new), ne);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
