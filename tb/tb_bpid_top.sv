// tb_bpid_top: end-to-end test of the closed loop at the default sizes (2000 control
// cycles, no parameter overrides).
//
// Workload: the reference is a sine, r(k) = sin(2*pi*k*0.001) (two periods over the run),
// and the plant coefficient rises as a(k) = 1.2*(1 - 0.8*exp(-0.1*k)); both are driven
// as functions of the cycle number `k`. A cycle-by-cycle reference model of the whole
// algorithm, written here on 64-bit integers (same start weights, same fixed-point
// rules), predicts y(k), e(k), Kp, Ki, Kd and u(k); every cycle's outputs are compared
// when `cycle_done` pulses. The test also checks the number of clocks per control cycle,
// that the run stops after exactly 2000 cycles, that y(k) follows r(k) at the end (mean
// |e| over the last 500 cycles below 0.02), and that each mechanism happened at least
// once: hidden neurons in their linear region and saturated at +1 and -1, an output neuron
// saturated, both signs of
// the plant-gain estimate, and weight writes in both layers.
module tb_bpid_top;
  import bpid_pkg::*;
  import tb_fx_pkg::*;

  localparam int     CYC   = 2000;
  localparam int     CLKS  = 231;   // clocks per control cycle
  localparam longint XI    = 64'sh033333;
  localparam longint AL    = 64'sh00CCCC;
  localparam longint ULIM  = 64'sd8388607;
  localparam logic [31:0] SEED = 32'h0001_847E;

  logic clk = 0, rst = 1;
  fx_t rin, ak, kp, ki, kd, u, y, err, du;
  logic [15:0] k;
  logic u_sat, cycle_done, finished;
  logic signed [1:0] dyu;
  state_t state;
  int checks = 0, failures = 0;

  bpid_top dut (.clk, .rst, .rin, .ak, .k, .kp, .ki, .kd, .u, .y, .err, .du, .u_sat, .dyu,
                .cycle_done, .finished, .state);

  always #5 clk = ~clk;

  // Workload, as functions of k
  function automatic longint rin_of(input int kk);
    return longint'($rtoi($floor($sin(2.0 * 3.14159265358979 * real'(kk) * 0.001) * 1048576.0 + 0.5)));
  endfunction
  function automatic longint ak_of(input int kk);
    return longint'($rtoi($floor(1.2 * (1.0 - 0.8 * $exp(-0.1 * real'(kk))) * 1048576.0 + 0.5)));
  endfunction

  assign rin = fx_t'(rin_of(int'(k)));
  assign ak  = fx_t'(ak_of(int'(k)));

  initial begin
    repeat (CYC * CLKS + 5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model state
  longint wi [NWI], wip [NWI], wo [NWO], wop [NWO];
  longint y_1 = 0, u_1 = 0, e_1 = 0, e_2 = 0;
  longint ry, re, rk [NO], ru;
  int n_lin = 0, n_hi = 0, n_lo = 0, n_pos = 0, n_neg = 0, n_zero = 0, n_osat = 0;
  int n_wo_wr = 0, n_wi_wr = 0;
  real abs_err_sum = 0.0;

  task automatic check(input string what, input int kk, input longint got, input longint expv);
    checks++;
    if (got != expv) begin
      failures++;
      if (failures < 20) $display("FAIL k=%0d %s got=%0d exp=%0d", kk, what, got, expv);
    end
  endtask

  task automatic init_weights();
    logic [31:0] m;
    m = SEED;
    for (int n = 0; n < NWI + NWO; n++) begin
      longint v;
      v = longint'(m[19:0]) - 64'sd524288;
      if (n < NWI) begin wi[n] = v; wip[n] = v; end
      else begin wo[n - NWI] = v; wop[n - NWI] = v; end
      m = m[0] ? ((m >> 1) ^ 32'hA300_0000) : (m >> 1);
    end
  endtask

  // One control cycle of the reference model
  task automatic model_cycle(input int kk);
    logic signed [95:0] num, den, q;
    longint r, a, x [NO], I [NH], O [NH], net, s, ex, dk, d3 [NO], d2, sg, t, nw, xi [NI], sum;
    r = rin_of(kk);
    a = ak_of(kk);
    num = 96'(a * y_1) <<< 30;
    den = 96'(y_1 * y_1) + (96'sd1 <<< 40);
    q   = num / den;
    ry  = radd(rsat(longint'(q >>> 10)), u_1);
    re  = rsub(r, ry);
    x[0] = rsub(re, e_1);
    x[1] = re;
    x[2] = radd(rsub(rsub(re, e_1), e_1), e_2);
    for (int h = 0; h < NH; h++) begin
      I[h] = radd(radd(radd(rmul(r, wi[h*NI]), rmul(ry, wi[h*NI+1])), rmul(re, wi[h*NI+2])), wi[h*NI+3]);
      O[h] = ract(I[h]);
      if (I[h] >= ONE) n_hi++; else if (I[h] <= -ONE) n_lo++; else n_lin++;
    end
    for (int o = 0; o < NO; o++) begin
      net = 0;
      for (int h = 0; h < NH; h++) net = radd(net, rmul(wo[o*NH+h], O[h]));
      rk[o] = ractpos(net);
      if (net >= ONE || net <= -ONE) n_osat++;
    end
    sum = u_1 + radd(radd(rmul(rk[0], x[0]), rmul(rk[1], x[1])), rmul(rk[2], x[2]));
    ru  = (sum > ULIM) ? ULIM : (sum < -ULIM) ? -ULIM : sum;
    s   = ((ry > y_1) ? 1 : (ry < y_1) ? -1 : 0) * ((ru < u_1) ? -1 : 1);
    if (s > 0) n_pos++; else if (s < 0) n_neg++; else n_zero++;
    for (int o = 0; o < NO; o++) begin
      ex = rmul(re, x[o]);
      ex = (s == 0) ? 0 : (s < 0) ? rsub(0, ex) : ex;
      dk = radd(rmul(rk[o], rsub(ONE, rk[o])), rmul(rk[o], rsub(ONE, rk[o])));
      d3[o] = rmul(ex, dk);
    end
    for (int o = 0; o < NO; o++)
      for (int h = 0; h < NH; h++) begin
        int w;
        w  = o * NH + h;
        t  = rmul(XI, rmul(d3[o], O[h]));
        nw = radd(radd(wo[w], t), rmul(AL, rsub(wo[w], wop[w])));
        wop[w] = wo[w];
        wo[w]  = nw;
      end
    xi = '{r, ry, re, ONE};
    for (int h = 0; h < NH; h++) begin
      sg = 0;
      for (int o = 0; o < NO; o++) sg = radd(sg, rmul(d3[o], wo[o*NH+h]));
      d2 = rmul(rsub(ONE, rmul(O[h], O[h])), sg);
      for (int i = 0; i < NI; i++) begin
        int w;
        w  = h * NI + i;
        t  = rmul(XI, rmul(d2, xi[i]));
        nw = radd(radd(wi[w], t), rmul(AL, rsub(wi[w], wip[w])));
        wip[w] = wi[w];
        wi[w]  = nw;
      end
    end
  endtask

  task automatic model_shift();
    y_1 = ry; u_1 = ru; e_2 = e_1; e_1 = re;
  endtask

  // Count weight writes (the write states of the controller)
  always @(posedge clk) begin
    if (state == S_ST15) n_wo_wr++;
    if (state == S_ST20) n_wi_wr++;
  end

  initial begin
    int ncyc, t_prev, t_now, clk_count;
    ncyc = 0; t_prev = -1; clk_count = 0;
    init_weights();
    repeat (3) @(posedge clk);
    #1 rst = 0;
    fork
      forever begin @(posedge clk); clk_count++; end
    join_none
    while (!finished) begin
      @(negedge clk);
      if (cycle_done) begin
        ncyc++;
        model_cycle(ncyc);
        check("k", ncyc, longint'(k), ncyc);
        check("y", ncyc, sx24(y), ry);
        check("err", ncyc, sx24(err), re);
        check("kp", ncyc, sx24(kp), rk[0]);
        check("ki", ncyc, sx24(ki), rk[1]);
        check("kd", ncyc, sx24(kd), rk[2]);
        check("u", ncyc, sx24(u), ru);
        model_shift();
        t_now = clk_count;
        if (t_prev >= 0) check("clocks per cycle", ncyc, t_now - t_prev, CLKS);
        t_prev = t_now;
        if (ncyc > CYC - 500) abs_err_sum += (re < 0 ? -real'(re) : real'(re)) / 1048576.0;
        if (ncyc % 250 == 0 || ncyc >= CYC - 2)
          $display("k=%0d r=%h y=%h e=%h kp=%h ki=%h kd=%h u=%h", ncyc, 24'(rin_of(ncyc)),
                   y, err, kp, ki, kd, u);
      end
    end
    check("cycles run", 0, ncyc, CYC);
    check("k at stop", 0, longint'(k), CYC);
    checks++;
    if (abs_err_sum / 500.0 >= 0.02) begin
      failures++;
      $display("FAIL tracking: mean |e| over last 500 cycles = %f", abs_err_sum / 500.0);
    end
    $display("mean |e| over last 500 cycles = %f", abs_err_sum / 500.0);
    $display("mechanisms: hidden linear=%0d sat+1=%0d sat-1=%0d, output sat=%0d, dy/du sign +=%0d -=%0d 0=%0d, wo writes=%0d wi writes=%0d",
             n_lin, n_hi, n_lo, n_osat, n_pos, n_neg, n_zero, n_wo_wr, n_wi_wr);
    check("hidden linear region used", 0, n_lin > 0, 1);
    check("hidden saturated at +1", 0, n_hi > 0, 1);
    check("hidden saturated at -1", 0, n_lo > 0, 1);
    check("output neuron saturated", 0, n_osat > 0, 1);
    check("positive dy/du sign", 0, n_pos > 0, 1);
    check("negative dy/du sign", 0, n_neg > 0, 1);
    check("wo writes", 0, n_wo_wr, CYC * NWO);
    check("wi writes", 0, n_wi_wr, CYC * NWI);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
