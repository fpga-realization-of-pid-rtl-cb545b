// tb_input_layer: checks the plant model and error terms. Random a(k), y(k-1), u(k-1),
// r(k), e(k-1), e(k-2) are applied; the expected y(k) is a*y/(1+y^2) formed as the block
// is specified (full-width products, quotient truncated towards zero with 30 fraction
// bits, then floored to 20) plus u(k-1), and e, x1, x2, x3 follow from it. Each result
// must be ready, with `done`, in the 79th clock after `start`. One value is also checked
// against real arithmetic to within 2e-6.
module tb_input_layer;
  import bpid_pkg::*;
  import tb_fx_pkg::*;

  logic clk = 0, rst = 1, start = 0;
  fx_t rink, ak, uk_1, yk_1, errk_1, errk_2, yk, errk, x1, x2, x3;
  logic busy, done;
  int checks = 0, failures = 0;

  input_layer dut (.clk, .rst, .start, .rink, .ak, .uk_1, .yk_1, .errk_1, .errk_2,
                   .yk, .errk, .x1, .x2, .x3, .busy, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  task automatic run();
    logic signed [95:0] num, den, q;
    longint ye, ee;
    int lat;
    num = 96'(sx24(ak) * sx24(yk_1)) <<< 30;
    den = 96'(sx24(yk_1) * sx24(yk_1)) + (96'sd1 <<< 40);
    q   = num / den;   // truncates towards zero
    ye  = radd(rsat(longint'(q >>> 10)), sx24(uk_1));
    ee  = rsub(sx24(rink), ye);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    lat = 0;
    while (!done && lat < 200) begin
      @(negedge clk);
      lat++;
    end
    check("latency", lat, 79);
    check("yk", sx24(yk), ye);
    check("errk", sx24(errk), ee);
    check("x1", sx24(x1), rsub(ee, sx24(errk_1)));
    check("x2", sx24(x2), ee);
    check("x3", sx24(x3), radd(rsub(rsub(ee, sx24(errk_1)), sx24(errk_1)), sx24(errk_2)));
  endtask

  initial begin
    real yr, ar, ur, expr;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    // Real-valued sanity: a=1.2, y=0.5, u=0.25 -> 1.2*0.5/1.25 + 0.25 = 0.73
    ak = fx_t'(24'(int'(1.2 * 1048576))); yk_1 = 24'h080000; uk_1 = 24'h040000;
    rink = 24'h100000; errk_1 = 0; errk_2 = 0;
    run();
    ar = 1.2; yr = 0.5; ur = 0.25;
    expr = ar * yr / (1.0 + yr * yr) + ur;
    checks++;
    if ((real'(sx24(yk)) / 1048576.0 - expr) > 2.0e-6 || (expr - real'(sx24(yk)) / 1048576.0) > 2.0e-6) begin
      failures++;
      $display("FAIL real y=%f exp=%f", real'(sx24(yk)) / 1048576.0, expr);
    end
    // Negative y(k-1)
    yk_1 = 24'hF40000; run();
    for (int n = 0; n < 200; n++) begin
      ak = fx_t'(rnd(21)); yk_1 = fx_t'(rnd(22)); uk_1 = fx_t'(rnd(21));
      rink = fx_t'(rnd(20)); errk_1 = fx_t'(rnd(20)); errk_2 = fx_t'(rnd(20));
      run();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
