// tb_hidden_input: checks the hidden-layer net input. The two values of the published
// simulation (neuron 1 -> EF0C62, neuron 2 -> 01A313, from r=0, y=002926, e=FFD6DA and
// the printed 48-bit weight words) are checked first, then random weights and inputs
// against a reference sum of floored products. Each result must appear one clock
// after `en`.
module tb_hidden_input;
  import bpid_pkg::*;
  import tb_fx_pkg::*;

  logic clk = 0, rst = 1, en = 0;
  logic [2:0] sel = '0;
  fx_t rink, yk, errk, hide_input;
  logic [47:0] wi1 [NH];
  logic [47:0] wi2 [NH];
  logic valid;
  int checks = 0, failures = 0;

  hidden_input dut (.clk, .rst, .en, .sel, .rink, .yk, .errk, .wi1, .wi2, .hide_input, .valid);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint refv(input int s);
    return radd(radd(radd(rmul(sx24(rink), sx24(wi1[s][47:24])), rmul(sx24(yk), sx24(wi1[s][23:0]))),
                     rmul(sx24(errk), sx24(wi2[s][47:24]))), sx24(wi2[s][23:0]));
  endfunction

  task automatic run(input int s, input longint expv);
    sel = 3'(s);
    en  = 1;
    @(posedge clk);
    #1 en = 0;
    checks++;
    if (!valid || sx24(hide_input) != expv) begin
      failures++;
      $display("FAIL sel=%0d out=%h exp=%h", s, hide_input, 24'(expv));
    end
  endtask

  initial begin
    rink = 24'h000000; yk = 24'h002926; errk = 24'hFFD6DA;
    wi1 = '{48'hFB7247038240, 48'hF4068DFE1062, 48'h0, 48'h0, 48'h0};
    wi2 = '{48'hF7D844EEEE63, 48'hF8779A0194AF, 48'h0, 48'h0, 48'h0};
    repeat (2) @(posedge clk);
    #1 rst = 0;
    run(0, sx24(24'hEF0C62));
    run(1, sx24(24'h01A313));
    run(2, 0);
    for (int n = 0; n < 300; n++) begin
      int s;
      s = $urandom_range(NH - 1, 0);
      rink = fx_t'(rnd(20)); yk = fx_t'(rnd(20)); errk = fx_t'(rnd(21));
      wi1[s] = {24'(rnd(21)), 24'(rnd(20))};
      wi2[s] = {24'(rnd(20)), 24'(rnd(21))};
      run(s, refv(s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
