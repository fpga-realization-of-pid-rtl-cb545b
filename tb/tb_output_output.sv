// tb_output_output: checks the output activation K = (f(net)+1)/2: 0 at and below -1,
// 1 at and above +1, 0.5 at 0, and random nets against the reference. The result must
// appear one clock after `en`.
module tb_output_output;
  import bpid_pkg::*;
  import tb_fx_pkg::*;

  logic clk = 0, rst = 1, en = 0;
  fx_t net, kout;
  logic valid;
  int checks = 0, failures = 0;

  output_output dut (.clk, .rst, .en, .net, .kout, .valid);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input longint x, input longint expv);
    net = fx_t'(x);
    en  = 1;
    @(posedge clk);
    #1 en = 0;
    checks++;
    if (!valid || sx24(kout) != expv) begin
      failures++;
      $display("FAIL net=%h k=%h exp=%h", net, kout, 24'(expv));
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    run(-ONE, 0);
    run(-2 * ONE, 0);
    run(ONE, ONE);
    run(3 * ONE, ONE);
    run(0, ONE / 2);
    run(ONE / 2, (((ONE / 2) * 3891 >>> 12) + ONE) >>> 1);
    for (int n = 0; n < 300; n++) begin
      longint x;
      x = rnd(21);
      run(x, ractpos(x));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
