// tb_hidden_output: checks the hidden-layer activation block. First the five values of
// the published hidden-output simulation (1.5 -> 1, -1.5625 -> -1, 0.5 -> 0.4749755859375,
// 0 -> 0, 0.0390625 -> 0.037107467651...), then the exact thresholds +-1 and random
// inputs against the reference function. Each result must appear one clock after `en`.
module tb_hidden_output;
  import bpid_pkg::*;
  import tb_fx_pkg::*;

  logic clk = 0, rst = 1, en = 0;
  logic [2:0] sel = '0;
  fx_t hide [NH];
  fx_t houtput;
  logic valid;
  int checks = 0, failures = 0;

  hidden_output dut (.clk, .rst, .en, .sel, .hide, .houtput, .valid);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int s, input longint expv);
    sel = 3'(s);
    en  = 1;
    @(posedge clk);
    #1 en = 0;
    checks++;
    if (!valid || sx24(houtput) != expv) begin
      failures++;
      $display("FAIL sel=%0d in=%h out=%h exp=%h valid=%b", s, hide[s], houtput, 24'(expv), valid);
    end
  endtask

  initial begin
    hide = '{24'h180000, 24'hE70000, 24'h080000, 24'h000000, 24'h00A000};
    repeat (2) @(posedge clk);
    #1 rst = 0;
    // Published values
    run(0, sx24(24'h100000));
    run(1, sx24(24'hF00000));
    run(2, sx24(24'h079980));
    run(3, 0);
    run(4, sx24(24'h0097FE));
    // Thresholds
    hide = '{24'h100000, 24'hF00000, 24'h0FFFFF, 24'hF00001, 24'h7FFFFF};
    run(0, ONE); run(1, -ONE); run(2, (64'sd1048575 * 3891) >>> 12);
    run(3, (-64'sd1048575 * 3891) >>> 12); run(4, ONE);
    // Random
    for (int n = 0; n < 300; n++) begin
      int s;
      s = $urandom_range(NH - 1, 0);
      hide[s] = fx_t'(rnd(21 + (n % 3)));
      run(s, ract(sx24(hide[s])));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
