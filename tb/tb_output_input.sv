// tb_output_input: checks the output-layer net input, sum over h of wo(o,h)*O(h), for
// random weights and hidden outputs, each output neuron in turn; the result must appear
// one clock after `en`.
module tb_output_input;
  import bpid_pkg::*;
  import tb_fx_pkg::*;

  logic clk = 0, rst = 1, en = 0;
  logic [1:0] sel = '0;
  fx_t hout [NH];
  fx_t wo [NWO];
  fx_t net;
  logic valid;
  int checks = 0, failures = 0;

  output_input dut (.clk, .rst, .en, .sel, .hout, .wo, .net, .valid);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 300; n++) begin
      for (int h = 0; h < NH; h++) hout[h] = fx_t'(rnd(20));
      for (int w = 0; w < NWO; w++) wo[w] = fx_t'(rnd(n % 2 == 0 ? 20 : 22));
      for (int o = 0; o < NO; o++) begin
        e = 0;
        for (int h = 0; h < NH; h++) e = radd(e, rmul(sx24(wo[o * NH + h]), sx24(hout[h])));
        sel = 2'(o);
        en  = 1;
        @(posedge clk);
        #1 en = 0;
        checks++;
        if (!valid || sx24(net) != e) begin
          failures++;
          $display("FAIL o=%0d net=%h exp=%h", o, net, 24'(e));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
