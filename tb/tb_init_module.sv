// tb_init_module: checks start-up weight loading: 20 loads to the input-to-hidden store
// at addresses 0..19, then 15 to the hidden-to-output store at 0..14, one per clock,
// each value equal to an independent model of the LFSR (low 20 bits minus 0.5) and
// inside [-0.5, 0.5); `done` rises after the 35th load and no load follows.
module tb_init_module;
  import bpid_pkg::*;

  localparam logic [31:0] SEED = 32'hCAFE_F00D;

  logic clk = 0, rst = 1;
  logic wi_load, wo_load, done;
  logic [4:0] addr;
  fx_t wdata;
  int checks = 0, failures = 0;

  init_module #(.SEED(SEED)) dut (.clk, .rst, .wi_load, .wo_load, .addr, .wdata, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  initial begin
    logic [31:0] m;
    longint v;
    m = SEED;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 35; n++) begin
      check("done low", done, 0);
      check("wi_load", wi_load, n < 20);
      check("wo_load", wo_load, n >= 20);
      check("addr", addr, n < 20 ? n : n - 20);
      v = longint'(m[19:0]) - 64'sd524288;
      check("value", longint'(wdata), v);
      checks++;
      if (v < -524288 || v >= 524288) failures++;
      @(posedge clk);
      #1;
      m = m[0] ? ((m >> 1) ^ 32'hA300_0000) : (m >> 1);
    end
    repeat (5) begin
      check("done", done, 1);
      check("no load", wi_load | wo_load, 0);
      @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
