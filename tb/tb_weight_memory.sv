// tb_weight_memory: checks the two-deep weight store: `load` sets both copies, `we`
// moves the current value to `prev` and stores the new one, other words unchanged.
module tb_weight_memory;
  import bpid_pkg::*;

  localparam int N = 20;

  logic clk = 0, rst = 1, load = 0, we = 0;
  logic [4:0] addr = '0;
  fx_t wdata = '0;
  fx_t cur [N];
  fx_t prev [N];
  fx_t mc [N];
  fx_t mp [N];
  int checks = 0, failures = 0;

  weight_memory #(.N(N)) dut (.clk, .rst, .load, .we, .addr, .wdata, .cur, .prev);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int a = 0; a < N; a++) begin
      checks++;
      if (cur[a] !== mc[a] || prev[a] !== mp[a]) begin
        failures++;
        $display("FAIL word %0d cur=%h/%h prev=%h/%h", a, cur[a], mc[a], prev[a], mp[a]);
      end
    end
  endtask

  initial begin
    for (int a = 0; a < N; a++) begin mc[a] = '0; mp[a] = '0; end
    repeat (2) @(posedge clk);
    #1 rst = 0;
    compare();
    for (int a = 0; a < N; a++) begin
      load = 1; addr = 5'(a); wdata = fx_t'($urandom);
      @(posedge clk);
      mc[a] = wdata; mp[a] = wdata;
      #1 compare();
    end
    load = 0;
    for (int n = 0; n < 300; n++) begin
      we    = ($urandom_range(3, 0) != 0);
      addr  = 5'($urandom_range(N - 1, 0));
      wdata = fx_t'($urandom);
      @(posedge clk);
      if (we) begin mp[addr] = mc[addr]; mc[addr] = wdata; end
      #1 compare();
    end
    we = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
