// tb_data_memory: checks the register file: cleared by reset, one word written per clock,
// all words readable at once, other words unchanged, out-of-range address ignored.
module tb_data_memory;
  import bpid_pkg::*;

  localparam int N = 5;

  logic clk = 0, rst = 1, we = 0;
  logic [2:0] waddr = '0;
  fx_t wdata = '0;
  fx_t rdata [N];
  fx_t model [N];
  int checks = 0, failures = 0;

  data_memory #(.N(N)) dut (.clk, .rst, .we, .waddr, .wdata, .rdata);

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
      if (rdata[a] !== model[a]) begin
        failures++;
        $display("FAIL word %0d = %h exp %h", a, rdata[a], model[a]);
      end
    end
  endtask

  initial begin
    for (int a = 0; a < N; a++) model[a] = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    compare();
    for (int n = 0; n < 300; n++) begin
      we    = ($urandom_range(3, 0) != 0);
      waddr = 3'($urandom_range(7, 0));
      wdata = fx_t'($urandom);
      @(posedge clk);
      if (we && waddr < N) model[waddr] = wdata;
      #1 compare();
    end
    we = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
