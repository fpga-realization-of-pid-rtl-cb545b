// data_memory: small register file for intermediate network values.
//
// N words of Q4.20, one write port and all words readable at once, because the blocks
// that consume them (the multiplexers of the next layer) take every word in parallel.
// The source design keeps these values in "middle signals" (registers) rather than RAM
// because the network is small; it is used three times: hidden-layer inputs (5 words),
// hidden-layer outputs (5 words) and the PID gains Kp, Ki, Kd (3 words). A write with
// `we` high lands on the next clock edge. Reset clears all words.
module data_memory
  import bpid_pkg::*;
#(
  parameter int N = NH
) (
  input  logic                           clk,
  input  logic                           rst,
  input  logic                           we,
  input  logic [$clog2(N > 1 ? N : 2)-1:0] waddr,
  input  fx_t                            wdata,
  output fx_t                            rdata [N]
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      rdata <= '{default: '0};
    end else if (we && int'(waddr) < N) begin
      rdata[waddr] <= wdata;
    end
  end

endmodule
