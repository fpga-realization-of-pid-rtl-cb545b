// weight_memory: weight store that keeps each weight's last two values.
//
// The momentum term of the weight update needs w(k-1) and w(k-2), so every word has a
// current and a previous copy, both readable in parallel. `we` writes a new weight:
// the old current value moves to `prev` and `wdata` becomes current. `load` (used at
// start-up) sets both copies to `wdata`, so the first update has no momentum. Used for
// the input-to-hidden weights (20 words) and the hidden-to-output weights (15 words).
// Writes land on the next clock edge; reset clears all words.
module weight_memory
  import bpid_pkg::*;
#(
  parameter int N = NWI
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         load,
  input  logic                         we,
  input  logic [$clog2(N > 1 ? N : 2)-1:0] addr,
  input  fx_t                          wdata,
  output fx_t                          cur  [N],
  output fx_t                          prev [N]
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      cur  <= '{default: '0};
      prev <= '{default: '0};
    end else if (int'(addr) < N) begin
      if (load) begin
        cur[addr]  <= wdata;
        prev[addr] <= wdata;
      end else if (we) begin
        cur[addr]  <= wdata;
        prev[addr] <= cur[addr];
      end
    end
  end

  // Start-up loading and update writes never overlap.
  a_load_or_write: assert property (@(posedge clk) disable iff (rst) !(load && we))
    else $error("weight_memory: load and write in the same clock");

endmodule
