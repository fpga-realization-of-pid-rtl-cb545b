// init_module: fills both weight memories with start values after reset.
//
// Walks addresses 0..NWI-1 of the input-to-hidden weights and then 0..NWO-1 of the
// hidden-to-output weights, one per clock, issuing a `load` strobe with a pseudo-random
// weight in [-0.5, 0.5). The numbers come from a 32-bit Galois LFSR seeded with SEED:
// the low 20 bits, read as a fraction, minus 0.5. `done` rises after the last load and
// stays high until the next reset. The source design has an initialisation module that
// provides the first weights; their values and how they are produced are this design's.
module init_module
  import bpid_pkg::*;
#(
  parameter logic [31:0] SEED = 32'h0001_847E
) (
  input  logic                       clk,
  input  logic                       rst,
  output logic                       wi_load,
  output logic                       wo_load,
  output logic [$clog2(NWI)-1:0]     addr,
  output fx_t                        wdata,
  output logic                       done
);

  localparam int TOTAL = NWI + NWO;

  logic [31:0]              lfsr;
  logic [$clog2(TOTAL)-1:0] cnt;
  logic                     active;

  assign active  = !done;
  assign wi_load = active && (int'(cnt) < NWI);
  assign wo_load = active && (int'(cnt) >= NWI);
  assign addr    = wi_load ? $bits(addr)'(cnt) : $bits(addr)'(int'(cnt) - NWI);
  assign wdata   = fx_t'({4'b0000, lfsr[19:0]}) - FX_HALF;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      lfsr <= (SEED == '0) ? 32'h1 : SEED;
      cnt  <= '0;
      done <= 1'b0;
    end else if (active) begin
      lfsr <= lfsr[0] ? ((lfsr >> 1) ^ 32'hA300_0000) : (lfsr >> 1);
      if (int'(cnt) == TOTAL - 1) done <= 1'b1;
      else                        cnt  <= cnt + 1'b1;
    end
  end

endmodule
