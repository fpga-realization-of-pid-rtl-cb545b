// seq_divider: iterative restoring divider for signed numerator, positive denominator.
//
// Computes q = trunc(num / den) for a signed NW-bit numerator and a positive DW-bit
// denominator, one quotient bit per clock: `start` loads the operands, `done` pulses
// NW cycles later with `quo` valid (held until the next start). A division by zero
// returns the largest magnitude with the numerator's sign. The source design uses a
// parallel divider block; trading it for a bit-serial one is this design's own choice,
// which costs NW cycles per sample of the control loop.
module seq_divider #(
  parameter int NW = 48,
  parameter int DW = 48
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 start,
  input  logic signed [NW-1:0] num,
  input  logic        [DW-1:0] den,
  output logic signed [NW-1:0] quo,
  output logic                 busy,
  output logic                 done
);

  localparam int CW = $clog2(NW + 1);

  logic [NW-1:0] mag;     // remaining numerator bits, shifted out at the top
  logic [NW-1:0] q;
  logic [DW-1:0] rem;
  logic [DW-1:0] d;
  logic          neg;
  logic [CW-1:0] cnt;
  logic [DW:0]   trial;

  assign trial = {rem, mag[NW-1]} - {1'b0, d};

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      mag  <= '0;
      q    <= '0;
      rem  <= '0;
      d    <= '0;
      neg  <= 1'b0;
      cnt  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        mag  <= num[NW-1] ? NW'(-num) : NW'(num);
        neg  <= num[NW-1];
        d    <= den;
        rem  <= '0;
        q    <= '0;
        cnt  <= CW'(NW);
        busy <= 1'b1;
      end else if (busy) begin
        if (!trial[DW]) begin
          rem <= trial[DW-1:0];
          q   <= {q[NW-2:0], 1'b1};
        end else begin
          rem <= {rem[DW-2:0], mag[NW-1]};
          q   <= {q[NW-2:0], 1'b0};
        end
        mag <= {mag[NW-2:0], 1'b0};
        cnt <= cnt - 1'b1;
        if (cnt == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  // A new division may only start when the previous one has finished.
  a_no_restart: assert property (@(posedge clk) disable iff (rst) start |-> !busy)
    else $error("seq_divider: start while busy");

  // Quotient of the finished division, with the sign restored.
  always_comb begin
    quo = neg ? -$signed(q) : $signed(q);
  end

endmodule
