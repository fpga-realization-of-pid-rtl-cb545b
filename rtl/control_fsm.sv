// control_fsm: schedule of the closed-loop BP-network PID controller.
//
// After reset the machine waits in idle for the weight initialisation, then repeats a
// control cycle CYCLES times (2000 in the source design) and parks in stop. Its states
// carry the names and the grouping of the source design; what each state does is this
// design's own schedule:
//   st0  cycle count: stop after CYCLES, else k++ and shift the history registers
//        (y, u, e) when a previous cycle exists; the new k selects r(k) and a(k)
//   st1  start the plant / input-layer block        st2  wait until it is done
//   st3  hidden net input of neuron h               st4  store it (memory 1)
//   st5  hidden output of neuron h                  st6  store it (memory 2); h = 0..4
//   st7  output net input of neuron o               st8  output activation
//   st9  store the gain (memory 3); o = 0..2        st10 PID law, u(k)
//   st11 sign of dy/du                              st12 delta3[o], o = 0..2
//   st13 update term of wo(o,h)   st14 new wo(o,h)  st15 write wo(o,h); 15 weights
//   st16 segma[h]                                   st17 delta2[h]; h = 0..4
//   st18 update term of wi(h,i)   st19 new wi(h,i)  st20 write wi(h,i); 20 weights
// Every enable below is a one-cycle strobe that is high while the machine is in the
// named state; the indices h, o, i are stable during it.
module control_fsm
  import bpid_pkg::*;
#(
  parameter int CYCLES = 2000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        init_done,
  input  logic        in_done,
  output state_t      state,
  output logic [15:0] k,
  output logic [2:0]  h_idx,
  output logic [1:0]  o_idx,
  output logic [1:0]  i_idx,
  output logic        hist_en,   // st0, not in the first cycle
  output logic        in_start,  // st1
  output logic        hin_en,    // st3
  output logic        mem1_we,   // st4
  output logic        hout_en,   // st5
  output logic        mem2_we,   // st6
  output logic        oin_en,    // st7
  output logic        oout_en,   // st8
  output logic        mem3_we,   // st9
  output logic        pid_en,    // st10
  output logic        dyu_en,    // st11
  output logic        d3_en,     // st12
  output logic        woterm_en, // st13
  output logic        wonew_en,  // st14
  output logic        wo_we,     // st15
  output logic        seg_en,    // st16
  output logic        d2_en,     // st17
  output logic        witerm_en, // st18
  output logic        winew_en,  // st19
  output logic        wi_we,     // st20
  output logic        finished
);

  state_t nstate;

  always_comb begin
    nstate = state;
    unique case (state)
      S_IDLE: if (init_done) nstate = S_ST0;
      S_ST0:  nstate = (int'(k) >= CYCLES) ? S_STOP : S_ST1;
      S_ST1:  nstate = S_ST2;
      S_ST2:  if (in_done) nstate = S_ST3;
      S_ST3:  nstate = S_ST4;
      S_ST4:  nstate = S_ST5;
      S_ST5:  nstate = S_ST6;
      S_ST6:  nstate = (int'(h_idx) == NH - 1) ? S_ST7 : S_ST3;
      S_ST7:  nstate = S_ST8;
      S_ST8:  nstate = S_ST9;
      S_ST9:  nstate = (int'(o_idx) == NO - 1) ? S_ST10 : S_ST7;
      S_ST10: nstate = S_ST11;
      S_ST11: nstate = S_ST12;
      S_ST12: if (int'(o_idx) == NO - 1) nstate = S_ST13;
      S_ST13: nstate = S_ST14;
      S_ST14: nstate = S_ST15;
      S_ST15: nstate = (int'(o_idx) == NO - 1 && int'(h_idx) == NH - 1) ? S_ST16 : S_ST13;
      S_ST16: nstate = S_ST17;
      S_ST17: nstate = (int'(h_idx) == NH - 1) ? S_ST18 : S_ST16;
      S_ST18: nstate = S_ST19;
      S_ST19: nstate = S_ST20;
      S_ST20: nstate = (int'(h_idx) == NH - 1 && int'(i_idx) == NI - 1) ? S_ST0 : S_ST18;
      S_STOP: nstate = S_STOP;
      default: nstate = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state <= S_IDLE;
      k     <= '0;
      h_idx <= '0;
      o_idx <= '0;
      i_idx <= '0;
    end else begin
      state <= nstate;
      unique case (state)
        S_ST0: if (int'(k) < CYCLES) k <= k + 1'b1;
        S_ST2: h_idx <= '0;
        S_ST6: h_idx <= (int'(h_idx) == NH - 1) ? '0 : h_idx + 1'b1;
        S_ST9, S_ST12: o_idx <= (int'(o_idx) == NO - 1) ? '0 : o_idx + 1'b1;
        S_ST15: begin
          if (int'(h_idx) == NH - 1) begin
            h_idx <= '0;
            o_idx <= (int'(o_idx) == NO - 1) ? '0 : o_idx + 1'b1;
          end else begin
            h_idx <= h_idx + 1'b1;
          end
        end
        S_ST17: h_idx <= (int'(h_idx) == NH - 1) ? '0 : h_idx + 1'b1;
        S_ST20: begin
          if (int'(i_idx) == NI - 1) begin
            i_idx <= '0;
            h_idx <= (int'(h_idx) == NH - 1) ? '0 : h_idx + 1'b1;
          end else begin
            i_idx <= i_idx + 1'b1;
          end
        end
        default: ;
      endcase
    end
  end

  assign hist_en   = (state == S_ST0) && (k != '0) && (int'(k) < CYCLES);
  assign in_start  = (state == S_ST1);
  assign hin_en    = (state == S_ST3);
  assign mem1_we   = (state == S_ST4);
  assign hout_en   = (state == S_ST5);
  assign mem2_we   = (state == S_ST6);
  assign oin_en    = (state == S_ST7);
  assign oout_en   = (state == S_ST8);
  assign mem3_we   = (state == S_ST9);
  assign pid_en    = (state == S_ST10);
  assign dyu_en    = (state == S_ST11);
  assign d3_en     = (state == S_ST12);
  assign woterm_en = (state == S_ST13);
  assign wonew_en  = (state == S_ST14);
  assign wo_we     = (state == S_ST15);
  assign seg_en    = (state == S_ST16);
  assign d2_en     = (state == S_ST17);
  assign witerm_en = (state == S_ST18);
  assign winew_en  = (state == S_ST19);
  assign wi_we     = (state == S_ST20);
  assign finished  = (state == S_STOP);

  // At most one datapath strobe per clock, and stop is final until reset.
  a_one_strobe: assert property (@(posedge clk) disable iff (rst)
    $onehot0({hist_en, in_start, hin_en, mem1_we, hout_en, mem2_we, oin_en, oout_en, mem3_we,
              pid_en, dyu_en, d3_en, woterm_en, wonew_en, wo_we, seg_en, d2_en, witerm_en,
              winew_en, wi_we}))
    else $error("control_fsm: two strobes in one clock");
  a_stop_final: assert property (@(posedge clk) disable iff (rst) state == S_STOP |=> state == S_STOP)
    else $error("control_fsm: left stop");

endmodule
