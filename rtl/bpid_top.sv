// bpid_top: self-tuning PID controller whose gains come from a BP neural network,
// closed around a plant model, all in one clocked datapath.
//
// Each control cycle k the plant output y(k) and error e(k) = r(k) - y(k) are computed
// (input_layer), a 4-5-3 network maps {r(k), y(k), e(k), 1} to the gains Kp, Ki, Kd
// (hidden_input, hidden_output, output_input, output_output), the incremental PID law
// gives u(k) (pid_incr), and back-propagation adapts first the hidden-to-output and then
// the input-to-hidden weights (wo_update, wi_update). control_fsm sequences everything;
// init_module loads start weights after reset; five register files hold the hidden
// inputs (memory 1), hidden outputs (memory 2), gains (memory 3) and the two weight
// sets (memories 4 and 5). Only clock, reset and the reference and plant coefficient
// are needed: the block runs CYCLES cycles on its own and raises `finished`.
//
// Interface: `k` is the number of the cycle in progress (1..CYCLES); r(k) on `rin` and
// a(k) on `ak` are sampled one clock after `k` changes, so they may be driven directly
// as functions of `k`. `du`, `u_sat` (u was clamped) and `dyu` (sign of dy/du used by
// the learning) are status outputs. `cycle_done` pulses when u(k) is ready (state st10); kp/ki/kd,
// u, y and err are then valid for cycle k. All values are Q4.20. One control cycle
// takes 231 clocks at the default sizes, 79 of them in the plant block's divider.
module bpid_top
  import bpid_pkg::*;
#(
  parameter int          CYCLES = 2000,
  parameter fx_t         XITE   = XITE_DEF,
  parameter fx_t         ALFA   = ALFA_DEF,
  parameter fx_t         U_LIM  = FX_MAX,
  parameter logic [31:0] SEED   = 32'h0001_847E
) (
  input  logic        clk,
  input  logic        rst,
  input  fx_t         rin,
  input  fx_t         ak,
  output logic [15:0] k,
  output fx_t         kp,
  output fx_t         ki,
  output fx_t         kd,
  output fx_t         u,
  output fx_t         y,
  output fx_t         err,
  output fx_t         du,
  output logic        u_sat,
  output logic signed [1:0] dyu,
  output logic        cycle_done,
  output logic        finished,
  output state_t      state
);

  // Controller strobes and indices
  logic [2:0] h_idx;
  logic [1:0] o_idx, i_idx;
  logic hist_en, in_start, hin_en, mem1_we, hout_en, mem2_we, oin_en, oout_en, mem3_we;
  logic pid_en, dyu_en, d3_en, woterm_en, wonew_en, wo_we, seg_en, d2_en;
  logic witerm_en, winew_en, wi_we;
  logic init_done, in_done;

  // Sampled inputs and history of the loop
  fx_t rin_q, ak_q, y_1, u_1, e_1, e_2;
  fx_t yk, errk, x1, x2, x3;

  // Network values
  fx_t hide_input, houtput, onet, kout_v;
  fx_t mem1 [NH];
  fx_t mem2 [NH];
  fx_t gains [NO];
  fx_t wi_cur [NWI];
  fx_t wi_prev [NWI];
  fx_t wo_cur [NWO];
  fx_t wo_prev [NWO];
  logic [47:0] wi1 [NH];
  logic [47:0] wi2 [NH];
  fx_t xvec [NO];
  fx_t xi [NI];
  fx_t delta3 [NO];
  fx_t wo_new, wi_new;
  logic pid_v, hin_v, hout_v, oin_v, oout_v;

  // Initialisation
  logic wi_load, wo_load;
  logic [$clog2(NWI)-1:0] init_addr;
  fx_t init_data;

  control_fsm #(.CYCLES(CYCLES)) u_ctrl (
    .clk, .rst, .init_done, .in_done, .state, .k, .h_idx, .o_idx, .i_idx,
    .hist_en, .in_start, .hin_en, .mem1_we, .hout_en, .mem2_we, .oin_en, .oout_en,
    .mem3_we, .pid_en, .dyu_en, .d3_en, .woterm_en, .wonew_en, .wo_we, .seg_en, .d2_en,
    .witerm_en, .winew_en, .wi_we, .finished
  );

  init_module #(.SEED(SEED)) u_init (
    .clk, .rst, .wi_load, .wo_load, .addr(init_addr), .wdata(init_data), .done(init_done)
  );

  // Cycle assignment: sample r(k), a(k) at the start of the plant step and shift the
  // loop history at the start of the next cycle.
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      rin_q <= '0;
      ak_q  <= '0;
      y_1   <= '0;
      u_1   <= '0;
      e_1   <= '0;
      e_2   <= '0;
    end else begin
      if (in_start) begin
        rin_q <= rin;
        ak_q  <= ak;
      end
      if (hist_en) begin
        y_1 <= yk;
        u_1 <= u;
        e_2 <= e_1;
        e_1 <= errk;
      end
    end
  end

  // Plant and input layer (operands are taken from rin/ak directly on the start edge)
  input_layer u_in (
    .clk, .rst, .start(in_start),
    .rink(in_start ? rin : rin_q), .ak(in_start ? ak : ak_q),
    .uk_1(u_1), .yk_1(y_1), .errk_1(e_1), .errk_2(e_2),
    .yk, .errk, .x1, .x2, .x3, .busy(), .done(in_done)
  );

  // Memory 5 view of the input-to-hidden weights: two weights per 48-bit word
  always_comb begin
    for (int h = 0; h < NH; h++) begin
      wi1[h] = {wi_cur[h*NI + 0], wi_cur[h*NI + 1]};
      wi2[h] = {wi_cur[h*NI + 2], wi_cur[h*NI + 3]};
    end
  end

  hidden_input u_hin (
    .clk, .rst, .en(hin_en), .sel(h_idx), .rink(rin_q), .yk, .errk,
    .wi1, .wi2, .hide_input, .valid(hin_v)
  );

  data_memory #(.N(NH)) u_mem1 (
    .clk, .rst, .we(mem1_we), .waddr(h_idx), .wdata(hide_input), .rdata(mem1)
  );

  hidden_output u_hout (
    .clk, .rst, .en(hout_en), .sel(h_idx), .hide(mem1), .houtput, .valid(hout_v)
  );

  data_memory #(.N(NH)) u_mem2 (
    .clk, .rst, .we(mem2_we), .waddr(h_idx), .wdata(houtput), .rdata(mem2)
  );

  output_input u_oin (
    .clk, .rst, .en(oin_en), .sel(o_idx), .hout(mem2), .wo(wo_cur), .net(onet),
    .valid(oin_v)
  );

  output_output u_oout (
    .clk, .rst, .en(oout_en), .net(onet), .kout(kout_v), .valid(oout_v)
  );

  data_memory #(.N(NO)) u_mem3 (
    .clk, .rst, .we(mem3_we), .waddr(o_idx), .wdata(kout_v), .rdata(gains)
  );

  pid_incr #(.U_LIM(U_LIM)) u_pid (
    .clk, .rst, .en(pid_en), .kp(gains[0]), .ki(gains[1]), .kd(gains[2]),
    .x1, .x2, .x3, .u_prev(u_1), .du, .u, .sat(u_sat), .valid(pid_v)
  );

  assign xvec = '{x1, x2, x3};
  assign xi   = '{rin_q, yk, errk, FX_ONE};

  wo_update #(.XITE(XITE), .ALFA(ALFA)) u_wo (
    .clk, .rst, .en_dyu(dyu_en), .en_d3(d3_en), .en_term(woterm_en), .en_new(wonew_en),
    .sel_o(o_idx), .sel_h(h_idx), .errk, .yk, .y_1, .u, .u_1, .x(xvec), .kout(gains),
    .hout(mem2), .wo_cur, .wo_prev, .dyu, .delta3, .wo_new
  );

  wi_update #(.XITE(XITE), .ALFA(ALFA)) u_wi (
    .clk, .rst, .en_seg(seg_en), .en_d2(d2_en), .en_term(witerm_en), .en_new(winew_en),
    .sel_h(h_idx), .sel_i(i_idx), .delta3, .wo(wo_cur), .hout(mem2), .xi,
    .wi_cur, .wi_prev, .delta2(), .wi_new
  );

  // Memory 4: hidden-to-output weights; memory 5: input-to-hidden weights
  weight_memory #(.N(NWO)) u_mem4 (
    .clk, .rst, .load(wo_load), .we(wo_we),
    .addr(wo_load ? 4'(init_addr) : 4'(int'(o_idx) * NH + int'(h_idx))),
    .wdata(wo_load ? init_data : wo_new), .cur(wo_cur), .prev(wo_prev)
  );

  weight_memory #(.N(NWI)) u_mem5 (
    .clk, .rst, .load(wi_load), .we(wi_we),
    .addr(wi_load ? 5'(init_addr) : 5'(int'(h_idx) * NI + int'(i_idx))),
    .wdata(wi_load ? init_data : wi_new), .cur(wi_cur), .prev(wi_prev)
  );

  // Each memory write and each consumer strobe must meet its producer's valid result.
  a_mem1_on_valid: assert property (@(posedge clk) disable iff (rst) mem1_we == hin_v)
    else $error("bpid_top: memory 1 write not aligned with hidden input result");
  a_mem2_on_valid: assert property (@(posedge clk) disable iff (rst) mem2_we == hout_v)
    else $error("bpid_top: memory 2 write not aligned with hidden output result");
  a_oout_on_valid: assert property (@(posedge clk) disable iff (rst) oout_en == oin_v)
    else $error("bpid_top: output activation not aligned with net input result");
  a_mem3_on_valid: assert property (@(posedge clk) disable iff (rst) mem3_we == oout_v)
    else $error("bpid_top: memory 3 write not aligned with gain result");

  assign kp         = gains[0];
  assign ki         = gains[1];
  assign kd         = gains[2];
  assign y          = yk;
  assign err        = errk;
  assign cycle_done = pid_v;

endmodule
