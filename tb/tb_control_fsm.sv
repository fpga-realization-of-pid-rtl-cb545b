// tb_control_fsm: runs the controller for CYCLES = 4 with a stand-in for the plant
// block that answers `in_start` with `in_done` after a random delay. Per control cycle
// it checks the number of each strobe (5 hidden steps, 3 output steps, 3 delta3,
// 15 hidden-to-output and 20 input-to-hidden weight writes, one PID step), that every
// weight index (o,h) and (h,i) is written exactly once, the order of the four phases,
// that k counts 1..CYCLES, that history is not shifted in the first cycle, and that
// the machine parks in stop with `finished` high.
module tb_control_fsm;
  import bpid_pkg::*;

  localparam int CYC = 4;

  logic clk = 0, rst = 1, init_done = 0, in_done = 0;
  state_t state;
  logic [15:0] k;
  logic [2:0] h_idx;
  logic [1:0] o_idx, i_idx;
  logic hist_en, in_start, hin_en, mem1_we, hout_en, mem2_we, oin_en, oout_en, mem3_we;
  logic pid_en, dyu_en, d3_en, woterm_en, wonew_en, wo_we, seg_en, d2_en;
  logic witerm_en, winew_en, wi_we, finished;
  int checks = 0, failures = 0;

  control_fsm #(.CYCLES(CYC)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Plant stand-in
  initial begin
    forever begin
      @(posedge clk);
      if (in_start) begin
        repeat ($urandom_range(8, 1)) @(posedge clk);
        #1 in_done = 1;
        @(posedge clk);
        #1 in_done = 0;
      end
    end
  end

  task automatic check(input string what, input longint got, input longint expv);
    checks++;
    if (got != expv) begin
      failures++;
      $display("FAIL %s got=%0d exp=%0d", what, got, expv);
    end
  endtask

  int n_hist, n_start, n_hin, n_m1, n_hout, n_m2, n_oin, n_oout, n_m3, n_pid, n_dyu, n_d3;
  int n_wot, n_won, n_wow, n_seg, n_d2, n_wit, n_win, n_wiw, cyc;
  bit wo_seen [NWO];
  bit wi_seen [NWI];
  int last_phase;
  int nrep = 0;

  task automatic clear();
    n_hist = 0; n_start = 0; n_hin = 0; n_m1 = 0; n_hout = 0; n_m2 = 0; n_oin = 0; n_oout = 0;
    n_m3 = 0; n_pid = 0; n_dyu = 0; n_d3 = 0; n_wot = 0; n_won = 0; n_wow = 0; n_seg = 0;
    n_d2 = 0; n_wit = 0; n_win = 0; n_wiw = 0; last_phase = 0;
    for (int w = 0; w < NWO; w++) wo_seen[w] = 0;
    for (int w = 0; w < NWI; w++) wi_seen[w] = 0;
  endtask

  task automatic phase(input int p);
    checks++;
    if (p < last_phase) begin
      failures++;
      $display("FAIL phase order %0d after %0d", p, last_phase);
    end
    last_phase = p;
  endtask

  task automatic report();
    check("hin", n_hin, 5); check("mem1", n_m1, 5); check("hout", n_hout, 5);
    check("mem2", n_m2, 5); check("oin", n_oin, 3); check("oout", n_oout, 3);
    check("mem3", n_m3, 3); check("pid", n_pid, 1); check("dyu", n_dyu, 1);
    check("d3", n_d3, 3); check("wot", n_wot, 15); check("won", n_won, 15);
    check("wow", n_wow, 15); check("seg", n_seg, 5); check("d2", n_d2, 5);
    check("wit", n_wit, 20); check("win", n_win, 20); check("wiw", n_wiw, 20);
    check("start", n_start, 1);
    for (int w = 0; w < NWO; w++) check("wo index", wo_seen[w], 1);
    for (int w = 0; w < NWI; w++) check("wi index", wi_seen[w], 1);
  endtask

  initial begin
    clear();
    cyc = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    repeat (3) @(posedge clk);
    check("idle waits", state == S_IDLE, 1);
    #1 init_done = 1;
    forever begin
      @(negedge clk);
      if (state == S_ST0 && cyc > 0 && int'(k) == cyc) begin
        report();
        nrep++;
        check("hist", n_hist, cyc == 1 ? 0 : 1);
        clear();
      end
      if (hist_en) n_hist++;
      if (in_start) begin
        n_start++; cyc++; phase(1);
        check("k", k, cyc);
        // history of the previous cycle is shifted in this cycle's st0
      end
      if (hin_en) begin n_hin++; phase(2); end
      if (mem1_we) n_m1++;
      if (hout_en) n_hout++;
      if (mem2_we) n_m2++;
      if (oin_en) begin n_oin++; phase(3); end
      if (oout_en) n_oout++;
      if (mem3_we) n_m3++;
      if (pid_en) begin n_pid++; phase(4); end
      if (dyu_en) begin n_dyu++; phase(5); end
      if (d3_en) n_d3++;
      if (woterm_en) n_wot++;
      if (wonew_en) n_won++;
      if (wo_we) begin n_wow++; wo_seen[int'(o_idx) * NH + int'(h_idx)] = 1; phase(6); end
      if (seg_en) begin n_seg++; phase(7); end
      if (d2_en) n_d2++;
      if (witerm_en) n_wit++;
      if (winew_en) n_win++;
      if (wi_we) begin n_wiw++; wi_seen[int'(h_idx) * NI + int'(i_idx)] = 1; phase(8); end
      if (finished) break;
    end
    check("reports", nrep, CYC);
    check("cycles", cyc, CYC);
    check("k final", k, CYC);
    repeat (10) @(posedge clk);
    check("stays stopped", state == S_STOP && finished, 1);
    check("no start after stop", n_start, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
