// Testbench for inter_clock_enable_generator at its default size (8-stage
// delay generator, FCK->SCK decode). FCK has a 1.5 ns period, SCK 3 ns, both
// rising together. The testbench gates the clocks with its own model of the
// final-enable latches (transparent while the clock is low) and checks, for
// several capture windows that begin at different SCK phases:
//   - exactly one TFCK (launch) and one TSCK (capture) pulse per window,
//     even in a window far longer than the generator's 15 states;
//   - the capture edge is exactly one FCK period after the launch edge;
//   - the launch pulse comes at least (N-1) FCK periods after SE falls
//     (d1) and within N+8 periods;
//   - fck_en_master is high for one FCK period, sck_en_master for two;
//   - with GE = 0 no pulse at all.
// A second generator with a 3-stage delay replays the published example
// waveform: SE falls just after an FCK edge at which SCK rises (edge 0);
// then S1 falls at edge 3, start is high after edge 4, the state machine is
// in state 1 after edge 5, the launch pulse p is at edge 9 and the capture
// pulse q at edge 10.
module tb_inter_clock_enable_generator;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned N = 8;
  localparam realtime TF = 1.5ns;

  logic fck = 1'b0, sck = 1'b0, rst_n = 1'b0, se = 1'b1, ge = 1'b1;
  logic fck_en_master, sck_en_master;
  logic lf = 1'b0, ls = 1'b0, tfck, tsck;
  int checks = 0, failures = 0;
  int nf = 0, ns = 0, fm_len = 0, sm_len = 0, fm_runs = 0, sm_runs = 0;
  realtime t_launch, t_capture, t_se;

  inter_clock_enable_generator dut (.*);

  // published example: 3-stage delay generator
  logic se3 = 1'b1, fm3, sm3, lf3 = 1'b0, ls3 = 1'b0;
  int edge3 = -100, e_s1 = -1, e_start = -1, e_state1 = -1, e_p = -1, e_q = -1, n_p = 0, n_q = 0;
  inter_clock_enable_generator #(.N_DELAY(3)) dut3 (
    .fck(fck), .sck(sck), .rst_n(rst_n), .se(se3), .ge(1'b1),
    .fck_en_master(fm3), .sck_en_master(sm3)
  );
  always_latch if (!fck) lf3 = fm3;
  always_latch if (!sck) ls3 = sm3;
  always @(posedge fck) begin
    edge3++;
    #0.2;
    if (!se3) begin
      if (e_s1 < 0 && !dut3.s1) e_s1 = edge3;
      if (e_start < 0 && dut3.start) e_start = edge3;
      if (e_state1 < 0 && dut3.state == 4'd1) e_state1 = edge3;
      // gated pulses, seen 0.2 ns into the high phase that began at this edge
      if (fck && lf3) begin n_p++; e_p = edge3; end
      if (sck && ls3) begin n_q++; e_q = edge3; end
    end
  end

  always #(TF / 2) fck = ~fck;
  // SCK toggles on every rising FCK edge: both clocks rise together
  initial begin
    #(TF / 2);
    forever begin
      sck = ~sck;
      #(TF);
    end
  end

  always_latch if (!fck) lf = fck_en_master;
  always_latch if (!sck) ls = sck_en_master;
  assign tfck = fck & lf;
  assign tsck = sck & ls;

  always @(posedge tfck) begin nf++; t_launch = $realtime; end
  always @(posedge tsck) begin ns++; t_capture = $realtime; end

  // lengths of master-enable pulses, measured in FCK periods
  always @(negedge fck) begin
    if (fck_en_master) fm_len++;
    else if (fm_len != 0) begin fm_runs++; check(fm_len == 1, $sformatf("FCK master length %0d", fm_len)); fm_len = 0; end
    if (sck_en_master) sm_len++;
    else if (sm_len != 0) begin sm_runs++; check(sm_len == 2, $sformatf("SCK master length %0d", sm_len)); sm_len = 0; end
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %t", what, $time);
    end
  endtask

  task automatic window(input int unsigned offset_ps, input int unsigned cycles, input bit en);
    ge = en;
    se = 1'b1;
    repeat (N + 4) @(posedge fck);
    #(offset_ps * 1ps);
    nf = 0;
    ns = 0;
    se = 1'b0;
    t_se = $realtime;
    repeat (cycles) @(posedge fck);
    if (en) begin
      check(nf == 1, $sformatf("one launch pulse (%0d)", nf));
      check(ns == 1, $sformatf("one capture pulse (%0d)", ns));
      check(t_capture - t_launch == TF, $sformatf("d2 = %0t", t_capture - t_launch));
      check(t_launch - t_se >= (N - 1) * TF, "d1 at least (N-1) FCK periods");
      check(t_launch - t_se <= (N + 8) * TF, "launch within N+8 FCK periods");
    end else begin
      check(nf == 0 && ns == 0, "GE = 0 blocks all pulses");
    end
    se = 1'b1;
  endtask

  initial begin
    repeat (3) @(posedge fck);
    rst_n = 1'b1;
    repeat (2) @(posedge fck);
    check(fck_en_master == 1'b0 && sck_en_master == 1'b0, "idle after reset");
    window(100, 40, 1'b1);    // SE falls in an SCK-high period
    window(1600, 40, 1'b1);   // one FCK period later: other SCK phase
    window(700, 120, 1'b1);   // long window: still a single pulse pair
    window(300, 40, 1'b0);    // generator disabled
    for (int k = 0; k < 6; k++) window($urandom_range(50, 2950), 40, 1'b1);
    // published example with the 3-stage generator
    ge = 1'b0;
    @(posedge sck);
    #0.1;
    edge3 = 0;
    se3 = 1'b0;
    repeat (30) @(posedge fck);
    #0.5;
    check(e_s1 == 3, $sformatf("example: S1 falls at edge %0d", e_s1));
    check(e_start == 4, $sformatf("example: start after edge %0d", e_start));
    check(e_state1 == 5, $sformatf("example: state 1 after edge %0d", e_state1));
    check(n_p == 1 && e_p == 9, $sformatf("example: launch p at edge %0d (%0d)", e_p, n_p));
    check(n_q == 1 && e_q == 10, $sformatf("example: capture q at edge %0d (%0d)", e_q, n_q));
    se3 = 1'b1;
    check(fm_runs == 9 && sm_runs == 9, $sformatf("enable pulses %0d/%0d", fm_runs, sm_runs));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge fck);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
