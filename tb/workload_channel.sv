// Testbench helper: one inter-clock enable generator with its own pair of
// free-running clocks (fast period TF_PS, slow period RATIO * TF_PS, rising
// together) and a model of the final-enable latches and gating ANDs. It
// counts the gated fast and slow pulses while se = 0 and records the time
// (in ps) of the last rising edge of each.
module workload_channel
  import ictc_pkg::*;
#(
  parameter int unsigned TF_PS = 1500,
  parameter int unsigned RATIO = 2,
  parameter direction_t  DIR   = FAST_TO_SLOW
) (
  input  logic   rst_n,
  input  logic   se,
  output int     n_fast,
  output int     n_slow,
  output longint t_fast,
  output longint t_slow
);
  timeunit 1ns;
  timeprecision 1ps;

  logic fck = 1'b0, sck = 1'b0;
  logic fck_en_master, sck_en_master;
  logic lf = 1'b0, ls = 1'b0;

  inter_clock_enable_generator #(.RATIO(RATIO), .DIR(DIR)) dut (
    .fck(fck), .sck(sck), .rst_n(rst_n), .se(se), .ge(1'b1),
    .fck_en_master(fck_en_master), .sck_en_master(sck_en_master)
  );

  initial begin
    #((TF_PS / 2) * 1ps);
    forever begin fck = ~fck; #((TF_PS / 2) * 1ps); end
  end
  initial begin
    #((TF_PS / 2) * 1ps);
    forever begin sck = ~sck; #((RATIO * TF_PS / 2) * 1ps); end
  end

  always_latch if (!fck) lf = fck_en_master;
  always_latch if (!sck) ls = sck_en_master;

  initial begin n_fast = 0; n_slow = 0; t_fast = 0; t_slow = 0; end
  always @(negedge se) begin n_fast = 0; n_slow = 0; end
  always @(posedge fck) if (!se && lf) begin n_fast++; t_fast = longint'($realtime / 1ps); end
  always @(posedge sck) if (!se && ls) begin n_slow++; t_slow = longint'($realtime / 1ps); end
endmodule
