// tb_ts_runner: test harness around one ts_switch configuration, used by the
// workload testbench. Its task `run` applies uniform random traffic at a given
// load, buffer scheme and deadline for a number of cycles, drains the switch,
// checks that nothing was misrouted and that every offered packet was
// delivered or counted as lost, and returns the measured figures.
module tb_ts_runner
  import ts_pkg::*;
#(
  parameter int unsigned N     = 8,
  parameter int unsigned M     = 8,
  parameter bit          CROSS = 1'b1
) (
  input logic clk,
  input logic rst_n
);
  localparam int unsigned LN = $clog2(N);
  localparam int unsigned H  = N / 2;

  logic lookahead_en = 1'b0, gen_en = 1'b0, stats_clear = 1'b0;
  logic [7:0] deadline = 8'd8;
  logic [15:0] load_thr = '0;
  logic [N-1:0] ext_valid = '0, out_valid;
  logic [N-1:0][TAG_W-1:0] ext_dest = '0;
  logic [1:0][LN-1:0][H-1:0] fault = '0;
  packet_t out_pkt [N];
  logic [CNT_W-1:0] offered, input_drops, delivered, latency_sum, misrouted, out_conflicts;
  logic [STAMP_W-1:0] latency_max;
  logic [LN-1:0][CNT_W-1:0] st_arrived, st_dropped, st_sent, st_bypassed, st_crossed,
                            st_stalled, st_forced;

  ts_switch #(.N(N), .M(M), .CROSS(CROSS)) dut (.*);

  // Results: thr = delivered per output port and cycle, loss = packets lost
  // (input and stages) / offered, delay = mean latency in cycles, sl = losses
  // per stage, errors = accounting errors found.
  task automatic run(input real load, input bit la, input int dl, input int cycles,
                     output real thr, output real loss, output real delay,
                     output longint sl [8], output int errors);
    longint lost;
    errors = 0;
    @(negedge clk);
    lookahead_en = la;
    deadline     = 8'(dl);
    stats_clear  = 1'b1;
    @(negedge clk);
    stats_clear = 1'b0;
    load_thr = (load >= 1.0) ? 16'hFFFF : 16'(int'(load * 65536.0));
    gen_en = 1'b1;
    repeat (cycles) @(negedge clk);
    gen_en = 1'b0;
    repeat (50 + 4 * LN * M) @(negedge clk);
    lost = 0;
    for (int s = 0; s < 8; s++) sl[s] = 0;
    for (int s = 0; s < LN; s++) begin
      lost += st_dropped[s];
      sl[s] = st_dropped[s];
    end
    if (misrouted != 0) errors++;
    if (offered != input_drops + delivered + lost) errors++;
    thr = real'(delivered) / real'(cycles * N);
    loss       = (offered == 0) ? 0.0 : real'(input_drops + lost) / real'(offered);
    delay      = (delivered == 0) ? 0.0 : real'(latency_sum) / real'(delivered);
  endtask
endmodule
