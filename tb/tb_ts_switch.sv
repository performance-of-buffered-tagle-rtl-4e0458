// tb_ts_switch: end-to-end test of the Tagle-Sharma switch at its default
// size (32 x 32, buffer of 4 packets per SE, planes cross-linked).
//
// 1. Single packets from chosen inputs to chosen outputs: each must reach the
//    output its tag names, after 2n+1 cycles with FIFO buffering and n+1
//    cycles with look-ahead (every buffer bypassed).
// 2. Random uniform traffic with look-ahead, then with FIFO handling, at the
//    same load, each followed by a drain. After each phase: nothing misrouted,
//    every offered packet is delivered or counted as lost (at the input or in
//    a stage), the per-stage counters chain (what leaves stage s arrives at
//    stage s+1), and the mean latency of look-ahead is below that of FIFO.
// 3. Random traffic with two faulty SEs: still nothing misrouted or lost
//    unaccounted, and the faulty SEs never receive a packet.
// Every mechanism must have happened at least once: bypass, back-pressure
// stall, move to the other plane, deadline-forced departure, overflow loss in
// a stage, loss at the input, output conflict, and the mode switch.
module tb_ts_switch;
  import ts_pkg::*;
  localparam int unsigned N  = 32;
  localparam int unsigned LN = 5;
  localparam int unsigned H  = N / 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic lookahead_en, gen_en, stats_clear;
  logic [7:0] deadline;
  logic [15:0] load_thr;
  logic [N-1:0] ext_valid, out_valid;
  logic [N-1:0][TAG_W-1:0] ext_dest;
  logic [1:0][LN-1:0][H-1:0] fault;
  packet_t out_pkt [N];
  logic [CNT_W-1:0] offered, input_drops, delivered, latency_sum, misrouted, out_conflicts;
  logic [STAMP_W-1:0] latency_max;
  logic [LN-1:0][CNT_W-1:0] st_arrived, st_dropped, st_sent, st_bypassed, st_crossed,
                            st_stalled, st_forced;

  ts_switch dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // mechanism counters over the whole run
  longint m_bypass = 0, m_stall = 0, m_cross = 0, m_forced = 0, m_ovf = 0,
          m_indrop = 0, m_conflict = 0, m_modes = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint sum_st(logic [LN-1:0][CNT_W-1:0] v);
    longint s = 0;
    for (int i = 0; i < LN; i++) s += v[i];
    return s;
  endfunction

  // one packet from src to dst; returns its arrival port and latency
  task automatic single(int src, int dst, int exp_lat, string what);
    int got_port, got_lat, t0;
    got_port = -1; got_lat = -1;
    @(negedge clk);
    ext_valid = '0; ext_valid[src] = 1'b1; ext_dest[src] = TAG_W'(dst);
    t0 = cyc;
    @(negedge clk);
    ext_valid = '0;
    for (int c = 0; c < 40 && got_port < 0; c++) begin
      for (int l = 0; l < N; l++)
        if (out_valid[l]) begin
          got_port = l;
          got_lat  = cyc - t0;
          check(out_pkt[l].src == TAG_W'(src), {what, ": source field"});
          check(int'(dut.now_q - out_pkt[l].stamp) == got_lat, {what, ": stamp"});
        end
      if (got_port < 0) @(negedge clk);
    end
    check(got_port == dst, $sformatf("%s: %0d->%0d arrived at %0d", what, src, dst, got_port));
    check(got_lat == exp_lat, $sformatf("%s: latency %0d expected %0d", what, got_lat, exp_lat));
    repeat (3) @(negedge clk);
  endtask

  // random traffic, drain, and the accounting checks; returns mean latency
  task automatic traffic(int cycles, real load, string what, output real mean_lat);
    longint lost;
    @(negedge clk);
    stats_clear = 1'b1;
    @(negedge clk);
    stats_clear = 1'b0;
    load_thr = (load >= 1.0) ? 16'hFFFF : 16'(int'(load * 65536.0));
    gen_en = 1'b1;
    repeat (cycles) @(negedge clk);
    gen_en = 1'b0;
    repeat (400) @(negedge clk);
    lost = sum_st(st_dropped);
    check(misrouted == 0, {what, ": misrouted packets"});
    check(offered == input_drops + delivered + lost,
          $sformatf("%s: offered %0d != input drops %0d + delivered %0d + stage losses %0d",
                    what, offered, input_drops, delivered, lost));
    check(st_arrived[0] == offered - input_drops, {what, ": stage 0 arrivals"});
    for (int s = 0; s < LN; s++) begin
      check(st_sent[s] == st_arrived[s] - st_dropped[s], $sformatf("%s: stage %0d balance", what, s));
      if (s + 1 < LN) check(st_arrived[s+1] == st_sent[s], $sformatf("%s: stage %0d -> %0d", what, s, s + 1));
    end
    check(delivered == st_sent[LN-1], {what, ": delivered from the last stage"});
    mean_lat = (delivered == 0) ? 0.0 : real'(latency_sum) / real'(delivered);
    $display("%s: load %0.2f offered %0d input-drops %0d delivered %0d stage-losses %0d throughput %0.3f mean-latency %0.2f max %0d",
             what, load, offered, input_drops, delivered, lost,
             real'(delivered) / real'(cycles * N), mean_lat, latency_max);
    $display("   per stage losses: %0d %0d %0d %0d %0d, bypass %0d stall %0d cross %0d forced %0d conflicts %0d",
             st_dropped[0], st_dropped[1], st_dropped[2], st_dropped[3], st_dropped[4],
             sum_st(st_bypassed), sum_st(st_stalled), sum_st(st_crossed), sum_st(st_forced), out_conflicts);
    m_bypass   += sum_st(st_bypassed);
    m_stall    += sum_st(st_stalled);
    m_cross    += sum_st(st_crossed);
    m_forced   += sum_st(st_forced);
    m_ovf      += lost;
    m_indrop   += input_drops;
    m_conflict += out_conflicts;
  endtask

  int faulty_arrivals = 0;
  always @(posedge clk)
    if (rst_n) faulty_arrivals += dut.g_stage[2].g_plane[0].g_se[5].u_se.ev.arrived
                                + dut.g_stage[0].g_plane[1].g_se[3].u_se.ev.arrived;

  initial begin
    real lat_la, lat_fifo, lat_f;
    lookahead_en = 1'b0; gen_en = 1'b0; stats_clear = 1'b0; deadline = 8'd8;
    load_thr = '0; ext_valid = '0; ext_dest = '0; fault = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);

    // 1. single packets
    lookahead_en = 1'b0;
    single(0, 31, 2 * LN + 1, "fifo");
    single(17, 4, 2 * LN + 1, "fifo");
    single(9, 9, 2 * LN + 1, "fifo");
    lookahead_en = 1'b1; m_modes++;
    single(0, 31, LN + 1, "look-ahead");
    single(30, 1, LN + 1, "look-ahead");
    single(12, 12, LN + 1, "look-ahead");

    // 2. random traffic, both schemes at the same load
    lookahead_en = 1'b1;
    traffic(3000, 0.7, "look-ahead", lat_la);
    lookahead_en = 1'b0; m_modes++;
    traffic(3000, 0.7, "fifo", lat_fifo);
    check(lat_la < lat_fifo, $sformatf("look-ahead delay %0.2f below fifo %0.2f", lat_la, lat_fifo));
    // heavy load with a short deadline
    deadline = 8'd3;
    traffic(2000, 1.0, "fifo-heavy", lat_f);
    lookahead_en = 1'b1; m_modes++;
    traffic(2000, 1.0, "look-ahead-heavy", lat_f);

    // 3. faulty SEs
    deadline = 8'd8;
    faulty_arrivals = 0;
    fault[0][2][5] = 1'b1;
    fault[1][0][3] = 1'b1;
    traffic(2000, 0.6, "faults", lat_f);
    check(faulty_arrivals == 0, "no packet entered a faulty SE");

    check(m_bypass > 0,   "mechanism: bypass");
    check(m_stall > 0,    "mechanism: back-pressure stall");
    check(m_cross > 0,    "mechanism: move to the other plane");
    check(m_forced > 0,   "mechanism: deadline-forced departure");
    check(m_ovf > 0,      "mechanism: overflow loss in a stage");
    check(m_indrop > 0,   "mechanism: loss at the input");
    check(m_conflict > 0, "mechanism: output conflict");
    check(m_modes >= 2,   "mechanism: mode switch");
    $display("mechanisms: bypass %0d stall %0d cross %0d forced %0d overflow %0d input-drop %0d conflict %0d mode-switch %0d",
             m_bypass, m_stall, m_cross, m_forced, m_ovf, m_indrop, m_conflict, m_modes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
