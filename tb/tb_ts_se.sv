// tb_ts_se: self-checking test of one 4x4 switching element.
//
// Directed cases, each started from reset, check the buffer handling rules
// and their timing: FIFO store-and-forward (two cycles), look-ahead bypass
// (one cycle), one bypass per terminal, no bypass while the buffer holds a
// packet (so order is kept), fallback to the other plane, back-pressure
// stall, deadline-forced departure (deadline + 2 cycles), forced departure
// around a faulty SE, buffer overflow with the `full` flag, and FIFO order.
// A final random phase checks conservation: every packet that arrived either
// left through the terminal its tag bit selects or was counted as dropped.
module tb_ts_se;
  import ts_pkg::*;
  localparam int unsigned NIN = 4;
  localparam int unsigned M   = 4;
  localparam int unsigned RB  = 1;

  logic clk = 1'b0, rst_n = 1'b0;
  logic lookahead_en;
  logic [7:0] deadline;
  logic [NIN-1:0] in_valid;
  packet_t in_pkt [NIN];
  logic [1:0][1:0] nxt_full, nxt_fault, out_valid;
  logic full;
  logic [1:0] req;
  packet_t out_pkt [2];
  se_events_t ev;

  ts_se #(.NIN(NIN), .M(M), .ROUTE_BIT(RB), .LAST(1'b0), .CROSS(1'b1)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct { int c; int t; int q; int id; int d; } rec_t;
  rec_t log_q [$];
  int n_arr = 0, n_drop = 0, n_byp = 0;
  always @(negedge clk) begin
    for (int t = 0; t < 2; t++)
      for (int q = 0; q < 2; q++)
        if (rst_n && out_valid[t][q]) log_q.push_back('{cyc, t, q, int'(out_pkt[t].stamp), int'(out_pkt[t].dest[RB])});
  end
  always @(posedge clk) if (rst_n) begin
    n_arr  += ev.arrived;
    n_drop += ev.dropped;
    n_byp  += ev.bypassed;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_reset();
    @(negedge clk);
    rst_n = 1'b0; in_valid = '0; nxt_full = '0; nxt_fault = '0;
    lookahead_en = 1'b0; deadline = 8'd0;
    for (int i = 0; i < NIN; i++) in_pkt[i] = '0;
    @(negedge clk); rst_n = 1'b1;
    log_q.delete(); n_arr = 0; n_drop = 0; n_byp = 0;
  endtask

  // present packets for one cycle; dest bit RB = term, id in the stamp
  function automatic packet_t mk(int term, int id);
    packet_t p;
    p.dest  = TAG_W'(term << RB);
    p.src   = 8'hA5;
    p.stamp = STAMP_W'(id);
    return p;
  endfunction

  task automatic put(int i, int term, int id);
    in_valid[i] = 1'b1;
    in_pkt[i]   = mk(term, id);
  endtask

  task automatic step();   // let one edge pass, clear inputs
    @(negedge clk);
    in_valid = '0;
  endtask

  function automatic int find(int id);
    foreach (log_q[k]) if (log_q[k].id == id) return k;
    return -1;
  endfunction

  task automatic expect_out(int id, int t, int q, int at, string what);
    int k;
    k = find(id);
    check(k >= 0, {what, ": packet left"});
    if (k >= 0) begin
      check(log_q[k].t == t && log_q[k].q == q, {what, ": link"});
      check(log_q[k].c == at, $sformatf("%s: cycle %0d expected %0d", what, log_q[k].c, at));
    end
  endtask

  initial begin
    int c0;
    do_reset();

    // 1. FIFO: store then forward, two cycles
    c0 = cyc; put(2, 1, 11); step(); repeat (4) step();
    expect_out(11, 1, 0, c0 + 2, "fifo latency");
    check(n_byp == 0, "fifo never bypasses");

    // 2. look-ahead: empty buffer, free terminal, next free -> one cycle
    do_reset(); lookahead_en = 1'b1;
    c0 = cyc; put(0, 0, 21); step(); repeat (3) step();
    expect_out(21, 0, 0, c0 + 1, "bypass latency");
    check(n_byp == 1, "bypass counted");

    // 3. two arrivals for one terminal: one bypasses, the other is stored
    do_reset(); lookahead_en = 1'b1;
    c0 = cyc; put(1, 0, 31); put(3, 0, 32); step(); repeat (4) step();
    check(find(31) >= 0 && find(32) >= 0, "both left");
    if (find(31) >= 0 && find(32) >= 0)
      check((log_q[find(31)].c == c0 + 1) != (log_q[find(32)].c == c0 + 1), "exactly one bypassed");
    check(n_byp == 1, "one bypass on a shared terminal");

    // 4. two arrivals for different terminals both bypass
    do_reset(); lookahead_en = 1'b1;
    c0 = cyc; put(0, 0, 41); put(2, 1, 42); step(); repeat (3) step();
    expect_out(41, 0, 0, c0 + 1, "bypass upper");
    expect_out(42, 1, 0, c0 + 1, "bypass lower");

    // 5. next SE of the own plane full -> other plane
    do_reset(); nxt_full[1][0] = 1'b1;
    c0 = cyc; put(0, 1, 51); step(); repeat (3) step();
    expect_out(51, 1, 1, c0 + 2, "plane fallback");

    // 6. back-pressure: both next SEs full, no deadline -> packet waits
    do_reset(); nxt_full[0] = 2'b11;
    c0 = cyc; put(1, 0, 61); step(); repeat (20) step();
    check(find(61) < 0, "held by back-pressure");
    check(full == 1'b0, "one packet does not fill the buffer");
    nxt_full[0] = 2'b00; step(); repeat (2) step();
    check(find(61) >= 0, "released when the next buffer frees");

    // 7. deadline: sent to the own plane although full, deadline + 2 cycles
    do_reset(); nxt_full = '1; deadline = 8'd5;
    c0 = cyc; put(3, 1, 71); step(); repeat (10) step();
    expect_out(71, 1, 0, c0 + 5 + 2, "deadline forced");

    // 8. forced departure avoids a faulty SE
    do_reset(); nxt_full = '1; nxt_fault[0][0] = 1'b1; deadline = 8'd3;
    c0 = cyc; put(0, 0, 81); step(); repeat (8) step();
    expect_out(81, 0, 1, c0 + 3 + 2, "forced around fault");

    // 9. overflow: 4 stored, the next 4 dropped; full flag
    do_reset(); nxt_full = '1;
    for (int i = 0; i < 4; i++) put(i, i % 2, 90 + i);
    #1 check(full == 1'b1, "full while four arrive");
    step();
    for (int i = 0; i < 4; i++) put(i, i % 2, 94 + i);
    step(); step();
    check(n_drop == 4, $sformatf("dropped %0d expected 4", n_drop));
    check(full == 1'b1, "buffer full");
    nxt_full = '0; repeat (8) step();
    check(log_q.size() == 4, "four stored packets left");

    // 10. FIFO order kept, one departure per cycle, head-of-line blocking
    do_reset();
    c0 = cyc;
    put(0, 0, 101); step(); put(1, 1, 102); step(); put(2, 0, 103); step();
    repeat (6) step();
    expect_out(101, 0, 0, c0 + 2, "order 1");
    expect_out(102, 1, 0, c0 + 3, "order 2");
    expect_out(103, 0, 0, c0 + 4, "order 3");

    // 11. look-ahead: a packet arriving while the buffer is not empty is stored
    do_reset(); lookahead_en = 1'b1; nxt_full[0] = 2'b11;
    put(0, 0, 111); step(); step();      // bypass refused, stored, head blocked
    put(1, 1, 112); step();              // terminal 1 free, but buffer not empty
    repeat (4) step();
    check(find(112) < 0, "no bypass past a waiting head");
    nxt_full[0] = 2'b00; repeat (4) step();
    check(find(111) >= 0 && find(112) >= 0 && find(111) < find(112), "order after release");

    // 12. random traffic, conservation
    do_reset(); lookahead_en = 1'b1; deadline = 8'd6;
    for (int c = 0; c < 3000; c++) begin
      if (c == 1500) lookahead_en = 1'b0;
      for (int i = 0; i < NIN; i++)
        if ($urandom_range(0, 99) < 30) put(i, $urandom_range(0, 1), 1000 + c * 4 + i);
      for (int t = 0; t < 2; t++) for (int q = 0; q < 2; q++)
        nxt_full[t][q] = ($urandom_range(0, 99) < 40);
      step();
    end
    nxt_full = '0; repeat (20) step();
    check(n_arr == log_q.size() + n_drop,
          $sformatf("conservation arrived %0d sent %0d dropped %0d", n_arr, log_q.size(), n_drop));
    foreach (log_q[k]) begin
      check(log_q[k].t == log_q[k].d, "terminal follows the tag bit");
    end
    check(n_drop > 0 && n_byp > 0, "random phase exercised drops and bypasses");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
