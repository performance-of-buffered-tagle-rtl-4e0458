// tb_ts_workloads: the evaluations of the buffered Tagle-Sharma switch, run
// on reduced lengths (a few thousand cycles per point instead of long runs).
//
//  * Applied load vs. packet loss, N = 8, m = 8, upper bound (cross-linked
//    planes) and lower bound (parallel banyan planes), both buffer schemes:
//    loss must grow with load, and the lower bound must lose at least as many
//    packets as the upper bound at full load.
//  * Throughput and delay vs. deadline, N = 32, m = 8, both schemes: the
//    look-ahead delay must stay below the FIFO delay at every deadline.
//  * Delay vs. buffer size, N = 8, m = 8, 32 and 128 (FIFO and look-ahead).
//  * Packet loss per stage, N = 32, look-ahead and FIFO, with m = 8 (the
//    evaluation used m = 64; a larger buffer only delays the losses).
// Each point also checks that nothing is misrouted and every offered packet
// is accounted for. The measured figures are printed as a table.
module tb_ts_workloads;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  tb_ts_runner #(.N(8),  .M(8),  .CROSS(1'b1)) u_up8  (.clk(clk), .rst_n(rst_n));
  tb_ts_runner #(.N(8),  .M(8),  .CROSS(1'b0)) u_lo8  (.clk(clk), .rst_n(rst_n));
  tb_ts_runner #(.N(8),  .M(32), .CROSS(1'b1)) u_up8b (.clk(clk), .rst_n(rst_n));
  tb_ts_runner #(.N(8),  .M(128), .CROSS(1'b1)) u_up8c (.clk(clk), .rst_n(rst_n));
  tb_ts_runner #(.N(32), .M(8),  .CROSS(1'b1)) u_up32 (.clk(clk), .rst_n(rst_n));

  int checks = 0, failures = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real t1, l1, d1, t2, l2, d2;
    longint s1 [8], s2 [8];
    int e1, e2;
    real loads [5] = '{0.2, 0.4, 0.6, 0.8, 1.0};
    real loss_up [5], loss_lo [5];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    $display("== load vs. packet loss, N=8, m=8 ==");
    for (int la = 0; la < 2; la++) begin
      for (int i = 0; i < 5; i++) begin
        u_up8.run(loads[i], la[0], 8, 3000, t1, l1, d1, s1, e1);
        check(e1 == 0, "upper bound accounting");
        loss_up[i] = l1;
        u_lo8.run(loads[i], la[0], 8, 3000, t2, l2, d2, s2, e2);
        check(e2 == 0, "lower bound accounting");
        loss_lo[i] = l2;
        $display("%s load %0.1f  upper: thr %0.3f loss %0.4f delay %0.2f   lower: thr %0.3f loss %0.4f delay %0.2f",
                 la ? "look-ahead" : "fifo      ", loads[i], t1, l1, d1,
                 t2, l2, d2);
      end
      check(loss_up[4] > loss_up[0], "upper bound: loss grows with load");
      check(loss_lo[4] > loss_lo[0], "lower bound: loss grows with load");
      check(loss_lo[4] >= loss_up[4], "lower bound loses at least as much as upper bound");
    end

    $display("== throughput / delay vs. deadline, N=32, m=8, load 0.9 ==");
    for (int dl = 2; dl <= 12; dl += 2) begin
      u_up32.run(0.9, 1'b0, dl, 1500, t1, l1, d1, s1, e1);
      u_up32.run(0.9, 1'b1, dl, 1500, t2, l2, d2, s2, e2);
      check(e1 == 0 && e2 == 0, "deadline sweep accounting");
      check(d2 < d1, $sformatf("deadline %0d: look-ahead delay below fifo", dl));
      $display("deadline %2d  fifo: thr %0.3f delay %0.2f   look-ahead: thr %0.3f delay %0.2f",
               dl, t1, d1, t2, d2);
    end

    $display("== delay vs. buffer size, N=8, load 0.8 ==");
    u_up8.run(0.8, 1'b0, 8, 3000, t1, l1, d1, s1, e1);   u_up8.run(0.8, 1'b1, 8, 3000, t2, l2, d2, s2, e2);
    $display("m=8   fifo delay %0.2f thr %0.3f   look-ahead delay %0.2f thr %0.3f", d1, t1, d2, t2);
    check(e1 == 0 && e2 == 0, "m=8 accounting");
    u_up8b.run(0.8, 1'b0, 8, 3000, t1, l1, d1, s1, e1);  u_up8b.run(0.8, 1'b1, 8, 3000, t2, l2, d2, s2, e2);
    $display("m=32  fifo delay %0.2f thr %0.3f   look-ahead delay %0.2f thr %0.3f", d1, t1, d2, t2);
    check(e1 == 0 && e2 == 0, "m=32 accounting");
    u_up8c.run(0.8, 1'b0, 8, 3000, t1, l1, d1, s1, e1);  u_up8c.run(0.8, 1'b1, 8, 3000, t2, l2, d2, s2, e2);
    $display("m=128 fifo delay %0.2f thr %0.3f   look-ahead delay %0.2f thr %0.3f", d1, t1, d2, t2);
    check(e1 == 0 && e2 == 0, "m=128 accounting");

    $display("== packet loss per stage, N=32, m=8, load 1.0 ==");
    for (int la = 0; la < 2; la++) begin
      u_up32.run(1.0, la[0], 8, 2000, t1, l1, d1, s1, e1);
      check(e1 == 0, "per-stage accounting");
      $display("%s stage losses %0d %0d %0d %0d %0d  thr %0.3f delay %0.2f",
               la ? "look-ahead" : "fifo      ", s1[0], s1[1],
               s1[2], s1[3], s1[4], t1, d1);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
