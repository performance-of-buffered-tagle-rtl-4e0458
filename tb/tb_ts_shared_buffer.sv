// tb_ts_shared_buffer: self-checking test of the SE shared buffer.
//
// Random writes on the NIN inputs, random pops and random priority rotation
// for a few thousand cycles. A queue model computes, from the rules (free
// slots = M - occupancy + 1 if the head leaves; inputs taken in rotating
// order from `rot`), which inputs must be accepted or dropped, what the head
// must be and what the occupancy must be, and compares every cycle.
module tb_ts_shared_buffer;
  import ts_pkg::*;
  localparam int unsigned NIN = 4;
  localparam int unsigned M   = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] rot;
  logic [NIN-1:0] wr_req, accepted, dropped;
  packet_t wr_pkt [NIN];
  logic pop, head_valid;
  packet_t head_pkt;
  logic [$clog2(M+1)-1:0] count;
  int checks = 0, failures = 0;
  packet_t q [$];
  int seq = 0;

  ts_shared_buffer #(.NIN(NIN), .M(M)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int free, i;
    logic [NIN-1:0] exp_acc, exp_drop;
    wr_req = '0; pop = 1'b0; rot = '0;
    for (int k = 0; k < NIN; k++) wr_pkt[k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      @(negedge clk);
      // bias the load: phases of heavy writing and heavy reading
      for (int k = 0; k < NIN; k++) begin
        wr_req[k] = ($urandom_range(0, 99) < ((cyc / 500) % 2 ? 15 : 45));
        wr_pkt[k] = packet_t'({8'($urandom), 8'(k), 16'(seq)});
        seq++;
      end
      pop = ($urandom_range(0, 99) < ((cyc / 500) % 2 ? 80 : 30));
      rot = 8'($urandom);
      #1;
      check(head_valid == (q.size() > 0), "head_valid");
      check(count == q.size(), "count");
      if (q.size() > 0) check(head_pkt == q[0], "head packet");
      free = M - q.size() + ((pop && q.size() > 0) ? 1 : 0);
      exp_acc = '0; exp_drop = '0;
      for (int j = 0; j < NIN; j++) begin
        i = (rot + j) % NIN;
        if (wr_req[i]) begin
          if (free > 0) begin exp_acc[i] = 1'b1; free--; end
          else exp_drop[i] = 1'b1;
        end
      end
      check(accepted == exp_acc, "accepted set");
      check(dropped == exp_drop, "dropped set");
      // model update at the coming edge
      if (pop && q.size() > 0) void'(q.pop_front());
      for (int j = 0; j < NIN; j++) begin
        i = (rot + j) % NIN;
        if (exp_acc[i]) q.push_back(wr_pkt[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
