// tb_ts_demux: self-checking test of the input 1x2 demultiplexer.
//
// Random packets and random full / fault flags of the two first-stage SEs.
// A model of the rule (usable plane = not full and not faulty; alternate
// between planes when both are usable; drop when none is) predicts the plane
// and the drop pulse; the packet must appear on that plane one cycle later.
module tb_ts_demux;
  import ts_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, dropped;
  packet_t in_pkt, out_pkt;
  logic [1:0] se_full, se_fault, out_valid;
  int checks = 0, failures = 0;

  ts_demux dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit pref;
    logic [1:0] ok, exp_v;
    packet_t exp_p;
    int n_alt = 0, n_drop = 0;
    pref = 0; exp_v = '0; exp_p = '0;
    in_valid = 0; in_pkt = '0; se_full = '0; se_fault = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      // outputs of the previous decision
      check(out_valid == exp_v, "plane choice");
      if (exp_v != 0) check(out_pkt == exp_p, "packet");
      in_valid = ($urandom_range(0, 99) < 70);
      in_pkt   = packet_t'($urandom);
      se_full  = 2'($urandom_range(0, 3)) & 2'($urandom_range(0, 3));
      se_fault = ($urandom_range(0, 9) == 0) ? 2'($urandom_range(1, 2)) : 2'b00;
      ok = ~se_full & ~se_fault;
      #1;
      check(dropped == (in_valid && ok == 0), "drop pulse");
      exp_v = '0;
      if (in_valid && ok != 0) begin
        bit pl;
        pl = ok[pref] ? pref : !pref;
        if (ok == 2'b11) n_alt++;
        exp_v[pl] = 1'b1;
        exp_p = in_pkt;
        pref = !pl;
      end
      if (dropped) n_drop++;
    end
    check(n_alt > 100 && n_drop > 50, "both plane choice and drops happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
