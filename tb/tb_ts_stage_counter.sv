// tb_ts_stage_counter: self-checking test of the per-stage counters.
//
// Random event reports from NSE elements every cycle; the testbench keeps its
// own sums and compares all seven counters, including after a clear.
module tb_ts_stage_counter;
  import ts_pkg::*;
  localparam int unsigned NSE = 6;
  logic clk = 1'b0, rst_n = 1'b0, clear;
  se_events_t ev [NSE];
  logic [CNT_W-1:0] arrived, dropped, sent, bypassed, crossed, stalled, forced;
  int checks = 0, failures = 0;

  ts_stage_counter #(.NSE(NSE)) dut (.*);
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
    longint e [7];
    clear = 0;
    foreach (ev[i]) ev[i] = '0;
    foreach (e[k]) e[k] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      check(arrived == 32'(e[0]) && dropped == 32'(e[1]) && sent == 32'(e[2]) &&
            bypassed == 32'(e[3]) && crossed == 32'(e[4]) && stalled == 32'(e[5]) &&
            forced == 32'(e[6]), "counters");
      clear = (c == 1500);
      if (clear) foreach (e[k]) e[k] = 0;
      foreach (ev[i]) begin
        ev[i] = se_events_t'($urandom);
        if (!clear) begin
          e[0] += ev[i].arrived;  e[1] += ev[i].dropped; e[2] += ev[i].sent;
          e[3] += ev[i].bypassed; e[4] += ev[i].crossed; e[5] += ev[i].stalled;
          e[6] += ev[i].forced;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
