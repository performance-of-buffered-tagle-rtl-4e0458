// tb_ts_source: self-checking test of the uniform random packet source.
//
// At three offered loads the number of packets over 20000 cycles must lie
// within 5 % of load * cycles, every destination must lie below N and each of
// the N destinations must get between half and twice its fair share. An
// external packet must override the random one, and the stamp and source
// fields must carry `now` and the port number.
module tb_ts_source;
  import ts_pkg::*;
  localparam int unsigned N = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic gen_en, ext_valid, valid;
  logic [15:0] load_thr;
  logic [TAG_W-1:0] ext_dest;
  logic [STAMP_W-1:0] now;
  packet_t pkt;
  int checks = 0, failures = 0;

  ts_source #(.N(N), .PORT(5), .SEED(32'h1357_9BDF)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cnt, hist [N];
    real ld, expect_n;
    gen_en = 0; ext_valid = 0; ext_dest = '0; load_thr = '0; now = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    foreach (ld_list[j]) begin
      ld = ld_list[j];
      load_thr = 16'(int'(ld * 65536.0));
      gen_en = 1;
      cnt = 0;
      for (int d = 0; d < N; d++) hist[d] = 0;
      for (int c = 0; c < 20000; c++) begin
        @(negedge clk);
        now = 16'(c);
        #1;
        if (valid) begin
          cnt++;
          check(pkt.dest < N, "destination in range");
          check(pkt.src == 8'd5 && pkt.stamp == 16'(c), "source and stamp");
          if (pkt.dest < N) hist[pkt.dest]++;
        end
      end
      expect_n = ld * 20000.0;
      check(cnt > 0.95 * expect_n && cnt < 1.05 * expect_n,
            $sformatf("load %0.2f gave %0d packets", ld, cnt));
      for (int d = 0; d < N; d++)
        check(hist[d] > cnt / N / 2 && hist[d] < cnt * 2 / N, "uniform destinations");
    end
    gen_en = 0;
    @(negedge clk); #1 check(!valid, "silent when disabled");
    ext_valid = 1; ext_dest = 8'd6; #1;
    check(valid && pkt.dest == 8'd6, "external packet");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  real ld_list [3] = '{0.2, 0.5, 0.9};
endmodule
