// tb_ts_sink_mux: self-checking test of the output 2x1 multiplexer.
//
// Random requests from the two planes. The model grants a lone request and,
// when both planes ask, the plane holding the priority token, which then
// passes to the other plane. The granted plane's packet is placed on its
// link one cycle later, as a last-stage SE would, and must appear at the
// output port.
module tb_ts_sink_mux;
  import ts_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [1:0] req, grant, link_valid;
  packet_t link_pkt [2];
  logic out_valid, conflict;
  packet_t out_pkt;
  int checks = 0, failures = 0;

  ts_sink_mux dut (.*);
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
    bit tok;
    logic [1:0] exp_g;
    packet_t nxt [2];
    int n_conf = 0;
    tok = 0;
    req = '0; link_valid = '0; link_pkt[0] = '0; link_pkt[1] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      req = 2'($urandom_range(0, 3));
      nxt[0] = packet_t'($urandom); nxt[1] = packet_t'($urandom);
      #1;
      exp_g = req;
      if (req == 2'b11) begin exp_g = tok ? 2'b10 : 2'b01; tok = !tok; n_conf++; end
      check(grant == exp_g, "grant");
      check(conflict == (req == 2'b11), "conflict flag");
      check(out_valid == (link_valid != 0), "output valid");
      if (link_valid[0]) check(out_pkt == link_pkt[0], "plane 0 packet");
      if (link_valid[1]) check(out_pkt == link_pkt[1], "plane 1 packet");
      @(posedge clk);
      // the granted SE drives its link register
      link_valid <= grant;
      if (grant[0]) link_pkt[0] <= nxt[0];
      if (grant[1]) link_pkt[1] <= nxt[1];
    end
    check(n_conf > 100, "conflicts happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
