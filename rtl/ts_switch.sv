// ts_switch: N x N buffered Tagle-Sharma switch.
//
// Two banyan planes of n = log2 N stages each; every stage of a plane has N/2
// switching elements. Stage s routes on destination-tag bit n-1-s (most
// significant bit first). The planes are wired as butterflies: the SE with
// index k in stage s owns lines lo = k with a 0 inserted at bit n-1-s and
// hi = lo | 1 << (n-1-s); its upper terminal drives line lo and its lower
// terminal line hi of the next stage. With CROSS = 1 (the Tagle-Sharma
// network, upper bound) every terminal is also linked to the SE owning the
// same line in the other plane, so every SE has inputs from both planes
// (2x4 elements in the first stage, 4x4 inside, 4x2 in the last stage), and a
// packet that cannot use the next SE of its own plane (faulty or full) moves
// to the other plane. With CROSS = 0 the links between planes are absent and
// only the input demultiplexers choose a plane (the parallel banyan, lower
// bound).
//
// Around the planes: a traffic source and a 1x2 demultiplexer at every input
// port, a 2x1 multiplexer (sink) at every output port, a packet counter per
// stage and global statistics (offered, dropped at the input, delivered,
// latency sum and maximum, misrouted, output conflicts).
//
// Interface: lookahead_en selects look-ahead (1) or FIFO (0) buffer handling;
// deadline is the head-of-buffer deadline in cycles (0 disables it);
// gen_en / load_thr drive the random traffic (offered load = load_thr/65536
// packets per port and cycle); ext_valid / ext_dest inject chosen packets;
// fault marks SEs out of service ([plane][stage][index]); stats_clear zeroes
// every counter. out_valid / out_pkt show the packet leaving each output
// port. Latency is counted in cycles from the source to the output port; a
// packet that bypasses every buffer takes n + 1 cycles, one that is stored in
// every SE 2n + 1 cycles.
//
// The two-plane structure, the element sizes, the destination-tag routing
// with plane fallback, the demultiplexer and multiplexer at the ports and the
// per-stage counting follow the study. The butterfly wiring of each banyan
// plane, the statistics set and the run-time mode inputs are this design's
// choices.
//
// The last stage never moves a packet to the other plane and never forces a
// departure (its terminals lead to the output multiplexers), so
// st_crossed[n-1] and st_forced[n-1] always read zero; they are kept so that
// every stage has the same set of counters.
module ts_switch
  import ts_pkg::*;
#(
  parameter int unsigned N     = 32,
  parameter int unsigned M     = 4,
  parameter bit          CROSS = 1'b1,
  localparam int unsigned LN   = $clog2(N),
  localparam int unsigned H    = N / 2
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         lookahead_en,
  input  logic [7:0]                   deadline,
  input  logic                         gen_en,
  input  logic [15:0]                  load_thr,
  input  logic [N-1:0]                 ext_valid,
  input  logic [N-1:0][TAG_W-1:0]      ext_dest,
  input  logic [1:0][LN-1:0][H-1:0]    fault,
  input  logic                         stats_clear,
  output logic [N-1:0]                 out_valid,
  output packet_t                      out_pkt [N],
  // global statistics
  output logic [CNT_W-1:0]             offered,
  output logic [CNT_W-1:0]             input_drops,
  output logic [CNT_W-1:0]             delivered,
  output logic [CNT_W-1:0]             latency_sum,
  output logic [STAMP_W-1:0]           latency_max,
  output logic [CNT_W-1:0]             misrouted,
  output logic [CNT_W-1:0]             out_conflicts,
  // per-stage statistics
  output logic [LN-1:0][CNT_W-1:0]     st_arrived,
  output logic [LN-1:0][CNT_W-1:0]     st_dropped,
  output logic [LN-1:0][CNT_W-1:0]     st_sent,
  output logic [LN-1:0][CNT_W-1:0]     st_bypassed,
  output logic [LN-1:0][CNT_W-1:0]     st_crossed,
  output logic [LN-1:0][CNT_W-1:0]     st_stalled,
  output logic [LN-1:0][CNT_W-1:0]     st_forced
);
  initial begin
    assert (N >= 4 && (N & (N - 1)) == 0 && N <= (1 << TAG_W))
      else $error("ts_switch: N must be a power of two between 4 and 256");
  end

  // ---------------- time base ----------------
  logic [STAMP_W-1:0] now_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) now_q <= '0;
    else        now_q <= now_q + 1'b1;
  end

  // ---------------- sources and input demultiplexers ----------------
  logic [N-1:0]       src_v, in_drop;
  packet_t            src_pkt [N];
  logic [1:0]         dmx_v   [N];   // [port][plane]
  packet_t            dmx_pkt [N];

  // ---------------- fabric wires ----------------
  logic       se_full [LN][2][H];
  logic [1:0] lnk_v   [LN][2][N];    // stage s output, plane, line, [q]
  packet_t    lnk_pkt [LN][2][N];
  logic       lreq    [2][N];        // last-stage request per plane and line
  logic [1:0] grant   [N];           // [line][plane]
  se_events_t ev      [LN][N];       // [stage][plane * H + index]
  logic [N-1:0] conflict;

  for (genvar i = 0; i < N; i++) begin : g_port
    localparam int unsigned K0 = del_bit(i, LN - 1);
    ts_source #(.N(N), .PORT(i), .SEED(32'h9E37_79B9 ^ (32'(i + 1) * 32'h0101_0107))) u_src (
      .clk(clk), .rst_n(rst_n), .gen_en(gen_en), .load_thr(load_thr),
      .ext_valid(ext_valid[i]), .ext_dest(ext_dest[i]), .now(now_q),
      .valid(src_v[i]), .pkt(src_pkt[i])
    );
    ts_demux u_dmx (
      .clk(clk), .rst_n(rst_n), .in_valid(src_v[i]), .in_pkt(src_pkt[i]),
      .se_full({se_full[0][1][K0], se_full[0][0][K0]}),
      .se_fault({fault[1][0][K0], fault[0][0][K0]}),
      .out_valid(dmx_v[i]), .out_pkt(dmx_pkt[i]), .dropped(in_drop[i])
    );
  end

  // ---------------- the two planes ----------------
  for (genvar s = 0; s < LN; s++) begin : g_stage
    localparam int unsigned B = LN - 1 - s;     // tag bit examined by this stage
    for (genvar p = 0; p < 2; p++) begin : g_plane
      for (genvar k = 0; k < H; k++) begin : g_se
        localparam int unsigned LO  = ins0(k, B);
        localparam int unsigned HI  = LO | (1 << B);
        localparam int unsigned NIN = (s == 0) ? 2 : 4;
        localparam bit          LST = (s == LN - 1);

        logic [NIN-1:0]  in_v;
        packet_t         in_p [NIN];
        logic [1:0][1:0] nfull, nfault;
        logic [1:0][1:0] ov;
        logic [1:0]      rq;
        packet_t         op [2];

        if (s == 0) begin : g_first
          assign in_v = {dmx_v[HI][p], dmx_v[LO][p]};
          assign in_p[0] = dmx_pkt[LO];
          assign in_p[1] = dmx_pkt[HI];
        end else begin : g_mid
          assign in_v = {lnk_v[s-1][1-p][HI][1], lnk_v[s-1][1-p][LO][1],
                         lnk_v[s-1][p][HI][0],   lnk_v[s-1][p][LO][0]};
          assign in_p[0] = lnk_pkt[s-1][p][LO];
          assign in_p[1] = lnk_pkt[s-1][p][HI];
          assign in_p[2] = lnk_pkt[s-1][1-p][LO];
          assign in_p[3] = lnk_pkt[s-1][1-p][HI];
        end

        if (!LST) begin : g_next
          localparam int unsigned KU = del_bit(LO, B - 1);  // next SE of upper terminal
          localparam int unsigned KL = del_bit(HI, B - 1);  // next SE of lower terminal
          assign nfull[0]  = {se_full[s+1][1-p][KU], se_full[s+1][p][KU]};
          assign nfull[1]  = {se_full[s+1][1-p][KL], se_full[s+1][p][KL]};
          assign nfault[0] = {fault[1-p][s+1][KU], fault[p][s+1][KU]};
          assign nfault[1] = {fault[1-p][s+1][KL], fault[p][s+1][KL]};
        end else begin : g_sink
          assign nfull[0]  = {1'b1, !grant[LO][p]};
          assign nfull[1]  = {1'b1, !grant[HI][p]};
          assign nfault    = '0;
          assign lreq[p][LO] = rq[0];
          assign lreq[p][HI] = rq[1];
        end

        ts_se #(
          .NIN(NIN), .M(M), .ROUTE_BIT(B), .LAST(LST), .CROSS(CROSS),
          .SEED(32'h5EED_0000 ^ 32'((s * 2 + p) * H + k + 1) * 32'h0001_9E37)
        ) u_se (
          .clk(clk), .rst_n(rst_n), .lookahead_en(lookahead_en), .deadline(deadline),
          .in_valid(in_v), .in_pkt(in_p), .nxt_full(nfull), .nxt_fault(nfault),
          .full(se_full[s][p][k]), .req(rq), .out_valid(ov), .out_pkt(op),
          .ev(ev[s][p * H + k])
        );

        assign lnk_v[s][p][LO]   = ov[0];
        assign lnk_v[s][p][HI]   = ov[1];
        assign lnk_pkt[s][p][LO] = op[0];
        assign lnk_pkt[s][p][HI] = op[1];
      end
    end

    ts_stage_counter #(.NSE(N)) u_cnt (
      .clk(clk), .rst_n(rst_n), .clear(stats_clear), .ev(ev[s]),
      .arrived(st_arrived[s]), .dropped(st_dropped[s]), .sent(st_sent[s]),
      .bypassed(st_bypassed[s]), .crossed(st_crossed[s]), .stalled(st_stalled[s]),
      .forced(st_forced[s])
    );
  end

  // ---------------- output multiplexers ----------------
  for (genvar l = 0; l < N; l++) begin : g_out
    packet_t lp [2];
    assign lp[0] = lnk_pkt[LN-1][0][l];
    assign lp[1] = lnk_pkt[LN-1][1][l];
    ts_sink_mux u_mux (
      .clk(clk), .rst_n(rst_n), .req({lreq[1][l], lreq[0][l]}), .grant(grant[l]),
      .link_valid({lnk_v[LN-1][1][l][0], lnk_v[LN-1][0][l][0]}), .link_pkt(lp),
      .out_valid(out_valid[l]), .out_pkt(out_pkt[l]), .conflict(conflict[l])
    );
  end

  // ---------------- global statistics ----------------
  logic [CNT_W-1:0]   d_cnt, l_sum, m_cnt;
  logic [STAMP_W-1:0] l_max;
  always_comb begin
    logic [STAMP_W-1:0] lat;
    d_cnt = '0; l_sum = '0; m_cnt = '0; l_max = latency_max; lat = '0;
    for (int unsigned l = 0; l < N; l++) begin
      if (out_valid[l]) begin
        lat   = now_q - out_pkt[l].stamp;
        d_cnt = d_cnt + 1;
        l_sum = l_sum + CNT_W'(lat);
        if (lat > l_max) l_max = lat;
        if (out_pkt[l].dest != TAG_W'(l)) m_cnt = m_cnt + 1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      offered <= '0; input_drops <= '0; delivered <= '0; latency_sum <= '0;
      latency_max <= '0; misrouted <= '0; out_conflicts <= '0;
    end else if (stats_clear) begin
      offered <= '0; input_drops <= '0; delivered <= '0; latency_sum <= '0;
      latency_max <= '0; misrouted <= '0; out_conflicts <= '0;
    end else begin
      offered       <= offered       + CNT_W'($countones(src_v));
      input_drops   <= input_drops   + CNT_W'($countones(in_drop));
      delivered     <= delivered     + d_cnt;
      latency_sum   <= latency_sum   + l_sum;
      latency_max   <= l_max;
      misrouted     <= misrouted     + m_cnt;
      out_conflicts <= out_conflicts + CNT_W'($countones(conflict));
    end
  end
endmodule
