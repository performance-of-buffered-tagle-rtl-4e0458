// ts_se: one shared-buffer switching element (SE) of the Tagle-Sharma switch.
//
// The network has two banyan planes. An SE sits at a (plane, stage, index)
// position and has two output terminals, upper (tag bit 0) and lower (tag
// bit 1); it examines tag bit ROUTE_BIT of a packet to pick the terminal.
// Each terminal has two links: one to the SE of the same plane in the next
// stage (q = 0) and one to the SE in the same position of the other plane
// (q = 1). A first-stage SE has NIN = 2 inputs (from the input
// demultiplexers), later stages have NIN = 4 (two lines from each plane):
// this gives the 2x4, 4x4 and 4x2 elements of the network. With LAST = 1
// each terminal has only the q = 0 link, to the output multiplexer.
//
// Buffer handling (both schemes of the study, selected at run time):
//  * FIFO (lookahead_en = 0): every arriving packet is stored in the shared
//    buffer. The head packet leaves when the next SE on its terminal can take
//    it (back-pressure: next buffer not full, SE not faulty), preferring the
//    same plane and falling back to the other plane. If it has waited
//    `deadline` cycles at the head (deadline != 0) it is sent anyway, to a
//    non-faulty next SE, even if that buffer is full.
//  * Look-ahead (lookahead_en = 1): as FIFO, but while the buffer is empty an
//    arriving packet skips the buffer when its output terminal is free this
//    cycle and the next SE can take it. Of several arrivals for one terminal,
//    one (chosen at random) may skip; the others are stored.
// A packet that finds no buffer slot is dropped and counted.
//
// Timing: output links are registered. A bypassing packet leaves one cycle
// after it arrives; a stored packet is at the earliest at the head in the
// next cycle and leaves a cycle later, so it spends at least two cycles in the
// SE. `full` (to upstream senders and the input demultiplexers) is
// combinational from registers: occupancy plus the packets now arriving
// reaches M. `req` shows, per terminal, that a packet wants to leave; it does
// not depend on the nxt_* inputs, so the output multiplexer may answer it in
// the same cycle through nxt_full.
//
// Taken from the study: the shared buffer of size m per SE, FIFO policy,
// back-pressure on "next buffer not full", the head-of-buffer deadline, the
// three look-ahead conditions (empty buffer, free output terminal, next
// buffer not full), the fallback to the other plane when the next SE of the
// own plane cannot be used, and the random choice among contenders. This
// design's own choices: one packet per terminal per cycle, the next buffer
// counts as usable when it is not faulty and not full, the deadline counts
// clock cycles and does not apply in the last stage (the output
// multiplexer always serves a waiting packet within two cycles), and the
// priority rotation comes from a per-SE LFSR.
module ts_se
  import ts_pkg::*;
#(
  parameter int unsigned NIN       = 4,
  parameter int unsigned M         = 4,
  parameter int unsigned ROUTE_BIT = 0,
  parameter bit          LAST      = 1'b0,
  parameter bit          CROSS     = 1'b1,
  parameter logic [31:0] SEED      = 32'h1234_5678
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             lookahead_en,
  input  logic [7:0]       deadline,
  input  logic [NIN-1:0]   in_valid,
  input  packet_t          in_pkt   [NIN],
  input  logic [1:0][1:0]  nxt_full,    // [terminal][q]
  input  logic [1:0][1:0]  nxt_fault,   // [terminal][q]
  output logic             full,
  output logic [1:0]       req,
  output logic [1:0][1:0]  out_valid,   // [terminal][q], registered
  output packet_t          out_pkt  [2],// per terminal, registered
  output se_events_t       ev
);
  localparam int unsigned CW = $clog2(M + 1);
  localparam int unsigned IW = (NIN > 1) ? $clog2(NIN) : 1;

  // ---------------- random bits ----------------
  logic [31:0] rnd;
  ts_lfsr #(.SEED(SEED)) u_lfsr (.clk(clk), .rst_n(rst_n), .en(1'b1), .value(rnd));

  // ---------------- shared buffer ----------------
  logic [NIN-1:0] store_req, acc, drop;
  logic           pop, head_v;
  packet_t        head_pkt;
  logic [CW-1:0]  count;

  ts_shared_buffer #(.NIN(NIN), .M(M)) u_buf (
    .clk(clk), .rst_n(rst_n), .rot(rnd[7:0]),
    .wr_req(store_req), .wr_pkt(in_pkt), .pop(pop),
    .head_valid(head_v), .head_pkt(head_pkt), .count(count),
    .accepted(acc), .dropped(drop)
  );

  // ---------------- head deadline ----------------
  logic [7:0] wait_q;
  logic       forced_ok;
  assign forced_ok = !LAST && head_v && (deadline != 8'd0) && (wait_q >= deadline);

  // ---------------- candidates per terminal ----------------
  logic [1:0]           cand_v, cand_byp;
  logic [1:0][IW-1:0]   cand_idx;   // arriving input that bypasses
  packet_t              cand_pkt [2];
  logic                 head_t;
  logic                 byp_en;

  assign head_t = head_pkt.dest[ROUTE_BIT];
  assign byp_en = lookahead_en && !head_v;

  always_comb begin
    int unsigned i;
    i        = 0;
    cand_v   = '0;
    cand_byp = '0;
    cand_idx = '0;
    for (int t = 0; t < 2; t++) cand_pkt[t] = head_pkt;
    if (head_v) begin
      cand_v[head_t] = 1'b1;
    end else if (byp_en) begin
      // one random arrival per terminal may skip the buffer
      for (int unsigned j = 0; j < NIN; j++) begin
        i = (int'(rnd[15:8]) + j) % NIN;
        if (in_valid[i] && !cand_v[in_pkt[i].dest[ROUTE_BIT]]) begin
          cand_v[in_pkt[i].dest[ROUTE_BIT]]   = 1'b1;
          cand_byp[in_pkt[i].dest[ROUTE_BIT]] = 1'b1;
          cand_idx[in_pkt[i].dest[ROUTE_BIT]] = IW'(i);
          cand_pkt[in_pkt[i].dest[ROUTE_BIT]] = in_pkt[i];
        end
      end
    end
  end

  assign req = cand_v;

  // ---------------- routing / back-pressure ----------------
  logic [1:0] send, tgt, stall, forced;
  always_comb begin
    logic ok_same, ok_other;
    send   = '0;
    tgt    = '0;
    stall  = '0;
    forced = '0;
    for (int t = 0; t < 2; t++) begin
      ok_same  = !nxt_full[t][0] && !nxt_fault[t][0];
      ok_other = CROSS && !LAST && !nxt_full[t][1] && !nxt_fault[t][1];
      if (cand_v[t]) begin
        if (ok_same) begin
          send[t] = 1'b1;
        end else if (ok_other) begin
          send[t] = 1'b1;
          tgt[t]  = 1'b1;
        end else if (!cand_byp[t] && forced_ok) begin
          // deadline expired: leave whether or not the next buffer has room
          if (!nxt_fault[t][0]) begin
            send[t]   = 1'b1;
            forced[t] = 1'b1;
          end else if (CROSS && !nxt_fault[t][1]) begin
            send[t]   = 1'b1;
            tgt[t]    = 1'b1;
            forced[t] = 1'b1;
          end
        end
        stall[t] = !send[t];
      end
    end
  end

  assign pop = head_v && send[head_t];

  // arrivals not leaving by the bypass go to the buffer
  always_comb begin
    store_req = in_valid;
    for (int t = 0; t < 2; t++)
      if (cand_byp[t] && send[t]) store_req[cand_idx[t]] = 1'b0;
  end

  // ---------------- state ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wait_q    <= '0;
      out_valid <= '0;
    end else begin
      if (!head_v || pop)        wait_q <= '0;
      else if (wait_q != 8'hFF)  wait_q <= wait_q + 8'd1;
      for (int t = 0; t < 2; t++) begin
        out_valid[t][0] <= send[t] && !tgt[t];
        out_valid[t][1] <= send[t] &&  tgt[t];
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int t = 0; t < 2; t++)
      if (send[t]) out_pkt[t] <= cand_pkt[t];
  end

  // ---------------- flow control to upstream ----------------
  assign full = (int'(count) + $countones(in_valid)) >= M;

  // ---------------- events ----------------
  always_comb begin
    ev          = '0;
    ev.arrived  = 3'($countones(in_valid));
    ev.dropped  = 3'($countones(drop));
    ev.sent     = 2'($countones(send));
    ev.bypassed = 2'($countones(cand_byp & send));
    ev.crossed  = 2'($countones(send & tgt));
    ev.stalled  = |stall;
    ev.forced   = |forced;
  end

  // Every packet that does not bypass is either stored or counted as dropped.
  assert property (@(posedge clk) disable iff (!rst_n) (acc | drop) == store_req);

  // A packet leaves through a terminal only toward the output its tag selects.
  assert property (@(posedge clk) disable iff (!rst_n)
    send[0] |-> cand_pkt[0].dest[ROUTE_BIT] == 1'b0);
  assert property (@(posedge clk) disable iff (!rst_n)
    send[1] |-> cand_pkt[1].dest[ROUTE_BIT] == 1'b1);
endmodule
