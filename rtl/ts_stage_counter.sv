// ts_stage_counter: packet counters of one stage of the switch.
//
// Every SE of the stage (both planes, NSE elements) reports per-cycle event
// counts (se_events_t); this block adds them over the stage and accumulates
// them in 32-bit counters: packets that arrived at the stage, packets lost in
// it to buffer overflow, packets that left it, look-ahead bypasses, moves to
// the other plane, cycles with a packet held back by back-pressure (counted
// once per SE and cycle) and deadline-forced departures. `clear` zeroes all
// counters (for example after a warm-up period).
//
// Timing: counters update at the clock edge after the events; they wrap at
// 2^32. The study monitors incoming, outgoing and lost packets per stage; the
// remaining counters are this design's additions for observing the buffer
// handling schemes.
module ts_stage_counter
  import ts_pkg::*;
#(
  parameter int unsigned NSE = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  se_events_t       ev [NSE],
  output logic [CNT_W-1:0] arrived,
  output logic [CNT_W-1:0] dropped,
  output logic [CNT_W-1:0] sent,
  output logic [CNT_W-1:0] bypassed,
  output logic [CNT_W-1:0] crossed,
  output logic [CNT_W-1:0] stalled,
  output logic [CNT_W-1:0] forced
);
  logic [CNT_W-1:0] s_arr, s_drop, s_sent, s_byp, s_cross, s_stall, s_forced;

  always_comb begin
    s_arr = '0; s_drop = '0; s_sent = '0; s_byp = '0;
    s_cross = '0; s_stall = '0; s_forced = '0;
    for (int unsigned i = 0; i < NSE; i++) begin
      s_arr    += CNT_W'(ev[i].arrived);
      s_drop   += CNT_W'(ev[i].dropped);
      s_sent   += CNT_W'(ev[i].sent);
      s_byp    += CNT_W'(ev[i].bypassed);
      s_cross  += CNT_W'(ev[i].crossed);
      s_stall  += CNT_W'(ev[i].stalled);
      s_forced += CNT_W'(ev[i].forced);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      arrived <= '0; dropped <= '0; sent <= '0; bypassed <= '0;
      crossed <= '0; stalled <= '0; forced <= '0;
    end else if (clear) begin
      arrived <= '0; dropped <= '0; sent <= '0; bypassed <= '0;
      crossed <= '0; stalled <= '0; forced <= '0;
    end else begin
      arrived  <= arrived  + s_arr;
      dropped  <= dropped  + s_drop;
      sent     <= sent     + s_sent;
      bypassed <= bypassed + s_byp;
      crossed  <= crossed  + s_cross;
      stalled  <= stalled  + s_stall;
      forced   <= forced   + s_forced;
    end
  end
endmodule
