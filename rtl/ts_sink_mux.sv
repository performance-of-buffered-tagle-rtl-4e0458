// ts_sink_mux: the 2x1 multiplexer at an output port of the switch (the
// packet sink).
//
// The last-stage SEs of both planes can deliver to the same output line. Each
// raises `req` when it has a packet for this line; the multiplexer grants one
// per cycle. When both ask, the grant goes to the plane holding the priority
// token, and the token passes to the other plane, so neither plane waits more
// than one cycle. The granted SE sends its packet on its (registered) link in
// the next cycle, and the multiplexer passes it to the output port. The sink
// accepts every granted packet: there is no further back-pressure.
//
// Timing: `grant` is combinational from `req` (which the SEs derive from
// their state and arriving packets only); out_valid / out_pkt follow the link
// registers combinationally. The sink that always accepts a packet is the
// study's; the one-grant-per-cycle rule and the alternating priority are this
// design's choices.
module ts_sink_mux
  import ts_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] req,         // plane 0 / 1 last-stage SE wants this line
  output logic [1:0] grant,
  input  logic [1:0] link_valid,  // registered links from the two planes
  input  packet_t    link_pkt [2],
  output logic       out_valid,
  output packet_t    out_pkt,
  output logic       conflict     // both planes asked this cycle
);
  logic prio_q;

  assign conflict = &req;

  always_comb begin
    grant = req;
    if (conflict) grant = prio_q ? 2'b10 : 2'b01;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        prio_q <= 1'b0;
    else if (conflict) prio_q <= !prio_q;
  end

  assign out_valid = |link_valid;
  assign out_pkt   = link_valid[1] ? link_pkt[1] : link_pkt[0];

  // Each plane was granted on its own, so both links never carry a packet at once.
  assert property (@(posedge clk) disable iff (!rst_n) !(&link_valid));
endmodule
