// ts_demux: the 1x2 demultiplexer at an input port of the switch.
//
// It hands each packet from the port's source to the first-stage SE of one of
// the two planes. A plane can be used when its first-stage SE is not faulty
// and its buffer is not full. If both can be used, the demultiplexer
// alternates between them (a toggle flips after every packet it places),
// which spreads the load over the planes; if only one can be used it takes
// that one; if neither, the packet is dropped and `dropped` pulses for that
// cycle, as the study specifies for a packet the first stage cannot accept.
//
// Timing: the choice is made combinationally from `in_valid` and the SE
// flags; the packet is presented on out_valid[plane] / out_pkt from the next
// cycle, for one cycle. Choosing a plane at the input is the study's; the
// alternating preference is this design's choice.
module ts_demux
  import ts_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  packet_t    in_pkt,
  input  logic [1:0] se_full,    // first-stage SE of plane 0 / 1 is full
  input  logic [1:0] se_fault,   // first-stage SE of plane 0 / 1 is faulty
  output logic [1:0] out_valid,  // registered, one-hot or zero
  output packet_t    out_pkt,
  output logic       dropped
);
  logic       pref_q;
  logic [1:0] ok;
  logic       go, plane;

  assign ok    = ~se_full & ~se_fault;
  assign go    = in_valid && (ok != 2'b00);
  assign plane = ok[pref_q] ? pref_q : !pref_q;
  assign dropped = in_valid && (ok == 2'b00);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pref_q    <= 1'b0;
      out_valid <= '0;
    end else begin
      out_valid <= go ? (plane ? 2'b10 : 2'b01) : 2'b00;
      if (go) pref_q <= !plane;
    end
  end

  always_ff @(posedge clk) begin
    if (go) out_pkt <= in_pkt;
  end
endmodule
