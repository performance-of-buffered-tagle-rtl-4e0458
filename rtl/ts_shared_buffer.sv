// ts_shared_buffer: the shared packet buffer of one switching element.
//
// All NIN inputs of the SE share one pool of M packet slots that is managed
// as a single first-in first-out queue: whatever output a packet is headed
// for, it waits behind every packet that entered the element before it, and
// only the packet at the head can leave. Up to NIN packets may be written in
// one cycle and one (the head) may be removed.
//
// Writing: the inputs with wr_req set are taken in a rotating order that
// starts at input `rot` (the SE feeds it random bits, so contending packets
// are chosen at random). Each is accepted while free slots remain; a slot
// freed by `pop` in the same cycle counts as free. The rest are reported in
// `dropped` and lost (overflow). Accepted packets are appended in that order.
// Reading: head_pkt / head_valid show the oldest packet combinationally;
// `pop` removes it at the clock edge. `count` is the occupancy before the
// edge.
//
// The buffer size M comes from the study (the switch reached its best
// performance with M = 4, the default); it must be a power of two (all the
// evaluated sizes, 4 to 2048, are). The multi-write organisation, the random
// choice among contenders and the overflow behaviour are this design's reading
// of "packets are stored immediately in the buffer following the FIFO
// policy" and "any packet not accepted is dropped".
module ts_shared_buffer
  import ts_pkg::*;
#(
  parameter int unsigned NIN = 4,
  parameter int unsigned M   = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [7:0]               rot,
  input  logic [NIN-1:0]           wr_req,
  input  packet_t                  wr_pkt   [NIN],
  input  logic                     pop,
  output logic                     head_valid,
  output packet_t                  head_pkt,
  output logic [$clog2(M+1)-1:0]   count,
  output logic [NIN-1:0]           accepted,
  output logic [NIN-1:0]           dropped
);
  localparam int unsigned PW = (M > 1) ? $clog2(M) : 1;
  localparam int unsigned CW = $clog2(M + 1);

  initial begin
    assert (M >= 2 && (M & (M - 1)) == 0)
      else $error("ts_shared_buffer: M must be a power of two >= 2");
  end

  packet_t        mem [M];
  logic [PW-1:0]  hd_q;
  logic [CW-1:0]  cnt_q;
  logic [PW-1:0]  slot [NIN];   // write position of each accepted input
  logic [CW-1:0]  nacc;         // packets accepted this cycle
  logic           do_pop;

  assign do_pop     = pop && (cnt_q != '0);
  assign head_valid = (cnt_q != '0);
  assign head_pkt   = mem[hd_q];
  assign count      = cnt_q;

  always_comb begin
    int unsigned free;
    int unsigned i;
    i        = 0;
    free     = M - int'(cnt_q) + (do_pop ? 1 : 0);
    nacc     = '0;
    accepted = '0;
    dropped  = '0;
    for (int unsigned k = 0; k < NIN; k++) slot[k] = '0;
    for (int unsigned j = 0; j < NIN; j++) begin
      i = (int'(rot) + j) % NIN;
      if (wr_req[i]) begin
        if (int'(nacc) < free) begin
          accepted[i] = 1'b1;
          slot[i]     = PW'(int'(hd_q) + int'(cnt_q) + int'(nacc));
          nacc        = nacc + 1'b1;
        end else begin
          dropped[i] = 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int unsigned k = 0; k < NIN; k++)
      if (accepted[k]) mem[slot[k]] <= wr_pkt[k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hd_q  <= '0;
      cnt_q <= '0;
    end else begin
      hd_q  <= hd_q + PW'(do_pop);
      cnt_q <= cnt_q - CW'(do_pop) + nacc;
    end
  end

  // The occupancy can never exceed the number of slots.
  assert property (@(posedge clk) disable iff (!rst_n) cnt_q <= CW'(M));
endmodule
