// ts_source: packet source of one input port, for uniform random traffic.
//
// In every cycle, independently of earlier cycles and of other ports, the
// source offers a new packet with probability load_thr / 65536, with a
// destination drawn uniformly from the N output ports. A private LFSR
// (seeded by SEED) supplies the random bits: bits [15:0] decide whether a
// packet is offered, bits [31:24] give the destination. An external packet
// (ext_valid, ext_dest) takes precedence over the random one, so a
// testbench can inject chosen traffic. The packet carries the port number
// as its source and `now` as its injection stamp.
//
// Timing: valid / pkt are combinational from the LFSR state and the inputs;
// the LFSR advances every cycle. The traffic model (Bernoulli arrivals with
// uniform destinations, independent per port and per cycle) is the study's;
// the LFSR and the 16-bit load resolution are this design's choices.
module ts_source
  import ts_pkg::*;
#(
  parameter int unsigned N     = 32,
  parameter int unsigned PORT  = 0,
  parameter logic [31:0] SEED  = 32'hACE1_0001
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               gen_en,
  input  logic [15:0]        load_thr,
  input  logic               ext_valid,
  input  logic [TAG_W-1:0]   ext_dest,
  input  logic [STAMP_W-1:0] now,
  output logic               valid,
  output packet_t            pkt
);
  localparam logic [TAG_W-1:0] MASK = TAG_W'(N - 1);

  logic [31:0] rnd;
  ts_lfsr #(.SEED(SEED)) u_lfsr (.clk(clk), .rst_n(rst_n), .en(1'b1), .value(rnd));

  always_comb begin
    valid     = ext_valid || (gen_en && (rnd[15:0] < load_thr));
    pkt.dest  = (ext_valid ? ext_dest : rnd[31:24]) & MASK;
    pkt.src   = TAG_W'(PORT);
    pkt.stamp = now;
  end

  logic unused_ok;
  assign unused_ok = ^rnd[23:16];
endmodule
