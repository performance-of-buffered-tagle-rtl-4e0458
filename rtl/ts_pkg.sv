// ts_pkg: types and constants shared by the buffered Tagle-Sharma switch.
//
// A packet is a fixed 32-bit word. The routing tag (destination port) is
// carried in the low bits of `dest`; stage s of an N x N network (n = log2 N
// stages) examines tag bit n-1-s, so the first stage looks at the most
// significant bit and the last stage at the least significant one. The
// source port and an injection time stamp ride along so that the output
// side can check routing and measure transit time. Field widths are this
// design's choice: 8-bit tags cover the largest network size evaluated
// (256 x 256), and the 16-bit stamp wraps, so latencies are taken modulo
// 2^16 cycles.
package ts_pkg;

  localparam int unsigned TAG_W   = 8;   // destination / source tag width
  localparam int unsigned STAMP_W = 16;  // injection time stamp width
  localparam int unsigned CNT_W   = 32;  // statistics counter width

  typedef struct packed {
    logic [TAG_W-1:0]   dest;   // routing tag d(n-1) .. d0
    logic [TAG_W-1:0]   src;    // input port that injected the packet
    logic [STAMP_W-1:0] stamp;  // cycle of injection
  } packet_t;

  // Per-cycle event flags of one switching element, collected by the
  // per-stage counters.
  typedef struct packed {
    logic [2:0] arrived;   // packets presented at the SE inputs
    logic [2:0] dropped;   // arrivals lost because the shared buffer overflowed
    logic [1:0] sent;      // packets that left through an output terminal
    logic [1:0] bypassed;  // look-ahead packets that skipped the buffer
    logic [1:0] crossed;   // packets sent to the other plane
    logic       stalled;   // a candidate packet was held by back-pressure
    logic       forced;    // the head packet was sent because its deadline expired
  } se_events_t;

  // Insert a zero at bit position `b` of `k` (line numbering of the butterfly
  // stages: SE k of a stage switching on bit b owns lines ins0(k,b) and
  // ins0(k,b) | 1<<b).
  function automatic int unsigned ins0(int unsigned k, int unsigned b);
    int unsigned lo_mask;
    lo_mask = (1 << b) - 1;
    return ((k & ~lo_mask) << 1) | (k & lo_mask);
  endfunction

  // Remove bit position `b` of line `l` (the inverse of ins0).
  function automatic int unsigned del_bit(int unsigned l, int unsigned b);
    int unsigned lo_mask;
    lo_mask = (1 << b) - 1;
    return ((l >> (b + 1)) << b) | (l & lo_mask);
  endfunction

endpackage
