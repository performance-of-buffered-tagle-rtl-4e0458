// ts_lfsr: 32-bit Galois linear feedback shift register, the random source
// of the switch (random choice among contending packets, traffic
// generation). Polynomial x^32 + x^22 + x^2 + x + 1 (maximal length).
// The register loads SEED on reset (a zero seed is replaced by 1) and
// advances once per cycle while `en` is high; `value` is the current state.
module ts_lfsr #(
  parameter logic [31:0] SEED = 32'h1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  output logic [31:0] value
);
  localparam logic [31:0] TAPS = 32'h8020_0003;
  localparam logic [31:0] INIT = (SEED == 32'h0) ? 32'h1 : SEED;

  logic [31:0] state_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  state_q <= INIT;
    else if (en) state_q <= state_q[0] ? ((state_q >> 1) ^ TAPS) : (state_q >> 1);
  end

  assign value = state_q;
endmodule
