// galois_lfsr: Galois-form linear feedback shift register over GF(2).
//
// Each clock the state is multiplied by x modulo the generator polynomial
// G(x) = x^5 + x^2 + 1: the register shifts left and, when the bit leaving
// the top is 1, the low coefficients of G (POLY = x^2 + 1 = 5'b00101) are
// XORed in. The feedback therefore sits between the stages rather than in
// front of them, which keeps the longest path to one XOR. G(x) is primitive,
// so any non-zero seed runs through all 31 non-zero states (an m-sequence).
// The polynomial and the Galois form follow the design; the seed, the
// enable and the choice of the top bit as serial output are this
// implementation's.
//
// Timing: one step per enabled clock; `state` and `out` are registered.
module galois_lfsr #(
  parameter int unsigned N    = 5,
  parameter logic [N-1:0] POLY = 5'b00101,  // G(x) without the x^N term
  parameter logic [N-1:0] SEED = 5'b00001   // must be non-zero
) (
  input  logic         clk,
  input  logic         rst_n,  // asynchronous, active low
  input  logic         en,
  output logic [N-1:0] state,
  output logic         out     // m-sequence bit
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  state <= SEED;
    else if (en) state <= {state[N-2:0], 1'b0} ^ (state[N-1] ? POLY : '0);
  end

  assign out = state[N-1];
endmodule
