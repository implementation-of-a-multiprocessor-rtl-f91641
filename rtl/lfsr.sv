// lfsr: 64-bit pseudorandom generator used to emulate neural noise.
//
// A Fibonacci shift register that advances one step per clock while enabled
// (RANDON sets, RANDOFF clears the enable). SEED loads both 32-bit halves
// with the same 32-bit value {R1, ACC}. LLFSR reads the low 16 bits. The
// feedback polynomial x^64 + x^63 + x^61 + x^60 + 1 (a maximal-length one)
// is this design's choice: the document gives only the length. The reset
// value is 1 so that the register never sits in the all-zero lock-up state.
module lfsr #(
  parameter int unsigned W = 64
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          enable,     // advance one step per cycle
  input  logic          seed_we,    // load seed into both halves
  input  logic [31:0]   seed,
  output logic [W-1:0]  state
);

  logic fb;
  assign fb = state[W-1] ^ state[W-2] ^ state[W-4] ^ state[W-5];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        state <= W'(1);
    else if (seed_we)  state <= {(W/32){seed}};
    else if (enable)   state <= {state[W-2:0], fb};
  end

endmodule
