// lfsr: conventional external-XOR (Fibonacci) linear feedback shift register.
//
// The register shifts toward bit 0 every cycle that adv is high; the feedback
// bit enters at the top, bit N-1, which is stage 1 of the polynomial. Stage k
// is bit N-k, so the coefficient of x^k in POLY (bit k-1) taps bit N-k. With
// the default x^8 + x + 1 the feedback is q[7] ^ q[0], which takes 1010_1011
// to 0101_0101 as in the worked example the design follows.
//
// When ZERO_STATE is set, a NOR of bits N-1..1 is XORed into the feedback.
// This is the usual way to splice the all-zeros vector into the sequence:
// 0000...1 goes to 0000...0 and 0000...0 goes to 1000...0, so the register is
// never locked up. The NOR leaves out bit 0, the bit being shifted out; a NOR
// over every bit would only leave the zero state, never reach it.
//
// Interface: load (synchronous, has priority) puts SEED into the register;
// adv advances one step. q is the register itself, valid one cycle after the
// edge that loads or advances it. There is no other reset: the generator is
// started by holding load for at least one clock.
//
// Note: x^8 + x + 1 is not primitive (it factors as (x^2+x+1)(x^6+x^5+x^3+x^2+1)),
// so the sequence is shorter than 2^8; POLY may be set to a primitive
// polynomial where a maximal-length sequence is wanted.
module lfsr #(
  parameter int unsigned     N          = 8,
  parameter logic [N-1:0]    POLY       = 8'b1000_0001, // bit k-1 = coeff. of x^k
  parameter logic [N-1:0]    SEED       = 8'b1010_1011,
  parameter bit              ZERO_STATE = 1'b1
) (
  input  logic         clk,
  input  logic         load,
  input  logic         adv,
  output logic [N-1:0] q
);

  // tap mask in register bit order: coefficient of x^k taps bit N-k
  function automatic logic [N-1:0] tap_mask(input logic [N-1:0] poly);
    logic [N-1:0] m;
    for (int k = 1; k <= int'(N); k++) m[N-k] = poly[k-1];
    return m;
  endfunction

  localparam logic [N-1:0] TAPS = tap_mask(POLY);

  logic fb;

  always_comb begin
    fb = ^(q & TAPS);
    if (ZERO_STATE) fb = fb ^ ~(|q[N-1:1]);
  end

  always_ff @(posedge clk) begin
    if (load)     q <= SEED;
    else if (adv) q <= {fb, q[N-1:1]};
  end

endmodule
