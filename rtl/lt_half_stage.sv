// lt_half_stage: low-transition output stage for one half of the LFSR outputs.
//
// It adds the two levels of logic that sit between the LFSR flip-flops and
// the low-power outputs. Level 1 is a register that either keeps the present
// half-vector (en low) or takes the next one from the LFSR (en high). Level 2
// is a multiplexer: sel high shows the held bits; sel low shows an
// intermediate half-vector in which every bit that is equal in the present
// (held) and next (LFSR) vectors keeps its value, and every bit that differs
// gets the injected value ~s. That is the OR of the two vectors for s = 0 and
// the AND for s = 1. Passing held -> intermediate -> next therefore costs each
// bit at most one transition, the same as going straight from held to next.
//
// Interface: load (synchronous, priority) puts SEED into the held register;
// en, sel and s come from lt_controller; nxt is the matching half of the LFSR
// register. out is combinational from the held register, nxt, sel and s.
// The split into two halves with en/sel/S controls follows the design's
// worked example; the OR/AND injection rule is this design's reading of it.
module lt_half_stage #(
  parameter int unsigned  W    = 4,
  parameter logic [W-1:0] SEED = 4'b1010
) (
  input  logic         clk,
  input  logic         load,
  input  logic         en,
  input  logic         sel,
  input  logic         s,
  input  logic [W-1:0] nxt,
  output logic [W-1:0] out
);

  logic [W-1:0] held;
  logic [W-1:0] inj;

  // level 1: propagate the present or the next state
  always_ff @(posedge clk) begin
    if (load)    held <= SEED;
    else if (en) held <= nxt;
  end

  // intermediate bits: equal bits pass, differing bits take ~s
  always_comb begin
    inj = s ? (held & nxt) : (held | nxt);
  end

  // level 2: select held or intermediate vector
  always_comb begin
    out = sel ? held : inj;
  end

endmodule
