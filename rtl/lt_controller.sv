// lt_controller: pattern generation controller of the low-transition LFSR.
//
// A two-bit phase counter walks PH_T -> PH_T1 -> PH_T2 -> PH_T3 -> PH_T while
// test_en is high; each full round emits one LFSR vector and the three
// intermediate vectors after it. Per phase it drives (enables act at the
// edge ending the cycle):
//   PH_T  : sel1=1 sel2=1, adv=1 (LFSR core steps from T^i to T^{i+1})
//   PH_T1 : sel1=1 sel2=0, en2=1 (lower half takes T^{i+1} at the edge)
//   PH_T2 : sel1=1 sel2=1
//   PH_T3 : sel1=0 sel2=1, en1=1 (upper half takes T^{i+1} at the edge)
// The sel pattern and the order in which the halves are updated follow the
// design's worked example; there, en1/en2 are shown in the row whose vector
// the load produced, one row after the cycle in which this controller raises
// them. The injection control s starts at 0 and toggles after every round
// (this toggling is this design's own choice, so that differing bits take
// 1 and 0 in alternate rounds).
//
// Interface: the generator has two pins, clock and test enable. test_en low
// is a synchronous load: phase goes to PH_T, s to 0, and ctrl.load tells the
// datapath to load its seed. Output is combinational from the phase register.
module lt_controller
  import lt_lfsr_pkg::*;
(
  input  logic      clk,
  input  logic      test_en,
  output lt_phase_e phase,
  output lt_ctrl_t  ctrl
);

  logic s_q;

  always_ff @(posedge clk) begin
    if (!test_en) begin
      phase <= PH_T;
      s_q   <= 1'b0;
    end else begin
      phase <= lt_phase_e'(phase + 2'd1);
      if (phase == PH_T3) s_q <= ~s_q;
    end
  end

  always_comb begin
    ctrl      = '0;
    ctrl.load = !test_en;
    ctrl.s    = s_q;
    ctrl.sel1 = (phase != PH_T3);
    ctrl.sel2 = (phase != PH_T1);
    ctrl.adv  = test_en && (phase == PH_T);
    ctrl.en2  = test_en && (phase == PH_T1);
    ctrl.en1  = test_en && (phase == PH_T3);
  end

endmodule
