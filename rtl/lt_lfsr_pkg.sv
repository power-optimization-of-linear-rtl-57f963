// lt_lfsr_pkg: types shared by the low-transition LFSR test pattern generator.
//
// The generator emits every LFSR vector T^i followed by three intermediate
// vectors, so one LFSR step takes four clock cycles. lt_phase_e names those
// four cycles after the vector that is on the outputs during the cycle:
//   PH_T  : T^i        (both halves show the held present vector)
//   PH_T1 : T^i1       (upper half held, lower half shows injected bits)
//   PH_T2 : T^i2       (upper half of T^i, lower half of T^{i+1})
//   PH_T3 : T^i3       (upper half shows injected bits, lower half of T^{i+1})
// lt_ctrl_t is the control word the controller hands to the datapath; every
// enable in it acts at the rising clock edge that ends the current cycle.
package lt_lfsr_pkg;

  typedef enum logic [1:0] {
    PH_T  = 2'd0,
    PH_T1 = 2'd1,
    PH_T2 = 2'd2,
    PH_T3 = 2'd3
  } lt_phase_e;

  typedef struct packed {
    logic load;  // test enable low: load the seed into every flip-flop
    logic adv;   // advance the LFSR core by one step
    logic en1;   // upper half output register takes the LFSR's upper half
    logic en2;   // lower half output register takes the LFSR's lower half
    logic sel1;  // 1: upper half shows its held bits, 0: injected bits
    logic sel2;  // 1: lower half shows its held bits, 0: injected bits
    logic s;     // value given to bits that change between T^i and T^{i+1}
                 // is ~s (s=0 -> OR of the two vectors, s=1 -> AND)
  } lt_ctrl_t;

endpackage
