// lp_lfsr: low-power (low-transition) LFSR test pattern generator for BIST.
//
// A conventional LFSR changes about half of its outputs on every clock, which
// makes the circuit under test switch far more than in normal operation.
// This generator keeps the LFSR's vectors but inserts three intermediate
// vectors between every two successive ones, T^i and T^{i+1}:
//   T^i1 = { upper(T^i),  I(lower)        }
//   T^i2 = { upper(T^i),  lower(T^{i+1})  }
//   T^i3 = { I(upper),    lower(T^{i+1})  }
// where I() keeps every bit the two vectors agree on and gives the bits that
// differ the value ~s. Each output bit that flips between T^i and T^{i+1}
// flips exactly once over the five vectors, so the total transition count is
// unchanged while the transitions per clock fall to about a quarter.
//
// Structure: lfsr (the conventional core, polynomial x^8 + x + 1 by default),
// two lt_half_stage blocks (upper = bits N-1..N/2, lower = bits N/2-1..0),
// each a held register plus injection multiplexer, and lt_controller, the
// four-phase controller. The LFSR core runs one step ahead of the outputs:
// it steps at the end of PH_T, the lower half picks up the new vector at the
// end of PH_T1 and the upper half at the end of PH_T3.
//
// Interface: clk and test_en are the only inputs. Holding test_en low for one
// clock loads SEED into the core and both halves; while test_en is high a new
// pattern appears every clock, the next LFSR vector every fourth clock. With
// test_en low the outputs show SEED. phase and ctrl are brought out for
// observation. Everything follows the design description except the
// injection rule for differing bits and the toggling of s, which are this
// design's reading of the worked example.
module lp_lfsr
  import lt_lfsr_pkg::*;
#(
  parameter int unsigned  N          = 8,
  parameter logic [N-1:0] POLY       = 8'b1000_0001, // x^8 + x + 1
  parameter logic [N-1:0] SEED       = 8'b1010_1011,
  parameter bit           ZERO_STATE = 1'b1
) (
  input  logic         clk,
  input  logic         test_en,
  output logic [N-1:0] pattern,
  output lt_phase_e    phase,
  output lt_ctrl_t     ctrl
);

  localparam int unsigned WL = N / 2;   // lower half width
  localparam int unsigned WU = N - WL;  // upper half width

  logic [N-1:0] core_q;

  lt_controller u_ctrl (
    .clk     (clk),
    .test_en (test_en),
    .phase   (phase),
    .ctrl    (ctrl)
  );

  lfsr #(
    .N          (N),
    .POLY       (POLY),
    .SEED       (SEED),
    .ZERO_STATE (ZERO_STATE)
  ) u_lfsr (
    .clk  (clk),
    .load (ctrl.load),
    .adv  (ctrl.adv),
    .q    (core_q)
  );

  lt_half_stage #(
    .W    (WU),
    .SEED (SEED[N-1:WL])
  ) u_upper (
    .clk  (clk),
    .load (ctrl.load),
    .en   (ctrl.en1),
    .sel  (ctrl.sel1),
    .s    (ctrl.s),
    .nxt  (core_q[N-1:WL]),
    .out  (pattern[N-1:WL])
  );

  lt_half_stage #(
    .W    (WL),
    .SEED (SEED[WL-1:0])
  ) u_lower (
    .clk  (clk),
    .load (ctrl.load),
    .en   (ctrl.en2),
    .sel  (ctrl.sel2),
    .s    (ctrl.s),
    .nxt  (core_q[WL-1:0]),
    .out  (pattern[WL-1:0])
  );

endmodule
