// tb_lp_lfsr_wide: checks that the generator scales to other output counts.
//
// The number of outputs follows the number of inputs of the circuit under
// test, so the generator is parameterised on N. This testbench runs two
// other sizes side by side: N = 16 with the primitive polynomial
// x^16 + x^14 + x^13 + x^11 + 1 (halves of 8 and 8), and N = 9 with the
// primitive polynomial x^9 + x^5 + 1 (halves of 5 and 4), both without the
// zero-state NOR. A width-generic reference model steps the LFSR, builds the
// three intermediate vectors and compares every clock; it also checks that
// the transitions over a round equal those of one conventional step.
module tb_lp_lfsr_wide;
  import lt_lfsr_pkg::*;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;
  logic test_en;

  int checks = 0, failures = 0;

  localparam int NA = 16;
  localparam logic [NA-1:0] POLY_A = 16'b1011_0100_0000_0000; // x^16, x^14, x^13, x^11
  localparam logic [NA-1:0] SEED_A = 16'hACE1;
  localparam int NB = 9;
  localparam logic [NB-1:0] POLY_B = 9'b1_0001_0000;           // x^9, x^5
  localparam logic [NB-1:0] SEED_B = 9'h1A5;

  logic [NA-1:0] pat_a;
  logic [NB-1:0] pat_b;
  lt_phase_e     ph_a, ph_b;
  lt_ctrl_t      ct_a, ct_b;

  lp_lfsr #(.N(NA), .POLY(POLY_A), .SEED(SEED_A), .ZERO_STATE(1'b0)) u_a (
    .clk(clk), .test_en(test_en), .pattern(pat_a), .phase(ph_a), .ctrl(ct_a));
  lp_lfsr #(.N(NB), .POLY(POLY_B), .SEED(SEED_B), .ZERO_STATE(1'b0)) u_b (
    .clk(clk), .test_en(test_en), .pattern(pat_b), .phase(ph_b), .ctrl(ct_b));

  // generic model on 32-bit words: stage k is bit n-k, coefficient of x^k taps it
  function automatic logic [31:0] step(input logic [31:0] v, input logic [31:0] poly, input int n);
    logic f = 1'b0;
    for (int k = 1; k <= n; k++) if (poly[k-1]) f ^= v[n-k];
    return ((v >> 1) | (32'(f) << (n - 1)));
  endfunction

  function automatic logic [31:0] expect_vec(input logic [31:0] a, input logic [31:0] b, input int n,
                                             input int p, input logic sv);
    int wl = n / 2;
    logic [31:0] r;
    for (int k = 0; k < n; k++) begin
      if (k < wl) begin  // lower half
        case (p)
          0: r[k] = a[k];
          1: r[k] = (a[k] == b[k]) ? a[k] : !sv;
          default: r[k] = b[k];
        endcase
      end else begin     // upper half
        case (p)
          0, 1, 2: r[k] = a[k];
          3: r[k] = (a[k] == b[k]) ? a[k] : !sv;
          default: r[k] = b[k];
        endcase
      end
    end
    for (int k = n; k < 32; k++) r[k] = 1'b0;
    return r;
  endfunction

  logic [31:0] ta, tb_, na, nb, prev_a, prev_b;
  int tr_a, tr_b;
  logic sv;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    test_en = 1'b0;
    @(posedge clk); #1;
    test_en = 1'b1; #1;
    ta = 32'(SEED_A); tb_ = 32'(SEED_B); sv = 1'b0;
    prev_a = ta; prev_b = tb_;
    for (int r = 0; r < 200; r++) begin
      na = step(ta, 32'(POLY_A), NA);
      nb = step(tb_, 32'(POLY_B), NB);
      tr_a = 0; tr_b = 0;
      for (int p = 0; p < 4; p++) begin
        checks++;
        if (ph_a != lt_phase_e'(p) || ph_b != ph_a || ct_a != ct_b) begin
          failures++;
          $display("FAIL round %0d: phase %0d/%0d, expected %0d", r, ph_a, ph_b, p);
        end
        checks += 2;
        if (32'(pat_a) !== expect_vec(ta, na, NA, p, sv)) begin
          failures++;
          $display("FAIL N=16 round %0d phase %0d: got %h expected %h", r, p, pat_a,
                   expect_vec(ta, na, NA, p, sv));
        end
        if (32'(pat_b) !== expect_vec(tb_, nb, NB, p, sv)) begin
          failures++;
          $display("FAIL N=9 round %0d phase %0d: got %h expected %h", r, p, pat_b,
                   expect_vec(tb_, nb, NB, p, sv));
        end
        @(posedge clk); #1;
        tr_a += $countones(32'(pat_a) ^ prev_a); prev_a = 32'(pat_a);
        tr_b += $countones(32'(pat_b) ^ prev_b); prev_b = 32'(pat_b);
      end
      checks += 2;
      if (tr_a != $countones(ta ^ na) || tr_b != $countones(tb_ ^ nb)) begin
        failures++;
        $display("FAIL round %0d transition count", r);
      end
      ta = na; tb_ = nb; sv = !sv;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
