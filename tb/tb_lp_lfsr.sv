// tb_lp_lfsr: end-to-end testbench of the low-transition LFSR generator at its
// default size (8 bits, x^8 + x + 1, seed 1010_1011, zero-state NOR on).
//
// 1. Loads the seed with test enable low and checks the first five patterns
//    against the worked example: 1010_1011, 1010_1111, 1010_0101, 1111_0101,
//    0101_0101.
// 2. Runs 300 LFSR steps (1200 clocks). A reference model steps a
//    stage-by-stage LFSR to get T^i and T^{i+1}, builds the three
//    intermediate vectors bit by bit (equal bits kept, differing bits take
//    ~s, s toggling every round) and compares the pattern every clock.
// 3. Counts output transitions: within every round the four steps together
//    must make exactly as many transitions as T^i -> T^{i+1}, and no single
//    step may change more than one half. It prints the transitions per clock
//    of the generator against a conventional LFSR clocked every cycle.
// 4. Checks that a new LFSR vector appears every fourth clock and that the
//    sequence repeats with the period the model predicts.
// 5. Drops test enable in the middle of a round and checks the restart.
// Each mechanism (lower-half injection, upper-half injection, injection with
// s=0 and s=1, the all-zeros vector, the restart) is counted and must occur.
module tb_lp_lfsr;
  import lt_lfsr_pkg::*;
  localparam int N  = 8;
  localparam int WL = N / 2;

  logic         clk;
  initial clk = 1'b0;
  logic         test_en;
  logic [N-1:0] pattern;
  lt_phase_e    phase;
  lt_ctrl_t     ctrl;

  int checks = 0, failures = 0;

  lp_lfsr dut (.clk(clk), .test_en(test_en), .pattern(pattern), .phase(phase), .ctrl(ctrl));

  always #5 clk = ~clk;

  // stage-by-stage reference: stage k is pattern bit N-k, stages 1 and 8 tapped,
  // NOR of stages 1..7 spliced into the feedback
  function automatic logic [N-1:0] ref_step(input logic [N-1:0] v);
    logic s [1:8];
    logic f, any;
    for (int k = 1; k <= 8; k++) s[k] = v[N-k];
    f = s[1] ^ s[8];
    any = 1'b0;
    for (int k = 1; k <= 7; k++) any = any | s[k];
    f = f ^ !any;
    for (int k = 8; k >= 2; k--) s[k] = s[k-1];
    s[1] = f;
    for (int k = 1; k <= 8; k++) ref_step[N-k] = s[k];
  endfunction

  // intermediate bits between a and b over bit range [hi:lo]
  function automatic logic [N-1:0] mix(input logic [N-1:0] base, input logic [N-1:0] a,
                                       input logic [N-1:0] b, input int hi, input int lo,
                                       input logic sv);
    logic [N-1:0] r = base;
    for (int k = lo; k <= hi; k++) r[k] = (a[k] == b[k]) ? a[k] : !sv;
    return r;
  endfunction

  function automatic int hd(input logic [N-1:0] a, input logic [N-1:0] b);
    return $countones(a ^ b);
  endfunction

  task automatic check(input logic [N-1:0] exp, input string what);
    checks++;
    if (pattern !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b (phase %0d)", what, pattern, exp, phase);
    end
  endtask

  task automatic require(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  logic [N-1:0] ti, tn, e1, e2, e3, prev;
  logic         sv;
  int lt_trans, conv_trans, round_trans, step_trans, peak_lt, peak_conv;
  int n_inj_lo, n_inj_hi, n_inj_s0, n_inj_s1, n_zero, n_restart;
  int period, cyc, last_new;
  logic [N-1:0] seq [$];

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    n_inj_lo = 0; n_inj_hi = 0; n_inj_s0 = 0; n_inj_s1 = 0; n_zero = 0; n_restart = 0;
    lt_trans = 0; conv_trans = 0; peak_lt = 0; peak_conv = 0;

    // period of the sequence through the seed, from the model alone
    ti = 8'hAB; period = 0;
    do begin ti = ref_step(ti); period++; end while (ti != 8'hAB);

    // 1. worked example
    test_en = 1'b0;
    @(posedge clk); #1;
    check(8'hAB, "seed while test enable low");
    test_en = 1'b1; #1;
    check(8'b1010_1011, "example T^i");
    @(posedge clk); #1; check(8'b1010_1111, "example T^i1");
    @(posedge clk); #1; check(8'b1010_0101, "example T^i2");
    @(posedge clk); #1; check(8'b1111_0101, "example T^i3");
    @(posedge clk); #1; check(8'b0101_0101, "example T^(i+1)");

    // 2..4. long run from the start of the second round
    ti = 8'h55; sv = 1'b1; prev = pattern; cyc = 0; last_new = 0;
    seq.push_back(8'hAB);
    for (int r = 0; r < 300; r++) begin
      tn = ref_step(ti);
      e1 = mix(ti, ti, tn, WL-1, 0, sv);
      e2 = {ti[N-1:WL], tn[WL-1:0]};
      e3 = mix(e2, ti, tn, N-1, WL, sv);
      seq.push_back(ti);
      if (ti == '0) n_zero++;
      check(ti, "T^i");
      round_trans = 0;
      for (int p = 1; p <= 4; p++) begin
        @(posedge clk); #1;
        cyc++;
        case (p)
          1: check(e1, "T^i1");
          2: check(e2, "T^i2");
          3: check(e3, "T^i3");
          default: begin
            check(tn, "T^(i+1)");
            require(cyc - last_new == 4, "new LFSR vector every fourth clock");
            last_new = cyc;
          end
        endcase
        step_trans = hd(prev, pattern);
        if (step_trans > peak_lt) peak_lt = step_trans;
        round_trans += step_trans;
        // no step may change bits in both halves
        require(!((prev[N-1:WL] != pattern[N-1:WL]) && (prev[WL-1:0] != pattern[WL-1:0])),
                "only one half changes per clock");
        if (p == 1 && ti[WL-1:0] != tn[WL-1:0]) begin
          n_inj_lo++;
          if (sv) n_inj_s1++; else n_inj_s0++;
        end
        if (p == 3 && ti[N-1:WL] != tn[N-1:WL]) begin
          n_inj_hi++;
          if (sv) n_inj_s1++; else n_inj_s0++;
        end
        require(ctrl.adv == (phase == PH_T) && ctrl.s == (p == 4 ? !sv : sv), "control word matches phase");
        prev = pattern;
      end
      require(round_trans == hd(ti, tn), "round keeps the conventional transition count");
      lt_trans   += round_trans;
      conv_trans += 4 * hd(ti, tn);   // conventional LFSR: one vector per clock
      if (hd(ti, tn) > peak_conv) peak_conv = hd(ti, tn);
      ti = tn;
      sv = !sv;
    end
    // the sequence repeats with the model's period
    for (int k = period; k < seq.size(); k++)
      require(seq[k] == seq[k - period], "sequence period");
    require(seq.size() > period, "run longer than one period");
    $display("period %0d LFSR vectors; transitions per clock: generator %0d/%0d, conventional %0d/%0d; peak per clock: %0d vs %0d",
             period, lt_trans, 4 * 300, conv_trans, 4 * 300, peak_lt, peak_conv);
    require(4 * lt_trans == conv_trans, "transitions per clock cut to a quarter");

    // 5. restart in the middle of a round
    @(posedge clk); @(posedge clk); #1;
    test_en = 1'b0;
    @(posedge clk); #1;
    check(8'hAB, "reload on test enable low");
    test_en = 1'b1;
    @(posedge clk); #1;
    check(8'b1010_1111, "restart T^i1");
    n_restart++;

    require(n_inj_lo > 0, "lower-half injection happened");
    require(n_inj_hi > 0, "upper-half injection happened");
    require(n_inj_s0 > 0, "injection with s=0 happened");
    require(n_inj_s1 > 0, "injection with s=1 happened");
    require(n_zero > 0, "all-zeros vector happened");
    require(n_restart > 0, "restart happened");
    $display("lower inj %0d, upper inj %0d, s=0 %0d, s=1 %0d, zero vectors %0d, restarts %0d",
             n_inj_lo, n_inj_hi, n_inj_s0, n_inj_s1, n_zero, n_restart);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
