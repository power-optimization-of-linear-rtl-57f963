// tb_lt_controller: self-checking testbench for lt_controller.
//
// Holds test enable low, then runs 40 rounds of four phases and checks, each
// cycle, the phase and the full control word against the table of the
// four-phase schedule (sel pattern 11, 10, 11, 01; adv in PH_T, en2 in
// PH_T1, en1 in PH_T3), the s bit toggling after each round, and the
// round length of exactly four clocks. Test enable is dropped mid-round to
// check that it restarts the schedule.
module tb_lt_controller;
  import lt_lfsr_pkg::*;

  logic      clk;
  initial clk = 1'b0;
  logic      test_en;
  lt_phase_e phase;
  lt_ctrl_t  ctrl;

  int checks = 0, failures = 0;

  lt_controller dut (.clk(clk), .test_en(test_en), .phase(phase), .ctrl(ctrl));

  always #5 clk = ~clk;

  task automatic expect_ctrl(input int ph, input logic sv, input logic te);
    lt_ctrl_t e;
    e.load = !te;
    e.s    = sv;
    e.sel1 = (ph != 3);
    e.sel2 = (ph != 1);
    e.adv  = te && (ph == 0);
    e.en2  = te && (ph == 1);
    e.en1  = te && (ph == 3);
    checks++;
    if (int'(phase) != ph || ctrl !== e) begin
      failures++;
      $display("FAIL phase %0d (exp %0d) ctrl %b exp %b", phase, ph, ctrl, e);
    end
  endtask

  int ph;
  logic sv;
  int adv_cycles [$];

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
    expect_ctrl(0, 1'b0, 1'b0);
    test_en = 1'b1; #1;
    ph = 0; sv = 1'b0;
    for (int c = 0; c < 160; c++) begin
      expect_ctrl(ph, sv, 1'b1);
      if (ctrl.adv) adv_cycles.push_back(c);
      @(posedge clk); #1;
      if (ph == 3) sv = !sv;
      ph = (ph + 1) % 4;
    end
    // one advance every four clocks
    checks++;
    if (adv_cycles.size() != 40) begin
      failures++;
      $display("FAIL: %0d advances in 160 clocks", adv_cycles.size());
    end
    for (int k = 1; k < adv_cycles.size(); k++) begin
      checks++;
      if (adv_cycles[k] - adv_cycles[k-1] != 4) begin
        failures++;
        $display("FAIL: advances %0d clocks apart", adv_cycles[k] - adv_cycles[k-1]);
      end
    end
    // drop test enable in the middle of a round
    @(posedge clk); @(posedge clk); #1;
    test_en = 1'b0; #1;
    checks++;
    if (!ctrl.load || ctrl.adv || ctrl.en1 || ctrl.en2) begin
      failures++;
      $display("FAIL: enables active while test enable low");
    end
    @(posedge clk); #1;
    expect_ctrl(0, 1'b0, 1'b0);
    test_en = 1'b1; #1;
    expect_ctrl(0, 1'b0, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
