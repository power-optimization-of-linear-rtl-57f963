// tb_lfsr: self-checking testbench for lfsr.
//
// Three instances: the default one (x^8 + x + 1, seed 1010_1011, zero-state
// NOR on), one seeded with 0000_0001 to see the all-zeros vector spliced in,
// and one without the NOR seeded with zero to see the plain LFSR lock up.
// A stage-by-stage reference model (stage k = bit N-k, stage 1 takes the
// feedback) is stepped alongside whenever adv is high; adv is random so
// holding is checked too. The first step must take 1010_1011 to 0101_0101.
module tb_lfsr;
  localparam int N = 8;

  logic         clk;
  initial clk = 1'b0;
  logic         load, adv;
  logic [N-1:0] q_a, q_b, q_c;

  int checks = 0, failures = 0;

  lfsr u_a (.clk(clk), .load(load), .adv(adv), .q(q_a));
  lfsr #(.SEED(8'h01)) u_b (.clk(clk), .load(load), .adv(adv), .q(q_b));
  lfsr #(.SEED(8'h00), .ZERO_STATE(1'b0)) u_c (.clk(clk), .load(load), .adv(adv), .q(q_c));

  always #5 clk = ~clk;

  // reference: stages s[1..8]; x^8 + x + 1 taps stages 1 and 8
  function automatic logic [N-1:0] ref_step(input logic [N-1:0] v, input bit zs);
    logic s [1:8];
    logic f, nor_rest;
    for (int k = 1; k <= 8; k++) s[k] = v[N-k];
    f = s[1] ^ s[8];
    nor_rest = 1'b1;
    for (int k = 1; k <= 7; k++) if (s[k]) nor_rest = 1'b0;
    if (zs) f = f ^ nor_rest;
    for (int k = 8; k >= 2; k--) s[k] = s[k-1];
    s[1] = f;
    for (int k = 1; k <= 8; k++) ref_step[N-k] = s[k];
  endfunction

  task automatic check(input logic [N-1:0] got, input logic [N-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  logic [N-1:0] m_a, m_b;
  int zero_seen = 0;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 1'b1; adv = 1'b0;
    @(posedge clk); #1;
    load = 1'b0;
    check(q_a, 8'hAB, "seed load");
    check(q_b, 8'h01, "seed load b");
    m_a = 8'hAB; m_b = 8'h01;
    // first step of the worked example
    adv = 1'b1;
    @(posedge clk); #1;
    check(q_a, 8'h55, "1010_1011 -> 0101_0101");
    check(q_b, 8'h00, "0000_0001 -> all zeros");
    check(q_c, 8'h00, "plain LFSR locked at zero");
    m_a = 8'h55; m_b = 8'h00;
    @(posedge clk); #1;
    check(q_b, 8'h80, "all zeros -> 1000_0000");
    m_a = ref_step(m_a, 1'b1); m_b = 8'h80;
    check(q_a, m_a, "step 2");
    for (int i = 0; i < 1000; i++) begin
      adv = 1'($urandom_range(0, 3) != 0);
      @(posedge clk); #1;
      if (adv) begin
        m_a = ref_step(m_a, 1'b1);
        m_b = ref_step(m_b, 1'b1);
      end
      check(q_a, m_a, "sequence a");
      check(q_b, m_b, "sequence b");
      check(q_c, 8'h00, "sequence c");
      if (q_b == 8'h00) zero_seen++;
    end
    checks++;
    if (zero_seen == 0) begin
      failures++;
      $display("FAIL: all-zeros vector never came round again");
    end
    $display("all-zeros vector seen %0d times", zero_seen);
    // reload in the middle of the run
    load = 1'b1; adv = 1'b1;
    @(posedge clk); #1;
    check(q_a, 8'hAB, "reload has priority");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
