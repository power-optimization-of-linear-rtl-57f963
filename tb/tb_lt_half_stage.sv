// tb_lt_half_stage: self-checking testbench for lt_half_stage.
//
// Drives random load/en/sel/s and random next half-vectors into a 4-bit
// stage and compares its output every cycle against a model that keeps its
// own copy of the held register and works out each intermediate bit one at
// a time: equal bits pass, differing bits take ~s. It also checks the worked
// example's injected halves: 1010 vs 0101 and 1011 vs 0101 both give 1111
// with s = 0.
module tb_lt_half_stage;
  localparam int W = 4;

  logic         clk;
  initial clk = 1'b0;
  logic         load, en, sel, s;
  logic [W-1:0] nxt, out;

  int checks = 0, failures = 0;

  lt_half_stage #(.W(W), .SEED(4'b1010)) dut (
    .clk(clk), .load(load), .en(en), .sel(sel), .s(s), .nxt(nxt), .out(out)
  );

  always #5 clk = ~clk;

  logic [W-1:0] m_held;

  function automatic logic [W-1:0] model_out(input logic [W-1:0] h, input logic [W-1:0] n,
                                             input logic sl, input logic sv);
    logic [W-1:0] r;
    for (int b = 0; b < W; b++) begin
      if (sl)              r[b] = h[b];
      else if (h[b] == n[b]) r[b] = h[b];
      else                 r[b] = !sv;
    end
    return r;
  endfunction

  task automatic check(input logic [W-1:0] exp, input string what);
    checks++;
    if (out !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, out, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 1'b1; en = 1'b0; sel = 1'b1; s = 1'b0; nxt = 4'b0101;
    @(posedge clk); #1;
    load = 1'b0;
    m_held = 4'b1010;
    check(4'b1010, "seed shown with sel=1");
    sel = 1'b0; #1;
    check(4'b1111, "1010 / 0101 injected, s=0");
    s = 1'b1; #1;
    check(4'b0000, "1010 / 0101 injected, s=1");
    // load 1011 through en
    s = 1'b0; sel = 1'b1; en = 1'b1; nxt = 4'b1011;
    @(posedge clk); #1;
    en = 1'b0; nxt = 4'b0101; m_held = 4'b1011;
    check(4'b1011, "en loads next half");
    sel = 1'b0; #1;
    check(4'b1111, "1011 / 0101 injected, s=0");
    s = 1'b1; #1;
    check(4'b0001, "1011 / 0101 injected, s=1");
    // random run
    for (int i = 0; i < 2000; i++) begin
      load = 1'($urandom_range(0, 49) == 0);
      en   = 1'($urandom_range(0, 1));
      sel  = 1'($urandom_range(0, 1));
      s    = 1'($urandom_range(0, 1));
      nxt  = W'($urandom);
      #1;
      check(model_out(m_held, nxt, sel, s), "random comb");
      @(posedge clk);
      if (load)    m_held = 4'b1010;
      else if (en) m_held = nxt;
      #1;
      check(model_out(m_held, nxt, sel, s), "random after edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
