// tb_bist_ctrl: self-checking testbench of the reseeding sequencer.
//
// Runs the default controller (4 seeds x 64 patterns) and a small one (3
// seeds x 5 patterns). For each it checks: the clear pulse comes once, first;
// each seed address is loaded once, in order; exactly
// NUM_SEEDS * PATTERNS_PER_SEED pattern cycles occur, each with tpg_en and
// misr_en; done rises 1 + NUM_SEEDS * (1 + PATTERNS_PER_SEED) clock edges
// after the edge that samples start, and stays; a start while busy changes
// nothing.
module tb_bist_ctrl;
  logic clk = 0;
  logic rst_n;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // default instance
  logic       start_a;
  logic [1:0] addr_a;
  logic       load_a, en_a, clr_a, men_a, pv_a, rs_a, busy_a, done_a;
  bist_ctrl dut_a (.clk, .rst_n, .start(start_a), .seed_addr(addr_a), .tpg_load(load_a),
                   .tpg_en(en_a), .misr_clr(clr_a), .misr_en(men_a), .pattern_valid(pv_a),
                   .reseed(rs_a), .busy(busy_a), .done(done_a));
  // small instance
  logic       start_b;
  logic [1:0] addr_b;
  logic       load_b, en_b, clr_b, men_b, pv_b, rs_b, busy_b, done_b;
  bist_ctrl #(.NUM_SEEDS(3), .PATTERNS_PER_SEED(5)) dut_b (
                   .clk, .rst_n, .start(start_b), .seed_addr(addr_b), .tpg_load(load_b),
                   .tpg_en(en_b), .misr_clr(clr_b), .misr_en(men_b), .pattern_valid(pv_b),
                   .reseed(rs_b), .busy(busy_b), .done(done_b));

  task automatic expect_eq(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic run(bit which, int ns, int pps);
    int cyc = 0, loads = 0, pats = 0, clrs = 0, next_addr = 0;
    bit order_ok = 1, strobes_ok = 1;
    if (which) start_b = 1; else start_a = 1;
    @(posedge clk); #1;
    start_a = 0; start_b = 0;
    cyc = 0;
    while (!(which ? done_b : done_a) && cyc < 2000) begin
      if (which ? clr_b : clr_a) begin clrs++; if (loads != 0) order_ok = 0; end
      if (which ? load_b : load_a) begin
        if (32'(which ? addr_b : addr_a) != next_addr) order_ok = 0;
        if (!(which ? rs_b : rs_a)) strobes_ok = 0;
        next_addr++; loads++;
      end
      if (which ? pv_b : pv_a) begin
        pats++;
        if (!(which ? (en_b && men_b) : (en_a && men_a))) strobes_ok = 0;
      end
      // start while busy must be ignored
      if (cyc == 3) begin if (which) start_b = 1; else start_a = 1; end
      else begin start_a = 0; start_b = 0; end
      @(posedge clk); #1;
      cyc++;
    end
    expect_eq(cyc, 1 + ns * (1 + pps), "cycles start to done");
    expect_eq(loads, ns, "seed loads");
    expect_eq(pats, ns * pps, "pattern cycles");
    expect_eq(clrs, 1, "clear pulses");
    expect_eq(int'(order_ok), 1, "clear first, seeds in order");
    expect_eq(int'(strobes_ok), 1, "strobes with load and pattern cycles");
    repeat (3) @(posedge clk); #1;
    expect_eq(int'(which ? (done_b && !busy_b) : (done_a && !busy_a)), 1, "done held, idle");
  endtask

  initial begin
    rst_n = 0; start_a = 0; start_b = 0;
    @(posedge clk); @(posedge clk); #1;
    expect_eq(int'(busy_a || done_a || busy_b || done_b), 0, "idle after reset");
    rst_n = 1;
    run(0, 4, 64);
    run(1, 3, 5);
    run(1, 3, 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
