// tb_bslfsr_bist_top: end-to-end testbench of the BIST engine, at the
// default parameters (8 bits, 4 seeds x 64 patterns).
//
// A behavioural circuit under test (an 8-bit combinational function, with an
// optional stuck-at-1 fault on one output) answers every pattern in the same
// cycle. A reference model, written independently of the RTL, regenerates
// the seed sequence, the LFSR steps, the pair swap and the MISR; every
// pattern and the final signature are compared with it, and the test length
// is checked to be 261 cycles. Runs:
//   1. bit swapping on, fault-free CUT       -> reference signature
//   2. bit swapping on, faulty CUT           -> signature must differ
//   3. bit swapping off, fault-free CUT      -> reference signature, and more
//                                               pattern transitions than run 1
//   4. bit swapping on, other MISR polynomial -> reference signature
// Then the BILBO ports are driven through all four modes and checked.
// Each mechanism (reseed, swapped pattern, plain pattern, compaction, fault
// detected, polynomial change, done, each BILBO mode) is counted and must
// have occurred at least once.
module tb_bslfsr_bist_top;
  logic       clk = 0;
  logic       rst_n, start, swap_en;
  logic [7:0] misr_poly, test_pattern, cut_response, signature;
  logic       pattern_valid, busy, done;
  logic       bilbo_b1, bilbo_b2, bilbo_si, bilbo_so;
  logic [7:0] bilbo_d, bilbo_q;
  int checks = 0, failures = 0;

  bslfsr_bist_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- behavioural CUT ----------------
  logic cut_fault;
  function automatic logic [7:0] cut_fn(logic [7:0] p);
    logic [7:0] y;
    y[3:0] = p[3:0] + p[7:4];
    y[4]   = p[0] & p[5] | p[7];
    y[5]   = ^p;
    y[6]   = ~(p[1] | p[6]);
    y[7]   = p[2] ^ (p[3] & p[4]);
    return y;
  endfunction
  always_comb begin
    cut_response = cut_fn(test_pattern);
    if (cut_fault) cut_response[5] = 1'b1;
  end

  // ---------------- reference model ----------------
  localparam logic [7:0] SEEDS [4] = '{8'h01, 8'h5A, 8'hC3, 8'h96};
  function automatic logic [7:0] ref_step(logic [7:0] s);
    return {s[6:0], s[7] ^ s[3] ^ s[2] ^ s[1]};
  endfunction
  function automatic logic [7:0] ref_swap(logic [7:0] a, logic e);
    if (e && a[7]) return {a[7], a[6], a[4], a[5], a[2], a[3], a[0], a[1]};
    return a;
  endfunction
  function automatic logic [7:0] ref_misr(logic [7:0] s, logic [7:0] p, logic [7:0] x);
    logic fb = 0;
    for (int i = 0; i < 8; i++) if (p[i]) fb ^= s[i];
    return {s[6:0], fb} ^ x;
  endfunction

  // mechanism counters
  int n_reseed = 0, n_swapped = 0, n_plain = 0, n_compact = 0, n_fault_det = 0;
  int n_poly = 0, n_done = 0;
  int n_bilbo [4] = '{0, 0, 0, 0};

  task automatic check(logic [7:0] got, logic [7:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // one full test; returns the signature and the transition count
  task automatic run_test(input logic sw, input logic [7:0] poly, input logic fault,
                          output logic [7:0] sig, output int trans);
    logic [7:0] exp_sig, st, exp_pat, prev;
    int cyc, pats;
    bit first, pv_q;
    swap_en = sw; misr_poly = poly; cut_fault = fault;
    exp_sig = 0; trans = 0; pats = 0; first = 1; pv_q = 0;
    start = 1;
    @(posedge clk); #1;
    start = 0;
    cyc = 0;
    foreach (SEEDS[s]) begin
      st = SEEDS[s];
      for (int k = 0; k < 64; k++) begin
        // skip the clear / load cycles
        while (!pattern_valid && cyc < 400) begin @(posedge clk); #1; cyc++; pv_q = 0; end
        if (!pv_q) n_reseed++;
        pv_q = 1;
        exp_pat = ref_swap(st, sw);
        check(test_pattern, exp_pat, "pattern");
        if (sw && st[7]) n_swapped++;
        if (!sw) n_plain++;
        if (!first) trans += $countones(test_pattern ^ prev);
        prev = test_pattern; first = 0;
        exp_sig = ref_misr(exp_sig, poly, cut_fn(exp_pat) | (fault ? 8'h20 : 8'h00));
        n_compact++;
        pats++;
        @(posedge clk); #1; cyc++;
        st = ref_step(st);
      end
    end
    checks++;
    if (!done || busy || cyc != 261) begin
      failures++;
      $display("FAIL end of test: done=%0b busy=%0b cycles=%0d", done, busy, cyc);
    end else n_done++;
    checks++;
    if (pats != 256) begin failures++; $display("FAIL pattern count %0d", pats); end
    check(signature, exp_sig, "signature");
    sig = signature;
  endtask

  logic [7:0] sig_good, sig_bad, sig_plain, sig_poly, m;
  int tr_sw, tr_plain, tr_x;

  initial begin
    rst_n = 0; start = 0; swap_en = 1; misr_poly = 8'h8E; cut_fault = 0;
    {bilbo_b1, bilbo_b2} = 2'b10; bilbo_si = 0; bilbo_d = 0;
    repeat (2) @(posedge clk); #1;
    rst_n = 1;
    @(posedge clk); #1;

    run_test(1'b1, 8'h8E, 1'b0, sig_good, tr_sw);
    run_test(1'b1, 8'h8E, 1'b1, sig_bad, tr_x);
    checks++;
    if (sig_bad == sig_good) begin failures++; $display("FAIL fault not detected"); end
    else n_fault_det++;
    run_test(1'b0, 8'h8E, 1'b0, sig_plain, tr_plain);
    $display("pattern transitions: bit swapping %0d, plain LFSR %0d", tr_sw, tr_plain);
    checks++;
    if (!(tr_sw < tr_plain)) begin failures++; $display("FAIL no switching reduction"); end
    run_test(1'b1, 8'hB8, 1'b0, sig_poly, tr_x);
    n_poly++;
    $display("signatures: good %h, faulty %h, plain %h, poly B8 %h", sig_good, sig_bad, sig_plain, sig_poly);

    // ---------------- BILBO ports ----------------
    // normal: load 0x6D
    {bilbo_b1, bilbo_b2} = 2'b10; bilbo_d = 8'h6D;
    @(posedge clk); #1; n_bilbo[2]++;
    check(bilbo_q, 8'h6D, "bilbo normal");
    m = 8'h6D;
    // LFSR: 10 steps
    {bilbo_b1, bilbo_b2} = 2'b01;
    repeat (10) begin @(posedge clk); #1; m = ref_step(m); n_bilbo[1]++; end
    check(bilbo_q, m, "bilbo lfsr");
    // MISR: compact the CUT function of a few values
    {bilbo_b1, bilbo_b2} = 2'b11;
    for (int i = 0; i < 10; i++) begin
      bilbo_d = cut_fn(8'(i * 37));
      @(posedge clk); #1;
      m = ref_misr(m, 8'h8E, bilbo_d); n_bilbo[3]++;
    end
    check(bilbo_q, m, "bilbo misr");
    // scan out the signature
    {bilbo_b1, bilbo_b2} = 2'b00; bilbo_si = 0;
    for (int i = 7; i >= 0; i--) begin
      checks++;
      if (bilbo_so !== m[i]) begin failures++; $display("FAIL bilbo scan bit %0d", i); end
      @(posedge clk); #1; n_bilbo[0]++;
    end

    // every mechanism must have happened
    begin
      int cnt [11];
      string nm [11];
      cnt = '{n_reseed, n_swapped, n_plain, n_compact, n_fault_det, n_poly, n_done,
              n_bilbo[0], n_bilbo[1], n_bilbo[2], n_bilbo[3]};
      nm  = '{"reseed", "swapped pattern", "plain pattern", "compaction", "fault detected",
              "polynomial change", "done", "bilbo scan", "bilbo lfsr", "bilbo normal", "bilbo misr"};
      for (int i = 0; i < 11; i++) begin
        $display("mechanism %s: %0d", nm[i], cnt[i]);
        checks++;
        if (cnt[i] == 0) begin failures++; $display("FAIL mechanism %s never happened", nm[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
