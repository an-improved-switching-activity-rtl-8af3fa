// tb_bs_lfsr: self-checking testbench of the bit-swapping LFSR generator.
//
// A reference model (its own LFSR step and its own pair swap) runs alongside
// the generator. The bench checks every pattern over a full period with
// swapping on, that the 255 patterns are all distinct and non-zero, that the
// raw LFSR state is exposed unchanged, that swap_en=0 gives the plain LFSR
// pattern, and reseeding in the middle of a run; it also counts bit
// transitions between successive patterns with swapping on and off.
module tb_bs_lfsr;
  logic       clk = 0;
  logic       rst_n, en, load, swap_en;
  logic [7:0] seed, pattern, lfsr_q;
  int checks = 0, failures = 0;

  bs_lfsr #(.N(8)) dut (.clk, .rst_n, .en, .load, .seed, .swap_en, .pattern, .lfsr_q);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] ref_step(logic [7:0] s);
    return {s[6:0], s[7] ^ s[3] ^ s[2] ^ s[1]};
  endfunction

  function automatic logic [7:0] ref_swap(logic [7:0] a, logic e);
    if (e && a[7]) return {a[7], a[6], a[4], a[5], a[2], a[3], a[0], a[1]};
    return a;
  endfunction

  task automatic check(logic [7:0] got, logic [7:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  bit seen [256];
  logic [7:0] m, prev;
  int n, t_on, t_off;

  initial begin
    rst_n = 0; en = 0; load = 0; seed = 0; swap_en = 1;
    @(posedge clk); #1;
    rst_n = 1;
    load = 1; seed = 8'h3C;
    @(posedge clk); #1;
    load = 0; en = 1;
    m = 8'h3C;
    foreach (seen[i]) seen[i] = 0;
    t_on = 0;
    for (int k = 0; k < 255; k++) begin
      check(lfsr_q, m, "raw state");
      check(pattern, ref_swap(m, 1'b1), "swapped pattern");
      seen[pattern] = 1;
      if (k > 0) t_on += $countones(pattern ^ prev);
      prev = pattern;
      @(posedge clk); #1;
      m = ref_step(m);
    end
    n = 0;
    foreach (seen[i]) if (seen[i]) n++;
    checks++;
    if (n != 255 || seen[0]) begin failures++; $display("FAIL distinct patterns %0d", n); end
    check(lfsr_q, 8'h3C, "period wraps to seed");
    // plain mode
    swap_en = 0; t_off = 0;
    for (int k = 0; k < 255; k++) begin
      check(pattern, m, "plain pattern");
      if (k > 0) t_off += $countones(pattern ^ prev);
      prev = pattern;
      @(posedge clk); #1;
      m = ref_step(m);
    end
    $display("transitions over 254 steps: swapped %0d, plain %0d", t_on, t_off);
    checks++;
    if (!(t_on < t_off)) begin failures++; $display("FAIL swapping did not reduce transitions"); end
    // random reseeds with random switch setting
    repeat (30) begin
      seed = 8'($urandom_range(1, 255));
      swap_en = 1'($urandom);
      load = 1; @(posedge clk); #1; load = 0;
      m = seed;
      repeat (4) begin
        check(pattern, ref_swap(m, swap_en), "after reseed");
        @(posedge clk); #1; m = ref_step(m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
