// tb_bilbo: self-checking testbench of the 8-bit BILBO register.
//
// Phase 1 scans a byte in serially (B1B2=00) and reads it back on SO.
// Phase 2 runs LFSR mode (01) from the scanned seed for a full period and
// checks that it returns to the seed after exactly 255 clocks.
// Phase 3 applies random modes, serial and parallel data for 2000 cycles and
// compares Q and SO with a reference model every cycle. Each mode is counted
// and must have occurred.
module tb_bilbo;
  logic       clk = 0;
  logic       rst_n, b1, b2, si, so;
  logic [7:0] d, q;
  int checks = 0, failures = 0;
  int mode_cnt [4];

  bilbo #(.N(8)) dut (.clk, .rst_n, .b1, .b2, .si, .d, .q, .so);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: Q1 = q[0]; feedback from Q8, Q4, Q3, Q2
  function automatic logic [7:0] ref_next(logic [7:0] s, logic [1:0] b, logic sin, logic [7:0] din);
    logic fb = s[7] ^ s[3] ^ s[2] ^ s[1];
    case (b)
      2'b00:   return {s[6:0], sin};
      2'b01:   return {s[6:0], fb};
      2'b10:   return din;
      default: return {s[6:0], fb} ^ din;
    endcase
  endfunction

  task automatic check(logic [7:0] got, logic [7:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  logic [7:0] m, rd, seedv;
  int steps;

  initial begin
    foreach (mode_cnt[i]) mode_cnt[i] = 0;
    rst_n = 0; {b1, b2} = 2'b00; si = 0; d = 0;
    @(posedge clk); #1;
    check(q, 8'h00, "reset");
    rst_n = 1;
    // phase 1: scan in 0xB4, first bit in ends up in Q8
    seedv = 8'hB4;
    {b1, b2} = 2'b00;
    for (int i = 7; i >= 0; i--) begin
      si = seedv[i]; @(posedge clk); #1;
    end
    check(q, seedv, "scan in");
    mode_cnt[0] += 8;
    // phase 2: LFSR mode period
    {b1, b2} = 2'b01; steps = 0;
    do begin @(posedge clk); #1; steps++; end while (q != seedv && steps < 400);
    mode_cnt[1] += steps;
    checks++;
    if (steps != 255) begin failures++; $display("FAIL LFSR period %0d", steps); end
    // scan out: SO shows Q8 first
    {b1, b2} = 2'b00; si = 0; rd = 0;
    for (int i = 7; i >= 0; i--) begin
      rd[i] = so; @(posedge clk); #1;
    end
    check(rd, seedv, "scan out");
    // phase 3: random
    m = q;
    repeat (2000) begin
      {b1, b2} = 2'($urandom); si = 1'($urandom); d = 8'($urandom);
      mode_cnt[{b1, b2}]++;
      @(posedge clk); #1;
      m = ref_next(m, {b1, b2}, si, d);
      check(q, m, "random op");
      check({7'b0, so}, {7'b0, m[7]}, "so");
    end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (mode_cnt[i] == 0) begin failures++; $display("FAIL mode %0d never used", i); end
    end
    $display("mode use: scan %0d, lfsr %0d, normal %0d, misr %0d",
             mode_cnt[0], mode_cnt[1], mode_cnt[2], mode_cnt[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
