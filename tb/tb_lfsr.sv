// tb_lfsr: self-checking testbench of the 8-bit reseedable LFSR.
//
// A reference model steps x^8 + x^4 + x^3 + x^2 + 1 by hand (new stage 0 =
// s7 ^ s3 ^ s2 ^ s1). The bench checks reset value, every step of a full
// period against the model, that the period is exactly 255 with 255 distinct
// states, that en=0 holds the state, that load writes a seed (and wins over
// en), that a zero seed becomes 1, and the serial output. Two more instances,
// 5 and 12 bits wide with their default taps, must show periods of exactly 31
// and 4095 with every non-zero state visited once.
module tb_lfsr;
  logic       clk = 0;
  logic       rst_n, en, load;
  logic [7:0] seed, q;
  logic       out;
  int checks = 0, failures = 0;

  lfsr #(.N(8)) dut (.clk, .rst_n, .en, .load, .seed, .q, .out);

  always #5 clk = ~clk;

  // other widths: period and coverage
  logic [4:0]  q5;
  logic [11:0] q12;
  logic        rst_w;
  logic        o5, o12;
  lfsr #(.N(5))  dut5  (.clk, .rst_n(rst_w), .en(1'b1), .load(1'b0), .seed(5'd0), .q(q5), .out(o5));
  lfsr #(.N(12)) dut12 (.clk, .rst_n(rst_w), .en(1'b1), .load(1'b0), .seed(12'd0), .q(q12), .out(o12));
  bit seen12 [4096];
  bit seen5 [32];
  int per5, per12, cnt5, cnt12;
  bit widths_done = 0;
  initial begin
    rst_w = 0;
    @(posedge clk); #1;
    rst_w = 1;
    per5 = 0; per12 = 0;
    foreach (seen12[i]) seen12[i] = 0;
    foreach (seen5[i]) seen5[i] = 0;
    for (int k = 0; k < 4095; k++) begin
      seen12[q12] = 1;
      seen5[q5] = 1;
      @(posedge clk); #1;
      if (q5 == 5'd1 && per5 == 0) per5 = k + 1;
      if (q12 == 12'd1 && per12 == 0) per12 = k + 1;
    end
    cnt5 = 0; cnt12 = 0;
    foreach (seen5[i]) if (seen5[i]) cnt5++;
    foreach (seen12[i]) if (seen12[i]) cnt12++;
    widths_done = 1;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] ref_step(logic [7:0] s);
    return {s[6:0], s[7] ^ s[3] ^ s[2] ^ s[1]};
  endfunction

  task automatic check(logic [7:0] got, logic [7:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  bit seen [256];
  logic [7:0] m;
  int period;

  initial begin
    rst_n = 0; en = 0; load = 0; seed = 0;
    @(posedge clk); @(posedge clk); #1;
    check(q, 8'h01, "reset value");
    rst_n = 1; en = 1;
    m = 8'h01; period = 0;
    foreach (seen[i]) seen[i] = 0;
    do begin
      seen[q] = 1;
      @(posedge clk); #1;
      m = ref_step(m);
      check(q, m, "step");
      check({7'b0, out}, {7'b0, m[7]}, "serial out");
      period++;
    end while (q != 8'h01 && period < 300);
    checks++;
    if (period != 255) begin failures++; $display("FAIL period %0d", period); end
    begin
      int n;
      n = 0;
      foreach (seen[i]) if (seen[i]) n++;
      checks++;
      if (n != 255 || seen[0]) begin failures++; $display("FAIL distinct %0d", n); end
    end
    // hold
    en = 0; m = q;
    repeat (3) @(posedge clk); #1;
    check(q, m, "hold");
    // load beats en
    en = 1; load = 1; seed = 8'hA5;
    @(posedge clk); #1;
    check(q, 8'hA5, "load seed");
    load = 0;
    @(posedge clk); #1;
    check(q, ref_step(8'hA5), "step after load");
    // zero seed
    load = 1; seed = 8'h00;
    @(posedge clk); #1;
    check(q, 8'h01, "zero seed guard");
    load = 0;
    // random seeds then a few steps
    repeat (20) begin
      seed = 8'($urandom_range(1, 255));
      load = 1; @(posedge clk); #1; load = 0;
      m = seed;
      check(q, m, "random load");
      repeat (5) begin @(posedge clk); #1; m = ref_step(m); check(q, m, "random step"); end
    end
    wait (widths_done);
    checks++;
    if (per5 != 31 || cnt5 != 31 || seen5[0]) begin failures++; $display("FAIL 5-bit period %0d states %0d", per5, cnt5); end
    checks++;
    if (per12 != 4095 || cnt12 != 4095 || seen12[0]) begin failures++; $display("FAIL 12-bit period %0d states %0d", per12, cnt12); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
