// tb_misr: self-checking testbench of the programmable MISR.
//
// Drives random responses under three feedback polynomials and compares the
// signature every cycle with a reference model; checks clear, hold when
// en=0, and that flipping one response bit in a long stream changes the
// final signature.
module tb_misr;
  logic       clk = 0;
  logic       rst_n, clr, en;
  logic [7:0] poly, r, sig;
  int checks = 0, failures = 0;

  misr #(.N(8)) dut (.clk, .rst_n, .clr, .en, .poly, .r, .sig);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] ref_next(logic [7:0] s, logic [7:0] p, logic [7:0] x);
    logic fb = 0;
    for (int i = 0; i < 8; i++) if (p[i]) fb ^= s[i];
    return {s[6:0], fb} ^ x;
  endfunction

  task automatic check(logic [7:0] got, logic [7:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  localparam logic [7:0] POLYS [3] = '{8'h8E, 8'hB8, 8'h1D};
  logic [7:0] m, stream [200];
  logic [7:0] good;

  initial begin
    rst_n = 0; clr = 0; en = 0; poly = 8'h8E; r = 0;
    @(posedge clk); #1;
    check(sig, 8'h00, "reset");
    rst_n = 1;
    foreach (POLYS[pi]) begin
      poly = POLYS[pi];
      clr = 1; @(posedge clk); #1; clr = 0;
      check(sig, 8'h00, "clear");
      m = 0;
      repeat (300) begin
        en = 1'($urandom_range(0, 3) != 0);
        r = 8'($urandom);
        @(posedge clk); #1;
        if (en) m = ref_next(m, poly, r);
        check(sig, m, "signature");
      end
    end
    // single-bit error detection
    poly = 8'h8E; en = 1;
    foreach (stream[i]) stream[i] = 8'($urandom);
    for (int run = 0; run < 2; run++) begin
      clr = 1; @(posedge clk); #1; clr = 0;
      foreach (stream[i]) begin
        r = stream[i];
        if (run == 1 && i == 57) r[3] = ~r[3];
        @(posedge clk); #1;
      end
      if (run == 0) good = sig;
    end
    checks++;
    if (sig == good) begin failures++; $display("FAIL single-bit error aliased"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
