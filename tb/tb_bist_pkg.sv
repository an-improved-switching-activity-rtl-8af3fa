// tb_bist_pkg: self-checking testbench of the shared package.
//
// For every width 3..16 it steps a software Fibonacci register with the mask
// from bist_pkg::lfsr_taps(n) and checks that the period is exactly 2^n - 1
// (a primitive polynomial). It checks the 8-bit mask against the design's
// stages 7, 3, 2, 1, that unsupported widths return 0, and the BILBO mode
// encoding {B1, B2}.
module tb_bist_pkg;
  import bist_pkg::*;
  int checks = 0, failures = 0;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] mask, s, full;
    int period;
    for (int n = 3; n <= 16; n++) begin
      mask = lfsr_taps(n);
      full = (32'd1 << n) - 1;
      s = 1; period = 0;
      do begin
        s = ((s << 1) | 32'($countones(s & mask) & 1)) & full;
        period++;
      end while (s != 1 && period <= 70000);
      checks++;
      if (32'(period) != full || (mask & ~full) != 0) begin
        failures++;
        $display("FAIL width %0d: mask %h period %0d", n, mask, period);
      end
    end
    checks++;
    if (lfsr_taps(8) != 32'h8E) begin failures++; $display("FAIL 8-bit taps %h", lfsr_taps(8)); end
    checks++;
    if (lfsr_taps(2) != 0 || lfsr_taps(33) != 0) begin failures++; $display("FAIL unsupported widths"); end
    checks++;
    if (BILBO_SCAN != 2'b00 || BILBO_LFSR != 2'b01 || BILBO_NORMAL != 2'b10 || BILBO_MISR != 2'b11) begin
      failures++; $display("FAIL BILBO encoding");
    end
    checks++;
    if (N_DEFAULT != 8) begin failures++; $display("FAIL default width"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
