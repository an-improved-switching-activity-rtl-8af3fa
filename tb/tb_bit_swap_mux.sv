// tb_bit_swap_mux: self-checking testbench of the MUX selection stage.
//
// For all 256 inputs and both swap_en values it compares the output with a
// bit-by-bit reference (pairs (0,1), (2,3), (4,5) exchanged when bit 7 is 1
// and swapping is on; bits 6 and 7 untouched), checks that the mapping is a
// permutation of the 256 words, and that over one full period of the 8-bit
// LFSR sequence the swapped patterns flip 832 bits against 1024 for the
// plain ones (fewer transitions, the purpose of the stage).
module tb_bit_swap_mux;
  logic [7:0] in, out;
  logic       swap_en;
  int checks = 0, failures = 0;

  bit_swap_mux #(.N(8)) dut (.in, .swap_en, .out);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] ref_swap(logic [7:0] a, logic e);
    logic [7:0] r = a;
    if (e && a[7]) begin
      r[0] = a[1]; r[1] = a[0];
      r[2] = a[3]; r[3] = a[2];
      r[4] = a[5]; r[5] = a[4];
    end
    return r;
  endfunction

  bit hit [256];
  logic [7:0] s, prev_plain, prev_swap, first_plain, first_swap;
  int tp, ts;

  initial begin
    for (int e = 0; e < 2; e++) begin
      foreach (hit[i]) hit[i] = 0;
      for (int v = 0; v < 256; v++) begin
        in = 8'(v); swap_en = e[0]; #1;
        checks++;
        if (out !== ref_swap(in, swap_en)) begin
          failures++;
          $display("FAIL in=%h en=%0d out=%h", in, swap_en, out);
        end
        hit[out] = 1;
      end
      begin
        int n;
        n = 0;
        foreach (hit[i]) if (hit[i]) n++;
        checks++;
        if (n != 256) begin failures++; $display("FAIL not a permutation (%0d)", n); end
      end
    end
    // transitions over a full LFSR period
    s = 8'h01; tp = 0; ts = 0;
    swap_en = 1;
    for (int k = 0; k < 255; k++) begin
      in = s; #1;
      if (k == 0) begin first_plain = s; first_swap = out; end
      else begin
        tp += $countones(s ^ prev_plain);
        ts += $countones(out ^ prev_swap);
      end
      prev_plain = s; prev_swap = out;
      s = {s[6:0], s[7] ^ s[3] ^ s[2] ^ s[1]};
    end
    tp += $countones(first_plain ^ prev_plain);
    ts += $countones(first_swap ^ prev_swap);
    $display("transitions over one period: plain %0d, bit-swapped %0d", tp, ts);
    checks++;
    if (tp != 1024 || ts != 832) begin failures++; $display("FAIL transition count"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
