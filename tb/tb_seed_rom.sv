// tb_seed_rom: self-checking testbench of the seed table.
//
// Reads every word of the default 4-seed table and of a 3-seed table given
// through the SEEDS parameter, and checks that the unused address of the
// 3-seed table reads seed 0.
module tb_seed_rom;
  logic [1:0] a4, a3;
  logic [7:0] d4, d3;
  int checks = 0, failures = 0;
  localparam logic [7:0] EXP4 [4] = '{8'h01, 8'h5A, 8'hC3, 8'h96};
  localparam logic [7:0] EXP3 [3] = '{8'h11, 8'h22, 8'h33};

  seed_rom #(.N(8)) dut4 (.addr(a4), .data(d4));
  seed_rom #(.N(8), .NUM_SEEDS(3), .SEEDS(EXP3)) dut3 (.addr(a3), .data(d3));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      a4 = 2'(i); a3 = 2'(i); #1;
      checks++;
      if (d4 !== EXP4[i]) begin failures++; $display("FAIL rom4[%0d]=%h", i, d4); end
      checks++;
      if (d3 !== ((i < 3) ? EXP3[i] : EXP3[0])) begin failures++; $display("FAIL rom3[%0d]=%h", i, d3); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
