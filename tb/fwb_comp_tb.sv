// Exhaustive test of fwb_comp for n = 8 (four main bits) and n = 16 (eight,
// random): the output must be 1 unless every main bit is 1, i.e. the bias
// it adds drops by one exactly in the theta = n/2 class.
module fwb_comp_tb;
  logic [3:0] m4;
  logic [7:0] m8;
  logic c4, c8;
  int checks = 0, failures = 0;

  fwb_comp dut (.main_bits(m4), .comp(c4));
  fwb_comp #(.ROWS(8)) dut8 (.main_bits(m8), .comp(c8));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int theta;
      m4 = 4'(v);
      #1;
      theta = $countones(m4);
      checks++;
      if (c4 !== (theta < 4)) begin
        failures++;
        $display("FAIL main=%b comp=%b", m4, c4);
      end
    end
    for (int v = 0; v < 256; v++) begin
      m8 = 8'(v);
      #1;
      checks++;
      if (c8 !== ($countones(m8) < 8)) begin
        failures++;
        $display("FAIL main=%b comp=%b", m8, c8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : fwb_comp_tb
