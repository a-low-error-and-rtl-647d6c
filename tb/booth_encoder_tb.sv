// Exhaustive test of booth_encoder against the radix-4 encoding table:
// for each of the 8 triplets, the digit the control word selects
// (one/two/neg) must equal b[2i-1] + b[2i] - 2*b[2i+1], with neg only for
// negative digits and one/two never both set.
module booth_encoder_tb;
  import fwb_pkg::*;

  logic [2:0]  triplet;
  booth_ctrl_t ctrl;
  int checks = 0, failures = 0;

  booth_encoder dut (.triplet(triplet), .ctrl(ctrl));

  // expected {neg, two, one} per triplet, written out from the table
  localparam logic [2:0] EXP [8] = '{3'b000, 3'b001, 3'b001, 3'b010,
                                     3'b110, 3'b101, 3'b101, 3'b000};

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 8; t++) begin
      int d, sel;
      triplet = 3'(t);
      #1;
      d = int'(triplet[0]) + int'(triplet[1]) - 2*int'(triplet[2]);
      sel = (ctrl.two ? 2 : 0) + (ctrl.one ? 1 : 0);
      checks++;
      if (ctrl !== EXP[t]) begin
        failures++;
        $display("FAIL triplet=%b ctrl=%b expected %b", triplet, ctrl, EXP[t]);
      end
      checks++;
      if ((ctrl.neg ? -sel : sel) != d || (ctrl.one && ctrl.two)) begin
        failures++;
        $display("FAIL triplet=%b selects %0d, digit %0d", triplet,
                 ctrl.neg ? -sel : sel, d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : booth_encoder_tb
