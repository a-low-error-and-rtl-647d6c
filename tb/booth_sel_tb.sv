// Exhaustive test of booth_sel: every legal control word (0, +A, +2A, -A,
// -2A) with every pair of multiplicand bits. Expected bit: a_j for A,
// a_(j-1) for 2A, 0 for zero, complemented for negative digits.
module booth_sel_tb;
  import fwb_pkg::*;

  booth_ctrl_t ctrl;
  logic a_j, a_jm1, pp;
  int checks = 0, failures = 0;

  booth_sel dut (.ctrl(ctrl), .a_j(a_j), .a_jm1(a_jm1), .pp(pp));

  localparam logic [2:0] CW [5] = '{3'b000, 3'b001, 3'b010, 3'b101, 3'b110};

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 5; c++) begin
      for (int v = 0; v < 4; v++) begin
        logic e;
        ctrl  = CW[c];
        a_j   = v[0];
        a_jm1 = v[1];
        #1;
        case (CW[c][1:0])
          2'b01:   e = a_j;
          2'b10:   e = a_jm1;
          default: e = 1'b0;
        endcase
        if (CW[c][2]) e = ~e;
        checks++;
        if (pp !== e) begin
          failures++;
          $display("FAIL ctrl=%b a_j=%b a_jm1=%b pp=%b expected %b",
                   ctrl, a_j, a_jm1, pp, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : booth_sel_tb
