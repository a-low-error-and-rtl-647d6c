// Self-checking test of fw_booth_mult.
//
//  * n = 4, 6, 8: every operand pair is applied and the output is compared
//    with the arithmetic reference (fwb_ref_pkg). The error against the exact
//    product, e = A*B - P*2^n, is accumulated and its maximum |e|, mean |e|
//    and variance are checked against the published error table
//    (n=4: 16, 4.59, 28.50; n=6: 85, 21.60, 716.86; n=8: 443, 103.12,
//    16376.65), to two decimals.
//  * n = 16: random operand pairs against the reference. The published
//    n = 16 figures are not reproduced by this general-n compensation (it
//    does better: mean |e| about 38.3e3 against 62501.62), so the check is
//    that mean |e| stays below the published compensated mean and far below
//    the published direct-truncation mean (196608.25), and that max |e|
//    stays below the published compensated maximum (504268).
//  * The theta = n/2 class (all main bits 1) must occur in every run.
// The multiplier is combinational; each vector is given 1 time unit.
module fw_booth_mult_tb;
  import fwb_ref_pkg::*;

  localparam int NR = 200000;  // random vectors at n = 16

  logic [3:0]  a4,  b4,  p4;
  logic [5:0]  a6,  b6,  p6;
  logic [7:0]  a8,  b8,  p8;
  logic [15:0] a16, b16, p16;

  fw_booth_mult #(.N(4))  dut4  (.a(a4),  .b(b4),  .p(p4));
  fw_booth_mult #(.N(6))  dut6  (.a(a6),  .b(b6),  .p(p6));
  fw_booth_mult           dut8  (.a(a8),  .b(b8),  .p(p8));
  fw_booth_mult #(.N(16)) dut16 (.a(a16), .b(b16), .p(p16));

  int checks = 0, failures = 0;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stats of the current run
  longint emax, cnt, full_cls;
  real    sabs, s1, s2;

  task automatic apply(int n, longint a, longint b);
    longint p, e, r;
    int th;
    case (n)
      4:  begin a4  = 4'(a);  b4  = 4'(b);  end
      6:  begin a6  = 6'(a);  b6  = 6'(b);  end
      8:  begin a8  = 8'(a);  b8  = 8'(b);  end
      default: begin a16 = 16'(a); b16 = 16'(b); end
    endcase
    #1;
    case (n)
      4:  p = sext(longint'(p4), 4);
      6:  p = sext(longint'(p6), 6);
      8:  p = sext(longint'(p8), 8);
      default: p = sext(longint'(p16), 16);
    endcase
    r = ref_fw(a, b, n, 1'b1, th);
    if (th == n/2) full_cls++;
    checks++;
    if (p != r) begin
      failures++;
      if (failures < 10)
        $display("FAIL n=%0d A=%0d B=%0d P=%0d expected %0d", n, a, b, p, r);
    end
    e = a * b - (p <<< n);
    if (e < 0) e = -e;
    if (e > emax) emax = e;
    sabs += real'(e);
    e = a * b - (p <<< n);
    s1 += real'(e);
    s2 += real'(e) * real'(e);
    cnt++;
  endtask

  function automatic bit near(real x, real y, real tol);
    return (x - y <= tol) && (y - x <= tol);
  endfunction

  task automatic check_stats(int n, longint pmax, real pavg, real pvar);
    real avg, mu, var_e;
    avg   = sabs / real'(cnt);
    mu    = s1 / real'(cnt);
    var_e = s2 / real'(cnt) - mu * mu;
    $display("n=%0d vectors=%0d max=%0d avg=%0.2f var=%0.2f theta=n/2 cases=%0d",
             n, cnt, emax, avg, var_e, full_cls);
    checks += 4;
    if (emax != pmax)               begin failures++; $display("FAIL max error"); end
    if (!near(avg, pavg, 0.006))    begin failures++; $display("FAIL mean error"); end
    if (!near(var_e, pvar, 0.006))  begin failures++; $display("FAIL variance"); end
    if (full_cls == 0)              begin failures++; $display("FAIL no theta=n/2 case"); end
  endtask

  task automatic clear();
    emax = 0; cnt = 0; full_cls = 0; sabs = 0.0; s1 = 0.0; s2 = 0.0;
  endtask

  initial begin
    int n;
    // exhaustive widths
    foreach (n_list[idx]) begin
      n = n_list[idx];
      clear();
      for (longint a = -(longint'(1) << (n-1)); a < (longint'(1) << (n-1)); a++)
        for (longint b = -(longint'(1) << (n-1)); b < (longint'(1) << (n-1)); b++)
          apply(n, a, b);
      check_stats(n, pub_max[idx], pub_avg[idx], pub_var[idx]);
    end
    // n = 16, random
    clear();
    for (int k = 0; k < NR; k++)
      apply(16, sext(longint'($urandom), 16), sext(longint'($urandom), 16));
    // corner operands
    apply(16, -32768, -32768);
    apply(16, -32768, 32767);
    apply(16, 32767, 32767);
    begin
      real avg;
      avg = sabs / real'(cnt);
      $display("n=16 vectors=%0d max=%0d avg=%0.2f theta=n/2 cases=%0d",
               cnt, emax, avg, full_cls);
      checks += 3;
      if (avg >= 62501.62 || avg * 4.0 >= 196608.25) begin
        failures++; $display("FAIL n=16 mean");
      end
      if (emax > 504268)               begin failures++; $display("FAIL n=16 max"); end
      if (full_cls == 0)               begin failures++; $display("FAIL n=16 theta"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // published error figures of the compensated multiplier
  localparam int     n_list  [3] = '{4, 6, 8};
  localparam longint pub_max [3] = '{16, 85, 443};
  localparam real    pub_avg [3] = '{4.59, 21.60, 103.12};
  localparam real    pub_var [3] = '{28.50, 716.86, 16376.65};
endmodule : fw_booth_mult_tb
