// End-to-end test of the FIR filter at its default size (8-bit words,
// 35 taps), which is also the full-size run.
//
// Coefficients: a 35-tap Hamming-windowed sinc low-pass (cutoff 0.15 of the
// sample rate), scaled so the largest tap is 127. Input: 1000 samples of a
// synthetic speech-like signal, a quiet noisy "consonant" part followed by
// a loud periodic "voiced" part, with randomly placed idle cycles. A second
// phase then loads random coefficients whose Booth digits are all non-zero
// and streams 300 random samples, so that products with every main-column
// bit set (theta = 4) occur too; the low-pass taps alone seldom give them.
// Checked, for every output:
//  * y_out equals the sum of the arithmetic reference products
//    (fwb_ref_pkg), with the delay line modelled in the testbench;
//  * out_valid rises exactly one clock after each accepted sample (latency 1,
//    one sample per clock).
// Also checked: after a mid-stream reset the filter restarts from zero
// history; over the run, the compensated filter's mean output error against
// the error-free filter is below that of a direct-truncation filter; each
// mechanism (all five Booth digits among the taps, theta < 4 and theta = 4
// products, idle cycles, the reset) occurred at least once.
module fwb_fir_tb;
  import fwb_ref_pkg::*;

  localparam int N    = 8;
  localparam int TAPS = 35;
  localparam int YW   = N + $clog2(TAPS);
  localparam int NS   = 1000;

  logic clk = 1'b0;
  logic rst_n;
  logic in_valid;
  logic signed [N-1:0] x_in;
  logic signed [N-1:0] coef [TAPS];
  logic out_valid;
  logic signed [YW-1:0] y_out;

  fwb_fir dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x_in(x_in),
               .coef(coef), .out_valid(out_valid), .y_out(y_out));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_idle = 0, n_reset = 0, n_th4 = 0, n_thlt = 0;
  int n_digit [5];
  longint hist [TAPS];
  longint exp_fw, exp_tr, exp_ex;
  real err_fw = 0.0, err_tr = 0.0;
  int n_out = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sample(int t);
    real v;
    if (t < NS/2) begin
      v = 18.0 * $sin(2.0 * 3.14159265 * 0.37 * t) + real'(int'($urandom_range(0, 16)) - 8);
    end else begin
      v = 70.0 * $sin(2.0 * 3.14159265 * 0.031 * t)
        + 40.0 * $sin(2.0 * 3.14159265 * 0.093 * t)
        + real'(int'($urandom_range(0, 20)) - 10);
    end
    if (v > 127.0)  v = 127.0;
    if (v < -128.0) v = -128.0;
    return int'(v);
  endfunction

  // reference output for the current history
  task automatic compute_ref();
    int th;
    exp_fw = 0; exp_tr = 0; exp_ex = 0;
    for (int k = 0; k < TAPS; k++) begin
      exp_fw += ref_fw(hist[k], longint'(coef[k]), N, 1'b1, th);
      exp_tr += ref_fw(hist[k], longint'(coef[k]), N, 1'b0, th);
      exp_ex += hist[k] * longint'(coef[k]);
      if (th == N/2) n_th4++; else n_thlt++;
    end
  endtask

  task automatic push(int x);
    for (int k = TAPS-1; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = longint'(x);
  endtask

  initial begin
    real hm, c, mx;
    real h [TAPS];
    // coefficient design
    mx = 0.0;
    for (int k = 0; k < TAPS; k++) begin
      real m;
      m = real'(k - TAPS/2);
      hm = 0.54 - 0.46 * $cos(2.0 * 3.14159265 * k / (TAPS - 1));
      c = (m == 0.0) ? 0.30 : $sin(3.14159265 * 0.30 * m) / (3.14159265 * m);
      h[k] = c * hm;
      if (h[k] > mx) mx = h[k];
    end
    for (int k = 0; k < TAPS; k++) begin
      coef[k] = N'($rtoi(h[k] / mx * 127.0 + (h[k] >= 0 ? 0.5 : -0.5)));
      for (int i = 0; i < N/2; i++)
        n_digit[booth_digit(longint'(coef[k]), i) + 2]++;
    end

    rst_n = 1'b0; in_valid = 1'b0; x_in = '0;
    foreach (hist[k]) hist[k] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    for (int t = 0; t < NS; t++) begin
      // occasional idle cycles
      if ($urandom_range(0, 9) == 0) begin
        @(negedge clk) in_valid = 1'b0;
        @(posedge clk);
        #1;
        checks++;
        if (out_valid !== 1'b0) begin failures++; $display("FAIL valid after idle"); end
        n_idle++;
      end
      // mid-stream synchronous reset
      if (t == NS/2 + 100) begin
        @(negedge clk) begin rst_n = 1'b0; in_valid = 1'b0; end
        @(posedge clk);
        @(negedge clk) rst_n = 1'b1;
        foreach (hist[k]) hist[k] = 0;
        n_reset++;
      end
      @(negedge clk);
      x_in = N'(sample(t));
      in_valid = 1'b1;
      push(int'(x_in));
      compute_ref();
      @(posedge clk);
      #1;
      checks++;
      if (out_valid !== 1'b1) begin
        failures++; $display("FAIL t=%0d no out_valid one cycle after input", t);
      end
      checks++;
      if (longint'(y_out) != exp_fw) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d y=%0d expected %0d", t, y_out, exp_fw);
      end
      err_fw += real'((exp_fw <<< N) > exp_ex ? (exp_fw <<< N) - exp_ex : exp_ex - (exp_fw <<< N));
      err_tr += real'((exp_tr <<< N) > exp_ex ? (exp_tr <<< N) - exp_ex : exp_ex - (exp_tr <<< N));
      n_out++;
    end
    @(negedge clk) in_valid = 1'b0;
    @(posedge clk);

    // phase 2: random coefficients with non-zero Booth digits, random input
    for (int k = 0; k < TAPS; k++) begin
      logic [N-1:0] cw;
      int dz;
      do begin
        cw = N'($urandom);
        dz = 0;
        for (int i = 0; i < N/2; i++)
          if (booth_digit(longint'(signed'(cw)), i) == 0) dz++;
      end while (dz != 0);
      coef[k] = cw;
    end
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      x_in = N'($urandom);
      in_valid = 1'b1;
      push(int'(x_in));
      compute_ref();
      @(posedge clk);
      #1;
      checks++;
      if (out_valid !== 1'b1 || longint'(y_out) != exp_fw) begin
        failures++;
        if (failures < 10) $display("FAIL phase 2 t=%0d y=%0d expected %0d", t, y_out, exp_fw);
      end
    end
    @(negedge clk) in_valid = 1'b0;
    @(posedge clk);

    $display("outputs=%0d mean|err| compensated=%0.1f truncated=%0.1f (LSB of full product)",
             n_out, err_fw / n_out, err_tr / n_out);
    $display("idle=%0d resets=%0d theta<4=%0d theta=4=%0d digits(-2..2)=%0d %0d %0d %0d %0d",
             n_idle, n_reset, n_thlt, n_th4,
             n_digit[0], n_digit[1], n_digit[2], n_digit[3], n_digit[4]);
    checks++;
    if (err_fw >= err_tr) begin failures++; $display("FAIL compensation not better"); end
    checks += 4;
    if (n_idle == 0)  begin failures++; $display("FAIL no idle cycle"); end
    if (n_reset == 0) begin failures++; $display("FAIL no reset"); end
    if (n_th4 == 0)   begin failures++; $display("FAIL no theta=4 product"); end
    if (n_thlt == 0)  begin failures++; $display("FAIL no theta<4 product"); end
    for (int d = 0; d < 5; d++) begin
      checks++;
      if (n_digit[d] == 0) begin failures++; $display("FAIL Booth digit %0d never used", d-2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : fwb_fir_tb
