// Direct-form FIR filter built from low-error fixed-width Booth multipliers.
//
// Application setting for the fixed-width multiplier: a TAPS-tap FIR filter
// (35 taps by default, the low-pass speech filter of the published
// evaluation) in which every tap product h[k]*x[t-k] is formed by an
// N x N fw_booth_mult, so each product is kept as its N most significant
// bits (weight 2^N) and the products are summed exactly.
//
//   y[t] = sum_{k=0}^{TAPS-1} fw(x[t-k], h[k])      (units of 2^N)
//
// Structure: a delay line of TAPS-1 samples; tap 0 uses the incoming sample
// directly, so all TAPS multipliers work in parallel on one sample per
// clock. The products are added combinationally and the sum is registered.
//
// Interface and timing: when in_valid is high on a rising clk edge, x_in
// enters the filter and y_out/out_valid show the filter output for that
// sample from the next cycle on (latency 1 cycle, one sample per cycle,
// in_valid may be low for any number of cycles in between). Coefficients
// coef[k] are N-bit two's complement, read continuously; hold them steady
// while samples stream. rst_n (active low, synchronous) clears the delay
// line, so the first outputs see zero history.
// The tap count and the use of the proposed multiplier follow the published
// application; the coefficient values, the word widths, the direct-form
// structure, the handshake and the reset are this design's choices. The
// sample goes to the multiplicand port A and the coefficient to the
// Booth-recoded port B.
module fwb_fir #(
  parameter int unsigned N    = 8,   // sample, coefficient and product width
  parameter int unsigned TAPS = 35,  // filter length
  localparam int unsigned YW  = N + $clog2(TAPS)  // output width
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [N-1:0] x_in,
  input  logic signed [N-1:0] coef [TAPS],
  output logic                out_valid,
  output logic signed [YW-1:0] y_out
);

  // x_hist[k] holds x[t-k]; x_hist[0] is the incoming sample
  logic signed [N-1:0] x_hist [TAPS];
  logic signed [N-1:0] dly    [1:TAPS-1];
  logic [N-1:0]        prod   [TAPS];

  assign x_hist[0] = x_in;
  for (genvar k = 1; k < TAPS; k++) begin : g_hist
    assign x_hist[k] = dly[k];
  end

  for (genvar k = 0; k < TAPS; k++) begin : g_tap
    fw_booth_mult #(.N(N)) u_mul (.a(x_hist[k]), .b(coef[k]), .p(prod[k]));
  end

  logic signed [YW-1:0] acc;
  always_comb begin
    acc = '0;
    for (int k = 0; k < TAPS; k++) begin
      acc += YW'(signed'(prod[k]));
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 1; k < TAPS; k++) dly[k] <= '0;
      out_valid <= 1'b0;
      y_out     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        for (int k = 1; k < TAPS; k++) dly[k] <= x_hist[k-1];
        y_out <= acc;
      end
    end
  end

  // every accepted sample yields exactly one output, one cycle later
  a_latency : assert property (@(posedge clk) disable iff (!rst_n)
                               in_valid |=> out_valid);
  a_no_spurious : assert property (@(posedge clk) disable iff (!rst_n)
                                   !in_valid |=> !out_valid);

endmodule : fwb_fir
