// Low-error fixed-width radix-4 Booth multiplier (n x n -> n bits).
//
// Multiplies two n-bit two's-complement numbers A (multiplicand) and B
// (multiplier) and returns only the n most significant bits of the 2n-bit
// product, P ~= A*B / 2^n, without ever building the low half.
//
// How it works:
//  * n/2 Booth encoders recode B into digits in {-2,-1,0,1,2}; each digit
//    controls one row of selectors that forms the row S_i = digit*A
//    (one's complement for negative digits), weighted 2^(2i).
//  * Sign extension uses the sign-generate scheme: row i's sign bit is
//    inverted in place (weight 2^(2i+n)) and a constant 1 is placed just
//    above it (2^(2i+n+1)); the remaining constant of that scheme sits at
//    2^n.
//  * Only the columns of weight >= 2^n are built, plus the selectors of the
//    "main" column 2^(n-1) (S_(i,n-1-2i) of every row). The main bits are
//    added at weight 2^n, and the compensation block's output replaces the
//    constant 1 at 2^n (see fwb_comp). Everything below 2^(n-1), including
//    the +1 LSB corrections of negative rows, is dropped.
//  * The bits are summed by a carry-save array with one level per added
//    row: level l (l = 1..n/2-1) has full adders in columns 2^n..2^(n+2l-2)
//    and a half adder in column 2^(n+2l-1) that absorbs the sign-generate 1
//    of row l-1. A ripple-carry row of n-1 full adders and one half adder
//    (absorbing the last row's 1) finishes the sum; its carry out of the
//    top column is dropped, as in any product taken modulo 2^2n.
//    For n = 8 this is 20 selectors, 16 full adders and 4 half adders.
// Selector, adder and compensation structure follow the published n = 8
// design; the general-n form of the array and of the compensation
// (complement of the AND of all main bits) are this design's reading of it.
// Purely combinational, no clock.
module fw_booth_mult
  import fwb_pkg::*;
#(
  parameter int unsigned N = 8  // operand and product width, even, >= 4
) (
  input  logic [N-1:0] a,  // multiplicand A, two's complement
  input  logic [N-1:0] b,  // multiplier B, two's complement
  output logic [N-1:0] p   // P[2N-1:N] of A*B, with error compensation
);

  localparam int unsigned R = N / 2;  // Booth rows

  if (N < 4 || N % 2 != 0) begin : g_bad_n
    $error("fw_booth_mult: N must be even and at least 4");
  end

  // ---------------------------------------------------------------- encoders
  booth_ctrl_t ctrl [R];

  for (genvar i = 0; i < R; i++) begin : g_enc
    logic [2:0] trip;
    if (i == 0) begin : g_first
      assign trip = {b[1], b[0], 1'b0};
    end else begin : g_rest
      assign trip = b[2*i+1 -: 3];
    end
    booth_encoder u_enc (.triplet(trip), .ctrl(ctrl[i]));
  end

  // --------------------------------------------------------------- selectors
  // pp[i][j] is S_(i,j) at weight 2^(2i+j); only j >= N-1-2i is built.
  // pp[i][N] is the row's sign, already inverted (sign-generate).
  logic [N:0] pp [R];
  logic [R-1:0] main_bits;

  for (genvar i = 0; i < R; i++) begin : g_row
    for (genvar j = 0; j <= N; j++) begin : g_bit
      if (j < N - 1 - 2*i) begin : g_none
        assign pp[i][j] = 1'b0;
      end else if (j == N) begin : g_sign
        logic s;
        booth_sel u_sel (.ctrl(ctrl[i]), .a_j(a[N-1]), .a_jm1(a[N-1]), .pp(s));
        assign pp[i][j] = ~s;
      end else begin : g_sel
        booth_sel u_sel (.ctrl(ctrl[i]), .a_j(a[j]), .a_jm1(a[j-1]), .pp(pp[i][j]));
      end
    end
    assign main_bits[i] = pp[i][N-1-2*i];
  end

  // ------------------------------------------------------------ compensation
  logic comp;
  fwb_comp #(.ROWS(R)) u_comp (.main_bits(main_bits), .comp(comp));

  // ---------------------------------------------------- carry-save array
  // State after level l: two bits per column k (weight 2^(N+k)),
  // sum_s[l][k] and car_s[l][k]. Level 0 is row 0 on its own.
  logic [N-1:0] sum_s [R];
  logic [N-1:0] car_s [R];

  for (genvar k = 0; k < N; k++) begin : g_lvl0
    if (k == 0) begin : g_k0
      assign sum_s[0][k] = pp[0][N];       // inverted sign of row 0
      assign car_s[0][k] = main_bits[0];   // S_(0,N-1), main column
    end else if (k == 1) begin : g_k1
      assign sum_s[0][k] = 1'b1;           // sign-generate 1 of row 0
      assign car_s[0][k] = 1'b0;
    end else begin : g_kx
      assign sum_s[0][k] = 1'b0;
      assign car_s[0][k] = 1'b0;
    end
  end

  for (genvar l = 1; l < R; l++) begin : g_lvl
    logic [N-1:0] cy;  // adder carries of this level, column k -> k+1
    for (genvar k = 0; k < N; k++) begin : g_col
      if (k <= 2*l - 2) begin : g_fa
        full_adder u_fa (.a(sum_s[l-1][k]), .b(car_s[l-1][k]),
                         .cin(pp[l][k+N-2*l]), .s(sum_s[l][k]), .cout(cy[k]));
      end else if (k == 2*l - 1) begin : g_ha
        // sum_s[l-1][k] is the constant 1 of row l-1
        half_adder u_ha (.a(sum_s[l-1][k]), .b(pp[l][N-1]),
                         .s(sum_s[l][k]), .c(cy[k]));
      end else if (k == 2*l) begin : g_sign
        assign sum_s[l][k] = pp[l][N];     // inverted sign of row l
        assign cy[k] = 1'b0;
      end else if (k == 2*l + 1) begin : g_one
        assign sum_s[l][k] = 1'b1;         // sign-generate 1 of row l
        assign cy[k] = 1'b0;
      end else begin : g_zero
        assign sum_s[l][k] = 1'b0;
        assign cy[k] = 1'b0;
      end

      if (k == 0) begin : g_c0
        assign car_s[l][k] = main_bits[l];  // S_(l,N-1-2l), main column
      end else if (k <= 2*l) begin : g_cn
        assign car_s[l][k] = cy[k-1];
      end else begin : g_cz
        assign car_s[l][k] = 1'b0;
      end
    end
  end

  // --------------------------------------------------- final ripple row
  logic [N-1:0] rc;  // ripple carries, column k -> k+1

  for (genvar k = 0; k < N; k++) begin : g_fin
    if (k == 0) begin : g_fa0
      full_adder u_fa (.a(sum_s[R-1][k]), .b(car_s[R-1][k]), .cin(comp),
                       .s(p[k]), .cout(rc[k]));
    end else if (k < N - 1) begin : g_fa
      full_adder u_fa (.a(sum_s[R-1][k]), .b(car_s[R-1][k]), .cin(rc[k-1]),
                       .s(p[k]), .cout(rc[k]));
    end else begin : g_ha
      // sum_s[R-1][N-1] is the constant 1 of the last row; the carry out
      // of the top column is the dropped 2^(2N) carry
      half_adder u_ha (.a(sum_s[R-1][k]), .b(rc[k-1]), .s(p[k]), .c(rc[k]));
    end
  end

endmodule : fw_booth_mult
