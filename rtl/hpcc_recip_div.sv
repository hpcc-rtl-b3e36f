// hpcc_recip_div -- division by multiplication with a stored reciprocal.
//
// Computes q ~= x / n for an unsigned denominator 1 <= n < 2^N_W without a
// divider: n is written as 2^e * (1 + k/2^M) with k the M bits below its
// leading one, the table gives R[k] = round(2^(RM+M) / (2^M + k)), i.e. the
// reciprocal of the largest stored value n_k = 2^e * (1 + k/2^M) that does not
// exceed n, and q = (x * R[k]) >> (RM + e).
//
// As in HPCC, the set of stored denominators is spaced so that neighbouring
// entries differ by a relative step of at most eps = 2^-M, which bounds the
// relative error of q to about eps (q is never below x/n by more than one
// LSB and never above it by more than eps*x/n). The published table holds
// the n values themselves and about 10 KB in all; this version uses the same
// eps spacing but folds every power of two onto one 2^M-entry mantissa table,
// so only 2^M words of RM+1 bits are stored. Those values are computed at
// elaboration.
//
// n = 0 saturates q to all ones. Purely combinational: the result is valid
// in the same cycle as the operands.
module hpcc_recip_div #(
  parameter int unsigned X_W = 48,  // numerator width
  parameter int unsigned N_W = 22,  // denominator width: n < 2^22 as in HPCC
  parameter int unsigned Q_W = 48,  // quotient width (saturating)
  parameter int unsigned M   = 8,   // mantissa index bits: eps = 2^-M
  parameter int unsigned RM  = 16   // reciprocal fraction bits
) (
  input  logic [X_W-1:0] x,
  input  logic [N_W-1:0] n,
  output logic [Q_W-1:0] q
);

  localparam int unsigned ENTRIES = 1 << M;
  localparam int unsigned PROD_W  = X_W + RM + 1;

  logic [RM:0] rtab [ENTRIES];

  // Reciprocal table: R[k] = round(2^(RM+M) / (2^M + k)).
  initial begin
    for (int unsigned k = 0; k < ENTRIES; k++) begin
      longint unsigned num, den;
      num = longint'(1) << (RM + M);
      den = longint'(ENTRIES) + longint'(k);
      rtab[k] = (RM+1)'((num + den / 2) / den);
    end
  end

  logic [$clog2(N_W)-1:0] e;
  logic [M-1:0]           k;
  logic [PROD_W-1:0]      prod;
  logic [PROD_W-1:0]      shifted;

  // Leading-one position of n.
  always_comb begin
    e = '0;
    for (int i = 0; i < int'(N_W); i++)
      if (n[i]) e = ($clog2(N_W))'(i);
  end

  // The M bits of n below the leading one, truncated.
  always_comb begin
    logic [N_W+M-1:0] ext;
    ext = {n, M'(0)} >> e;        // ext[M-1:0] = the M bits below bit e
    k   = ext[M-1:0];
  end

  always_comb begin
    prod    = PROD_W'(x) * PROD_W'(rtab[k]);
    shifted = prod >> (RM + 32'(e));
    if (n == '0)
      q = '1;
    else if (|(shifted >> Q_W))
      q = '1;
    else
      q = Q_W'(shifted);
  end

endmodule
