// common_reduction_unit: the shared Montgomery reduction of the common
// multiplicand P, kept in carry-save form.
//
// T is held as two vectors, T1 and T2, with T = T1 + T2. On load, T1 = 0 and
// T2 = P. Each enabled cycle performs one step of the reduction loop:
//   q  = (T1[0] xor T2[0])            -- quotient computation
//   T1, T2 := (T1 + T2 + q*n) / 2     -- common multiplicand reduction
// The three-operand sum is formed by one row of full adders. Its sum vector S
// has S[0] = 0 (n is odd), so the halving is exact: T1' = S >> 1 and T2' = the
// carry vector, which already carries the factor 2 that the halving removes.
// The critical path is one XOR, one 2:1 mux (q*n) and one full adder,
// independent of k.
// Bounds: if T1, T2, n < 2^(k+g) then so are T1', T2', so k+g bits suffice.
// (T1' = S >> 1 is in fact below 2^(k+g-1): the top bit of t1 is always zero
// after a step. It is kept so that both vectors share one width.)
//
// Interface: load has priority over en; t1/t2/q are the register contents and
// the quotient of the current cycle. After load, the value T = T1+T2 after j
// enabled cycles is the j-th reduction of P, i.e. congruent to P*2^-j mod n.
module common_reduction_unit
  import cscmmm_pkg::*;
#(
  parameter int unsigned K = 1024,
  localparam int unsigned G = guard_bits(K),
  localparam int unsigned W = K + G
) (
  input  logic         clk,
  input  logic         load,
  input  logic         en,
  input  logic [W-1:0] p_in,
  input  logic [K-1:0] n,
  output logic [W-1:0] t1,
  output logic [W-1:0] t2,
  output logic         q
);

  logic [W-1:0] qn, s, c;

  always_comb begin
    q  = t1[0] ^ t2[0];
    qn = q ? W'(n) : '0;
    s  = t1 ^ t2 ^ qn;
    c  = (t1 & t2) | (t1 & qn) | (t2 & qn);
  end

  always_ff @(posedge clk) begin
    if (load) begin
      t1 <= '0;
      t2 <= p_in;
    end else if (en) begin
      t1 <= s >> 1;
      t2 <= c;
    end
  end

endmodule
