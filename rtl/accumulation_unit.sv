// accumulation_unit: carry-save accumulator for one of the two results of the
// common multiplicand multiplication (instantiated once for X, once for Y).
//
// The accumulator is a pair of vectors (A1, A2). Each enabled cycle adds the
// reduced multiplicand T = T1 + T2 when the current multiplier bit is one:
//   A1, A2 := A1 + A2 + bit*(T1 + T2)
// The 2:1 mux selects T1/T2 or zero; two rows of full adders (a 4:2
// compression) reduce the four vectors to two. No shifting is needed: the
// weighting by powers of two is already inside the T values.
// Arithmetic is modulo 2^AW, AW = 48 * ceil((k+g)/48). The true sum stays
// below 2^(k+g) <= 2^AW, so dropping carries out of the top bit does not change
// the final A1 + A2.
// During the conversion (shift_en) both vectors shift right by 48 bits per
// cycle and present their low chunks to the adder.
//
// Interface: clear (highest priority) zeroes both vectors at the start of a
// multiplication; acc_en performs one accumulation; shift_en one chunk shift.
module accumulation_unit
  import cscmmm_pkg::*;
#(
  parameter int unsigned K = 1024,
  localparam int unsigned G   = guard_bits(K),
  localparam int unsigned W   = K + G,
  localparam int unsigned NCH = num_chunks(W),
  localparam int unsigned AW  = NCH * DSP_W
) (
  input  logic             clk,
  input  logic             clear,
  input  logic             acc_en,
  input  logic             bit_i,
  input  logic [W-1:0]     t1,
  input  logic [W-1:0]     t2,
  input  logic             shift_en,
  output logic [DSP_W-1:0] a1_chunk,
  output logic [DSP_W-1:0] a2_chunk
);

  logic [AW-1:0] a1, a2;
  logic [AW-1:0] m1, m2, s1, c1, s2, c2;

  always_comb begin
    m1 = bit_i ? AW'(t1) : '0;
    m2 = bit_i ? AW'(t2) : '0;
    // first full-adder row: A1 + A2 + m1
    s1 = a1 ^ a2 ^ m1;
    c1 = ((a1 & a2) | (a1 & m1) | (a2 & m1)) << 1;
    // second full-adder row: s1 + c1 + m2
    s2 = s1 ^ c1 ^ m2;
    c2 = ((s1 & c1) | (s1 & m2) | (c1 & m2)) << 1;
  end

  always_ff @(posedge clk) begin
    if (clear) begin
      a1 <= '0;
      a2 <= '0;
    end else if (acc_en) begin
      a1 <= s2;
      a2 <= c2;
    end else if (shift_en) begin
      a1 <= a1 >> DSP_W;
      a2 <= a2 >> DSP_W;
    end
  end

  assign a1_chunk = a1[DSP_W-1:0];
  assign a2_chunk = a2[DSP_W-1:0];

endmodule
