// operand_regs: the operand registers of the multiplier.
//
// On load they take the modulus n and copies of the multiplier R and of the
// common multiplicand P. The latter two are left-shifting registers whose top
// bits r_bit and p_bit are the multiplier bits used by the X and Y
// accumulations: after load they present r_{k+g-1} and p_{k+g-1}, and each
// shift moves to the next lower bit, down to r_0 and p_0 after k+g-1 shifts.
// A shift register avoids a (k+g)-to-1 multiplexer on the bit index.
//
// Interface: load has priority over shift; outputs are register contents.
// The MSB-first bit order follows the algorithm; the register organisation is
// this design's own.
module operand_regs
  import cscmmm_pkg::*;
#(
  parameter int unsigned K = 1024,
  localparam int unsigned G = guard_bits(K),
  localparam int unsigned W = K + G
) (
  input  logic         clk,
  input  logic         load,
  input  logic         shift,
  input  logic [W-1:0] p_in,
  input  logic [W-1:0] r_in,
  input  logic [K-1:0] n_in,
  output logic [K-1:0] n_q,
  output logic         r_bit,
  output logic         p_bit
);

  logic [W-1:0] r_sh, p_sh;

  always_ff @(posedge clk) begin
    if (load) begin
      n_q  <= n_in;
      r_sh <= r_in;
      p_sh <= p_in;
    end else if (shift) begin
      r_sh <= r_sh << 1;
      p_sh <= p_sh << 1;
    end
  end

  assign r_bit = r_sh[W-1];
  assign p_bit = p_sh[W-1];

endmodule
