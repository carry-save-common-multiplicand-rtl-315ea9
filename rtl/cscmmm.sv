// cscmmm: carry save common multiplicand Montgomery modular multiplier.
//
// For a k-bit odd modulus n and (k+g)-bit operands P (the common multiplicand)
// and R, with g = 1 + ceil(log2(k+1)), one operation returns both
//   X = P * R * 2^-(k+2g) mod n   and   Y = P * P * 2^-(k+2g) mod n,
// each as a (k+g)-bit binary number that is congruent to the exact result and
// below 2^(k+g) (it is not necessarily below n).
//
// The idea: Montgomery multiplication P*R and squaring P*P share the
// multiplicand, so the successive reductions T_i = P * 2^-i mod n are computed
// only once (common reduction unit) and summed into two accumulators, X with
// the bits of R and Y with the bits of P, most significant bit first. All wide
// additions are carry-save, so the clock period does not depend on k. The
// reduction and the accumulations are pipelined: in iteration i the reduction
// produces T[i+1] while the accumulators add T[i], so the accumulation runs for
// i = g+2 .. k+2g+1. At the end each carry-save pair is converted to binary by
// a 48-bit DSP adder, one chunk per cycle; the binary form is needed because
// the next multiplication of an exponentiation scans its multiplier from the
// most significant bit.
//
// Blocks: io_interface (handshake), cscmmm_ctrl (control unit), iter_counter
// (counter), operand_regs (registers), common_reduction_unit, two
// accumulation_units (X, Y) and two rb_adders (the DSP adders with the X and Y
// result registers).
//
// Timing (k = 1024): operands are loaded on the clock edge where in_valid and
// in_ready are high; out_valid is high 1 + (k+2g+1) + NCH = 1072 cycles later
// (1050 for the main loop including the load, 22 for the conversion), and a new
// operation may be loaded in that same cycle. X and Y stay valid until the
// next operation starts its conversion.
module cscmmm
  import cscmmm_pkg::*;
#(
  parameter int unsigned K = 1024,
  localparam int unsigned G = guard_bits(K),
  localparam int unsigned W = K + G
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] p_in,
  input  logic [W-1:0] r_in,
  input  logic [K-1:0] n_in,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] x_out,
  output logic [W-1:0] y_out
);

  logic             load, busy, finish;
  logic             red_en, acc_en, conv_en;
  logic             cnt_load_run, cnt_load_conv, cnt_inc;
  logic             acc_phase, run_last, conv_first, conv_last;
  logic [K-1:0]     n_q;
  logic             r_bit, p_bit;
  logic [W-1:0]     t1, t2;
  logic [DSP_W-1:0] x1_chunk, x2_chunk, y1_chunk, y2_chunk;

  io_interface u_io (
    .clk, .rst_n, .in_valid, .in_ready, .out_valid, .out_ready,
    .busy, .finish, .load
  );

  cscmmm_ctrl u_ctrl (
    .clk, .rst_n, .load, .acc_phase, .run_last, .conv_last,
    .busy, .red_en, .acc_en, .conv_en,
    .cnt_load_run, .cnt_load_conv, .cnt_inc, .finish
  );

  iter_counter #(.K(K)) u_cnt (
    .clk, .load_run(cnt_load_run), .load_conv(cnt_load_conv), .inc(cnt_inc),
    .cnt(), .acc_phase, .run_last, .conv_first, .conv_last
  );

  operand_regs #(.K(K)) u_regs (
    .clk, .load, .shift(acc_en), .p_in, .r_in, .n_in,
    .n_q, .r_bit, .p_bit
  );

  common_reduction_unit #(.K(K)) u_red (
    .clk, .load, .en(red_en), .p_in, .n(n_q), .t1, .t2, .q()
  );

  accumulation_unit #(.K(K)) u_acc_x (
    .clk, .clear(load), .acc_en, .bit_i(r_bit), .t1, .t2,
    .shift_en(conv_en), .a1_chunk(x1_chunk), .a2_chunk(x2_chunk)
  );

  accumulation_unit #(.K(K)) u_acc_y (
    .clk, .clear(load), .acc_en, .bit_i(p_bit), .t1, .t2,
    .shift_en(conv_en), .a1_chunk(y1_chunk), .a2_chunk(y2_chunk)
  );

  rb_adder #(.K(K)) u_add_x (
    .clk, .en(conv_en), .first(conv_first), .a_chunk(x1_chunk), .b_chunk(x2_chunk),
    .result(x_out)
  );

  rb_adder #(.K(K)) u_add_y (
    .clk, .en(conv_en), .first(conv_first), .a_chunk(y1_chunk), .b_chunk(y2_chunk),
    .result(y_out)
  );

  // the modulus must be odd for the quotient rule q = T mod 2
  a_n_odd: assert property (@(posedge clk) disable iff (!rst_n) load |-> n_in[0]);

endmodule
