// rsa_modexp: RSA modular exponentiation C = M^e mod n on the Montgomery
// powering ladder, using one carry save common multiplicand Montgomery
// multiplier (cscmmm) for every step.
//
// Inputs are M < n, the exponent e, the odd k-bit modulus n and two values
// precomputed from n: lambda = 2^(2k+4g) mod n and Z = 2^(k+2g) mod n (Z is 1
// in the Montgomery domain). The sequence, with CSCMMM(P, R) returning
// X = P*R*2^-(k+2g) and Y = P*P*2^-(k+2g):
//   1. P = X of CSCMMM(M, lambda)          (M into the Montgomery domain)
//   2. R = Z
//   3. for each exponent bit e_i, most significant set bit first:
//        e_i = 1:  R, P = CSCMMM(P, R)     (R := P*R, P := P^2)
//        e_i = 0:  P, R = CSCMMM(R, P)     (P := R*P, R := R^2)
//   4. C = X of CSCMMM(1, R)               (back to the integer domain)
// Every ladder step does one multiplication and one squaring whatever the bit,
// so the operation sequence does not depend on the exponent's bit values.
// Leading zero bits of e are skipped (a design choice): the number of ladder
// steps is the exponent's bit length, 17 for e = 2^16+1.
//
// No operand is copied between multiplications: P and R live in the
// multiplier's X and Y result registers (or, for R after step 1, in the Z
// register), and a small state (the last operation and its exponent bit) says
// which is which. The next multiplication is issued in the cycle its
// predecessor's results appear, so the operations follow each other without
// gaps: the whole exponentiation takes (bitlength(e) + 2) * 1072 cycles for
// k = 1024, 20368 for e = 2^16+1.
//
// Interface: start is sampled while busy is low; M, e, n, lambda and Z need to
// be valid only in that cycle. done pulses for one cycle when c_out is valid;
// c_out then holds until the next start. c_out is congruent to M^e mod n and
// below 2^(k+g); like the multiplier's outputs it is not reduced below n.
module rsa_modexp
  import cscmmm_pkg::*;
#(
  parameter int unsigned K = 1024,
  localparam int unsigned G  = guard_bits(K),
  localparam int unsigned W  = K + G,
  localparam int unsigned IW = $clog2(K)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  output logic         busy,
  output logic         done,
  input  logic [K-1:0] m_in,
  input  logic [K-1:0] e_in,
  input  logic [K-1:0] n_in,
  input  logic [K-1:0] lambda_in,
  input  logic [K-1:0] z_in,
  output logic [W-1:0] c_out
);

  // multiplier interface
  logic         cm_in_valid, cm_in_ready, cm_out_valid;
  logic [W-1:0] cm_p, cm_r, cm_x, cm_y;
  logic [K-1:0] cm_n;

  // exponentiation state
  logic          busy_q;
  logic [K-1:0]  n_reg, z_reg, e_reg;
  logic          e_nonzero;
  logic [IW-1:0] idx;        // exponent bit of the pending or running ladder step
  op_kind_e      kind;       // operation now running in the multiplier
  logic          last_bit;   // exponent bit of the running ladder step

  logic [IW-1:0] msb;
  logic [W-1:0]  cur_p, cur_r;
  logic          step_done, accept;
  op_kind_e      next_kind;
  logic [IW-1:0] next_idx;
  logic          next_bit;

  // position of the most significant set bit of the exponent
  always_comb begin
    msb = '0;
    for (int j = 0; j < K; j++)
      if (e_in[j]) msb = IW'(j);
  end

  assign accept    = start && !busy_q;
  assign step_done = busy_q && cm_out_valid;

  // where P and R are once the running operation has finished
  always_comb begin
    cur_p = cm_x;
    cur_r = cm_y;
    unique case (kind)
      OP_TO_MONT: begin
        cur_p = cm_x;
        cur_r = W'(z_reg);
      end
      OP_LADDER: begin
        if (last_bit) begin
          cur_r = cm_x;
          cur_p = cm_y;
        end else begin
          cur_p = cm_x;
          cur_r = cm_y;
        end
      end
      default: ;
    endcase
  end

  // what follows the running operation
  always_comb begin
    next_kind = OP_FROM_MONT;
    next_idx  = idx;
    unique case (kind)
      OP_TO_MONT: begin
        next_kind = e_nonzero ? OP_LADDER : OP_FROM_MONT;
        next_idx  = idx;
      end
      OP_LADDER: begin
        next_kind = (idx == '0) ? OP_FROM_MONT : OP_LADDER;
        next_idx  = idx - IW'(1);
      end
      default: next_kind = OP_FROM_MONT;
    endcase
    next_bit = e_reg[next_idx];
  end

  // operands of the multiplication issued this cycle
  always_comb begin
    cm_in_valid = 1'b0;
    cm_p        = '0;
    cm_r        = '0;
    cm_n        = n_reg;
    if (accept) begin
      cm_in_valid = 1'b1;
      cm_p        = W'(m_in);
      cm_r        = W'(lambda_in);
      cm_n        = n_in;
    end else if (step_done && kind != OP_FROM_MONT) begin
      cm_in_valid = 1'b1;
      if (next_kind == OP_FROM_MONT) begin
        cm_p = W'(1);
        cm_r = cur_r;
      end else if (next_bit) begin
        cm_p = cur_p;
        cm_r = cur_r;
      end else begin
        cm_p = cur_r;
        cm_r = cur_p;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q <= 1'b0;
    end else if (accept) begin
      busy_q <= 1'b1;
    end else if (step_done && kind == OP_FROM_MONT) begin
      busy_q <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (accept) begin
      n_reg     <= n_in;
      z_reg     <= z_in;
      e_reg     <= e_in;
      e_nonzero <= |e_in;
      idx       <= msb;
      kind      <= OP_TO_MONT;
      last_bit  <= 1'b0;
    end else if (step_done && kind != OP_FROM_MONT) begin
      kind     <= next_kind;
      last_bit <= next_bit;
      if (kind == OP_LADDER) idx <= next_idx;
    end
  end

  cscmmm #(.K(K)) u_cm (
    .clk, .rst_n,
    .in_valid (cm_in_valid),
    .in_ready (cm_in_ready),
    .p_in     (cm_p),
    .r_in     (cm_r),
    .n_in     (cm_n),
    .out_valid(cm_out_valid),
    .out_ready(1'b1),
    .x_out    (cm_x),
    .y_out    (cm_y)
  );

  assign busy  = busy_q;
  assign done  = step_done && kind == OP_FROM_MONT;
  assign c_out = cm_x;

  // a multiplication is only issued to an idle multiplier
  a_issue_ready: assert property (@(posedge clk) disable iff (!rst_n) cm_in_valid |-> cm_in_ready);

endmodule
