// cscmmm_pkg: sizes and types shared by the carry save common multiplicand
// Montgomery multiplier (CSCMMM) and the RSA exponentiation around it.
//
// For a k-bit modulus the operands carry g = 1 + ceil(log2(k+1)) guard bits, so
// P, R, X and Y are k+g bits wide and one multiplication runs k+2g reduction
// steps. The redundant-to-binary conversion works on 48-bit chunks, the width
// of the DSP48E adder; the carry-save accumulators are padded to a whole number
// of chunks.
package cscmmm_pkg;

  localparam int unsigned DSP_W = 48;

  // g = 1 + ceil(log2(k+1)); 12 for k = 1024
  function automatic int unsigned guard_bits(input int unsigned k);
    return 1 + $clog2(k + 1);
  endfunction

  // number of 48-bit chunks needed for a w-bit number; 22 for w = 1036
  function automatic int unsigned num_chunks(input int unsigned w);
    return (w + DSP_W - 1) / DSP_W;
  endfunction

  // states of the multiplier's control unit
  typedef enum logic [1:0] {
    CM_IDLE = 2'd0,  // waiting for operands
    CM_RUN  = 2'd1,  // reduction and accumulation, i = 1 .. k+2g+1
    CM_CONV = 2'd2   // carry-save to binary conversion, one chunk per cycle
  } cm_state_e;

  // kind of multiplication issued by the exponentiation controller
  typedef enum logic [1:0] {
    OP_TO_MONT   = 2'd0,  // P = CSCMMM(M, lambda): into the Montgomery domain
    OP_LADDER    = 2'd1,  // one Montgomery powering ladder step
    OP_FROM_MONT = 2'd2   // CSCMMM(1, R): back to the integer domain
  } op_kind_e;

endpackage
