// iter_counter: the counter that keeps track of a multiplication.
//
// During the main loop it holds the iteration number i, starting at 1 when the
// operands are loaded and running to k+2g+1. The loop runs k+2g reduction
// steps; the accumulation is one cycle behind the reduction, so it is active
// for i = g+2 .. k+2g+1 (k+g cycles, one per multiplier bit). During the
// redundant-to-binary conversion the same register counts the 48-bit chunks
// 0 .. NCH-1.
//
// Interface: load_run sets the count to 1, load_conv to 0 (load_run has
// priority), inc adds one. The flags are decoded from the current count:
// acc_phase (i >= g+2), run_last (i = k+2g+1), conv_first (0), conv_last
// (NCH-1); the control unit interprets them according to its state.
// The loop bounds are those of the carry-save algorithm; sharing one counter
// between the loop and the conversion is this design's choice.
module iter_counter
  import cscmmm_pkg::*;
#(
  parameter int unsigned K = 1024,
  localparam int unsigned G   = guard_bits(K),
  localparam int unsigned W   = K + G,
  localparam int unsigned NCH = num_chunks(W),
  localparam int unsigned LAST = K + 2 * G + 1,
  localparam int unsigned CW  = $clog2(LAST + 1)
) (
  input  logic          clk,
  input  logic          load_run,
  input  logic          load_conv,
  input  logic          inc,
  output logic [CW-1:0] cnt,
  output logic          acc_phase,
  output logic          run_last,
  output logic          conv_first,
  output logic          conv_last
);

  always_ff @(posedge clk) begin
    if (load_run)       cnt <= CW'(1);
    else if (load_conv) cnt <= '0;
    else if (inc)       cnt <= cnt + CW'(1);
  end

  always_comb begin
    acc_phase  = (cnt >= CW'(G + 2));
    run_last   = (cnt == CW'(LAST));
    conv_first = (cnt == '0);
    conv_last  = (cnt == CW'(NCH - 1));
  end

endmodule
