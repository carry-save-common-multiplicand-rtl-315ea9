// rb_adder: redundant-to-binary converter for one carry-save result
// (X = X1 + X2 or Y = Y1 + Y2), built around one 48-bit DSP adder.
//
// The two carry-save vectors are presented 48 bits at a time, least
// significant chunk first, one chunk per cycle (en high for NCH cycles, first
// high on the first of them). The adder computes chunk_a + chunk_b + carry,
// where the carry in is zero for the first chunk and afterwards the DSP's
// registered CARRYOUT of the previous chunk. The final carry out is dropped: the
// result is taken modulo 2^(48*NCH) and the true sum is below 2^(k+g).
// Each sum chunk lands in the DSP's P register and, one cycle later, is shifted
// into the top of a result shift register. After the NCH-th enabled cycle the
// complete binary result is {P, shift register}: the top chunk sits in the DSP
// output register and the lower NCH-1 chunks in the shift register. Together
// they are the X (or Y) result register; they hold their value while en is low.
//
// Timing: result is valid in the cycle after the last enabled cycle, i.e. NCH
// cycles after the first chunk was presented (22 cycles for k = 1024).
module rb_adder
  import cscmmm_pkg::*;
#(
  parameter int unsigned K = 1024,
  localparam int unsigned G   = guard_bits(K),
  localparam int unsigned W   = K + G,
  localparam int unsigned NCH = num_chunks(W)
) (
  input  logic             clk,
  input  logic             en,
  input  logic             first,
  input  logic [DSP_W-1:0] a_chunk,
  input  logic [DSP_W-1:0] b_chunk,
  output logic [W-1:0]     result
);

  logic [DSP_W-1:0] p;
  logic             cout;
  logic             cin;

  assign cin = first ? 1'b0 : cout;

  dsp_add48 #(.WIDTH(DSP_W)) u_dsp (
    .CLK     (clk),
    .CE      (en),
    .C       (a_chunk),
    .CONCAT  (b_chunk),
    .CARRYIN (cin),
    .P       (p),
    .CARRYOUT(cout)
  );

  if (NCH == 1) begin : g_one_chunk
    assign result = W'(p);
  end else begin : g_chunks
    localparam int unsigned RW = (NCH - 1) * DSP_W;
    logic [RW-1:0] res;
    if (NCH == 2) begin : g_two
      always_ff @(posedge clk) if (en) res <= p;
    end else begin : g_many
      always_ff @(posedge clk) if (en) res <= {p, res[RW-1:DSP_W]};
    end
    assign result = W'({p, res});
  end

endmodule
