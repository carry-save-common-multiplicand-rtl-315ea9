// io_interface: operand and result handshake of the multiplier.
//
// Operands (P, R, n) are offered with in_valid and taken in a cycle where
// in_ready is high, which is whenever the multiplier is not busy; load is the
// resulting one-cycle command to the registers and the control unit. Results
// (X, Y) are announced with out_valid, which rises the cycle after the control
// unit signals finish and stays high until out_ready is seen or a new operation
// is loaded. X and Y themselves stay valid until the next operation reaches its
// conversion phase, so a consumer may start the next multiplication in the same
// cycle in which it takes the results (back-to-back operation).
// The valid/ready protocol is this design's choice; the data paths are wired
// directly between the ports and the registers.
module io_interface (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  output logic out_valid,
  input  logic out_ready,
  input  logic busy,
  input  logic finish,
  output logic load
);

  assign in_ready = !busy;
  assign load     = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      out_valid <= 1'b0;
    else if (finish)                 out_valid <= 1'b1;
    else if (out_ready || load)      out_valid <= 1'b0;
  end

  // results are only announced while the unit is idle
  a_valid_idle: assert property (@(posedge clk) disable iff (!rst_n) out_valid |-> !busy);
  // finish comes from a busy unit, never together with a new load
  a_finish_busy: assert property (@(posedge clk) disable iff (!rst_n) finish |-> busy && !load);

endmodule
