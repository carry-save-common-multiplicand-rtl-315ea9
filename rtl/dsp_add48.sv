// dsp_add48: a 48-bit adder with carry in and carry out, the function a DSP48E
// slice performs when configured for the operation C + CONCAT + CARRYIN with
// CARRYOUT brought out.
//
// P and CARRYOUT are registered (one clock of latency), as in a DSP48E with its
// output register in use; CE holds both. Port names follow the DSP48E macro
// symbol: C and CONCAT are the two 48-bit addends. Only the ports this
// operation uses are modelled. The use of CE to keep the last sum in P after a
// conversion, and the single output register stage, are choices of this design.
// The module is plain RTL so that it synthesizes anywhere; on a Xilinx part it
// maps onto one DSP slice.
module dsp_add48 #(
  parameter int unsigned WIDTH = cscmmm_pkg::DSP_W
) (
  input  logic             CLK,
  input  logic             CE,
  input  logic [WIDTH-1:0] C,
  input  logic [WIDTH-1:0] CONCAT,
  input  logic             CARRYIN,
  output logic [WIDTH-1:0] P,
  output logic             CARRYOUT
);

  logic [WIDTH:0] sum;

  always_comb sum = {1'b0, C} + {1'b0, CONCAT} + {{WIDTH{1'b0}}, CARRYIN};

  always_ff @(posedge CLK) begin
    if (CE) begin
      P        <= sum[WIDTH-1:0];
      CARRYOUT <= sum[WIDTH];
    end
  end

endmodule
