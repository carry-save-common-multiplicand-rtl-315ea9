// tb_rb_adder: converts random carry-save pairs (including all-ones operands,
// which make carries ripple through every chunk) to binary and checks the
// result against A + B mod 2^(k+g), valid exactly NCH cycles after the first
// chunk, and held afterwards while en is low.
module tb_rb_adder;
  import cscmmm_pkg::*;
  localparam int unsigned K   = 128;
  localparam int unsigned G   = guard_bits(K);
  localparam int unsigned W   = K + G;
  localparam int unsigned NCH = num_chunks(W);
  localparam int unsigned AW  = NCH * DSP_W;

  logic             clk = 1'b0;
  logic             en, first;
  logic [DSP_W-1:0] a_chunk, b_chunk;
  logic [W-1:0]     result;
  logic [AW-1:0]    a, b, s;
  int checks = 0, failures = 0;

  rb_adder #(.K(K)) dut (.clk, .en, .first, .a_chunk, .b_chunk, .result);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [AW-1:0] rnd_a();
    logic [AW-1:0] v = '0;
    for (int i = 0; i < AW; i += 32) v = (v << 32) | AW'($urandom());
    return v;
  endfunction

  initial begin
    en = 1'b0; first = 1'b0;
    for (int v = 0; v < 200; v++) begin
      a = (v == 0) ? '1 : rnd_a();
      b = (v == 0) ? AW'(1) : (v == 1) ? '1 : rnd_a();
      s = a + b;
      for (int c = 0; c < NCH; c++) begin
        @(negedge clk);
        en      = 1'b1;
        first   = (c == 0);
        a_chunk = a[c*DSP_W +: DSP_W];
        b_chunk = b[c*DSP_W +: DSP_W];
      end
      @(negedge clk);
      en = 1'b0;
      a_chunk = '1; b_chunk = '1;
      checks++;
      if (result !== s[W-1:0]) begin
        failures++;
        $display("result mismatch in vector %0d", v);
      end
      repeat (2) @(negedge clk);
      checks++;
      if (result !== s[W-1:0]) begin
        failures++;
        $display("result not held in vector %0d", v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
