// tb_accumulation_unit: accumulates random carry-save T values under random
// multiplier bits and enables, then shifts the two vectors out chunk by chunk
// and checks that their sum equals the reference sum of the selected T values
// modulo 2^(48*NCH). Also checks that clear empties the accumulator.
module tb_accumulation_unit;
  import cscmmm_pkg::*;
  localparam int unsigned K   = 128;
  localparam int unsigned G   = guard_bits(K);
  localparam int unsigned W   = K + G;
  localparam int unsigned NCH = num_chunks(W);
  localparam int unsigned AW  = NCH * DSP_W;

  logic             clk = 1'b0;
  logic             clear, acc_en, bit_i, shift_en;
  logic [W-1:0]     t1, t2;
  logic [DSP_W-1:0] a1_chunk, a2_chunk;
  logic [AW-1:0]    ref_sum, got1, got2;
  int checks = 0, failures = 0;

  accumulation_unit #(.K(K)) dut (.clk, .clear, .acc_en, .bit_i, .t1, .t2, .shift_en, .a1_chunk, .a2_chunk);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] rnd_w();
    logic [W-1:0] v = '0;
    for (int i = 0; i < W; i += 32) v = (v << 32) | W'($urandom());
    return v;
  endfunction

  initial begin
    clear = 1'b0; acc_en = 1'b0; bit_i = 1'b0; shift_en = 1'b0;
    for (int v = 0; v < 30; v++) begin
      @(negedge clk);
      clear = 1'b1;
      ref_sum = '0;
      @(negedge clk);
      clear = 1'b0;
      for (int i = 0; i < 200; i++) begin
        t1     = (v == 0) ? '1 : rnd_w();
        t2     = (v == 0) ? '1 : rnd_w();
        bit_i  = (v == 0) ? 1'b1 : 1'($urandom());
        acc_en = (v == 0) ? 1'b1 : ($urandom() % 4 != 0);
        if (acc_en && bit_i) ref_sum = ref_sum + AW'(t1) + AW'(t2);
        @(negedge clk);
      end
      acc_en   = 1'b0;
      shift_en = 1'b1;
      for (int c = 0; c < NCH; c++) begin
        got1[c*DSP_W +: DSP_W] = a1_chunk;
        got2[c*DSP_W +: DSP_W] = a2_chunk;
        @(negedge clk);
      end
      shift_en = 1'b0;
      checks++;
      if (got1 + got2 !== ref_sum) begin
        failures++;
        $display("sum mismatch in vector %0d", v);
      end
    end
    // clear
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    checks++;
    if (a1_chunk !== '0 || a2_chunk !== '0) begin
      failures++;
      $display("clear failed");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
