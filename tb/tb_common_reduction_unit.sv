// tb_common_reduction_unit: checks the carry-save reduction against a plain
// binary reference: T := (T + (T mod 2)*n) / 2, starting from T = P.
// After every step T1 + T2 must equal the reference, q must equal the parity
// of the reference before the step, and both vectors must stay below 2^(k+g).
module tb_common_reduction_unit;
  import cscmmm_pkg::*;
  localparam int unsigned K = 64;
  localparam int unsigned G = guard_bits(K);
  localparam int unsigned W = K + G;

  logic         clk = 1'b0;
  logic         load, en;
  logic [W-1:0] p_in, t1, t2;
  logic [K-1:0] n;
  logic         q;
  logic [W+1:0] tref;
  int checks = 0, failures = 0;

  common_reduction_unit #(.K(K)) dut (.clk, .load, .en, .p_in, .n, .t1, .t2, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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
    load = 1'b0; en = 1'b0;
    for (int v = 0; v < 20; v++) begin
      @(negedge clk);
      n    = K'(rnd_w()) | {1'b1, {(K-2){1'b0}}, 1'b1};
      p_in = (v == 0) ? '1 : rnd_w();
      load = 1'b1;
      tref = (W+2)'(p_in);
      @(negedge clk);
      load = 1'b0;
      en   = 1'b1;
      for (int i = 1; i <= K + 2 * G; i++) begin
        checks++;
        if (q !== tref[0]) begin
          failures++;
          $display("q mismatch at step %0d", i);
        end
        if (tref[0]) tref = tref + (W+2)'(n);
        tref = tref >> 1;
        @(negedge clk);
        checks++;
        if ((W+2)'(t1) + (W+2)'(t2) !== tref) begin
          failures++;
          $display("T mismatch at step %0d", i);
        end
      end
      // en low: hold
      en = 1'b0;
      @(negedge clk);
      checks++;
      if ((W+2)'(t1) + (W+2)'(t2) !== tref) begin
        failures++;
        $display("T not held with en low");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
