// tb_operand_regs: loads random P, R and n and checks n, and that the
// multiplier bits come out most significant first, one per shift, holding
// while shift is low.
module tb_operand_regs;
  import cscmmm_pkg::*;
  localparam int unsigned K = 64;
  localparam int unsigned G = guard_bits(K);
  localparam int unsigned W = K + G;

  logic         clk = 1'b0;
  logic         load, shift;
  logic [W-1:0] p_in, r_in;
  logic [K-1:0] n_in, n_q;
  logic         r_bit, p_bit;
  int checks = 0, failures = 0;

  operand_regs #(.K(K)) dut (.clk, .load, .shift, .p_in, .r_in, .n_in, .n_q, .r_bit, .p_bit);

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
    load = 1'b0; shift = 1'b0;
    for (int v = 0; v < 20; v++) begin
      @(negedge clk);
      p_in = rnd_w(); r_in = rnd_w(); n_in = K'(rnd_w());
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      p_in = ~p_in; r_in = ~r_in; n_in = ~n_in;  // registers must not follow
      for (int b = int'(W) - 1; b >= 0; b--) begin
        checks++;
        if (r_bit !== ~r_in[b] || p_bit !== ~p_in[b] || n_q !== ~n_in) begin
          failures++;
          $display("bit %0d mismatch", b);
        end
        shift = ($urandom() % 3 != 0);
        @(negedge clk);
        if (!shift) b++;
        shift = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
