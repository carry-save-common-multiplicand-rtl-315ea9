// tb_dsp_add48: self-checking test of the 48-bit DSP adder model.
// Random addends and carry in, including all-ones operands that make the carry
// out ripple; checks the registered sum and carry out one cycle later and that
// CE low holds both.
module tb_dsp_add48;
  logic        clk = 1'b0;
  logic        ce;
  logic [47:0] c, concat, p;
  logic        cin, cout;
  logic [48:0] exp_sum;
  int checks = 0, failures = 0;

  dsp_add48 dut (.CLK(clk), .CE(ce), .C(c), .CONCAT(concat), .CARRYIN(cin), .P(p), .CARRYOUT(cout));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      ce     = 1'b1;
      c      = (t % 7 == 0) ? '1 : {16'($urandom()), $urandom()};
      concat = (t % 5 == 0) ? '1 : {16'($urandom()), $urandom()};
      cin    = 1'($urandom());
      exp_sum = {1'b0, c} + {1'b0, concat} + 49'(cin);
      @(negedge clk);
      ce = 1'b0;
      c  = ~c;               // must not reach P while CE is low
      checks++;
      if ({cout, p} !== exp_sum) begin
        failures++;
        $display("mismatch: got %h %h expected %h", cout, p, exp_sum);
      end
      @(negedge clk);
      checks++;
      if ({cout, p} !== exp_sum) begin
        failures++;
        $display("CE low did not hold P");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
