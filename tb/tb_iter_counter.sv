// tb_iter_counter: walks the counter through a main loop (i = 1 .. k+2g+1) and
// a conversion (0 .. NCH-1) and checks the count and every decoded flag
// against the loop bounds, and that the count holds without inc.
module tb_iter_counter;
  import cscmmm_pkg::*;
  localparam int unsigned K    = 64;
  localparam int unsigned G    = guard_bits(K);
  localparam int unsigned W    = K + G;
  localparam int unsigned NCH  = num_chunks(W);
  localparam int unsigned LAST = K + 2 * G + 1;
  localparam int unsigned CW   = $clog2(LAST + 1);

  logic          clk = 1'b0;
  logic          load_run, load_conv, inc;
  logic [CW-1:0] cnt;
  logic          acc_phase, run_last, conv_first, conv_last;
  int checks = 0, failures = 0;

  iter_counter #(.K(K)) dut (.clk, .load_run, .load_conv, .inc, .cnt, .acc_phase, .run_last, .conv_first, .conv_last);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("fail: %s (cnt=%0d)", what, cnt);
    end
  endtask

  initial begin
    load_run = 1'b0; load_conv = 1'b0; inc = 1'b0;
    for (int rep = 0; rep < 2; rep++) begin
      @(negedge clk);
      load_run = 1'b1;
      @(negedge clk);
      load_run = 1'b0;
      inc = 1'b1;
      for (int i = 1; i <= int'(LAST); i++) begin
        check(int'(cnt) == i, "run count");
        check(acc_phase == (i >= int'(G) + 2), "acc_phase");
        check(run_last == (i == int'(LAST)), "run_last");
        @(negedge clk);
      end
      inc = 1'b0;
      load_conv = 1'b1;
      @(negedge clk);
      load_conv = 1'b0;
      check(cnt == '0 && conv_first, "conv start");
      repeat (3) @(negedge clk);
      check(cnt == '0, "hold without inc");
      inc = 1'b1;
      for (int c = 0; c < int'(NCH); c++) begin
        check(int'(cnt) == c, "conv count");
        check(conv_first == (c == 0), "conv_first");
        check(conv_last == (c == int'(NCH) - 1), "conv_last");
        @(negedge clk);
      end
      inc = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
