// tb_io_interface: drives random in_valid, out_ready and a busy period that
// ends with finish, and checks in_ready, load and out_valid against a
// reference of the handshake rules.
module tb_io_interface;
  logic clk = 1'b0;
  logic rst_n, in_valid, in_ready, out_valid, out_ready, busy, finish, load;
  logic exp_valid;
  int   busy_left;
  int checks = 0, failures = 0;
  int loads = 0, finishes = 0;

  io_interface dut (.clk, .rst_n, .in_valid, .in_ready, .out_valid, .out_ready, .busy, .finish, .load);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; out_ready = 1'b0; busy = 1'b0; finish = 1'b0;
    exp_valid = 1'b0; busy_left = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 5000; t++) begin
      // inputs for this cycle
      in_valid  = 1'($urandom());
      out_ready = ($urandom() % 4 == 0);
      busy      = (busy_left > 0);
      finish    = (busy_left == 1);
      #1;
      checks++;
      if (in_ready !== !busy || load !== (in_valid && !busy) || out_valid !== exp_valid) begin
        failures++;
        $display("t=%0d: in_ready=%b load=%b out_valid=%b (expected %b)", t, in_ready, load, out_valid, exp_valid);
      end
      // reference for the next cycle
      if (finish) begin
        exp_valid = 1'b1;
        finishes++;
      end else if (out_ready || (in_valid && !busy)) exp_valid = 1'b0;
      if (busy_left > 0) busy_left--;
      else if (in_valid) begin
        busy_left = 1 + $urandom() % 5;
        loads++;
      end
      @(negedge clk);
    end
    checks++;
    if (loads == 0 || finishes == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
