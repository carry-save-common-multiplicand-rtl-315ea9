// tb_cscmmm_ctrl: runs the control unit with its counter for several
// multiplications and checks, per operation, the number of cycles with each
// enable (k+2g reduction steps, k+g accumulation steps, NCH conversion steps),
// that accumulation only happens in iterations g+2 .. k+2g+1, that finish comes
// 1 + (k+2g+1) + NCH cycles after load, and that busy covers exactly that.
module tb_cscmmm_ctrl;
  import cscmmm_pkg::*;
  localparam int unsigned K    = 64;
  localparam int unsigned G    = guard_bits(K);
  localparam int unsigned W    = K + G;
  localparam int unsigned NCH  = num_chunks(W);
  localparam int unsigned LAST = K + 2 * G + 1;
  localparam int unsigned CW   = $clog2(LAST + 1);

  logic          clk = 1'b0;
  logic          rst_n, load;
  logic          acc_phase, run_last, conv_first, conv_last;
  logic          busy, red_en, acc_en, conv_en, cnt_load_run, cnt_load_conv, cnt_inc, finish;
  logic [CW-1:0] cnt;
  int checks = 0, failures = 0;

  cscmmm_ctrl dut (.clk, .rst_n, .load, .acc_phase, .run_last, .conv_last, .busy, .red_en, .acc_en,
                   .conv_en, .cnt_load_run, .cnt_load_conv, .cnt_inc, .finish);
  iter_counter #(.K(K)) u_cnt (.clk, .load_run(cnt_load_run), .load_conv(cnt_load_conv), .inc(cnt_inc),
                               .cnt, .acc_phase, .run_last, .conv_first, .conv_last);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("fail: %s", what);
    end
  endtask

  initial begin
    int n_red, n_acc, n_conv, cycles, iter;
    bit acc_out_of_window;
    rst_n = 1'b0; load = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int op = 0; op < 4; op++) begin
      @(negedge clk);
      check(!busy, "idle before load");
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      n_red = 0; n_acc = 0; n_conv = 0; cycles = 1; iter = 1; acc_out_of_window = 0;
      while (!finish && cycles < 1000) begin
        check(busy, "busy during operation");
        if (red_en) n_red++;
        if (acc_en) begin
          n_acc++;
          if (iter < int'(G) + 2 || iter > int'(LAST)) acc_out_of_window = 1;
        end
        if (conv_en) n_conv++;
        if (!conv_en) iter++;
        cycles++;
        @(negedge clk);
      end
      // finish cycle is the last conversion cycle
      if (conv_en) n_conv++;
      cycles++;
      check(n_red == int'(K + 2 * G), $sformatf("reduction steps %0d", n_red));
      check(n_acc == int'(K + G), $sformatf("accumulation steps %0d", n_acc));
      check(n_conv == int'(NCH), $sformatf("conversion steps %0d", n_conv));
      check(!acc_out_of_window, "accumulation outside i = g+2 .. k+2g+1");
      check(cycles == int'(1 + LAST + NCH), $sformatf("latency %0d", cycles));
      @(negedge clk);
      check(!busy, "idle after finish");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
