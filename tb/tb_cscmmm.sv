// tb_cscmmm: end-to-end test of the multiplier at k = 64 (g = 8, 72-bit
// operands, two 48-bit conversion chunks). For random odd moduli n with
// 2^(k-1) < n < 2^k and random (k+g)-bit P and R (plus all-ones corner
// operands) it checks:
//   * X and Y bit-exactly against a plain binary model of the common
//     multiplicand Montgomery algorithm (no carry-save anywhere);
//   * X = P*R*2^-(k+2g) and Y = P*P*2^-(k+2g) modulo n, computed with wide
//     integer arithmetic, and X, Y < 2^(k+g);
//   * the latency 1 + (k+2g+1) + NCH cycles from load to out_valid;
//   * back-to-back operation: a new load in the cycle the results appear.
module tb_cscmmm;
  import cscmmm_pkg::*;
  localparam int unsigned K   = 64;
  localparam int unsigned G   = guard_bits(K);
  localparam int unsigned W   = K + G;
  localparam int unsigned NCH = num_chunks(W);
  localparam int unsigned LAT = 1 + (K + 2 * G + 1) + NCH;
  localparam int unsigned BW  = 2 * W + K + 2 * G + 2;

  logic         clk = 1'b0;
  logic         rst_n, in_valid, in_ready, out_valid, out_ready;
  logic [W-1:0] p_in, r_in, x_out, y_out;
  logic [K-1:0] n_in;
  int checks = 0, failures = 0;
  int back_to_back = 0;

  cscmmm #(.K(K)) dut (.clk, .rst_n, .in_valid, .in_ready, .p_in, .r_in, .n_in, .out_valid, .out_ready, .x_out, .y_out);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] rnd_w();
    logic [W-1:0] v = '0;
    for (int i = 0; i < W; i += 32) v = (v << 32) | W'($urandom());
    return v;
  endfunction

  // plain binary model: T := (T + T_0*n)/2 for i = 1..k+2g, X += r_{k+2g-i}*T,
  // Y += p_{k+2g-i}*T for i >= g+1
  function automatic void model(input logic [W-1:0] p, input logic [W-1:0] r, input logic [K-1:0] n,
                                output logic [W+1:0] x, output logic [W+1:0] y);
    logic [W+1:0] t;
    t = (W+2)'(p); x = '0; y = '0;
    for (int i = 1; i <= int'(K + 2 * G); i++) begin
      if (t[0]) t = t + (W+2)'(n);
      t = t >> 1;
      if (i >= int'(G) + 1) begin
        if (r[int'(K + 2 * G) - i]) x = x + t;
        if (p[int'(K + 2 * G) - i]) y = y + t;
      end
    end
  endfunction

  // a*2^(k+2g) mod n == b*c mod n
  function automatic bit mont_ok(input logic [W-1:0] a, input logic [W-1:0] b, input logic [W-1:0] c,
                                 input logic [K-1:0] n);
    logic [BW-1:0] lhs, rhs;
    lhs = (BW'(a) << (K + 2 * G)) % BW'(n);
    rhs = (BW'(b) * BW'(c)) % BW'(n);
    return lhs == rhs;
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("fail: %s", what);
    end
  endtask

  logic [W-1:0] p_q, r_q;
  logic [K-1:0] n_q;

  initial begin
    logic [W+1:0] xm, ym;
    int cycles;
    rst_n = 1'b0; in_valid = 1'b0; out_ready = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int v = 0; v < 60; v++) begin
      n_q = K'(rnd_w()) | {1'b1, {(K-2){1'b0}}, 1'b1};
      p_q = (v == 1) ? '1 : rnd_w();
      r_q = (v == 2) ? '1 : (v == 3) ? '0 : rnd_w();
      if (v == 4) n_q = '1;
      p_in = p_q; r_in = r_q; n_in = n_q;
      in_valid = 1'b1;
      check(in_ready, "ready before load");
      if (out_valid) back_to_back++;
      @(negedge clk);
      in_valid = 1'b0;
      p_in = '0; r_in = '0; n_in = '0;
      cycles = 1;
      while (!out_valid && cycles < 5000) begin
        @(negedge clk);
        cycles++;
      end
      check(cycles == int'(LAT), $sformatf("latency %0d, expected %0d", cycles, LAT));
      model(p_q, r_q, n_q, xm, ym);
      check(xm < (W+2)'(1) << W && ym < (W+2)'(1) << W, "model result below 2^(k+g)");
      check(x_out == xm[W-1:0], $sformatf("X vs model, vector %0d", v));
      check(y_out == ym[W-1:0], $sformatf("Y vs model, vector %0d", v));
      check(mont_ok(x_out, p_q, r_q, n_q), "X = P*R*2^-(k+2g) mod n");
      check(mont_ok(y_out, p_q, p_q, n_q), "Y = P*P*2^-(k+2g) mod n");
      // every other vector: load the next one in this same cycle
      if (v % 2 == 1) begin
        out_ready = 1'b1;
        @(negedge clk);
        out_ready = 1'b0;
        check(!out_valid, "out_valid cleared by out_ready");
      end
    end
    check(back_to_back > 0, "back-to-back load exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
