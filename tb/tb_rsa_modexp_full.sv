// tb_rsa_modexp_full: one RSA-1024 encryption with the public exponent
// e = 2^16+1 on the design at its default size (k = 1024, g = 12), followed
// by one with e = 3 and one with a random full-length 1024-bit exponent (the
// size of an RSA private-key operation). It checks C = M^e mod n (modulo n) and
// the cycle count (bitlength(e) + 2) * 1072, i.e. 19 * 1072 = 20368 cycles for
// e = 2^16+1 and 1026 * 1072 = 1099872 cycles for the full-length exponent.
module tb_rsa_modexp_full;
  import cscmmm_pkg::*;
  localparam int unsigned K   = 1024;
  localparam int unsigned G   = guard_bits(K);
  localparam int unsigned W   = K + G;
  localparam int unsigned NCH = num_chunks(W);
  localparam int unsigned LAT = 1 + (K + 2 * G + 1) + NCH;
  localparam int unsigned BW  = 2 * K + 4 * G + 2;

  logic         clk = 1'b0;
  logic         rst_n, start, busy, done;
  logic [K-1:0] m_in, e_in, n_in, lambda_in, z_in;
  logic [W-1:0] c_out;
  int checks = 0, failures = 0;
  int n_bit1 = 0, n_bit0 = 0;

  rsa_modexp dut (.clk, .rst_n, .start, .busy, .done, .m_in, .e_in, .n_in, .lambda_in, .z_in, .c_out);

  always #5 clk = ~clk;

  initial begin
    repeat (1200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk)
    if (rst_n && dut.cm_in_valid && !dut.accept && dut.next_kind == OP_LADDER) begin
      if (dut.next_bit) n_bit1++;
      else n_bit0++;
    end

  function automatic logic [K-1:0] rnd_k();
    logic [K-1:0] v = '0;
    for (int i = 0; i < K; i += 32) v = (v << 32) | K'($urandom());
    return v;
  endfunction

  function automatic logic [K-1:0] modexp_ref(input logic [K-1:0] m, input logic [K-1:0] e, input logic [K-1:0] n);
    logic [BW-1:0] acc, base;
    acc  = BW'(1) % BW'(n);
    base = BW'(m) % BW'(n);
    for (int i = int'(K) - 1; i >= 0; i--) begin
      acc = (acc * acc) % BW'(n);
      if (e[i]) acc = (acc * base) % BW'(n);
    end
    return K'(acc);
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("fail: %s", what);
    end
  endtask

  initial begin
    logic [K-1:0] m, e, n, cref;
    logic [BW-1:0] c_mod;
    int cycles, expected;
    rst_n = 1'b0; start = 1'b0;
    m_in = '0; e_in = '0; n_in = '0; lambda_in = '0; z_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int v = 0; v < 3; v++) begin
      n = rnd_k() | {1'b1, {(K-2){1'b0}}, 1'b1};
      m = rnd_k() % n;
      e = (v == 0) ? K'(65537) : (v == 1) ? K'(3) : rnd_k() | {1'b1, {(K-1){1'b0}}};
      expected = (v == 0) ? 20368 : (v == 1) ? 4 * int'(LAT) : int'(K + 2) * int'(LAT);
      m_in = m; e_in = e; n_in = n;
      lambda_in = K'(((BW)'(1) << (2 * K + 4 * G)) % BW'(n));
      z_in      = K'(((BW)'(1) << (K + 2 * G)) % BW'(n));
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cycles = 1;
      while (!done && cycles < 1150000) begin
        @(negedge clk);
        cycles++;
      end
      cref  = modexp_ref(m, e, n);
      c_mod = BW'(c_out) % BW'(n);
      check(K'(c_mod) == cref, $sformatf("vector %0d: C mod n differs from M^e mod n", v));
      check(cycles == expected, $sformatf("vector %0d: %0d cycles, expected %0d", v, cycles, expected));
      $display("vector %0d: %0d cycles", v, cycles);
      @(negedge clk);
    end
    check(n_bit1 > 0 && n_bit0 > 0, "ladder steps for both bit values");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
