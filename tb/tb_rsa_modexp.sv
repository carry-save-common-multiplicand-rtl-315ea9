// tb_rsa_modexp: end-to-end test of the RSA exponentiation at k = 64
// (g = 8). For random odd moduli and messages and a set of exponents
// (2^16+1, 0, 1, 3, a single high bit, random full-width ones) it computes
// lambda = 2^(2k+4g) mod n and Z = 2^(k+2g) mod n, runs the design and checks:
//   * C = M^e mod n (C is compared modulo n, see rsa_modexp), C < 2^(k+g);
//   * the cycle count (bitlength(e) + 2) * (1 + (k+2g+1) + NCH);
// and counts the mechanisms of the design, failing if one never occurred:
// conversion into and out of the Montgomery domain, ladder steps for bit 1 and
// bit 0, skipped leading zero bits, back-to-back issue of a multiplication in
// the cycle its predecessor's results appear, a carry passed between chunks in
// the binary conversion, and a result not reduced below n.
module tb_rsa_modexp;
  import cscmmm_pkg::*;
  localparam int unsigned K   = 64;
  localparam int unsigned G   = guard_bits(K);
  localparam int unsigned W   = K + G;
  localparam int unsigned NCH = num_chunks(W);
  localparam int unsigned LAT = 1 + (K + 2 * G + 1) + NCH;
  localparam int unsigned BW  = 2 * K + 4 * G + 2;
  localparam int unsigned NVEC = 24;

  logic         clk = 1'b0;
  logic         rst_n, start, busy, done;
  logic [K-1:0] m_in, e_in, n_in, lambda_in, z_in;
  logic [W-1:0] c_out;
  int checks = 0, failures = 0;
  int n_to_mont = 0, n_from_mont = 0, n_bit1 = 0, n_bit0 = 0, n_skip = 0;
  int n_b2b = 0, n_carry = 0, n_unreduced = 0;

  rsa_modexp #(.K(K)) dut (.clk, .rst_n, .start, .busy, .done, .m_in, .e_in, .n_in, .lambda_in, .z_in, .c_out);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters, sampled on the issue of every multiplication
  always @(posedge clk) begin
    if (rst_n && dut.cm_in_valid) begin
      if (dut.accept) n_to_mont++;
      else if (dut.next_kind == OP_FROM_MONT) n_from_mont++;
      else if (dut.next_bit) n_bit1++;
      else n_bit0++;
      if (dut.cm_out_valid) n_b2b++;
    end
    if (rst_n && dut.u_cm.conv_en && !dut.u_cm.conv_first && dut.u_cm.u_add_x.cin) n_carry++;
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

  function automatic int bitlen(input logic [K-1:0] e);
    int l = 0;
    for (int i = 0; i < int'(K); i++) if (e[i]) l = i + 1;
    return l;
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
    int cycles;
    rst_n = 1'b0; start = 1'b0;
    m_in = '0; e_in = '0; n_in = '0; lambda_in = '0; z_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int v = 0; v < int'(NVEC); v++) begin
      n = rnd_k() | {1'b1, {(K-2){1'b0}}, 1'b1};
      m = rnd_k() % n;
      case (v)
        0:       e = K'(65537);
        1:       e = '0;
        2:       e = K'(1);
        3:       e = K'(3);
        4:       e = {1'b1, {(K-1){1'b0}}};
        5:       begin e = K'(65537); m = '0; end
        6:       begin e = rnd_k(); m = n - K'(1); end
        default: e = (v % 2 == 0) ? rnd_k() : rnd_k() >> ($urandom() % K);
      endcase
      if (bitlen(e) < int'(K)) n_skip++;
      m_in = m; e_in = e; n_in = n;
      lambda_in = K'(((BW)'(1) << (2 * K + 4 * G)) % BW'(n));
      z_in      = K'(((BW)'(1) << (K + 2 * G)) % BW'(n));
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      m_in = '0; e_in = '0; n_in = '0; lambda_in = '0; z_in = '0;
      cycles = 1;
      while (!done && cycles < 150000) begin
        @(negedge clk);
        cycles++;
      end
      cref  = modexp_ref(m, e, n);
      c_mod = BW'(c_out) % BW'(n);
      if (BW'(c_out) >= BW'(n)) n_unreduced++;
      check(K'(c_mod) == cref, $sformatf("vector %0d: C mod n = %h, expected %h", v, c_mod, cref));
      check(cycles == (bitlen(e) + 2) * int'(LAT),
            $sformatf("vector %0d: %0d cycles, expected %0d", v, cycles, (bitlen(e) + 2) * int'(LAT)));
      @(negedge clk);
      check(!busy, "idle after done");
    end
    check(n_to_mont == int'(NVEC), "conversion into the Montgomery domain");
    check(n_from_mont == int'(NVEC), "conversion back to the integer domain");
    check(n_bit1 > 0, "ladder step with e_i = 1");
    check(n_bit0 > 0, "ladder step with e_i = 0");
    check(n_skip > 0, "leading zero bits skipped");
    check(n_b2b > 0, "back-to-back issue");
    check(n_carry > 0, "carry between conversion chunks");
    check(n_unreduced > 0, "result above n");
    $display("mechanisms: to_mont=%0d from_mont=%0d bit1=%0d bit0=%0d skip=%0d b2b=%0d carry=%0d unreduced=%0d",
             n_to_mont, n_from_mont, n_bit1, n_bit0, n_skip, n_b2b, n_carry, n_unreduced);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
