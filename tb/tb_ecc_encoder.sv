// tb_ecc_encoder: self-checking test of the SECDED encoder.
//
// The expected codeword is not computed with the design's functions. The
// testbench has its own list of data-bit positions, then checks that every
// encoded word (a) carries the data at those positions, (b) satisfies the six
// Hamming parity equations (XOR over all positions with bit k set is zero),
// and (c) has even overall parity. Two fixed vectors are checked by value,
// and error injection is checked to invert exactly the masked data bits.
module tb_ecc_encoder;
  import zmc_pkg::*;

  word_t data_in, inj_mask;
  code_t code_out;
  int    checks = 0, failures = 0;

  ecc_encoder dut (.data_in(data_in), .inj_mask(inj_mask), .code_out(code_out));

  // Non-power-of-two positions 3..38, listed by hand.
  int unsigned pos_tab [32] = '{3, 5, 6, 7, 9, 10, 11, 12, 13, 14, 15, 17, 18, 19, 20, 21,
                                22, 23, 24, 25, 26, 27, 28, 29, 30, 31, 33, 34, 35, 36, 37, 38};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s data=%h code=%h", what, data_in, code_out);
    end
  endtask

  task automatic check_code(input word_t d);
    bit ok_data, ok_par;
    ok_data = 1'b1;
    for (int i = 0; i < 32; i++) if (code_out[pos_tab[i]] !== d[i]) ok_data = 1'b0;
    check(ok_data, "data placement");
    ok_par = 1'b1;
    for (int k = 0; k < 6; k++) begin
      bit x = 1'b0;
      for (int p = 1; p < 39; p++) if (((p >> k) & 1) != 0) x ^= code_out[p];
      if (x) ok_par = 1'b0;
    end
    check(ok_par, "hamming equations");
    check(^code_out == 1'b0, "overall parity");
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    inj_mask = '0;
    data_in  = '0;             #1; check(code_out == 39'h0, "encode(0)");
    data_in  = 32'h1;          #1; check(code_out == 39'hF, "encode(1)");  // pos 3 -> checks 1,2, parity
    data_in  = 32'h8000_0000;  #1; check(code_out == 39'h41_0000_0014, "encode(msb)");  // pos 38 -> checks 2,4,32, even
    for (int n = 0; n < 2000; n++) begin
      data_in = $urandom; #1;
      check_code(data_in);
    end
    // Injection: the masked data bits, and only those, are inverted.
    for (int n = 0; n < 200; n++) begin
      code_t clean;
      code_t expect_diff;
      data_in = $urandom; inj_mask = '0; #1;
      clean = code_out;
      inj_mask = (n < 100) ? (32'h1 << (n % 32)) : $urandom; #1;
      expect_diff = '0;
      for (int i = 0; i < 32; i++) expect_diff[pos_tab[i]] = inj_mask[i];
      check((code_out ^ clean) == expect_diff, "injection");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
