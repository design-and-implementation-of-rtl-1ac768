// tb_ecc_decoder: self-checking test of the SECDED decoder.
//
// Codewords are built by the testbench's own encoder (its own position table
// and parity equations). Each random word is checked clean, with one flipped
// bit at every one of the 39 positions (must be corrected, single_err), and
// with two distinct flipped bits (must be flagged double_err). With ecc_en
// low the raw data bits must pass through with no flag.
module tb_ecc_decoder;
  import zmc_pkg::*;

  code_t code_in;
  logic  ecc_en;
  word_t data_out;
  logic  single_err, double_err;
  int    checks = 0, failures = 0;

  ecc_decoder dut (.code_in(code_in), .ecc_en(ecc_en), .data_out(data_out),
                   .single_err(single_err), .double_err(double_err));

  int unsigned pos_tab [32] = '{3, 5, 6, 7, 9, 10, 11, 12, 13, 14, 15, 17, 18, 19, 20, 21,
                                22, 23, 24, 25, 26, 27, 28, 29, 30, 31, 33, 34, 35, 36, 37, 38};

  function automatic code_t ref_encode(input word_t d);
    code_t c = '0;
    for (int i = 0; i < 32; i++) c[pos_tab[i]] = d[i];
    for (int k = 0; k < 6; k++) begin
      bit x = 1'b0;
      for (int p = 1; p < 39; p++) if ((((p >> k) & 1) != 0) && p != (1 << k)) x ^= c[p];
      c[1 << k] = x;
    end
    c[0] = ^c[38:1];
    return c;
  endfunction

  function automatic word_t raw_data(input code_t c);
    word_t d;
    for (int i = 0; i < 32; i++) d[i] = c[pos_tab[i]];
    return d;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s code=%h data=%h se=%b de=%b", what, code_in, data_out, single_err, double_err);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t d;
    code_t c;
    ecc_en = 1'b1;
    for (int n = 0; n < 200; n++) begin
      d = $urandom;
      c = ref_encode(d);
      code_in = c; #1;
      check(data_out == d && !single_err && !double_err, "clean");
      for (int p = 0; p < 39; p++) begin
        code_in = c ^ (39'h1 << p); #1;
        check(data_out == d && single_err && !double_err, "single");
      end
      for (int m = 0; m < 20; m++) begin
        int p1, p2;
        p1 = $urandom_range(38);
        p2 = (p1 + 1 + $urandom_range(37)) % 39;
        code_in = c ^ (39'h1 << p1) ^ (39'h1 << p2); #1;
        check(!single_err && double_err, "double");
      end
    end
    ecc_en = 1'b0;
    for (int n = 0; n < 200; n++) begin
      c = ref_encode($urandom) ^ (39'h1 << $urandom_range(38));
      code_in = c; #1;
      check(data_out == raw_data(c) && !single_err && !double_err, "bypass");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
