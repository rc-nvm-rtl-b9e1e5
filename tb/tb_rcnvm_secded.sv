// Self-checking testbench of rcnvm_secded. For random words it checks that
// the code word satisfies every Hamming check (computed here position by
// position) and has even parity, that a clean word decodes unchanged, that
// every single-bit flip is corrected, and that random double flips are
// flagged as uncorrectable.
module tb_rcnvm_secded;
  import rcnvm_pkg::*;
  word_t enc_data, dec_data;
  logic [71:0] enc_code, dec_code;
  logic dec_corrected, dec_double;
  int checks = 0, failures = 0;

  rcnvm_secded dut (.*);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 100; n++) begin
      logic [6:0] s;
      enc_data = {$urandom, $urandom};
      #1;
      s = '0;
      for (int p = 1; p < 72; p++) if (enc_code[p]) s ^= 7'(p);
      check("syndrome of code word", 64'(s), 0);
      check("even parity", 64'(^enc_code), 0);
      dec_code = enc_code; #1;
      check("clean data", dec_data, enc_data);
      check("clean flags", 64'({dec_corrected, dec_double}), 0);
      for (int b = 0; b < 72; b++) begin
        dec_code = enc_code; dec_code[b] = ~dec_code[b]; #1;
        check("corrected data", dec_data, enc_data);
        check("corrected flag", 64'({dec_corrected, dec_double}), 2);
      end
      for (int k = 0; k < 10; k++) begin
        automatic int b1 = $urandom_range(0, 71);
        automatic int b2 = (b1 + $urandom_range(1, 71)) % 72;
        dec_code = enc_code; dec_code[b1] = ~dec_code[b1]; dec_code[b2] = ~dec_code[b2]; #1;
        check("double flag", 64'({dec_corrected, dec_double}), 1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
