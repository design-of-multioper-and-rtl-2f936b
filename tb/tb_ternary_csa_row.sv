// tb_ternary_csa_row: self-checking test of the W-bit 5:3 carry-save stage.
//
// A W = 3 instance is driven through every combination of its five input
// words (2^15 cases) and the default W = 16 instance with corner cases and
// random words. Checks, against arithmetic done here: s + cao + cbo equals
// a + b + c + cai + cbi modulo 2^W, both carry words have bit 0 clear, and at
// every bit the five input bits equal s + 2*(cA + cB) for the unshifted
// carries. A watchdog ends the run if it hangs.
module tb_ternary_csa_row;
  timeunit 1ns;
  timeprecision 1ps;

  int checks   = 0;
  int failures = 0;

  logic [15:0] a, b, c, cai, cbi, s, cao, cbo;
  logic [2:0]  a3, b3, c3, ai3, bi3, s3, ao3, bo3;

  ternary_csa_row u_dut16 (.a(a), .b(b), .c(c), .cai(cai), .cbi(cbi),
                           .s(s), .cao(cao), .cbo(cbo));
  ternary_csa_row #(.W(3)) u_dut3 (.a(a3), .b(b3), .c(c3), .cai(ai3), .cbi(bi3),
                                   .s(s3), .cao(ao3), .cbo(bo3));

  task automatic check16();
    logic [18:0] total;
    int ok_bits;
    total = 19'(a) + 19'(b) + 19'(c) + 19'(cai) + 19'(cbi);
    checks += 2;
    if (16'(s + cao + cbo) !== total[15:0]) begin
      failures++; $display("FAIL sum a=%h b=%h c=%h cai=%h cbi=%h", a, b, c, cai, cbi);
    end
    if (cao[0] !== 1'b0 || cbo[0] !== 1'b0) begin
      failures++; $display("FAIL carry bit 0");
    end
    ok_bits = 0;
    for (int i = 0; i < 15; i++) begin
      int in_bits;
      in_bits = int'(a[i]) + int'(b[i]) + int'(c[i]) + int'(cai[i]) + int'(cbi[i]);
      if (in_bits == int'(s[i]) + 2 * (int'(cao[i+1]) + int'(cbo[i+1]))) ok_bits++;
    end
    checks++;
    if (ok_bits != 15) begin
      failures++; $display("FAIL per-bit count a=%h b=%h c=%h", a, b, c);
    end
  endtask

  initial begin
    for (int v = 0; v < (1 << 15); v++) begin
      {a3, b3, c3, ai3, bi3} = 15'(v);
      #1;
      checks++;
      if (3'(s3 + ao3 + bo3) !== 3'(a3 + b3 + c3 + ai3 + bi3) || ao3[0] || bo3[0]) begin
        failures++; $display("FAIL w3 v=%h", v);
      end
    end
    a = '1; b = '1; c = '1; cai = '1; cbi = '1; #1 check16();
    a = '0; b = '0; c = '0; cai = '0; cbi = '0; #1 check16();
    for (int t = 0; t < 3000; t++) begin
      a = 16'($urandom); b = 16'($urandom); c = 16'($urandom);
      cai = 16'($urandom); cbi = 16'($urandom);
      #1 check16();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
