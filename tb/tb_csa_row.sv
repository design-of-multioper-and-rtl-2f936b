// tb_csa_row: self-checking test of the W-bit 3:2 carry-save adder.
//
// Drives corner cases and random words into two instances (W = 16, the
// default, and W = 5) and checks, against bit-level arithmetic worked out
// here: the sum word is the bitwise three-way XOR, the carry word is the
// bitwise majority shifted one place left, and s + co equals a + b + ci
// modulo 2^W. A watchdog ends the run if it hangs.
module tb_csa_row;
  timeunit 1ns;
  timeprecision 1ps;

  int checks   = 0;
  int failures = 0;

  logic [15:0] a16, b16, c16, s16, co16;
  logic [4:0]  a5, b5, c5, s5, co5;

  csa_row u_dut16 (.a(a16), .b(b16), .ci(c16), .s(s16), .co(co16));
  csa_row #(.W(5)) u_dut5 (.a(a5), .b(b5), .ci(c5), .s(s5), .co(co5));

  task automatic check16();
    logic [15:0] maj;
    logic [17:0] total;
    maj   = (a16 & b16) | (a16 & c16) | (b16 & c16);
    total = 18'(a16) + 18'(b16) + 18'(c16);
    checks += 3;
    if (s16 !== (a16 ^ b16 ^ c16)) begin
      failures++; $display("FAIL s16 a=%h b=%h c=%h s=%h", a16, b16, c16, s16);
    end
    if (co16 !== {maj[14:0], 1'b0}) begin
      failures++; $display("FAIL co16 a=%h b=%h c=%h co=%h", a16, b16, c16, co16);
    end
    if (16'(s16 + co16) !== total[15:0]) begin
      failures++; $display("FAIL sum16 a=%h b=%h c=%h", a16, b16, c16);
    end
  endtask

  initial begin
    // Corner cases: zeros, all ones, alternating patterns.
    logic [15:0] corners [4];
    corners = '{16'h0000, 16'hFFFF, 16'hAAAA, 16'h5555};
    foreach (corners[i]) foreach (corners[j]) foreach (corners[k]) begin
      a16 = corners[i]; b16 = corners[j]; c16 = corners[k];
      #1 check16();
    end
    for (int t = 0; t < 2000; t++) begin
      a16 = 16'($urandom); b16 = 16'($urandom); c16 = 16'($urandom);
      #1 check16();
    end
    // Exhaustive over all 5-bit triples would be 32768 cases; do all of them.
    for (int i = 0; i < 32; i++) for (int j = 0; j < 32; j++) for (int k = 0; k < 32; k++) begin
      a5 = 5'(i); b5 = 5'(j); c5 = 5'(k);
      #1;
      checks++;
      if (5'(s5 + co5) !== 5'(i + j + k) || co5[0] !== 1'b0) begin
        failures++; $display("FAIL w5 %0d %0d %0d", i, j, k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
