// tb_compressor_4to2_row: self-checking test of the W-bit 4:2 compressor.
//
// A W = 3 instance is driven through all 2^12 combinations of its four input
// words and the default W = 16 instance with corner cases and random words.
// Checks, against arithmetic done here: s + c equals x0 + x1 + x2 + x3 modulo
// 2^W and c has bit 0 clear. A watchdog ends the run if it hangs.
module tb_compressor_4to2_row;
  timeunit 1ns;
  timeprecision 1ps;

  int checks   = 0;
  int failures = 0;

  logic [15:0] x0, x1, x2, x3, s, c;
  logic [2:0]  y0, y1, y2, y3, s3, c3;

  compressor_4to2_row u_dut16 (.x0(x0), .x1(x1), .x2(x2), .x3(x3), .s(s), .c(c));
  compressor_4to2_row #(.W(3)) u_dut3 (.x0(y0), .x1(y1), .x2(y2), .x3(y3), .s(s3), .c(c3));

  task automatic check16();
    logic [17:0] total;
    total = 18'(x0) + 18'(x1) + 18'(x2) + 18'(x3);
    checks += 2;
    if (16'(s + c) !== total[15:0]) begin
      failures++; $display("FAIL sum %h %h %h %h -> s=%h c=%h", x0, x1, x2, x3, s, c);
    end
    if (c[0] !== 1'b0) begin
      failures++; $display("FAIL c[0]");
    end
  endtask

  initial begin
    for (int v = 0; v < (1 << 12); v++) begin
      {y0, y1, y2, y3} = 12'(v);
      #1;
      checks++;
      if (3'(s3 + c3) !== 3'(y0 + y1 + y2 + y3) || c3[0]) begin
        failures++; $display("FAIL w3 v=%h", v);
      end
    end
    x0 = '1; x1 = '1; x2 = '1; x3 = '1; #1 check16();
    x0 = '0; x1 = '0; x2 = '0; x3 = '0; #1 check16();
    x0 = 16'h5555; x1 = 16'hAAAA; x2 = 16'h5555; x3 = 16'hAAAA; #1 check16();
    for (int t = 0; t < 3000; t++) begin
      x0 = 16'($urandom); x1 = 16'($urandom); x2 = 16'($urandom); x3 = 16'($urandom);
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
