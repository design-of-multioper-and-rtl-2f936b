// tb_linear_array_3to2: self-checking test of the binary linear-array
// compressor tree.
//
// Several operand counts are built side by side, among them the 9:2 and 5:2
// arrays of the reference drawings and the default instance. For each it
// drives corner cases (all zero, all ones, one-hot) and random operands and
// checks that sf + cf modulo 2^W equals the sum computed here, and that cf
// bit 0 is 0. For Nop = 9 and Nop = 5 it also rebuilds the documented wiring
// with a CSA function (9:2: (I2,I1,I0), (I4,I3), (I6,I5), (I8,I7), (S0,S1),
// (S2,S3), (S4,S5); 5:2: (I2,I1,I0), (I4,I3), (S0,S1)) and requires sf and cf
// to match it bit for bit. A watchdog ends the run if it hangs.
module tb_linear_array_3to2;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int N       = 16;
  localparam int NUM_CFG = 7;
  localparam int NOPS [NUM_CFG] = '{3, 4, 5, 6, 9, 10, 17};
  localparam int ROUNDS  = 3000;

  int checks   = 0;
  int failures = 0;
  bit done [NUM_CFG];

  // One W-bit CSA: returns {co, s}, co already shifted.
  function automatic logic [63:0] csa_model(input logic [31:0] a, b, c, input int w);
    logic [31:0] s, co, mask;
    mask = (w >= 32) ? '1 : ((32'd1 << w) - 1);
    s  = (a ^ b ^ c) & mask;
    co = (((a & b) | (a & c) | (b & c)) << 1) & mask;
    return {co, s};
  endfunction

  function automatic logic [N-1:0] stimulus(input int t, input int i, input int nop);
    case (t)
      0: return '0;
      1: return '1;
      2: return (i == 0) ? '1 : '0;
      3: return (i == nop - 1) ? '1 : '0;
      4: return N'(1) << (i % N);
      default: return N'($urandom);
    endcase
  endfunction

  for (genvar g = 0; g < NUM_CFG; g++) begin : g_cfg
    localparam int NOP = NOPS[g];
    localparam int W   = N + $clog2(NOP);

    logic [N-1:0] ops [NOP];
    logic [W-1:0] sf, cf;

    if (NOP == 9) begin : g_default
      linear_array_3to2 u_dut (.ops(ops), .sf(sf), .cf(cf));
    end else begin : g_sized
      linear_array_3to2 #(.NOP(NOP), .N(N)) u_dut (.ops(ops), .sf(sf), .cf(cf));
    end

    initial begin
      for (int t = 0; t < ROUNDS; t++) begin
        logic [31:0] total;
        logic [31:0] s [8];
        logic [31:0] c;
        logic [63:0] r;
        total = 0;
        for (int i = 0; i < NOP; i++) begin
          ops[i] = stimulus(t, i, NOP);
          total += 32'(ops[i]);
        end
        #1;
        checks += 2;
        if (W'(sf + cf) !== W'(total)) begin
          failures++;
          $display("FAIL nop=%0d t=%0d sum: sf+cf=%h expected %h", NOP, t, W'(sf + cf), W'(total));
        end
        if (cf[0] !== 1'b0) begin
          failures++; $display("FAIL nop=%0d cf[0] set", NOP);
        end
        if (NOP == 9) begin
          r = csa_model(ops[2], ops[1], ops[0], W); s[0] = r[31:0]; c = r[63:32];
          r = csa_model(ops[4], ops[3], c, W);      s[1] = r[31:0]; c = r[63:32];
          r = csa_model(ops[6], ops[5], c, W);      s[2] = r[31:0]; c = r[63:32];
          r = csa_model(ops[8], ops[7], c, W);      s[3] = r[31:0]; c = r[63:32];
          r = csa_model(s[0], s[1], c, W);          s[4] = r[31:0]; c = r[63:32];
          r = csa_model(s[2], s[3], c, W);          s[5] = r[31:0]; c = r[63:32];
          r = csa_model(s[4], s[5], c, W);          s[6] = r[31:0]; c = r[63:32];
          checks++;
          if (sf !== W'(s[6]) || cf !== W'(c)) begin
            failures++; $display("FAIL 9:2 wiring t=%0d sf=%h/%h cf=%h/%h", t, sf, s[6], cf, c);
          end
        end
        if (NOP == 5) begin
          r = csa_model(ops[2], ops[1], ops[0], W); s[0] = r[31:0]; c = r[63:32];
          r = csa_model(ops[4], ops[3], c, W);      s[1] = r[31:0]; c = r[63:32];
          r = csa_model(s[0], s[1], c, W);          s[2] = r[31:0]; c = r[63:32];
          checks++;
          if (sf !== W'(s[2]) || cf !== W'(c)) begin
            failures++; $display("FAIL 5:2 wiring t=%0d", t);
          end
        end
      end
      done[g] = 1'b1;
    end
  end

  initial begin
    wait (done.and() == 1'b1);
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
