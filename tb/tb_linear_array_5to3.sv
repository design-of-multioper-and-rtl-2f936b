// tb_linear_array_5to3: self-checking test of the ternary linear-array
// compressor tree.
//
// Operand counts 3 to 13 are built side by side, among them the 11:2 array of
// the reference drawing as the default instance. For each it drives corner
// cases and random operands and checks that sf + cf modulo 2^W equals the sum
// computed here and that cf bit 0 is 0. For Nop = 11 it also rebuilds the
// documented wiring with a 5:3 stage function ((I4,I3,I2 | I1,I0),
// (I5,I6,I7), (I8,I9,I10), (S0,S1,S2), then (0,0,S3) with the carries) and
// requires sf and cf to match it bit for bit. A watchdog ends the run.
module tb_linear_array_5to3;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int N       = 16;
  localparam int NUM_CFG = 8;
  localparam int NOPS [NUM_CFG] = '{3, 5, 6, 7, 8, 9, 11, 13};
  localparam int ROUNDS  = 3000;

  int checks   = 0;
  int failures = 0;
  bit done [NUM_CFG];

  // One W-bit 5:3 stage: returns {cb, ca, s}, carries already shifted. The
  // cell adds a, b, c first (carry -> ca), then adds that sum to cai, cbi
  // (carry -> cb).
  function automatic logic [95:0] stage_model(input logic [31:0] a, b, c, cai, cbi,
                                              input int w);
    logic [31:0] x, y, s, z, mask;
    mask = (w >= 32) ? '1 : ((32'd1 << w) - 1);
    x = a ^ b ^ c;
    y = (a & b) | (a & c) | (b & c);
    s = x ^ cai ^ cbi;
    z = (x & cai) | (x & cbi) | (cai & cbi);
    return {(z << 1) & mask, (y << 1) & mask, s & mask};
  endfunction

  function automatic logic [N-1:0] stimulus(input int t, input int i);
    case (t)
      0: return '0;
      1: return '1;
      2: return (i == 0) ? '1 : '0;
      3: return N'(1) << (i % N);
      default: return N'($urandom);
    endcase
  endfunction

  for (genvar g = 0; g < NUM_CFG; g++) begin : g_cfg
    localparam int NOP = NOPS[g];
    localparam int W   = N + $clog2(NOP);

    logic [N-1:0] ops [NOP];
    logic [W-1:0] sf, cf;

    if (NOP == 11) begin : g_default
      linear_array_5to3 u_dut (.ops(ops), .sf(sf), .cf(cf));
    end else begin : g_sized
      linear_array_5to3 #(.NOP(NOP), .N(N)) u_dut (.ops(ops), .sf(sf), .cf(cf));
    end

    initial begin
      for (int t = 0; t < ROUNDS; t++) begin
        logic [31:0] total;
        logic [31:0] s [4];
        logic [31:0] ca, cb;
        logic [95:0] r;
        total = 0;
        for (int i = 0; i < NOP; i++) begin
          ops[i] = stimulus(t, i);
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
        if (NOP == 11) begin
          r = stage_model(ops[4], ops[3], ops[2], ops[0], ops[1], W);
          s[0] = r[31:0]; ca = r[63:32]; cb = r[95:64];
          r = stage_model(ops[5], ops[6], ops[7], ca, cb, W);
          s[1] = r[31:0]; ca = r[63:32]; cb = r[95:64];
          r = stage_model(ops[8], ops[9], ops[10], ca, cb, W);
          s[2] = r[31:0]; ca = r[63:32]; cb = r[95:64];
          r = stage_model(s[0], s[1], s[2], ca, cb, W);
          s[3] = r[31:0]; ca = r[63:32]; cb = r[95:64];
          r = stage_model(0, 0, s[3], ca, cb, W);
          checks++;
          if (sf !== W'(r[31:0]) || cf !== W'(r[95:64]) || r[63:32] != 0) begin
            failures++; $display("FAIL 11:2 wiring t=%0d", t);
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
