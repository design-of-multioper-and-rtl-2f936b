// tb_compressor_tree_4to2: self-checking test of the 4:2 compressor tree.
//
// Operand counts 2 to 17 are built side by side, including the default 9:2
// instance. For each it drives corner cases and random operands and checks
// that sf + cf modulo 2^W equals the sum computed here and that cf bit 0 is
// 0. A watchdog ends the run if it hangs.
module tb_compressor_tree_4to2;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int N       = 16;
  localparam int NUM_CFG = 8;
  localparam int NOPS [NUM_CFG] = '{2, 3, 4, 5, 8, 9, 12, 17};
  localparam int ROUNDS  = 3000;

  int checks   = 0;
  int failures = 0;
  bit done [NUM_CFG];

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

    if (NOP == 9) begin : g_default
      compressor_tree_4to2 u_dut (.ops(ops), .sf(sf), .cf(cf));
    end else begin : g_sized
      compressor_tree_4to2 #(.NOP(NOP), .N(N)) u_dut (.ops(ops), .sf(sf), .cf(cf));
    end

    initial begin
      for (int t = 0; t < ROUNDS; t++) begin
        logic [31:0] total;
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
