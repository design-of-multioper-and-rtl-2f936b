// tb_multioperand_adders_top: end-to-end test of all five compressor trees at
// their default sizes (16-bit operands).
//
// Each round feeds one operand set to the 9-operand units (la9, ct9), one to
// the 5-operand units (la5, ta5) and one to the 11-operand unit (ta11). It
// checks every carry-save result against the sum computed here and checks
// that the two designs sharing operands give the same total. It also counts
// how often each mechanism of the trees showed up and fails if one never did:
//   * carry word reaches the output (cf != 0) - the chained carries are live;
//   * the total exceeds N bits - the extra high-order bits of the outputs
//     carry part of the result;
//   * the full-scale case (all operands all ones) - the largest possible sum.
// A watchdog ends the run if it hangs.
module tb_multioperand_adders_top;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int N      = 16;
  localparam int ROUNDS = 5000;
  localparam int NUNIT  = 5;
  localparam string UNIT_NAME [NUNIT] = '{"la9", "la5", "ta11", "ta5", "ct9"};

  int checks   = 0;
  int failures = 0;
  int carry_live [NUNIT];
  int grown      [NUNIT];
  int full_scale [NUNIT];

  logic [N-1:0]  la9_ops [9], la5_ops [5], ta11_ops [11], ta5_ops [5], ct9_ops [9];
  logic [N+3:0]  la9_sf, la9_cf, ct9_sf, ct9_cf, ta11_sf, ta11_cf;
  logic [N+2:0]  la5_sf, la5_cf, ta5_sf, ta5_cf;

  multioperand_adders_top u_top (
    .la9_ops (la9_ops),  .la9_sf (la9_sf),  .la9_cf (la9_cf),
    .la5_ops (la5_ops),  .la5_sf (la5_sf),  .la5_cf (la5_cf),
    .ta11_ops(ta11_ops), .ta11_sf(ta11_sf), .ta11_cf(ta11_cf),
    .ta5_ops (ta5_ops),  .ta5_sf (ta5_sf),  .ta5_cf (ta5_cf),
    .ct9_ops (ct9_ops),  .ct9_sf (ct9_sf),  .ct9_cf (ct9_cf)
  );

  // Compare one carry-save result with the expected total and log mechanisms.
  task automatic check_unit(input int u, input int w, input logic [31:0] sf, cf,
                            input logic [31:0] total, input bit is_full);
    logic [32:0] raw;
    logic [31:0] mask;
    mask = (32'd1 << w) - 1;
    raw  = 33'(sf) + 33'(cf);
    checks++;
    if ((raw[31:0] & mask) !== (total & mask)) begin
      failures++;
      $display("FAIL %s: sf+cf=%h expected %h", UNIT_NAME[u], raw[31:0] & mask, total);
    end
    if (cf != 0) carry_live[u]++;
    if ((total >> N) != 0) grown[u]++;
    if (is_full) full_scale[u]++;
  endtask

  function automatic logic [N-1:0] pick(input int t);
    if (t == 0) return '1;                          // full scale
    if (t == 1) return '0;
    if (t % 3 == 0) return N'($urandom) | 16'hF000;  // large values
    return N'($urandom);
  endfunction

  initial begin
    for (int t = 0; t < ROUNDS; t++) begin
      logic [31:0] t9, t5, t11;
      t9 = 0; t5 = 0; t11 = 0;
      for (int i = 0; i < 9; i++) begin
        la9_ops[i] = pick(t); ct9_ops[i] = la9_ops[i]; t9 += 32'(la9_ops[i]);
      end
      for (int i = 0; i < 5; i++) begin
        la5_ops[i] = pick(t); ta5_ops[i] = la5_ops[i]; t5 += 32'(la5_ops[i]);
      end
      for (int i = 0; i < 11; i++) begin
        ta11_ops[i] = pick(t); t11 += 32'(ta11_ops[i]);
      end
      #1;
      check_unit(0, N + 4, 32'(la9_sf),  32'(la9_cf),  t9,  t == 0);
      check_unit(1, N + 3, 32'(la5_sf),  32'(la5_cf),  t5,  t == 0);
      check_unit(2, N + 4, 32'(ta11_sf), 32'(ta11_cf), t11, t == 0);
      check_unit(3, N + 3, 32'(ta5_sf),  32'(ta5_cf),  t5,  t == 0);
      check_unit(4, N + 4, 32'(ct9_sf),  32'(ct9_cf),  t9,  t == 0);
      checks += 2;
      if ((N+4)'(la9_sf + la9_cf) !== (N+4)'(ct9_sf + ct9_cf)) begin
        failures++; $display("FAIL la9 and ct9 disagree");
      end
      if ((N+3)'(la5_sf + la5_cf) !== (N+3)'(ta5_sf + ta5_cf)) begin
        failures++; $display("FAIL la5 and ta5 disagree");
      end
    end
    for (int u = 0; u < NUNIT; u++) begin
      $display("%-5s carry word live %0d, beyond N bits %0d, full scale %0d",
               UNIT_NAME[u], carry_live[u], grown[u], full_scale[u]);
      checks += 3;
      if (carry_live[u] == 0) begin failures++; $display("FAIL %s: carry never live", UNIT_NAME[u]); end
      if (grown[u] == 0)      begin failures++; $display("FAIL %s: never beyond N bits", UNIT_NAME[u]); end
      if (full_scale[u] == 0) begin failures++; $display("FAIL %s: no full-scale case", UNIT_NAME[u]); end
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
