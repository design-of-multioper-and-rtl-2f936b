// tb_workload_n64: the compressor trees at 64-bit operand width and with a
// large operand count.
//
// Builds the whole set of trees with N = 64 and, next to it, a 32-operand
// binary linear array, a 32-operand ternary linear array and a 32-operand
// 4:2 tree, all of 64-bit operands. Random and full-scale operands are
// applied and every carry-save result is compared with a 128-bit sum worked
// out here. A watchdog ends the run if it hangs.
module tb_workload_n64;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int N      = 64;
  localparam int BIG    = 32;
  localparam int WB     = N + $clog2(BIG);
  localparam int ROUNDS = 1000;

  int checks   = 0;
  int failures = 0;

  logic [N-1:0]  la9_ops [9], la5_ops [5], ta11_ops [11], ta5_ops [5], ct9_ops [9];
  logic [N+3:0]  la9_sf, la9_cf, ct9_sf, ct9_cf, ta11_sf, ta11_cf;
  logic [N+2:0]  la5_sf, la5_cf, ta5_sf, ta5_cf;

  logic [N-1:0]  big_ops [BIG];
  logic [WB-1:0] bl_sf, bl_cf, bt_sf, bt_cf, bc_sf, bc_cf;

  multioperand_adders_top #(.N(N)) u_top (
    .la9_ops (la9_ops),  .la9_sf (la9_sf),  .la9_cf (la9_cf),
    .la5_ops (la5_ops),  .la5_sf (la5_sf),  .la5_cf (la5_cf),
    .ta11_ops(ta11_ops), .ta11_sf(ta11_sf), .ta11_cf(ta11_cf),
    .ta5_ops (ta5_ops),  .ta5_sf (ta5_sf),  .ta5_cf (ta5_cf),
    .ct9_ops (ct9_ops),  .ct9_sf (ct9_sf),  .ct9_cf (ct9_cf)
  );

  linear_array_3to2    #(.NOP(BIG), .N(N)) u_big_la (.ops(big_ops), .sf(bl_sf), .cf(bl_cf));
  linear_array_5to3    #(.NOP(BIG), .N(N)) u_big_ta (.ops(big_ops), .sf(bt_sf), .cf(bt_cf));
  compressor_tree_4to2 #(.NOP(BIG), .N(N)) u_big_ct (.ops(big_ops), .sf(bc_sf), .cf(bc_cf));

  task automatic check(input string name, input int w, input logic [127:0] sf, cf, total);
    logic [127:0] mask, got;
    mask = (128'd1 << w) - 1;
    got  = (sf + cf) & mask;
    checks++;
    if (got !== (total & mask)) begin
      failures++; $display("FAIL %s: got %h expected %h", name, got, total);
    end
  endtask

  function automatic logic [N-1:0] pick(input int t);
    if (t == 0) return '1;
    return {$urandom, $urandom};
  endfunction

  initial begin
    for (int t = 0; t < ROUNDS; t++) begin
      logic [127:0] t9, t5, t11, tb;
      t9 = 0; t5 = 0; t11 = 0; tb = 0;
      for (int i = 0; i < 9; i++) begin
        la9_ops[i] = pick(t); ct9_ops[i] = pick(t);
        t9 += 128'(la9_ops[i]);
      end
      for (int i = 0; i < 5; i++) begin
        la5_ops[i] = pick(t); ta5_ops[i] = la5_ops[i]; t5 += 128'(la5_ops[i]);
      end
      for (int i = 0; i < 11; i++) begin
        ta11_ops[i] = pick(t); t11 += 128'(ta11_ops[i]);
      end
      for (int i = 0; i < BIG; i++) begin
        big_ops[i] = pick(t); tb += 128'(big_ops[i]);
      end
      #1;
      check("la9",  N + 4, 128'(la9_sf),  128'(la9_cf),  t9);
      check("la5",  N + 3, 128'(la5_sf),  128'(la5_cf),  t5);
      check("ta11", N + 4, 128'(ta11_sf), 128'(ta11_cf), t11);
      check("ta5",  N + 3, 128'(ta5_sf),  128'(ta5_cf),  t5);
      begin
        logic [127:0] tc;
        tc = 0;
        for (int i = 0; i < 9; i++) tc += 128'(ct9_ops[i]);
        check("ct9", N + 4, 128'(ct9_sf), 128'(ct9_cf), tc);
      end
      check("la32", WB, 128'(bl_sf), 128'(bl_cf), tb);
      check("ta32", WB, 128'(bt_sf), 128'(bt_cf), tb);
      check("ct32", WB, 128'(bc_sf), 128'(bc_cf), tb);
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
