// tb_rounding_multiplier -- self-checking test of the combinational core.
//
// The default instance (8 bits, one significant bit kept, only active rows
// reduced) and the full-matrix instance (ACTIVE_ONLY = 0) are run over all
// 65,536 operand pairs and compared with a * round(b), round() taken from the
// brute-force model in tb_ref_pkg. A second instance with ROUND_BITS = 8 keeps
// every bit and must return the exact product; two with ROUND_BITS = 3
// (active rows only, full matrix) are checked on random pairs. Also checks the reference example 6 x 3 = 12 and
// counts how often the rounding went up, down, or left b unchanged.
module tb_rounding_multiplier;
  import tb_ref_pkg::*;

  localparam int W = 8;

  logic [W-1:0]   a, b;
  logic [2*W-1:0] p1, p8, p3, pf1, pf3;
  logic [W:0]     br1, act1, br8, act8, br3, act3, brf1, actf1, brf3, actf3;
  logic           up1, ex1, up8, ex8, up3, ex3, upf1, exf1, upf3, exf3;
  longint unsigned ref1 [1 << W];
  longint unsigned ref3 [1 << W];
  int checks = 0;
  int failures = 0;
  int n_up = 0, n_down = 0, n_exact = 0;

  rounding_multiplier #(.WIDTH(W), .ROUND_BITS(1)) dut1 (
    .a(a), .b(b), .p(p1), .b_round(br1), .row_active(act1), .rounded_up(up1), .exact(ex1));
  rounding_multiplier #(.WIDTH(W), .ROUND_BITS(W)) dut8 (
    .a(a), .b(b), .p(p8), .b_round(br8), .row_active(act8), .rounded_up(up8), .exact(ex8));
  rounding_multiplier #(.WIDTH(W), .ROUND_BITS(3)) dut3 (
    .a(a), .b(b), .p(p3), .b_round(br3), .row_active(act3), .rounded_up(up3), .exact(ex3));
  // full partial product matrix, inactive rows reduced as zeros
  rounding_multiplier #(.WIDTH(W), .ROUND_BITS(1), .ACTIVE_ONLY(1'b0)) dutf1 (
    .a(a), .b(b), .p(pf1), .b_round(brf1), .row_active(actf1), .rounded_up(upf1), .exact(exf1));
  rounding_multiplier #(.WIDTH(W), .ROUND_BITS(3), .ACTIVE_ONLY(1'b0)) dutf3 (
    .a(a), .b(b), .p(pf3), .b_round(brf3), .row_active(actf3), .rounded_up(upf3), .exact(exf3));

  task automatic check(string what, longint unsigned got, longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s a=%0d b=%0d got=%0d exp=%0d", what, a, b, got, exp);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << W); v++) begin
      ref1[v] = round_ref(64'(v), W, 1);
      ref3[v] = round_ref(64'(v), W, 3);
    end
    a = 8'd6; b = 8'd3; #1;
    check("example 6x3", 64'(p1), 64'd12);
    for (int va = 0; va < (1 << W); va++) begin
      for (int vb = 0; vb < (1 << W); vb++) begin
        a = W'(va); b = W'(vb);
        #1;
        check("k1", 64'(p1), 64'(va) * ref1[vb]);
        check("k1 full matrix", 64'(pf1), 64'(va) * ref1[vb]);
        if (up1) n_up++;
        else if (ex1) n_exact++;
        else n_down++;
        // at most one live partial product row when one bit is kept
        checks++;
        if (!$onehot0(act1)) begin
          failures++;
          $display("FAIL more than one active row b=%0d", b);
        end
        if (vb[2:0] == 3'd5) check("exact", 64'(p8), 64'(va) * 64'(vb));
      end
    end
    for (int n = 0; n < 5000; n++) begin
      a = W'($urandom); b = W'($urandom);
      #1;
      check("k3", 64'(p3), 64'(a) * ref3[b]);
      check("k3 full matrix", 64'(pf3), 64'(a) * ref3[b]);
      check("exact rnd", 64'(p8), 64'(a) * 64'(b));
    end
    $display("rounded up %0d, rounded down %0d, unchanged %0d", n_up, n_down, n_exact);
    checks++;
    if (n_up == 0 || n_down == 0 || n_exact == 0) begin
      failures++;
      $display("FAIL a rounding case never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
