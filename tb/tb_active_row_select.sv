// tb_active_row_select -- self-checking test of the active-row generator.
//
// For one- and three-row instances, drives random multiplicands with every
// mantissa and every shift that keeps the product in range, and checks each
// row against a * mant[k] * 2^(shift+k) and the row sum against
// a * mant * 2^shift.
module tb_active_row_select;
  localparam int W = 8;

  logic [W-1:0]   a;
  logic [0:0]     m1;
  logic [2:0]     m3;
  logic [3:0]     sh;
  logic [2*W-1:0] r1 [1];
  logic [2*W-1:0] r3 [3];
  int checks = 0;
  int failures = 0;

  active_row_select #(.WIDTH(W), .ROUND_BITS(1)) d1 (.a(a), .mant(m1), .shift(sh), .rows(r1));
  active_row_select #(.WIDTH(W), .ROUND_BITS(3)) d3 (.a(a), .mant(m3), .shift(sh), .rows(r3));

  task automatic check(string what, longint unsigned got, longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s a=%0d m1=%0d m3=%0d sh=%0d got=%0d exp=%0d",
                                  what, a, m1, m3, sh, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned total;
    for (int n = 0; n < 200; n++) begin
      a = (n == 0) ? 8'hFF : W'($urandom);
      for (int m = 0; m < 8; m++) begin
        for (int s = 0; s <= W; s++) begin
          m1 = 1'(m); m3 = 3'(m); sh = 4'(s);
          #1;
          check("k1 row", 64'(r1[0]), 64'(a) * 64'(m1) << s);
          // three kept bits: only shifts that keep mant << shift <= 2^W
          if ((m << s) <= (1 << W)) begin
            total = 0;
            for (int k = 0; k < 3; k++) begin
              check("k3 row", 64'(r3[k]), (64'(a) * 64'(m3[k])) << (s + k));
              total += 64'(r3[k]);
            end
            check("k3 sum", total, (64'(a) * 64'(m)) << s);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
