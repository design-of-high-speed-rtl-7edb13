// tb_wallace_tree -- self-checking test of the row reduction tree.
//
// Instances with 1, 2, 3, 5, 9 and 17 rows of 16 bits get random rows; the
// two output rows must add up (mod 2^16) to the plain sum of the input rows.
module tb_wallace_tree;
  localparam int C = 16;

  logic [C-1:0] r1 [1];
  logic [C-1:0] r2 [2];
  logic [C-1:0] r3 [3];
  logic [C-1:0] r5 [5];
  logic [C-1:0] r9 [9];
  logic [C-1:0] r17 [17];
  logic [C-1:0] s [6];
  logic [C-1:0] c [6];
  int checks = 0;
  int failures = 0;

  wallace_tree #(.ROWS(1),  .COLS(C)) d1  (.rows(r1),  .sum_row(s[0]), .carry_row(c[0]));
  wallace_tree #(.ROWS(2),  .COLS(C)) d2  (.rows(r2),  .sum_row(s[1]), .carry_row(c[1]));
  wallace_tree #(.ROWS(3),  .COLS(C)) d3  (.rows(r3),  .sum_row(s[2]), .carry_row(c[2]));
  wallace_tree #(.ROWS(5),  .COLS(C)) d5  (.rows(r5),  .sum_row(s[3]), .carry_row(c[3]));
  wallace_tree #(.ROWS(9),  .COLS(C)) d9  (.rows(r9),  .sum_row(s[4]), .carry_row(c[4]));
  wallace_tree #(.ROWS(17), .COLS(C)) d17 (.rows(r17), .sum_row(s[5]), .carry_row(c[5]));

  task automatic check(int idx, int unsigned exp);
    logic [C-1:0] got = s[idx] + c[idx];
    checks++;
    if (got != C'(exp)) begin
      failures++;
      $display("FAIL tree %0d got=%h exp=%h", idx, got, C'(exp));
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
    int unsigned t1, t2, t3, t5, t9, t17;
    for (int n = 0; n < 3000; n++) begin
      t1 = 0; t2 = 0; t3 = 0; t5 = 0; t9 = 0; t17 = 0;
      foreach (r1[i])  begin r1[i]  = (n == 0) ? '1 : C'($urandom); t1  += r1[i];  end
      foreach (r2[i])  begin r2[i]  = (n == 0) ? '1 : C'($urandom); t2  += r2[i];  end
      foreach (r3[i])  begin r3[i]  = (n == 0) ? '1 : C'($urandom); t3  += r3[i];  end
      foreach (r5[i])  begin r5[i]  = (n == 0) ? '1 : C'($urandom); t5  += r5[i];  end
      foreach (r9[i])  begin r9[i]  = (n == 0) ? '1 : C'($urandom); t9  += r9[i];  end
      foreach (r17[i]) begin r17[i] = (n == 0) ? '1 : C'($urandom); t17 += r17[i]; end
      #1;
      check(0, t1); check(1, t2); check(2, t3); check(3, t5); check(4, t9); check(5, t17);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
