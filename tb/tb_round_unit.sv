// tb_round_unit -- exhaustive self-checking test of the rounding block.
//
// Applies every 8-bit operand to three instances (ROUND_BITS = 1, 2, 3) and
// compares b_round, rounded_up, exact and the normalised form (mant, shift)
// with the brute-force nearest value
// from tb_ref_pkg. Also checks the listed corner values by hand (6 -> 4,
// 3 -> 2, 255 -> 256, 0 -> 0, 96 -> 64 for one significant bit).
module tb_round_unit;
  import tb_ref_pkg::*;

  localparam int W = 8;

  logic [W-1:0] b;
  logic [W:0]   r1, r2, r3;
  logic         up1, up2, up3, ex1, ex2, ex3;
  logic [0:0]   m1;
  logic [1:0]   m2;
  logic [2:0]   m3;
  logic [3:0]   s1, s2, s3;
  int checks = 0;
  int failures = 0;

  round_unit #(.WIDTH(W), .ROUND_BITS(1)) dut1 (.b(b), .b_round(r1), .rounded_up(up1), .exact(ex1),
    .mant(m1), .shift(s1));
  round_unit #(.WIDTH(W), .ROUND_BITS(2)) dut2 (.b(b), .b_round(r2), .rounded_up(up2), .exact(ex2),
    .mant(m2), .shift(s2));
  round_unit #(.WIDTH(W), .ROUND_BITS(3)) dut3 (.b(b), .b_round(r3), .rounded_up(up3), .exact(ex3),
    .mant(m3), .shift(s3));

  task automatic check(string what, longint unsigned got, longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s b=%0d got=%0d exp=%0d", what, b, got, exp);
    end
  endtask

  task automatic check_all();
    longint unsigned e1 = round_ref(64'(b), W, 1);
    longint unsigned e2 = round_ref(64'(b), W, 2);
    longint unsigned e3 = round_ref(64'(b), W, 3);
    check("k1 value", 64'(r1), e1);
    check("k2 value", 64'(r2), e2);
    check("k3 value", 64'(r3), e3);
    check("k1 up", 64'(up1), 64'(e1 > 64'(b)));
    check("k2 up", 64'(up2), 64'(e2 > 64'(b)));
    check("k3 up", 64'(up3), 64'(e3 > 64'(b)));
    check("k1 exact", 64'(ex1), 64'(e1 == 64'(b)));
    check("k2 exact", 64'(ex2), 64'(e2 == 64'(b)));
    check("k3 exact", 64'(ex3), 64'(e3 == 64'(b)));
    // normalised form: value, and mant's top bit set whenever shift > 0
    check("k1 mant<<shift", 64'(m1) << s1, e1);
    check("k2 mant<<shift", 64'(m2) << s2, e2);
    check("k3 mant<<shift", 64'(m3) << s3, e3);
    check("k1 normalised", 64'(s1 == 0 || m1[0]), 64'd1);
    check("k2 normalised", 64'(s2 == 0 || m2[1]), 64'd1);
    check("k3 normalised", 64'(s3 == 0 || m3[2]), 64'd1);
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << W); v++) begin
      b = W'(v);
      #1;
      check_all();
    end
    b = 8'd6;   #1; check("6->4",     64'(r1), 64'd4);
    b = 8'd3;   #1; check("3->2",     64'(r1), 64'd2);
    b = 8'd255; #1; check("255->256", 64'(r1), 64'd256);
                    check("255 shift", 64'(s1), 64'd8);
    b = 8'd0;   #1; check("0->0",     64'(r1), 64'd0);
    b = 8'd96;  #1; check("96->64",   64'(r1), 64'd64);
    b = 8'd97;  #1; check("97->128",  64'(r1), 64'd128);
    b = 8'd7;   #1; check("k2 7->6",  64'(r2), 64'd6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
