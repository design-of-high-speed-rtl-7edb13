// tb_prefix_adder -- self-checking test of the parallel prefix adder.
//
// A 16-bit and a 7-bit instance get corner cases (all ones plus carry-in,
// alternating bits, zero) and random operands with random carry-in; sum and
// carry out are compared with the integer sum.
module tb_prefix_adder;
  logic [15:0] x16, y16, s16;
  logic [6:0]  x7, y7, s7;
  logic        cin, co16, co7;
  int checks = 0;
  int failures = 0;

  prefix_adder #(.WIDTH(16)) d16 (.x(x16), .y(y16), .cin(cin), .sum(s16), .cout(co16));
  prefix_adder #(.WIDTH(7))  d7  (.x(x7),  .y(y7),  .cin(cin), .sum(s7),  .cout(co7));

  task automatic check_now();
    logic [16:0] e16 = 17'(x16) + 17'(y16) + 17'(cin);
    logic [7:0]  e7  = 8'(x7) + 8'(y7) + 8'(cin);
    checks += 2;
    if ({co16, s16} != e16) begin
      failures++;
      $display("FAIL 16 %h+%h+%0d got=%h exp=%h", x16, y16, cin, {co16, s16}, e16);
    end
    if ({co7, s7} != e7) begin
      failures++;
      $display("FAIL 7 %h+%h+%0d got=%h exp=%h", x7, y7, cin, {co7, s7}, e7);
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
    x16 = '1; y16 = '0; x7 = '1; y7 = '0; cin = 1'b1; #1; check_now();
    x16 = 16'hAAAA; y16 = 16'h5555; x7 = 7'h2A; y7 = 7'h55; cin = 1'b1; #1; check_now();
    x16 = '0; y16 = '0; x7 = '0; y7 = '0; cin = 1'b0; #1; check_now();
    x16 = '1; y16 = '1; x7 = '1; y7 = '1; cin = 1'b1; #1; check_now();
    for (int n = 0; n < 5000; n++) begin
      x16 = 16'($urandom); y16 = 16'($urandom);
      x7  = 7'($urandom);  y7  = 7'($urandom);
      cin = 1'($urandom);
      #1;
      check_now();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
