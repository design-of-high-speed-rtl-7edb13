// tb_rounding_multiplier_wide -- the 16-bit and 32-bit configurations.
//
// Two clocked multipliers, WIDTH = 16 and WIDTH = 32 (one significant bit of
// b kept), get 20,000 random operand pairs each, one per clock, plus corner
// values (zero, all ones, exact-half ties, powers of two). Each product is
// checked one cycle later against a * r, where r is the power of two nearest
// to b (smaller one on a tie), found by comparing b with every 2^k.
module tb_rounding_multiplier_wide;
  logic        clk = 1'b0;
  logic        rst;
  logic [15:0] a16, b16;
  logic [31:0] p16;
  logic [31:0] a32, b32;
  logic [63:0] p32;
  int checks = 0;
  int failures = 0;
  int cycles = 0;

  rounding_multiplier8x8 #(.WIDTH(16)) dut16 (.clk(clk), .rst(rst), .a(a16), .b(b16), .p(p16));
  rounding_multiplier8x8 #(.WIDTH(32)) dut32 (.clk(clk), .rst(rst), .a(a32), .b(b32), .p(p32));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 100000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [32:0] nearest_pow2(logic [31:0] b, int width);
    logic [32:0] best = '0;
    logic [32:0] best_d = '1;
    logic [32:0] cand, d;
    if (b == '0) return '0;
    for (int k = 0; k <= width; k++) begin
      cand = 33'(1) << k;
      d = (cand > 33'(b)) ? cand - 33'(b) : 33'(b) - cand;
      if (d < best_d) begin
        best = cand;
        best_d = d;
      end
    end
    return best;
  endfunction

  task automatic apply_and_check(logic [15:0] x16, logic [15:0] y16, logic [31:0] x32, logic [31:0] y32);
    logic [31:0] e16;
    logic [63:0] e32;
    a16 = x16; b16 = y16; a32 = x32; b32 = y32;
    e16 = 32'(64'(x16) * 64'(nearest_pow2(32'(y16), 16)));
    e32 = 64'(x32) * 64'(nearest_pow2(y32, 32));
    @(posedge clk); #1;
    checks += 2;
    if (p16 != e16) begin
      failures++;
      if (failures < 20) $display("FAIL 16 a=%0d b=%0d got=%0d exp=%0d", x16, y16, p16, e16);
    end
    if (p32 != e32) begin
      failures++;
      if (failures < 20) $display("FAIL 32 a=%0d b=%0d got=%0d exp=%0d", x32, y32, p32, e32);
    end
  endtask

  initial begin
    rst = 1'b1; a16 = '0; b16 = '0; a32 = '0; b32 = '0;
    repeat (2) @(posedge clk);
    rst = 1'b0;
    apply_and_check(16'd6, 16'd3, 32'd6, 32'd3);
    apply_and_check('1, '1, '1, '1);
    apply_and_check('1, 16'h0, '1, 32'h0);
    apply_and_check(16'd1234, 16'h6000, 32'd123456, 32'h6000_0000);
    apply_and_check(16'd1234, 16'h6001, 32'd123456, 32'h6000_0001);
    apply_and_check(16'hFFFF, 16'h8000, 32'hFFFF_FFFF, 32'h8000_0000);
    for (int n = 0; n < 20000; n++) begin
      logic [31:0] y32 = $urandom;
      logic [15:0] y16 = 16'($urandom);
      // keep some small operands so every leading-one position is reached
      y32 = y32 >> ($urandom % 32);
      y16 = y16 >> ($urandom % 16);
      apply_and_check(16'($urandom), y16, $urandom, y32);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
