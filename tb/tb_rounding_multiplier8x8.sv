// tb_rounding_multiplier8x8 -- end-to-end test of the clocked 8x8 top at its
// default parameters.
//
// Resets the multiplier and checks that p is cleared, then reproduces the
// reference run (a = 6, b = 3 held for several cycles, p = 12). After that it
// streams all 65,536 operand pairs, one per clock, and checks each product
// exactly one cycle after its operands were applied, against a * round(b)
// from the brute-force model in tb_ref_pkg. A reset in mid-stream is checked
// too. It counts every mechanism of the design: rounding up, rounding down
// (including the exact-half tie), operand already a power of two, rounding up
// into bit 8 (b_round = 256), zero operand, and reset; each must occur.
module tb_rounding_multiplier8x8;
  import tb_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst;
  logic [7:0]  a, b;
  logic [15:0] p;
  longint unsigned rnd [256];
  longint unsigned expected;
  logic        have_expected;
  int checks = 0;
  int failures = 0;
  int cycles = 0;
  int n_up = 0, n_down = 0, n_tie = 0, n_exact = 0, n_to_msb = 0, n_zero = 0, n_reset = 0;

  rounding_multiplier8x8 dut (.clk(clk), .rst(rst), .a(a), .b(b), .p(p));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 200000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint unsigned got, longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got=%0d exp=%0d (cycle %0d)", what, got, exp, cycles);
    end
  endtask

  // Which rounding case the current operand b falls into (from the model).
  task automatic count_mechanisms();
    if (b == 8'd0) n_zero++;
    if (rnd[b] > 64'(b)) n_up++;
    else if (rnd[b] == 64'(b)) n_exact++;
    else n_down++;
    if (rnd[b] == 64'd256) n_to_msb++;
    // tie: the dropped part is exactly half the kept power of two
    if (rnd[b] < 64'(b) && (2 * (64'(b) - rnd[b]) == rnd[b])) n_tie++;
  endtask

  initial begin
    for (int v = 0; v < 256; v++) rnd[v] = round_ref(64'(v), 8, 1);
    rst = 1'b1; a = 8'd6; b = 8'd3;
    repeat (2) @(posedge clk);
    #1;
    n_reset++;
    check("p cleared by reset", 64'(p), 64'd0);
    rst = 1'b0;
    @(posedge clk); #1;
    check("first product after reset (latency 1)", 64'(p), 64'd12);
    repeat (5) begin
      @(posedge clk); #1;
      check("6 x 3 held", 64'(p), 64'd12);
    end

    // stream all pairs, one per clock
    have_expected = 1'b0;
    for (int va = 0; va < 256; va++) begin
      for (int vb = 0; vb < 256; vb++) begin
        a = 8'(va); b = 8'(vb);
        #1;
        count_mechanisms();
        @(posedge clk); #1;
        check("stream", 64'(p), 64'(va) * rnd[vb]);
        // mid-stream reset
        if (va == 100 && vb == 37) begin
          rst = 1'b1;
          @(posedge clk); #1;
          n_reset++;
          check("p cleared mid-stream", 64'(p), 64'd0);
          rst = 1'b0;
        end
      end
    end

    $display("up %0d down %0d (ties %0d) unchanged %0d to-bit-8 %0d zero %0d reset %0d",
             n_up, n_down, n_tie, n_exact, n_to_msb, n_zero, n_reset);
    checks++;
    if (n_up == 0 || n_down == 0 || n_tie == 0 || n_exact == 0 || n_to_msb == 0 ||
        n_zero == 0 || n_reset < 2) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
