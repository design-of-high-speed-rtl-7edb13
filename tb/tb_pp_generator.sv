// tb_pp_generator -- self-checking test of the partial product AND array.
//
// Drives random and corner (a, b_round) pairs and checks every row bit
// against a[j] & b_round[i] at column i+j, row_active against b_round, and
// that the rows add up to a * b_round.
module tb_pp_generator;
  localparam int W = 8;

  logic [W-1:0]   a;
  logic [W:0]     br;
  logic [2*W-1:0] rows [W+1];
  logic [W:0]     act;
  int checks = 0;
  int failures = 0;

  pp_generator #(.WIDTH(W)) dut (.a(a), .b_round(br), .rows(rows), .row_active(act));

  task automatic check_now();
    longint unsigned total = 0;
    logic [2*W-1:0] exp_row;
    for (int i = 0; i <= W; i++) begin
      exp_row = '0;
      for (int j = 0; j < W; j++) exp_row[i+j] = a[j] & br[i];
      checks++;
      if (rows[i] !== exp_row) begin
        failures++;
        $display("FAIL row %0d a=%0d br=%0d got=%h exp=%h", i, a, br, rows[i], exp_row);
      end
      total += 64'(rows[i]);
    end
    checks++;
    if (total != 64'(a) * 64'(br)) begin
      failures++;
      $display("FAIL sum a=%0d br=%0d got=%0d", a, br, total);
    end
    checks++;
    if (act !== br) begin
      failures++;
      $display("FAIL row_active");
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
    a = 8'hFF; br = 9'h100; #1; check_now();
    a = 8'h00; br = 9'h1FF; #1; check_now();
    a = 8'h06; br = 9'h002; #1; check_now();
    for (int n = 0; n < 2000; n++) begin
      a  = W'($urandom);
      br = (W+1)'($urandom);
      #1;
      check_now();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
