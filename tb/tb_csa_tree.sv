// tb_csa_tree: Wallace tree against plain addition.
//
// Trees of 3, 4, 7 and 10 rows get random operands (and all-ones operands,
// to exercise every carry); sum + carry must equal the sum of the rows
// modulo 2^W.
module tb_csa_tree;

  localparam int unsigned W = 16;

  logic [W-1:0] r3 [3];
  logic [W-1:0] r4 [4];
  logic [W-1:0] r7 [7];
  logic [W-1:0] r10 [10];
  logic [W-1:0] s3, c3, s4, c4, s7, c7, s10, c10;

  int checks = 0;
  int failures = 0;

  csa_tree #(.W(W), .ROWS(3))  dut3  (.rows_in(r3),  .sum(s3),  .carry(c3));
  csa_tree #(.W(W), .ROWS(4))  dut4  (.rows_in(r4),  .sum(s4),  .carry(c4));
  csa_tree #(.W(W), .ROWS(7))  dut7  (.rows_in(r7),  .sum(s7),  .carry(c7));
  csa_tree #(.W(W), .ROWS(10)) dut10 (.rows_in(r10), .sum(s10), .carry(c10));

  task automatic check(string name, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s rows: sum+carry %h, want %h", name, got, exp);
    end
  endtask

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] e3, e4, e7, e10;
    for (int it = 0; it < 5000; it++) begin
      e3 = '0; e4 = '0; e7 = '0; e10 = '0;
      for (int k = 0; k < 10; k++) begin
        logic [W-1:0] v;
        v = (it % 50 == 0) ? '1 : W'($urandom);
        if (k < 3) begin r3[k] = v; e3 += v; end
        if (k < 4) begin r4[k] = v; e4 += v; end
        if (k < 7) begin r7[k] = v; e7 += v; end
        r10[k] = v; e10 += v;
      end
      #1;
      check("3", s3 + c3, e3);
      check("4", s4 + c4, e4);
      check("7", s7 + c7, e7);
      check("10", s10 + c10, e10);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
