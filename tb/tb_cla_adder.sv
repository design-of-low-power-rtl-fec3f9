// tb_cla_adder: carry-lookahead adder against plain addition.
//
// A 16-bit adder in groups of 4 and a 13-bit adder in groups of 5 (a partial
// last group) get random operands, carry chains across every group boundary
// (all ones plus one) and both carry-in values; {cout, sum} must equal
// a + b + cin.
module tb_cla_adder;

  logic [15:0] a16, b16, s16;
  logic [12:0] a13, b13, s13;
  logic        cin, co16, co13;

  int checks = 0;
  int failures = 0;

  cla_adder #(.W(16))              dut16 (.a(a16), .b(b16), .cin(cin), .sum(s16), .cout(co16));
  cla_adder #(.W(13), .GROUP(5))   dut13 (.a(a13), .b(b13), .cin(cin), .sum(s13), .cout(co13));

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [16:0] e16;
    logic [13:0] e13;
    for (int it = 0; it < 20000; it++) begin
      cin = it[0];
      case (it % 5)
        0: begin a16 = '1; b16 = 16'(it % 3); a13 = '1; b13 = 13'(it % 3); end
        1: begin a16 = 16'hAAAA; b16 = 16'h5555; a13 = 13'h0AAA; b13 = 13'h1555; end
        default: begin a16 = 16'($urandom); b16 = 16'($urandom); a13 = 13'($urandom); b13 = 13'($urandom); end
      endcase
      #1;
      e16 = 17'(a16) + 17'(b16) + 17'(cin);
      e13 = 14'(a13) + 14'(b13) + 14'(cin);
      checks++;
      if ({co16, s16} != e16) begin
        failures++;
        if (failures < 10) $display("16: %h + %h + %0d = %h, want %h", a16, b16, cin, {co16, s16}, e16);
      end
      checks++;
      if ({co13, s13} != e13) begin
        failures++;
        if (failures < 10) $display("13: %h + %h + %0d = %h, want %h", a13, b13, cin, {co13, s13}, e13);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
