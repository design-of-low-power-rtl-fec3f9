// tb_smb_recoder: exhaustive check of the sum-to-Booth recoder.
//
// Two recoders, an even width (8) and an odd width (7), get every pair of
// operands in both number modes. For each, the weighted sum of the digit
// values, sum_i 4^i * (-2n + p1 + p2), must equal A + B computed here as
// plain integers (sign-extended when tc = 1, zero-extended otherwise).
module tb_smb_recoder;
  import mac_pkg::*;

  localparam int unsigned NE = 8;
  localparam int unsigned NO = 7;
  localparam int unsigned DE = mb_digits(NE);
  localparam int unsigned DO = mb_digits(NO);

  logic [NE-1:0] ae, be;
  logic [NO-1:0] ao, bo;
  logic          tc;
  mb_bits_t      de [DE];
  mb_bits_t      dov [DO];

  int checks = 0;
  int failures = 0;

  smb_recoder #(.N(NE)) dut_even (.a(ae), .b(be), .tc(tc), .digit(de));
  smb_recoder #(.N(NO)) dut_odd  (.a(ao), .b(bo), .tc(tc), .digit(dov));

  function automatic int opval(logic [NE-1:0] v, int unsigned w, logic s);
    int r = int'(v) & ((1 << w) - 1);
    if (s && r[w-1]) r -= (1 << w);
    return r;
  endfunction

  initial begin
    #50ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int got, exp;
    for (int t = 0; t < 2; t++) begin
      tc = t[0];
      for (int i = 0; i < (1 << NE); i++) begin
        for (int j = 0; j < (1 << NE); j++) begin
          ae = i[NE-1:0];
          be = j[NE-1:0];
          ao = i[NO-1:0];
          bo = j[NO-1:0];
          #1;
          got = 0;
          for (int k = 0; k < int'(DE); k++) got += mb_value(de[k]) * (4 ** k);
          exp = opval(ae, NE, tc) + opval(be, NE, tc);
          checks++;
          if (got != exp) begin
            failures++;
            if (failures < 10) $display("even tc=%0d a=%0d b=%0d: digits give %0d, want %0d", tc, ae, be, got, exp);
          end
          if (i < (1 << NO) && j < (1 << NO)) begin
            got = 0;
            for (int k = 0; k < int'(DO); k++) got += mb_value(dov[k]) * (4 ** k);
            exp = opval(NE'(ao), NO, tc) + opval(NE'(bo), NO, tc);
            checks++;
            if (got != exp) begin
              failures++;
              if (failures < 10) $display("odd tc=%0d a=%0d b=%0d: digits give %0d, want %0d", tc, ao, bo, got, exp);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
