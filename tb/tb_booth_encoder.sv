// tb_booth_encoder: all eight digit patterns against the Booth table.
//
// For each {y2k+1, y2k, y2k-1} the expected operation (0, +1, +2, -1, -2)
// is listed here by hand and compared with the selected multiple
// (one ? 1 : two ? 2 : 0), its sign, and the one-hot rule on one/two.
module tb_booth_encoder;
  import mac_pkg::*;

  mb_bits_t bits;
  mb_ctrl_t ctrl;
  int checks = 0;
  int failures = 0;

  booth_encoder dut (.bits(bits), .ctrl(ctrl));

  // Expected operation per pattern, index {n, p1, p2}.
  int table_op [8] = '{0, 1, 1, 2, -2, -1, -1, 0};

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int got;
    for (int i = 0; i < 8; i++) begin
      bits = mb_bits_t'(i[2:0]);
      #1;
      got = ctrl.two ? 2 : (ctrl.one ? 1 : 0);
      if (ctrl.neg) got = -got;
      checks++;
      if (got != table_op[i] || (ctrl.one && ctrl.two) || (ctrl.neg && got == 0)) begin
        failures++;
        $display("pattern %03b: neg=%0b one=%0b two=%0b, want %0d", i[2:0], ctrl.neg, ctrl.one, ctrl.two, table_op[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
