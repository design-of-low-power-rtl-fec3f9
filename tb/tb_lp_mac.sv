// tb_lp_mac: end-to-end test of the add-multiply-accumulate unit at its
// default size (8-bit X, A, B; 16-bit accumulator).
//
// Drives random operand sets, in both number modes, with random enable and
// clear, and compares the accumulator each cycle with a reference model kept
// here as plain integers: acc = (acc + X*(A+B)) mod 2^16. It also checks the
// timing (the accumulator changes only at the clock edge after en, never
// before it), starts with a worked example (X = A = B = 2 gives 8, and a
// second set is added to the first), and counts how often each mechanism
// occurs: signed and unsigned operation, clear, hold (en low), accumulator
// wrap-around, every Booth digit value -2..+2, a non-zero top digit of the
// sum recoding, negative products and the asynchronous reset. A mechanism
// that never occurs counts as a failure.
module tb_lp_mac;
  import mac_pkg::*;

  localparam int unsigned N     = 8;
  localparam int unsigned ACC_W = 16;
  localparam int unsigned ND    = mb_digits(N);

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic             en = 1'b0, clr = 1'b0, tc = 1'b0;
  logic [N-1:0]     x = '0, a = '0, b = '0;
  logic [ACC_W-1:0] acc;

  int checks = 0;
  int failures = 0;
  int cycles = 0;

  // Mechanism counters.
  int n_signed = 0, n_unsigned = 0, n_clear = 0, n_hold = 0, n_wrap = 0;
  int n_negprod = 0, n_topdigit = 0, n_reset = 0;
  int n_digit [5] = '{0, 0, 0, 0, 0};

  lp_mac dut (
    .clk(clk), .rst_n(rst_n), .en(en), .clr(clr), .tc(tc),
    .x(x), .a(a), .b(b), .acc(acc)
  );

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cycles++;
    if (cycles > 200000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  longint ref_acc;      // reference accumulator, kept modulo 2^ACC_W
  longint ref_unbound;  // same sum without wrap, to see overflow happen

  function automatic longint opv(logic [N-1:0] v, logic s);
    return s ? longint'(signed'(v)) : longint'(v);
  endfunction

  task automatic check_acc(string what);
    checks++;
    if (acc != ACC_W'(ref_acc)) begin
      failures++;
      if (failures < 10)
        $display("cycle %0d %s: acc=%0h, want %0h (tc=%0d x=%0h a=%0h b=%0h)",
                 cycles, what, acc, ACC_W'(ref_acc), tc, x, a, b);
    end
  endtask

  // One clock with the given controls; checks the value right before and
  // right after the edge.
  task automatic step(logic e, logic c, logic t, logic [N-1:0] xv, logic [N-1:0] av, logic [N-1:0] bv);
    longint p;
    @(negedge clk);
    en = e; clr = c; tc = t; x = xv; a = av; b = bv;
    #1;
    // Count Booth digit values and the top digit seen this cycle.
    for (int k = 0; k < int'(ND); k++) n_digit[mb_value(dut.digit[k]) + 2]++;
    if (mb_value(dut.digit[ND-1]) != 0) n_topdigit++;
    check_acc("before edge");
    p = opv(xv, t) * (opv(av, t) + opv(bv, t));
    @(posedge clk);
    #1;
    if (c) begin
      ref_acc = 0; ref_unbound = 0; n_clear++;
    end else if (e) begin
      ref_acc = (ref_acc + p) & ((longint'(1) << ACC_W) - 1);
      ref_unbound += p;
      if (t) n_signed++; else n_unsigned++;
      if (p < 0) n_negprod++;
      if (ref_unbound >= (longint'(1) << ACC_W) || ref_unbound < -(longint'(1) << (ACC_W - 1))) begin
        n_wrap++;
        ref_unbound = t ? longint'(signed'(ACC_W'(ref_unbound))) : longint'(ACC_W'(ref_unbound));
      end
    end else begin
      n_hold++;
    end
    check_acc("after edge");
  endtask

  task automatic need(string name, int count);
    checks++;
    $display("mechanism %-22s %0d", name, count);
    if (count == 0) begin
      failures++;
      $display("mechanism %s never occurred", name);
    end
  endtask

  initial begin
    ref_acc = 0;
    ref_unbound = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check_acc("after reset");

    // Worked example: X = 2, A = 2, B = 2 -> 2 * (2 + 2) = 8.
    step(1'b1, 1'b0, 1'b1, 8'd2, 8'd2, 8'd2);
    checks++;
    if (acc != 16'd8) begin
      failures++;
      $display("example: acc=%0d, want 8", acc);
    end
    // A changed input set is added to the previous result: 8 + 3*(1+4) = 23.
    step(1'b1, 1'b0, 1'b1, 8'd3, 8'd1, 8'd4);
    checks++;
    if (acc != 16'd23) begin
      failures++;
      $display("example: acc=%0d, want 23", acc);
    end

    // Extreme operands in both modes.
    step(1'b1, 1'b1, 1'b0, '0, '0, '0);
    step(1'b1, 1'b0, 1'b0, '1, '1, '1);
    step(1'b1, 1'b0, 1'b1, 8'h80, 8'h80, 8'h80);
    step(1'b1, 1'b0, 1'b1, 8'h7f, 8'h80, 8'h80);
    step(1'b1, 1'b0, 1'b1, 8'h80, 8'h7f, 8'h7f);

    // Random operation.
    for (int it = 0; it < 20000; it++) begin
      step(($urandom % 5) != 0, ($urandom % 40) == 0, ($urandom % 2) == 1,
           N'($urandom), N'($urandom), N'($urandom));
      if (it == 10000) begin
        // Asynchronous reset between clock edges.
        @(negedge clk);
        en = 1'b0;
        #2 rst_n = 1'b0;
        #1;
        ref_acc = 0; ref_unbound = 0;
        check_acc("async reset");
        n_reset++;
        #1 rst_n = 1'b1;
      end
    end

    need("signed accumulate", n_signed);
    need("unsigned accumulate", n_unsigned);
    need("clear", n_clear);
    need("hold (en low)", n_hold);
    need("accumulator wrap", n_wrap);
    need("negative product", n_negprod);
    need("digit -2", n_digit[0]);
    need("digit -1", n_digit[1]);
    need("digit 0", n_digit[2]);
    need("digit +1", n_digit[3]);
    need("digit +2", n_digit[4]);
    need("top digit non-zero", n_topdigit);
    need("asynchronous reset", n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
