// tb_booth_ppgen: partial product rows against integer products.
//
// Random multiplicands and random Booth digits, in both number modes. Each
// row plus its correction bit must equal digit_i * X * 4^i (mod 2^W), and
// all rows together X * sum_i digit_i * 4^i (mod 2^W). Edge values of X
// (most negative, all ones, zero) are included.
module tb_booth_ppgen;
  import mac_pkg::*;

  localparam int unsigned N  = 8;
  localparam int unsigned W  = 16;
  localparam int unsigned ND = mb_digits(N);

  logic [N-1:0] x;
  logic         tc;
  mb_bits_t     digit [ND];
  logic [W-1:0] rows [ND];
  logic [W-1:0] neg_row;

  int checks = 0;
  int failures = 0;

  booth_ppgen #(.N(N), .W(W)) dut (.x(x), .tc(tc), .digit(digit), .rows(rows), .neg_row(neg_row));

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int xv, y, d;
    logic [W-1:0] total, exp_row, got_row;
    for (int it = 0; it < 4000; it++) begin
      tc = it[0];
      case (it % 7)
        0:       x = {1'b1, {(N-1){1'b0}}};
        1:       x = '1;
        2:       x = '0;
        default: x = N'($urandom);
      endcase
      for (int k = 0; k < int'(ND); k++) digit[k] = mb_bits_t'($urandom % 8);
      #1;
      xv = tc ? int'(signed'(x)) : int'(x);
      y = 0;
      total = '0;
      for (int k = 0; k < int'(ND); k++) begin
        d = mb_value(digit[k]);
        y += d * (4 ** k);
        exp_row = W'(d * xv * (4 ** k));
        got_row = rows[k] + W'(neg_row[2*k]) * W'(4 ** k);
        total += rows[k];
        checks++;
        if (got_row != exp_row) begin
          failures++;
          if (failures < 10) $display("x=%0d digit%0d=%0d: row %h, want %h", xv, k, d, got_row, exp_row);
        end
      end
      total += neg_row;
      checks++;
      if (total != W'(xv * y)) begin
        failures++;
        if (failures < 10) $display("x=%0d y=%0d: rows sum to %h, want %h", xv, y, total, W'(xv * y));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
