// tb_mac_accumulator: load, hold, clear and reset of the accumulator.
//
// Random en/clr/d sequences are compared cycle by cycle with a reference
// register kept here; an asynchronous reset is applied mid-run between clock
// edges and must clear the output at once.
module tb_mac_accumulator;

  localparam int unsigned W = 16;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         en = 1'b0, clr = 1'b0;
  logic [W-1:0] d = '0, q, ref_q;

  int checks = 0;
  int failures = 0;
  int cycles = 0;

  mac_accumulator #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .en(en), .clr(clr), .d(d), .q(q));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cycles++;
    if (cycles > 10000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    ref_q = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int it = 0; it < 2000; it++) begin
      @(negedge clk);
      en  = ($urandom % 3) != 0;
      clr = ($urandom % 8) == 0;
      d   = W'($urandom);
      @(posedge clk);
      if (clr) ref_q = '0;
      else if (en) ref_q = d;
      #1;
      checks++;
      if (q != ref_q) begin
        failures++;
        if (failures < 10) $display("cycle %0d: q=%h, want %h", cycles, q, ref_q);
      end
      if (it == 1000) begin
        // Asynchronous reset between edges.
        #2 rst_n = 1'b0;
        #1;
        ref_q = '0;
        checks++;
        if (q != '0) begin
          failures++;
          $display("asynchronous reset did not clear q=%h", q);
        end
        #1 rst_n = 1'b1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
