// tb_barrel_shifter: exhaustive self-check of barrel_shifter.
// Every 8-bit input, every count 0..7 and both directions are applied; the
// expected value is formed by repeating a single-place shift count times,
// the way the bsl / bsr instruction definition describes the operation.
module tb_barrel_shifter;
  logic [7:0] din, dout, expect_v;
  logic [2:0] amount;
  logic       dir_right;
  int checks = 0, failures = 0;

  barrel_shifter #(.WIDTH(8), .SHAMT_W(3)) dut (
    .din(din), .amount(amount), .dir_right(dir_right), .dout(dout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < 2; d++)
      for (int n = 0; n < 8; n++)
        for (int v = 0; v < 256; v++) begin
          din = 8'(v); amount = 3'(n); dir_right = d[0];
          #1;
          expect_v = 8'(v);
          for (int k = 0; k < n; k++)
            expect_v = dir_right ? {1'b0, expect_v[7:1]} : {expect_v[6:0], 1'b0};
          checks++;
          if (dout !== expect_v) begin
            failures++;
            if (failures < 10)
              $display("FAIL din=%02h n=%0d right=%0d got %02h exp %02h", din, n, dir_right, dout, expect_v);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
