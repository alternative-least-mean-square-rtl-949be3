// tb_booth_mult: self-checking testbench of booth_mult.
//
// Instance 1 has the default 12 x 12 size and is driven with every pairing
// of the extreme and near-extreme operand values plus 200000 random pairs.
// Instance 2 is 5 x 7 bits (odd multiplier width, so the Booth recoding must
// sign-extend) and is checked exhaustively. The expected product is the
// plain signed product of the operands.
module tb_booth_mult;
  int checks = 0, failures = 0;

  logic signed [11:0] a, b;
  logic signed [23:0] p;
  logic signed [4:0]  a2;
  logic signed [6:0]  b2;
  logic signed [11:0] p2;

  booth_mult dut (.a(a), .b(b), .p(p));
  booth_mult #(.A_W(5), .B_W(7)) dut2 (.a(a2), .b(b2), .p(p2));

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check12(int av, int bv);
    a = 12'(av); b = 12'(bv);
    #1;
    checks++;
    if (p !== 24'(longint'(a) * longint'(b))) begin
      failures++;
      if (failures < 10) $display("%0d * %0d = %0d, got %0d", a, b, longint'(a) * b, p);
    end
  endtask

  initial begin
    int corner [10] = '{-2048, -2047, -1025, -1, 0, 1, 2, 5, 1023, 2047};
    foreach (corner[i]) foreach (corner[j]) check12(corner[i], corner[j]);
    for (int i = 0; i < 200000; i++)
      check12(int'($urandom_range(4095)) - 2048, int'($urandom_range(4095)) - 2048);
    for (int i = -16; i < 16; i++)
      for (int j = -64; j < 64; j++) begin
        a2 = 5'(i); b2 = 7'(j);
        #1;
        checks++;
        if (p2 !== 12'(i * j)) begin
          failures++;
          if (failures < 10) $display("5x7: %0d * %0d got %0d", i, j, p2);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
