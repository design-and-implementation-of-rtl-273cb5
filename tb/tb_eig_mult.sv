// tb_eig_mult: checks the generator's multiplier against 64-bit products of
// random signed operands (full-range BW-bit operand B, operand A drawn both
// from the BW-bit range and from the wide range of the orthogonal scalars),
// plus the extreme corners.
module tb_eig_mult;
  localparam int IW = 32, BW = 9;
  logic signed [IW-1:0] a, p;
  logic signed [BW-1:0] b;
  int checks = 0, failures = 0;

  eig_mult #(.IW(IW), .BW(BW)) dut (.a, .b, .p);

  task automatic one(input longint av, input longint bv);
    longint expv;
    a = IW'(av); b = BW'(bv);
    #1;
    expv = av * bv;
    checks++;
    if (longint'(p) != expv) begin
      failures++;
      $display("FAIL: %0d * %0d = %0d, expected %0d", av, bv, p, expv);
    end
  endtask

  initial begin
    one(-256, -256); one(255, -256); one(-256, 255); one(0, 77);
    one((1 <<< 22) - 1, -256); one(-(1 <<< 22), 255);
    for (int n = 0; n < 2000; n++) begin
      longint av, bv;
      bv = longint'($urandom_range(511)) - 256;
      if (n % 2 == 0) av = longint'($urandom_range(511)) - 256;
      else            av = longint'($urandom_range((1 << 23) - 1)) - (1 <<< 22);
      one(av, bv);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
