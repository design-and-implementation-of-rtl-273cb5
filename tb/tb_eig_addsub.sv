// tb_eig_addsub: checks addition and subtraction of random signed IW-bit
// operands (kept in a range where the result fits) against 64-bit arithmetic.
module tb_eig_addsub;
  localparam int IW = 32;
  logic signed [IW-1:0] addend, product, y;
  logic sub;
  int checks = 0, failures = 0;

  eig_addsub #(.IW(IW)) dut (.addend, .product, .sub, .y);

  initial begin
    for (int n = 0; n < 2000; n++) begin
      longint av, pv, expv;
      av  = longint'($urandom_range(32'h7fff_fffe)) - 64'sh3fff_ffff;
      pv  = longint'($urandom_range(32'h7fff_fffe)) - 64'sh3fff_ffff;
      sub = n[0];
      addend = IW'(av); product = IW'(pv);
      #1;
      expv = sub ? av - pv : av + pv;
      checks++;
      if (longint'(y) != expv) begin
        failures++;
        $display("FAIL: %0d %s %0d = %0d, expected %0d", av, sub ? "-" : "+", pv, y, expv);
      end
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
