// tb_eig_cmp: checks the overflow comparator at and around both limits
// (2^(BW-1) and -2^(BW-1)) and on random wide values: ovf must be set exactly
// when x >= 2^(BW-1) or x < -2^(BW-1).
module tb_eig_cmp;
  localparam int IW = 32, BW = 9;
  logic signed [IW-1:0] x;
  logic ovf;
  int checks = 0, failures = 0;

  eig_cmp #(.IW(IW), .BW(BW)) dut (.x, .ovf);

  task automatic one(input longint xv);
    bit expv;
    x = IW'(xv);
    #1;
    expv = (xv >= 256) || (xv < -256);
    checks++;
    if (ovf != expv) begin
      failures++;
      $display("FAIL: x=%0d ovf=%0b expected %0b", xv, ovf, expv);
    end
  endtask

  initial begin
    for (int v = -260; v <= 260; v++) one(v);
    one(64'sh7fff_ffff); one(-64'sh8000_0000);
    for (int n = 0; n < 1000; n++) one(longint'($urandom_range(4095)) - 2048);
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
