// tb_eig_rshift: checks the level-shift step y = (x + 1) >> 1 (arithmetic)
// on small values around zero, on the extremes and on random values, against
// floor((x + 1) / 2) computed in 64 bits.
module tb_eig_rshift;
  localparam int IW = 32;
  logic signed [IW-1:0] x, y;
  int checks = 0, failures = 0;

  eig_rshift #(.IW(IW)) dut (.x, .y);

  function automatic longint floor_half(input longint v);
    longint q;
    q = v / 2;
    if (v < 0 && (v % 2) != 0) q = q - 1;
    return q;
  endfunction

  task automatic one(input longint xv);
    longint expv;
    x = IW'(xv);
    #1;
    expv = floor_half(xv + 1);
    checks++;
    if (longint'(y) != expv) begin
      failures++;
      $display("FAIL: x=%0d y=%0d expected %0d", xv, y, expv);
    end
  endtask

  initial begin
    for (int v = -20; v <= 20; v++) one(v);
    one(64'sh7fff_fffe); one(-64'sh8000_0000); one(-64'sh7fff_ffff);
    for (int n = 0; n < 1000; n++) one(longint'($urandom_range(32'hffff_fffe)) - 64'sh7fff_ffff);
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
