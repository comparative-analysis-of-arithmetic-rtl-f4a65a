// tb_karatsuba_rsd: self-checking test of the recursive Karatsuba multiplier
// at N = 8 digits. Operands are random signed-digit vectors (every digit
// spelling, the redundant zero (1,1) included), plus the worked example
// 85 x 59 = 5015 and the extreme values +-255. The product's value, summed
// digit by digit, must equal the integer product of the operand values.
module tb_karatsuba_rsd;
  import rsd_pkg::*;

  localparam int N  = 8;
  localparam int PW = kara_digits(N);

  sd_t [N-1:0]  a, b;
  sd_t [PW-1:0] p;
  int checks = 0, failures = 0;

  karatsuba_rsd #(.N(N)) dut (.a(a), .b(b), .p(p));

  function automatic longint value_of(input logic [2*PW-1:0] v, input int nd);
    longint r = 0;
    for (int i = 0; i < nd; i++) r += (longint'(v[2*i+1]) - longint'(v[2*i])) <<< i;
    return r;
  endfunction

  function automatic logic [2*N-1:0] from_bin(input int x);
    logic [2*N-1:0] r = '0;
    for (int i = 0; i < N; i++) r[2*i+1] = x[i];
    return r;
  endfunction

  task automatic check(input string what);
    longint va, vb, vp;
    #1;
    va = value_of((2*PW)'(a), N);
    vb = value_of((2*PW)'(b), N);
    vp = value_of(p, PW);
    checks++;
    if (vp != va * vb) begin
      failures++;
      if (failures < 10) $display("FAIL %s: %0d * %0d gave %0d", what, va, vb, vp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = from_bin(85); b = from_bin(59);
    check("85*59");
    if (value_of(p, PW) != 5015) failures++;
    checks++;
    a = from_bin(255); b = from_bin(255); check("255*255");
    a = {N{2'b01}}; b = from_bin(255); check("-255*255");
    for (int k = 0; k < 20000; k++) begin
      a = (2*N)'($urandom()); b = (2*N)'($urandom());
      check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
