// tb_rsd_digit_mul: exhaustive test of the one-digit signed-digit multiplier.
// All 16 input spellings are applied; the output value must be the product of
// the input values and the output must not use the (1,1) spelling.
module tb_rsd_digit_mul;
  import rsd_pkg::*;

  sd_t a, b, y;
  int checks = 0, failures = 0;

  rsd_digit_mul dut (.a(a), .b(b), .y(y));

  function automatic int dv(input logic [1:0] d);
    return int'(d[1]) - int'(d[0]);
  endfunction

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        a = 2'(i);
        b = 2'(j);
        #1;
        checks++;
        if (dv(y) != dv(a) * dv(b) || (y.p && y.n)) begin
          failures++;
          $display("FAIL %0d * %0d gave %b", dv(a), dv(b), y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
