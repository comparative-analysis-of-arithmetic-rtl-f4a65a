// tb_rsd_adder: self-checking test of the carry-free RSD adder at N = 8.
// Random digit vectors in every spelling (redundant zero included) and the
// extremes are added; the value of the N+1-digit sum must equal the sum of the
// operand values, and no output digit may use the (1,1) spelling.
module tb_rsd_adder;
  import rsd_pkg::*;

  localparam int N = 8;

  sd_t [N-1:0] x, y;
  sd_t [N:0]   s;
  int checks = 0, failures = 0;

  rsd_adder #(.N(N)) dut (.x(x), .y(y), .s(s));

  function automatic int value_of(input logic [2*N+1:0] v, input int nd);
    int r = 0;
    for (int i = 0; i < nd; i++) r += (int'(v[2*i+1]) - int'(v[2*i])) <<< i;
    return r;
  endfunction

  task automatic check();
    int vx, vy;
    #1;
    vx = value_of((2*N+2)'(x), N);
    vy = value_of((2*N+2)'(y), N);
    checks++;
    if (value_of(s, N + 1) != vx + vy) begin
      failures++;
      if (failures < 10) $display("FAIL %0d + %0d gave %0d", vx, vy, value_of(s, N + 1));
    end
    for (int i = 0; i <= N; i++) if (s[i].p && s[i].n) begin
      failures++;
      $display("FAIL redundant zero on output digit %0d", i);
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
    x = {N{2'b10}}; y = {N{2'b10}}; check();   // 255 + 255
    x = {N{2'b01}}; y = {N{2'b01}}; check();   // -255 + -255
    x = {N{2'b10}}; y = {N{2'b01}}; check();
    x = {N{2'b11}}; y = {N{2'b10}}; check();
    for (int k = 0; k < 50000; k++) begin
      x = (2*N)'($urandom());
      y = (2*N)'($urandom());
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
