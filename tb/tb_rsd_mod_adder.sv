// tb_rsd_mod_adder: self-checking test of the modular unit for (X + Y) mod M at N = 8.
//  - Worked example: X = 85, Y = 59, M = 127 as plain binary digits must give
//    exactly 17, and the same with X, Y, M spelled in CSD.
//  - Random operands below a random modulus, each spelled redundantly (random
//    negative part): the result must be congruent to X + Y modulo M and its
//    value must lie in (-2^N, 2^N). For a modulus of at least 2^(N-1) the two
//    top result digits must also be zero, and so must digit N+1 of the
//    level-2 sum.
module tb_rsd_mod_adder;
  import rsd_pkg::*;

  localparam int N = 8;

  sd_t [N-1:0] x, y, m;
  sd_t [N+2:0] s;
  int checks = 0, failures = 0;

  rsd_mod_adder #(.N(N)) dut (.x(x), .y(y), .m(m), .s(s));

  function automatic int value_of(input logic [2*N+5:0] v, input int nd);
    int r = 0;
    for (int i = 0; i < nd; i++) r += (int'(v[2*i+1]) - int'(v[2*i])) <<< i;
    return r;
  endfunction

  // a random signed-digit spelling of v (0 <= v < 2^N): pos - neg = v
  function automatic logic [2*N-1:0] spell(input int v, input bit plain);
    int negv, posv;
    logic [2*N-1:0] r;
    negv = plain ? 0 : int'($urandom_range(((1 << N) - 1 - v), 0));
    posv = v + negv;
    for (int i = 0; i < N; i++) begin
      r[2*i+1] = posv[i];
      r[2*i]   = negv[i];
    end
    return r;
  endfunction

  task automatic run(input int vx, input int vy, input int vm);
    int vs, d;
    #1;
    vs = value_of(s, N + 3);
    d  = (vs - (vx + vy)) % vm;
    checks++;
    if (d != 0 || vs >= (1 << N) || vs <= -(1 << N)) begin
      failures++;
      if (failures < 10) $display("FAIL %0d + %0d mod %0d gave %0d", vx, vy, vm, vs);
    end
    if (vm >= (1 << (N - 1))) begin
      // level 2 may leave a non-zero digit only at position N, never at N+1
      checks++;
      if (dut.t2[N+1] != '0) begin
        failures++;
        if (failures < 10) $display("FAIL level-2 digit N+1 used");
      end
      checks++;
      if (s[N+2:N+1] != '0) begin
        failures++;
        if (failures < 10) $display("FAIL top digits used: %0d + %0d mod %0d", vx, vy, vm);
      end
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int vm, vx, vy;
    // worked example, binary digits
    x = spell(85, 1); y = spell(59, 1); m = spell(127, 1);
    run(85, 59, 127);
    checks++;
    if (value_of(s, N + 3) != 17) begin
      failures++;
      $display("FAIL example gave %0d, expected 17", value_of(s, N + 3));
    end
    // worked example, CSD digits (+1 = 10, -1 = 01)
    x = 16'b0010001000100010; y = 16'b0010000000010001; m = 16'b1000000000000001;
    run(85, 59, 127);
    checks++;
    if (value_of(s, N + 3) != 17) begin
      failures++;
      $display("FAIL CSD example gave %0d, expected 17", value_of(s, N + 3));
    end
    for (int k = 0; k < 40000; k++) begin
      vm = (k % 2 == 0) ? int'($urandom_range(255, 128)) : int'($urandom_range(127, 2));
      vx = int'($urandom_range(vm - 1, 0));
      vy = int'($urandom_range(vm - 1, 0));
      x = spell(vx, 1'($urandom_range(1, 0)));
      y = spell(vy, 1'($urandom_range(1, 0)));
      m = spell(vm, 1'($urandom_range(1, 0)));
      run(vx, vy, vm);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
