// tb_bin_to_csd: exhaustive test of the CSD recoder at N = 8. For every input
// the digits must add up to the input value and no two adjacent digits may be
// non-zero (the canonical property), and the CSD form may never have more
// non-zero digits than the binary one. The worked operands 85, 59 and 127 must
// give the digit patterns 0010001000100010, 0010000000010001 and
// 1000000000000001 (low 8 digits, +1 = 10, -1 = 01).
module tb_bin_to_csd;
  import rsd_pkg::*;

  localparam int N = 8;

  logic [N-1:0] b;
  sd_t  [N:0]   d;
  int checks = 0, failures = 0;

  bin_to_csd #(.N(N)) dut (.b(b), .d(d));

  function automatic int value_of(input sd_t [N:0] v);
    int r = 0;
    for (int i = 0; i <= N; i++) r += (int'(v[i].p) - int'(v[i].n)) <<< i;
    return r;
  endfunction

  task automatic expect_pattern(input int v, input logic [2*N-1:0] pat);
    b = N'(v);
    #1;
    checks++;
    if (d[N-1:0] != pat || d[N] != '0) begin
      failures++;
      $display("FAIL CSD of %0d is %b", v, d);
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
    for (int v = 0; v < (1 << N); v++) begin
      bit adj;
      int nz;
      b = N'(v);
      #1;
      adj = 1'b0;
      for (int i = 0; i < N; i++)
        if ((d[i] != '0) && (d[i+1] != '0)) adj = 1'b1;
      // never more non-zero digits than the binary form
      nz = 0;
      for (int i = 0; i <= N; i++) if (d[i] != '0) nz++;
      checks++;
      if (nz > $countones(b)) begin
        failures++;
        $display("FAIL %0d has %0d non-zero digits", v, nz);
      end
      checks++;
      if (value_of(d) != v || adj) begin
        failures++;
        if (failures < 10) $display("FAIL %0d -> %b", v, d);
      end
    end
    expect_pattern(85,  16'b0010001000100010);
    expect_pattern(59,  16'b0010000000010001);
    expect_pattern(127, 16'b1000000000000001);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
