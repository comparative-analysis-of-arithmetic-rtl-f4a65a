// tb_ecc_arith_unit: end-to-end test of the arithmetic unit at its default size
// (N = 8, no parameter override).
//
// It replays the worked examples (X = 85, Y = 59, M = 127: sum 17, difference
// 26, product 5015) in RSD and CSD form with both multipliers, then runs random
// requests over every operation and operand format. Each result is checked
// against an integer model: products exactly, modular results for congruence
// modulo M and for the range (-2^N, 2^N). The clocks from acceptance to
// out_valid are checked (1 for add, sub and the recursive multiplier, 6 for the
// iterative multiplier), as is in_ready dropping while an operation runs.
// The test also counts how often each mechanism of the datapath was exercised:
// every operation and format, a level-2 and a level-3 correction by -M and by
// +M, a non-zero carry digit in a Karatsuba middle sum, the CSD fallback and a
// request held off by in_ready. A mechanism that never happened is a failure.
module tb_ecc_arith_unit;
  import rsd_pkg::*;

  localparam int N        = 8;
  localparam int PW       = kara_digits(N);
  localparam int ZW       = (N + 3 > PW) ? N + 3 : PW;
  localparam int LAT_COMB = 1;
  localparam int LAT_ITR  = 6;

  logic         clk = 1'b0;
  logic         rst = 1'b1;
  logic         in_valid = 1'b0;
  logic         in_ready;
  op_e          op = OP_MODADD;
  fmt_e         fmt = FMT_RSD;
  logic [N-1:0] a = '0, b = '0, m = '0;
  sd_t  [N-1:0] x_in = '0, y_in = '0, m_in = '0;
  logic         out_valid;
  sd_t  [ZW-1:0] z;
  logic         csd_fallback;

  int checks = 0, failures = 0;
  int cycles = 0;

  // mechanism counters
  int n_op [4]  = '{default: 0};
  int n_fmt [3] = '{default: 0};
  int n_l2_sub = 0, n_l2_add = 0, n_l3_sub = 0, n_l3_add = 0;
  int n_mid_carry = 0, n_fallback = 0, n_held = 0;

  ecc_arith_unit dut (
    .clk(clk), .rst(rst), .in_valid(in_valid), .in_ready(in_ready),
    .op(op), .fmt(fmt), .a(a), .b(b), .m(m),
    .x_in(x_in), .y_in(y_in), .m_in(m_in),
    .out_valid(out_valid), .z(z), .csd_fallback(csd_fallback)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  // observe the internal corrections of the modular adders and the middle carries
  always @(posedge clk) if (!rst && dut.state == dut.S_EXEC) begin
    if (dut.op_q == OP_MODADD || dut.op_q == OP_MODSUB) begin
      sd_t t1n, t2n;
      t1n = (dut.op_q == OP_MODADD) ? dut.u_modadd.t1[N] : dut.u_modsub.u_add.t1[N];
      t2n = (dut.op_q == OP_MODADD) ? dut.u_modadd.t2[N] : dut.u_modsub.u_add.t2[N];
      if (sd_is_pos(t1n)) n_l2_sub++;
      if (sd_is_neg(t1n)) n_l2_add++;
      if (sd_is_pos(t2n)) n_l3_sub++;
      if (sd_is_neg(t2n)) n_l3_add++;
    end
    if (dut.op_q == OP_MUL_REC &&
        (dut.u_mulrec.g_lvl[0].g_node[0].g_split.sa[N/2] != '0 || dut.u_mulrec.g_lvl[0].g_node[0].g_split.sb[N/2] != '0))
      n_mid_carry++;
  end

  function automatic longint value_of(input logic [2*ZW-1:0] v, input int nd);
    longint r = 0;
    for (int i = 0; i < nd; i++) r += (longint'(v[2*i+1]) - longint'(v[2*i])) <<< i;
    return r;
  endfunction

  function automatic logic [2*N-1:0] spell(input int v);
    int negv, posv;
    logic [2*N-1:0] r;
    negv = int'($urandom_range(((1 << N) - 1 - v), 0));
    posv = v + negv;
    for (int i = 0; i < N; i++) begin
      r[2*i+1] = posv[i];
      r[2*i]   = negv[i];
    end
    return r;
  endfunction

  // issue one request, wait for its result, check latency and value
  task automatic request(input op_e o, input fmt_e f, input int va, input int vb,
                         input int vm, input longint exact, input bit hold_off);
    longint vz, want;
    int     t0, lat;
    @(negedge clk);
    op = o; fmt = f;
    a = N'(va); b = N'(vb); m = N'(vm);
    if (f == FMT_DIGITS) begin
      x_in = spell(va); y_in = spell(vb); m_in = spell(vm);
    end
    in_valid = 1'b1;
    @(posedge clk);
    #1;
    t0 = cycles;
    in_valid = 1'b0;
    checks++;
    if (in_ready) begin
      failures++;
      $display("FAIL in_ready high while busy");
    end
    if (hold_off) begin
      // present the next request early: it must not be taken while busy
      @(negedge clk);
      in_valid = 1'b1;
      op = OP_MODADD;
      if (!in_ready) n_held++;
      @(posedge clk);
      #1;
      in_valid = 1'b0;
    end
    while (!out_valid && cycles - t0 < 20) begin
      @(posedge clk);
      #1;
    end
    lat = cycles - t0;
    checks++;
    if (lat != ((o == OP_MUL_ITR) ? LAT_ITR : LAT_COMB)) begin
      failures++;
      $display("FAIL op %s latency %0d", o.name(), lat);
    end
    vz = value_of(z, ZW);
    n_op[o]++;
    n_fmt[f]++;
    if (csd_fallback) n_fallback++;
    checks++;
    if (o == OP_MUL_REC || o == OP_MUL_ITR) begin
      want = longint'(va) * longint'(vb);
      if (vz != want) begin
        failures++;
        if (failures < 10) $display("FAIL %0d * %0d gave %0d", va, vb, vz);
      end
    end else begin
      want = (o == OP_MODADD) ? longint'(va) + longint'(vb) : longint'(va) - longint'(vb);
      if ((vz - want) % vm != 0 || vz >= (1 << N) || vz <= -(1 << N)) begin
        failures++;
        if (failures < 10)
          $display("FAIL %s %0d, %0d mod %0d gave %0d", o.name(), va, vb, vm, vz);
      end
    end
    if (exact >= 0) begin
      checks++;
      if (vz != exact) begin
        failures++;
        $display("FAIL worked example %s/%s gave %0d, expected %0d",
                 o.name(), f.name(), vz, exact);
      end
    end
    @(posedge clk);
    #1;
    checks++;
    if (out_valid) begin
      failures++;
      $display("FAIL out_valid longer than one cycle");
    end
  endtask

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int vm, va, vb;
    op_e  o;
    fmt_e f;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    // worked examples in both representations
    for (int k = 0; k < 2; k++) begin
      f = (k == 0) ? FMT_RSD : FMT_CSD;
      request(OP_MODADD,  f, 85, 59, 127, 17,   1'b0);
      request(OP_MODSUB,  f, 85, 59, 127, 26,   1'b0);
      request(OP_MUL_REC, f, 85, 59, 127, 5015, 1'b0);
      request(OP_MUL_ITR, f, 85, 59, 127, 5015, 1'b1);
    end
    // operands that drive a negative most significant digit into levels 2 and 3
    request(OP_MODSUB, FMT_RSD, 0, 192, 193, -1, 1'b0);
    request(OP_MODSUB, FMT_RSD, 0, 177, 178, -1, 1'b0);
    // random traffic
    for (int k = 0; k < 4000; k++) begin
      o  = op_e'(k % 4);
      f  = fmt_e'((k / 4) % 3);
      vm = int'($urandom_range((1 << N) - 1, 2));
      va = int'($urandom_range(vm - 1, 0));
      vb = int'($urandom_range(vm - 1, 0));
      request(o, f, va, vb, vm, -1, 1'(k % 13 == 0));
    end
    // every mechanism must have been exercised
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (n_op[i] == 0) begin failures++; $display("FAIL op %0d never ran", i); end
    end
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (n_fmt[i] == 0) begin failures++; $display("FAIL fmt %0d never ran", i); end
    end
    checks += 7;
    if (n_l2_sub == 0)    begin failures++; $display("FAIL no level-2 -M correction"); end
    if (n_l2_add == 0)    begin failures++; $display("FAIL no level-2 +M correction"); end
    if (n_l3_sub == 0)    begin failures++; $display("FAIL no level-3 -M correction"); end
    if (n_l3_add == 0)    begin failures++; $display("FAIL no level-3 +M correction"); end
    if (n_mid_carry == 0) begin failures++; $display("FAIL no middle-sum carry"); end
    if (n_fallback == 0)  begin failures++; $display("FAIL no CSD fallback"); end
    if (n_held == 0)      begin failures++; $display("FAIL no request held off"); end
    $display("mechanisms: ops %0d/%0d/%0d/%0d fmts %0d/%0d/%0d L2-M %0d L2+M %0d L3-M %0d L3+M %0d midcarry %0d fallback %0d held %0d",
             n_op[0], n_op[1], n_op[2], n_op[3], n_fmt[0], n_fmt[1], n_fmt[2],
             n_l2_sub, n_l2_add, n_l3_sub, n_l3_add, n_mid_carry, n_fallback, n_held);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
