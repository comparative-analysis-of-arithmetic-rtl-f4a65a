// tb_karatsuba_iter: self-checking test of the iterative Karatsuba multiplier
// at N = 8. Each product is started with a one-cycle start pulse; the test
// checks that done arrives exactly 4 clocks later, that busy is high meanwhile,
// that start is ignored while busy, and that the product value equals the
// integer product of the operand values (worked example 85 x 59 = 5015, the
// extremes, and random redundant spellings).
module tb_karatsuba_iter;
  import rsd_pkg::*;

  localparam int N       = 8;
  localparam int PW      = kara_digits(N);
  localparam int LATENCY = 4;

  logic         clk = 1'b0;
  logic         rst = 1'b1;
  logic         start = 1'b0;
  sd_t [N-1:0]  a = '0, b = '0;
  logic         busy, done;
  sd_t [PW-1:0] p;
  int checks = 0, failures = 0;
  int cycles = 0;

  karatsuba_iter #(.N(N)) dut (
    .clk(clk), .rst(rst), .start(start), .a(a), .b(b),
    .busy(busy), .done(done), .p(p)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  function automatic longint value_of(input logic [2*PW-1:0] v, input int nd);
    longint r = 0;
    for (int i = 0; i < nd; i++) r += (longint'(v[2*i+1]) - longint'(v[2*i])) <<< i;
    return r;
  endfunction

  task automatic multiply(input logic [2*N-1:0] va, input logic [2*N-1:0] vb,
                          input bit poke_busy);
    longint ea, eb;
    int     t0, n;
    ea = value_of((2*PW)'(va), N);
    eb = value_of((2*PW)'(vb), N);
    @(negedge clk);
    a = va;
    b = vb;
    start = 1'b1;
    @(posedge clk);
    #1;
    t0 = cycles;
    @(negedge clk);
    start = 1'b0;
    if (poke_busy) begin
      // a second start while busy must be ignored
      a = '0;
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      checks++;
      if (!busy) failures++;
    end
    n = 0;
    while (!done && n < 20) begin
      @(posedge clk);
      #1;
      n++;
    end
    checks++;
    if (cycles - t0 != LATENCY) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", cycles - t0, LATENCY);
    end
    checks++;
    if (value_of(p, PW) != ea * eb) begin
      failures++;
      if (failures < 10) $display("FAIL %0d * %0d gave %0d", ea, eb, value_of(p, PW));
    end
    @(posedge clk);
    #1;
    checks++;
    if (done || busy) begin
      failures++;
      $display("FAIL done or busy held after completion");
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [2*N-1:0] from_bin(input int v);
    logic [2*N-1:0] r = '0;
    for (int i = 0; i < N; i++) r[2*i+1] = v[i];
    return r;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    multiply(from_bin(85), from_bin(59), 1'b0);
    checks++;
    if (value_of(p, PW) != 5015) failures++;
    multiply(16'b0010001000100010, 16'b0010000000010001, 1'b1);  // CSD 85 x 59
    multiply({N{2'b10}}, {N{2'b01}}, 1'b0);                      // 255 x -255
    for (int k = 0; k < 3000; k++)
      multiply((2*N)'($urandom()), (2*N)'($urandom()), 1'(k % 7 == 0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
