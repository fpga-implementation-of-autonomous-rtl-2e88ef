// tb_conv_repl1: self-checking testbench for the ConvRepl1 (1x11, replicated border, fixed-point output) accelerator.
//
// The accelerator runs on full 96x96 blocks against behavioural block RAMs
// (one clock read latency). A reference convolution computed here with
// 64-bit integers, the same border rule and the same output rounding and
// clamping gives every expected output word. Tests: a smooth test image with
// the filter the feature-extraction flow uses, random signed data with random
// taps (large enough to reach the 32-bit clamp), and a start while busy,
// which must be ignored. Each run's length is checked against one
// multiply-accumulate per clock: start-to-done = N*N*KH*KW + CONV_EXTRA_CYCLES.
module tb_conv_repl1;
  import nav_pkg::*;

  localparam int N  = 96;
  localparam int KH = 1;
  localparam int KW = 11;
  localparam bit REPL = 1;
  localparam int AW = $clog2(N*N);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              start;
  logic [5:0]        shift;
  logic              busy, done, u_en, h_en, y_we;
  logic [AW-1:0]     u_addr, y_addr;
  logic [6:0]        h_addr;
  logic [31:0]       u_q, h_q, y_d;

  logic [31:0] U [N*N];
  logic [31:0] H [89];
  logic [31:0] Y [N*N];

  always_ff @(posedge clk) begin
    if (u_en) u_q <= U[u_addr];
    if (h_en) h_q <= H[h_addr];
    if (y_we) Y[y_addr] <= y_d;
  end

  conv_repl1 dut (
    .clk, .rst_n, .start, .shift, .busy, .done,
    .u_addr, .u_en, .u_q, .h_addr, .h_en, .h_q,
    .y_addr, .y_we, .y_d
  );

  int checks = 0;
  int failures = 0;
  int done_count = 0;

  always @(negedge clk) if (done) done_count++;

  // reference model
  function automatic logic [31:0] ref_pixel(int r, int c, int sh);
    longint acc = 0;
    longint res;
    for (int ky = 0; ky < KH; ky++)
      for (int kx = 0; kx < KW; kx++) begin
        int rr = r + ky - KH/2;
        int cc = c + kx - KW/2;
        bit in_blk = (rr >= 0 && rr < N && cc >= 0 && cc < N);
        if (!in_blk && !REPL) continue;
        rr = (rr < 0) ? 0 : (rr > N-1) ? N-1 : rr;
        cc = (cc < 0) ? 0 : (cc > N-1) ? N-1 : cc;
        acc += longint'(signed'(U[rr*N+cc])) * longint'(signed'(H[ky*KW+kx]));
      end
    if (REPL && sh > 0) res = (acc + (longint'(1) << (sh-1))) >>> sh;
    else                res = acc;
    if (res > 64'sd2147483647)  res = 64'sd2147483647;
    if (res < -64'sd2147483648) res = -64'sd2147483648;
    return res[31:0];
  endfunction

  task automatic run_block(string name, int sh, bit poke_busy);
    int cyc = 0;
    int bad = 0;
    int d0 = done_count;
    for (int i = 0; i < N*N; i++) Y[i] = 32'hDEAD_BEEF;
    shift = 6'(sh);
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    cyc = 1;
    while (!done) begin
      if (poke_busy && cyc == 100) begin
        start = 1'b1; shift = 6'd0;     // must be ignored
      end else start = 1'b0;
      @(negedge clk);
      cyc++;
    end
    @(negedge clk);
    @(negedge clk);
    checks++;
    if (cyc != N*N*KH*KW + int'(CONV_EXTRA_CYCLES)) begin
      failures++;
      $display("FAIL %s: %0d cycles from start to done, expected %0d", name, cyc, N*N*KH*KW + CONV_EXTRA_CYCLES);
    end
    checks++;
    if (done_count - d0 != 1 || busy) begin
      failures++;
      $display("FAIL %s: done pulses=%0d busy=%0b", name, done_count - d0, busy);
    end
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        logic [31:0] e = ref_pixel(r, c, sh);
        checks++;
        if (Y[r*N+c] !== e) begin
          failures++;
          bad++;
          if (bad < 5) $display("FAIL %s: Y[%0d][%0d]=%0d expected %0d", name, r, c, signed'(Y[r*N+c]), signed'(e));
        end
      end
    $display("%s: %0d cycles, %0d wrong pixels", name, cyc, bad);
  endtask

  initial begin
    start = 1'b0;
    shift = '0;
    for (int i = 0; i < 89; i++) H[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // test 1: the filter the flow uses on a structured image
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++)
        U[r*N+c] = 32'(((r * 5 + c * 11) * (r + 1)) % 600000);
    // 11-tap Gaussian, sigma 2, taps in Q16
    begin
      real g[11];
      real s = 0.0;
      for (int k = 0; k < 11; k++) begin g[k] = $exp(-((k-5)*(k-5)) / 8.0); s += g[k]; end
      for (int k = 0; k < 11; k++) H[k] = 32'(int'(g[k] / s * 65536.0));
    end
    run_block("gaussian", 8, 1'b1);
    // test 2: random signed data and taps, shift 0 to reach the clamp
    for (int i = 0; i < N*N; i++) U[i] = 32'(signed'(24'($urandom())));
    for (int k = 0; k < 11; k++)  H[k] = 32'(signed'(16'($urandom())));
    run_block("random_noshift", 0, 1'b0);
    run_block("random_shift5", 5, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
