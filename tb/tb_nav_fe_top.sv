// tb_nav_fe_top: end-to-end test of the three-unit feature-extraction
// subsystem at its default sizes (96x96 blocks, three units).
//
// The testbench plays the processor software and the partial-reconfiguration
// controller. For one 96x96 test image it computes the eight convolutions of
// the Harris corner step (Prewitt gradients Ix and Iy; Gaussian 1x11 then
// 11x1 smoothing of Ix*Ix, Iy*Iy and Ix*Iy) on the hardware, once under each
// reconfiguration strategy:
//   low    - one unit, rewritten before every convolution
//   medium - two units in ping-pong: one runs while the other is rewritten
//   high   - three units, each configured once with one accelerator
//   super  - three units as in high, with independent convolutions of
//            neighbouring steps run in parallel (five steps instead of eight)
// Squaring and products of the gradients are done here, as software.
// Each strategy's three smoothed outputs are compared word by word with a
// reference model computed here. The reconfiguration controller model takes
// RECONF_CYCLES clocks per rewrite (5.37 ms at 100 MHz) and rewrites one
// region at a time. Also exercised: a start refused on an empty region, a
// soft reset, bursts, interrupts, reads of a unit number that does not exist
// and the cycle register. Each mechanism is counted and must occur; the
// strategies' total clock counts must rank super < high < medium < low.
// As a sanity check of the whole chain, the Harris corner response computed
// from the reference outputs must peak at a corner of the test image, away from the block edge.
module tb_nav_fe_top;
  import nav_pkg::*;

  localparam int N  = IMG_N;
  localparam int NN = N * N;
  localparam int RECONF_CYCLES = 537_000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  bus_req_t                req;
  bus_rsp_t                rsp;
  logic   [NUM_RU-1:0]     irq;
  logic   [NUM_RU-1:0]     cfg_start, cfg_done;
  rm_id_e [NUM_RU-1:0]     cfg_id;

  nav_fe_top dut (
    .clk, .rst_n, .bus_req(req), .bus_rsp(rsp), .irq,
    .cfg_start, .cfg_id, .cfg_done
  );

  int checks = 0;
  int failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL [%0d] %s", cycle, what);
    end
  endtask

  // ------------------------------------------------------------------
  // data slots
  localparam int S_IMG = 0, S_IX = 1, S_IY = 2, S_XX = 3, S_YY = 4, S_XY = 5,
                 S_A1 = 6, S_B1 = 7, S_C1 = 8, S_SXX = 9, S_SYY = 10, S_SXY = 11,
                 S_RXX = 12, S_RYY = 13, S_RXY = 14, S_TMP = 15, NSLOT = 16;
  logic [31:0] store [NSLOT][NN];
  logic [31:0] taps  [3][11];      // 0: Prewitt H, 1: Prewitt V, 2: Gaussian
  int          ntaps [3] = '{9, 9, 11};
  localparam int SH_R1 = 8;         // ConvRepl1 output keeps 8 fraction bits
  localparam int SH_R2 = 16;        // ConvRepl2 keeps the scale (taps in Q16)

  // ------------------------------------------------------------------
  // mechanism counters
  int n_reconf = 0, n_irq = 0, n_burst = 0, n_parallel = 0, n_overlap = 0;
  int n_err = 0, n_softrst = 0, n_miss = 0, n_cfg_evt = 0;
  int n_exec [4] = '{0, 0, 0, 0};
  int active = 0;         // convolutions running now
  bit icap_busy = 1'b0;

  // clocks in which a region is rewritten while another unit computes
  always @(negedge clk) if (icap_busy && active > 0) n_overlap++;

  // ------------------------------------------------------------------
  // bus master (one owner at a time)
  semaphore bus_sem  = new(1);
  semaphore icap_sem = new(1);

  function automatic logic [BUS_AW-1:0] a_mem(int ru, region_e rg, int idx);
    return {2'(ru), rg, 14'(idx)};
  endfunction
  function automatic logic [BUS_AW-1:0] a_csr(int ru, logic [3:0] off);
    return {2'(ru), RGN_CSR, 10'd0, off};
  endfunction

  task automatic reg_write(logic [BUS_AW-1:0] a, logic [31:0] d);
    bus_sem.get(1);
    @(negedge clk);
    req = '{valid: 1'b1, we: 1'b1, addr: a, wdata: d};
    @(negedge clk);
    req.valid = 1'b0;
    check(rsp.ack, $sformatf("write ack at %h", a));
    bus_sem.put(1);
  endtask

  task automatic reg_read(logic [BUS_AW-1:0] a, output logic [31:0] d);
    bus_sem.get(1);
    @(negedge clk);
    req = '{valid: 1'b1, we: 1'b0, addr: a, wdata: '0};
    @(negedge clk);
    req.valid = 1'b0;
    check(rsp.ack, $sformatf("read ack at %h", a));
    d = rsp.rdata;
    bus_sem.put(1);
  endtask

  // burst: one beat per clock, responses one clock behind
  task automatic burst_write(int ru, region_e rg, int slot, int n);
    int acks = 0;
    bus_sem.get(1);
    for (int i = 0; i <= n; i++) begin
      @(negedge clk);
      if (i > 0 && rsp.ack) acks++;
      if (i < n) req = '{valid: 1'b1, we: 1'b1, addr: a_mem(ru, rg, i), wdata: store[slot][i]};
      else       req.valid = 1'b0;
    end
    bus_sem.put(1);
    check(acks == n, $sformatf("burst write acks %0d of %0d", acks, n));
    n_burst++;
  endtask

  task automatic burst_read(int ru, region_e rg, int slot, int n);
    int acks = 0;
    bus_sem.get(1);
    for (int i = 0; i <= n; i++) begin
      @(negedge clk);
      if (i > 0) begin
        if (rsp.ack) acks++;
        store[slot][i-1] = rsp.rdata;
      end
      if (i < n) req = '{valid: 1'b1, we: 1'b0, addr: a_mem(ru, rg, i), wdata: '0};
      else       req.valid = 1'b0;
    end
    bus_sem.put(1);
    check(acks == n, $sformatf("burst read acks %0d of %0d", acks, n));
    n_burst++;
  endtask

  task automatic write_taps(int ru, int set);
    bus_sem.get(1);
    for (int i = 0; i <= ntaps[set]; i++) begin
      @(negedge clk);
      if (i < ntaps[set]) req = '{valid: 1'b1, we: 1'b1, addr: a_mem(ru, RGN_H, i), wdata: taps[set][i]};
      else                req.valid = 1'b0;
    end
    bus_sem.put(1);
  endtask

  // ------------------------------------------------------------------
  // partial-reconfiguration controller model: one region at a time
  rm_id_e loaded [NUM_RU];

  task automatic reconfigure(int ru, rm_id_e id);
    logic [31:0] st;
    icap_sem.get(1);
    icap_busy = 1'b1;
    @(negedge clk);
    cfg_start[ru] = 1'b1;
    cfg_id[ru]    = id;
    @(negedge clk);
    cfg_start[ru] = 1'b0;
    reg_read(a_csr(ru, CSR_STATUS), st);
    check(st[1] == 1'b1 && st[3:2] == RM_NONE, "region reads empty while reconfiguring");
    repeat (RECONF_CYCLES) @(negedge clk);
    cfg_done[ru] = 1'b1;
    @(negedge clk);
    cfg_done[ru] = 1'b0;
    icap_busy = 1'b0;
    icap_sem.put(1);
    loaded[ru] = id;
    n_reconf++;
    reg_read(a_csr(ru, CSR_STATUS), st);
    check(st[3:2] == id && st[1] == 1'b0, $sformatf("unit %0d holds accelerator %0d", ru, id));
    reg_read(a_csr(ru, CSR_ISR), st);
    check(st[EV_CFG], "reconfiguration event flagged");
    if (st[EV_CFG]) n_cfg_evt++;
    reg_write(a_csr(ru, CSR_ISR), 32'(1 << EV_CFG));
  endtask

  task automatic ensure(int ru, rm_id_e id);
    if (loaded[ru] != id) reconfigure(ru, id);
  endtask

  // ------------------------------------------------------------------
  // one convolution on one unit: data in, start, interrupt, data out
  task automatic run_conv(int ru, rm_id_e id, int src, int set, int sh, int dst);
    logic [31:0] v;
    int k = ntaps[set];
    check(loaded[ru] == id, $sformatf("unit %0d loaded with %0d before run", ru, id));
    burst_write(ru, RGN_U, src, NN);
    write_taps(ru, set);
    reg_write(a_csr(ru, CSR_SHIFT), 32'(sh));
    if (active > 0) n_parallel++;
    active++;
    reg_write(a_csr(ru, CSR_CTRL), 32'd1);
    while (!irq[ru]) @(negedge clk);
    active--;
    n_irq++;
    reg_read(a_csr(ru, CSR_ISR), v);
    check(v[EV_DONE], "done event behind the interrupt");
    reg_write(a_csr(ru, CSR_ISR), 32'(1 << EV_DONE));
    @(negedge clk);
    check(!irq[ru], "interrupt clears");
    reg_read(a_csr(ru, CSR_CYCLES), v);
    check(v == 32'(NN * k + int'(CONV_EXTRA_CYCLES)),
          $sformatf("unit %0d run took %0d clocks, expected %0d", ru, v, NN * k + CONV_EXTRA_CYCLES));
    burst_read(ru, RGN_Y, dst, NN);
    n_exec[id]++;
  endtask

  // software steps between the convolutions
  function automatic void sw_products();
    for (int i = 0; i < NN; i++) begin
      store[S_XX][i] = store[S_IX][i] * store[S_IX][i];
      store[S_YY][i] = store[S_IY][i] * store[S_IY][i];
      store[S_XY][i] = store[S_IX][i] * store[S_IY][i];
    end
  endfunction

  // ------------------------------------------------------------------
  // reference model
  function automatic void ref_conv(int src, int set, int kh, int kw, bit repl, int sh, int dst);
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        longint acc = 0;
        for (int ky = 0; ky < kh; ky++)
          for (int kx = 0; kx < kw; kx++) begin
            int rr = r + ky - kh/2;
            int cc = c + kx - kw/2;
            if (!repl && (rr < 0 || rr >= N || cc < 0 || cc >= N)) continue;
            rr = (rr < 0) ? 0 : (rr > N-1) ? N-1 : rr;
            cc = (cc < 0) ? 0 : (cc > N-1) ? N-1 : cc;
            acc += longint'(signed'(store[src][rr*N+cc])) * longint'(signed'(taps[set][ky*kw+kx]));
          end
        if (sh > 0) acc = (acc + (longint'(1) << (sh-1))) >>> sh;
        if (acc > 64'sd2147483647)  acc = 64'sd2147483647;
        if (acc < -64'sd2147483648) acc = -64'sd2147483648;
        store[dst][r*N+c] = acc[31:0];
      end
  endfunction

  function automatic void compute_reference();
    ref_conv(S_IMG, 0, 3, 3, 1'b0, 0, S_IX);
    ref_conv(S_IMG, 1, 3, 3, 1'b0, 0, S_IY);
    sw_products();
    ref_conv(S_XX, 2, 1, 11, 1'b1, SH_R1, S_A1);
    ref_conv(S_A1, 2, 11, 1, 1'b1, SH_R2, S_RXX);
    ref_conv(S_YY, 2, 1, 11, 1'b1, SH_R1, S_B1);
    ref_conv(S_B1, 2, 11, 1, 1'b1, SH_R2, S_RYY);
    ref_conv(S_XY, 2, 1, 11, 1'b1, SH_R1, S_C1);
    ref_conv(S_C1, 2, 11, 1, 1'b1, SH_R2, S_RXY);
  endfunction

  task automatic compare(string name);
    int bad = 0;
    for (int i = 0; i < NN; i++) begin
      if (store[S_SXX][i] !== store[S_RXX][i]) bad++;
      if (store[S_SYY][i] !== store[S_RYY][i]) bad++;
      if (store[S_SXY][i] !== store[S_RXY][i]) bad++;
    end
    check(bad == 0, $sformatf("%s: %0d output words differ from the reference", name, bad));
    for (int s = S_IX; s <= S_SXY; s++)
      for (int i = 0; i < NN; i++) store[s][i] = 32'hDEAD_BEEF;
  endtask

  // the eight convolutions, in the order of the flow; unit per step
  // step:           1              2              3              4
  //                 5              6              7              8
  function automatic rm_id_e step_id(int s);
    case (s)
      1, 4:    return RM_CONV_CONST;
      2, 5, 7: return RM_CONV_REPL1;
      default: return RM_CONV_REPL2;
    endcase
  endfunction

  task automatic do_step(int s, int ru);
    case (s)
      1: run_conv(ru, RM_CONV_CONST, S_IMG, 0, 0, S_IX);
      2: begin
           for (int i = 0; i < NN; i++) store[S_XX][i] = store[S_IX][i] * store[S_IX][i];
           run_conv(ru, RM_CONV_REPL1, S_XX, 2, SH_R1, S_A1);
         end
      3: run_conv(ru, RM_CONV_REPL2, S_A1, 2, SH_R2, S_SXX);
      4: run_conv(ru, RM_CONV_CONST, S_IMG, 1, 0, S_IY);
      5: begin
           for (int i = 0; i < NN; i++) store[S_YY][i] = store[S_IY][i] * store[S_IY][i];
           run_conv(ru, RM_CONV_REPL1, S_YY, 2, SH_R1, S_B1);
         end
      6: run_conv(ru, RM_CONV_REPL2, S_B1, 2, SH_R2, S_SYY);
      7: begin
           for (int i = 0; i < NN; i++) store[S_XY][i] = store[S_IX][i] * store[S_IY][i];
           run_conv(ru, RM_CONV_REPL1, S_XY, 2, SH_R1, S_C1);
         end
      default: run_conv(ru, RM_CONV_REPL2, S_C1, 2, SH_R2, S_SXY);
    endcase
  endtask

  // ------------------------------------------------------------------
  longint t_low, t_med, t_high, t_super;

  task automatic strategy_low();
    longint t0 = cycle;
    for (int s = 1; s <= 8; s++) begin
      ensure(0, step_id(s));
      do_step(s, 0);
    end
    t_low = cycle - t0;
    compare("low");
  endtask

  task automatic strategy_medium();
    longint t0 = cycle;
    ensure(0, step_id(1));
    for (int s = 1; s <= 8; s++) begin
      automatic int ru = (s - 1) % 2;
      automatic int nx = s + 1;
      fork
        if (nx <= 8) ensure(nx % 2 == 1 ? 0 : 1, step_id(nx));
        do_step(s, ru);
      join
    end
    t_med = cycle - t0;
    compare("medium");
  endtask

  task automatic strategy_high();
    longint t0 = cycle;
    ensure(0, RM_CONV_CONST);
    ensure(1, RM_CONV_REPL1);
    ensure(2, RM_CONV_REPL2);
    for (int s = 1; s <= 8; s++) do_step(s, s == 1 || s == 4 ? 0 : (s == 2 || s == 5 || s == 7) ? 1 : 2);
    t_high = cycle - t0;
    compare("high");
  endtask

  task automatic strategy_super();
    longint t0 = cycle;
    ensure(0, RM_CONV_CONST);
    ensure(1, RM_CONV_REPL1);
    ensure(2, RM_CONV_REPL2);
    do_step(1, 0);                                   // step 1
    fork do_step(2, 1); do_step(4, 0); join          // step 2
    fork do_step(3, 2); do_step(5, 1); join          // step 3
    fork do_step(6, 2); do_step(7, 1); join          // step 4
    do_step(8, 2);                                   // step 5
    t_super = cycle - t0;
    compare("super");
  endtask

  // ------------------------------------------------------------------
  initial begin
    logic [31:0] v;
    req       = '0;
    cfg_start = '0;
    cfg_done  = '0;
    cfg_id    = '{default: RM_NONE};
    for (int i = 0; i < NUM_RU; i++) loaded[i] = RM_NONE;

    // test image: dark background with bright and mid-grey rectangles
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        int p;
        p = 20 + ((r * 3 + c) % 7);
        if (r >= 20 && r < 50 && c >= 15 && c < 45) p = 230;
        if (r >= 60 && r < 85 && c >= 50 && c < 90) p = 140;
        store[S_IMG][r*N+c] = 32'(p);
      end
    // Prewitt filters and an 11-tap Gaussian (sigma 2) in Q16
    for (int k = 0; k < 9; k++) begin
      taps[0][k] = (k < 3) ? 32'd1 : (k < 6) ? 32'd0 : -32'sd1;
      taps[1][k] = (k % 3 == 0) ? 32'd1 : (k % 3 == 1) ? 32'd0 : -32'sd1;
    end
    begin
      real g[11];
      real s = 0.0;
      for (int k = 0; k < 11; k++) begin g[k] = $exp(-((k-5)*(k-5)) / 8.0); s += g[k]; end
      for (int k = 0; k < 11; k++) taps[2][k] = 32'(int'(g[k] / s * 65536.0));
    end
    compute_reference();

    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);

    // interrupts: enable all events on every unit
    for (int u = 0; u < NUM_RU; u++) begin
      reg_write(a_csr(u, CSR_IER), 32'h7);
      reg_write(a_csr(u, CSR_GIE), 32'h1);
    end

    // a start on an empty region is refused and raises the error event
    reg_write(a_csr(0, CSR_CTRL), 32'd1);
    repeat (2) @(negedge clk);
    check(irq[0], "refused start raises the interrupt");
    reg_read(a_csr(0, CSR_ISR), v);
    check(v[EV_ERR] && !v[EV_DONE], "refused start flags the error event only");
    if (v[EV_ERR]) n_err++;
    reg_write(a_csr(0, CSR_ISR), 32'h7);

    // a unit number that does not exist still answers, with zero
    reg_read({2'd3, RGN_CSR, 14'd1}, v);
    check(v == 32'd0, "unmapped unit reads zero");
    n_miss++;

    // soft reset: clears user registers, keeps memories and the region
    ensure(1, RM_CONV_REPL1);
    reg_write(a_csr(1, CSR_SHIFT), 32'd9);
    reg_write(a_mem(1, RGN_H, 3), 32'h1234_5678);
    reg_read(a_csr(1, CSR_SHIFT), v);
    check(v == 32'd9, "shift register written");
    reg_write(a_csr(1, CSR_SOFT_RST), SOFT_RST_KEY);
    repeat (SOFT_RST_CYCLES + 2) @(negedge clk);
    reg_read(a_csr(1, CSR_SHIFT), v);
    check(v == 32'd0, "soft reset clears the shift register");
    reg_read(a_mem(1, RGN_H, 3), v);
    check(v == 32'h1234_5678, "soft reset keeps memory contents");
    reg_read(a_csr(1, CSR_STATUS), v);
    check(v[3:2] == RM_CONV_REPL1, "soft reset keeps the loaded accelerator");
    n_softrst++;

    // the corner response R = Sxx*Syy - Sxy^2 - 0.04*(Sxx+Syy)^2 of the
    // smoothed products must peak at a corner of a rectangle in the image
    begin
      real best = -1.0e30;
      int  br = 0, bc = 0;
      bit  near = 1'b0;
      int  cr [8] = '{20, 20, 49, 49, 60, 60, 84, 84};
      int  cc [8] = '{15, 44, 15, 44, 50, 89, 50, 89};
      // the zero border of ConvConst makes a step at the block edge, which
      // the smoothing spreads 6 pixels inwards: look only further inside
      for (int r = 7; r < N - 7; r++)
        for (int c = 7; c < N - 7; c++) begin
          real a, b, x, rr;
          a  = real'(signed'(store[S_RXX][r*N+c]));
          b  = real'(signed'(store[S_RYY][r*N+c]));
          x  = real'(signed'(store[S_RXY][r*N+c]));
          rr = a * b - x * x - 0.04 * (a + b) * (a + b);
          if (rr > best) begin best = rr; br = r; bc = c; end
        end
      for (int k = 0; k < 8; k++)
        if ((br - cr[k]) * (br - cr[k]) + (bc - cc[k]) * (bc - cc[k]) <= 9) near = 1'b1;
      $display("strongest corner response at row %0d, column %0d", br, bc);
      check(near, "strongest corner response lies on a rectangle corner");
    end

    strategy_low();
    $display("low:    %0d clocks", t_low);
    strategy_medium();
    $display("medium: %0d clocks", t_med);
    strategy_high();
    $display("high:   %0d clocks", t_high);
    strategy_super();
    $display("super:  %0d clocks", t_super);

    check(t_super < t_high && t_high < t_med && t_med < t_low,
          "strategies rank super < high < medium < low in clocks");

    $display("mechanisms: reconfigurations=%0d cfg_events=%0d interrupts=%0d bursts=%0d parallel_runs=%0d",
             n_reconf, n_cfg_evt, n_irq, n_burst, n_parallel);
    $display("            clocks_reconfig_overlapping_run=%0d refused_starts=%0d soft_resets=%0d unmapped=%0d",
             n_overlap, n_err, n_softrst, n_miss);
    $display("            runs: ConvConst=%0d ConvRepl1=%0d ConvRepl2=%0d",
             n_exec[RM_CONV_CONST], n_exec[RM_CONV_REPL1], n_exec[RM_CONV_REPL2]);
    check(n_reconf > 0 && n_cfg_evt > 0, "reconfiguration happened");
    check(n_irq > 0, "interrupts happened");
    check(n_burst > 0, "bursts happened");
    check(n_parallel > 0, "parallel runs happened");
    check(n_overlap > 0, "reconfiguration overlapped a run");
    check(n_err > 0, "refused start happened");
    check(n_softrst > 0, "soft reset happened");
    check(n_exec[RM_CONV_CONST] == 8 && n_exec[RM_CONV_REPL1] == 12 && n_exec[RM_CONV_REPL2] == 12,
          "every accelerator ran its share (4 strategies x 2/3/3)");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
