// tb_reconfig_unit: self-checking testbench for one Reconfigurable Unit, on
// 16x16 blocks. It drives the unit's bus port beat by beat. Checked: every
// beat acknowledged exactly one clock later (single beats and back-to-back
// bursts); interrupt service (ISR set by events, IER masking, GIE, write-1-
// to-clear); soft reset (only with the key; clears user registers for
// SOFT_RST_CYCLES clocks, keeps memories, interrupt registers and the loaded
// accelerator); and a complete ConvRepl2 run through the bus whose output
// matches tb_ref_pkg.
module tb_reconfig_unit;
  import nav_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 16;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;

  ru_req_t  req;
  bus_rsp_t rsp;
  logic     irq, cfg_start, cfg_done;
  rm_id_e   cfg_id;

  reconfig_unit #(.N(N)) dut (.clk, .rst_n, .bus_req(req), .bus_rsp(rsp), .irq,
                              .cfg_start, .cfg_id, .cfg_done);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // every beat must be acknowledged one clock later, and only then
  logic pending;
  int   acks = 0;
  always @(negedge clk) begin
    if (rsp.ack) acks++;
    if (rst_n && rsp.ack !== pending) begin
      failures++; checks++;
      $display("FAIL ack %0b, expected %0b", rsp.ack, pending);
    end
  end
  always @(posedge clk) pending <= req.valid;

  function automatic logic [15:0] csr(logic [3:0] off);
    return {RGN_CSR, 10'd0, off};
  endfunction

  task automatic wr(logic [15:0] a, logic [31:0] d);
    @(negedge clk); req = '{valid: 1'b1, we: 1'b1, addr: a, wdata: d};
    @(negedge clk); req.valid = 1'b0;
  endtask

  task automatic rd(logic [15:0] a, output logic [31:0] d);
    @(negedge clk); req = '{valid: 1'b1, we: 1'b0, addr: a, wdata: '0};
    @(negedge clk); req.valid = 1'b0; d = rsp.rdata;
  endtask

  task automatic configure(rm_id_e id);
    @(negedge clk); cfg_start = 1; cfg_id = id;
    @(negedge clk); cfg_start = 0;
    repeat (25) @(negedge clk);
    cfg_done = 1; @(negedge clk); cfg_done = 0;
  endtask

  initial begin
    logic [31:0] v, uu[], hh[], yy[];
    int bad = 0, a0;
    req = '0; cfg_start = 0; cfg_done = 0; cfg_id = RM_NONE;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // interrupt service: events latch in ISR; irq needs IER and GIE
    wr(csr(CSR_CTRL), 32'd1);               // refused start -> EV_ERR
    repeat (2) @(negedge clk);
    rd(csr(CSR_ISR), v);
    check(v == 32'(1 << EV_ERR), "ISR holds the error event");
    check(!irq, "no irq while disabled");
    wr(csr(CSR_IER), 32'(1 << EV_ERR));
    @(negedge clk);
    check(!irq, "no irq without GIE");
    wr(csr(CSR_GIE), 32'd1);
    @(negedge clk);
    check(irq, "irq with IER and GIE");
    rd(csr(CSR_IER), v); check(v == 32'(1 << EV_ERR), "IER read-back");
    rd(csr(CSR_GIE), v); check(v == 32'd1, "GIE read-back");
    wr(csr(CSR_ISR), 32'(1 << EV_ERR));
    @(negedge clk);
    check(!irq, "write 1 clears the event");
    rd(csr(CSR_ISR), v); check(v == 32'd0, "ISR clear");
    configure(RM_CONV_REPL2);
    rd(csr(CSR_ISR), v); check(v == 32'(1 << EV_CFG), "reconfiguration event");
    check(!irq, "masked event gives no irq");
    wr(csr(CSR_ISR), 32'h7);
    wr(csr(CSR_IER), 32'h7);

    // soft reset: wrong key does nothing, right key clears user registers
    wr(csr(CSR_SHIFT), 32'd12);
    wr({RGN_U, 14'd7}, 32'h0BAD_F00D);
    wr(csr(CSR_SOFT_RST), 32'h5);
    repeat (3) @(negedge clk);
    rd(csr(CSR_SHIFT), v); check(v == 32'd12, "wrong key ignored");
    wr(csr(CSR_SOFT_RST), SOFT_RST_KEY);
    wr(csr(CSR_CTRL), 32'd1);               // lands while in reset: no event
    repeat (SOFT_RST_CYCLES) @(negedge clk);
    rd(csr(CSR_SHIFT), v);   check(v == 32'd0, "soft reset clears SHIFT");
    rd({RGN_U, 14'd7}, v);   check(v == 32'h0BAD_F00D, "soft reset keeps U");
    rd(csr(CSR_IER), v);     check(v == 32'h7, "soft reset keeps IER");
    rd(csr(CSR_STATUS), v);  check(v[3:2] == RM_CONV_REPL2, "soft reset keeps the accelerator");
    rd(csr(CSR_ISR), v);     check(v == 32'd0, "no event from a start during soft reset");

    // burst load of U at one word per clock, burst read-back
    uu = new[N*N]; hh = new[11];
    a0 = acks;
    for (int i = 0; i < N*N; i++) begin
      uu[i] = 32'(signed'(22'($urandom())));
      @(negedge clk); req = '{valid: 1'b1, we: 1'b1, addr: {RGN_U, 14'(i)}, wdata: uu[i]};
    end
    @(negedge clk); req.valid = 1'b0;
    check(acks - a0 == N*N, "burst write fully acknowledged");
    for (int i = 0; i <= N*N; i++) begin
      @(negedge clk);
      if (i > 0 && rsp.rdata !== uu[i-1]) bad++;
      if (i < N*N) req = '{valid: 1'b1, we: 1'b0, addr: {RGN_U, 14'(i)}, wdata: '0};
      else         req.valid = 1'b0;
    end
    check(bad == 0, "burst read-back of U");

    // one ConvRepl2 run through the bus, finished by interrupt
    for (int i = 0; i < 11; i++) begin hh[i] = 32'(signed'(15'($urandom()))); wr({RGN_H, 14'(i)}, hh[i]); end
    conv_ref(uu, hh, N, 11, 1, 1'b1, 4, yy);
    wr(csr(CSR_SHIFT), 32'd4);
    wr(csr(CSR_CTRL), 32'd1);
    a0 = 0;
    while (!irq && a0 < 10000) begin @(negedge clk); a0++; end
    rd(csr(CSR_ISR), v); check(v == 32'(1 << EV_DONE), "done event");
    rd(csr(CSR_CYCLES), v); check(v == 32'(N*N*11 + int'(CONV_EXTRA_CYCLES)), "run length");
    bad = 0;
    for (int i = 0; i < N*N; i++) begin rd({RGN_Y, 14'(i)}, v); if (v !== yy[i]) bad++; end
    check(bad == 0, $sformatf("ConvRepl2 output: %0d wrong words", bad));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
