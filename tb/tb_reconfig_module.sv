// tb_reconfig_module: self-checking testbench for the reconfigurable region,
// on 16x16 blocks to keep runs short. Behavioural block RAMs stand for U, H
// and Y. Checked: the region is empty after reset and refuses a start
// (start_err, no memory traffic); each of the three accelerators can be
// configured in turn and then computes its convolution correctly (compared
// with tb_ref_pkg), in N*N*taps + CONV_EXTRA_CYCLES clocks; during a
// reconfiguration the region reads empty and refuses starts; a
// reconfiguration in the middle of a run aborts it; an accelerator reset
// (rst_n) keeps the loaded accelerator while a system reset empties it.
module tb_reconfig_module;
  import nav_pkg::*;
  import tb_ref_pkg::*;

  localparam int N  = 16;
  localparam int AW = $clog2(N*N);

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0, cfg_rst_n = 1'b0;

  logic        cfg_start, cfg_done, reconfiguring, start, busy, done, start_err;
  rm_id_e      cfg_id, loaded_id;
  logic [5:0]  shift;
  logic [AW-1:0] u_addr, y_addr;
  logic [6:0]  h_addr;
  logic        u_en, h_en, y_we;
  logic [31:0] u_q, h_q, y_d;

  reconfig_module #(.N(N)) dut (
    .clk, .rst_n, .cfg_rst_n, .cfg_start, .cfg_id, .cfg_done, .loaded_id, .reconfiguring,
    .start, .shift, .busy, .done, .start_err,
    .u_addr, .u_en, .u_q, .h_addr, .h_en, .h_q, .y_addr, .y_we, .y_d
  );

  logic [31:0] U [N*N];
  logic [31:0] H [89];
  logic [31:0] Y [N*N];
  always_ff @(posedge clk) begin
    if (u_en) u_q <= U[u_addr];
    if (h_en) h_q <= H[h_addr];
    if (y_we) Y[y_addr] <= y_d;
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic configure(rm_id_e id);
    @(negedge clk); cfg_start = 1; cfg_id = id;
    @(negedge clk); cfg_start = 0;
    check(reconfiguring && loaded_id == RM_NONE, "empty while reconfiguring");
    start = 1;
    #1 check(start_err, "start refused while reconfiguring");
    @(negedge clk); start = 0;
    repeat (20) @(negedge clk);
    check(!busy && !u_en && !y_we, "no activity while reconfiguring");
    cfg_done = 1;
    @(negedge clk); cfg_done = 0;
    check(!reconfiguring && loaded_id == id, $sformatf("loaded %0d", id));
  endtask

  task automatic run_and_check(string name, int kh, int kw, bit repl, int sh);
    logic [31:0] uu[], hh[], yy[];
    int cyc = 0, bad = 0;
    uu = new[N*N]; hh = new[kh*kw];
    for (int i = 0; i < N*N; i++) begin U[i] = 32'(signed'(20'($urandom()))); uu[i] = U[i]; Y[i] = '0; end
    for (int i = 0; i < kh*kw; i++) begin H[i] = 32'(signed'(12'($urandom()))); hh[i] = H[i]; end
    conv_ref(uu, hh, N, kh, kw, repl, sh, yy);
    shift = 6'(sh);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0; cyc = 1;
    while (!done && cyc < 100000) begin @(negedge clk); cyc++; end
    @(negedge clk);
    check(cyc == N*N*kh*kw + int'(CONV_EXTRA_CYCLES), $sformatf("%s: %0d clocks", name, cyc));
    for (int i = 0; i < N*N; i++) if (Y[i] !== yy[i]) bad++;
    check(bad == 0, $sformatf("%s: %0d wrong words", name, bad));
  endtask

  initial begin
    int cyc;
    cfg_start = 0; cfg_done = 0; cfg_id = RM_NONE; start = 0; shift = 0;
    repeat (3) @(negedge clk);
    rst_n = 1; cfg_rst_n = 1;
    @(negedge clk);
    check(loaded_id == RM_NONE && !reconfiguring, "empty after reset");
    start = 1;
    #1 check(start_err, "start on empty region refused");
    @(negedge clk); start = 0;
    repeat (5) @(negedge clk);
    check(!busy && !u_en && !done, "empty region stays idle");

    configure(RM_CONV_CONST);
    run_and_check("ConvConst", 3, 3, 1'b0, 0);
    configure(RM_CONV_REPL1);
    run_and_check("ConvRepl1", 1, 11, 1'b1, 7);
    configure(RM_CONV_REPL2);
    run_and_check("ConvRepl2", 11, 1, 1'b1, 3);

    // reconfiguration in the middle of a run aborts it
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    repeat (50) @(negedge clk);
    check(busy, "running before reconfiguration");
    configure(RM_CONV_CONST);
    cyc = 0;
    while (!done && cyc < 4000) begin @(negedge clk); cyc++; end
    check(!done && !busy, "aborted run never finishes");

    // accelerator reset keeps the region, system reset empties it
    rst_n = 0; @(negedge clk); rst_n = 1; @(negedge clk);
    check(loaded_id == RM_CONV_CONST, "accelerator reset keeps the region");
    run_and_check("ConvConst after reset", 3, 3, 1'b0, 0);
    cfg_rst_n = 0; @(negedge clk); cfg_rst_n = 1; @(negedge clk);
    check(loaded_id == RM_NONE, "system reset empties the region");

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
