// tb_ru_user_logic: self-checking testbench for the user logic of one unit,
// on 16x16 blocks. It drives the IP-side access signals directly. Checked:
// read-back of U and H and the SHIFT register with one clock read latency;
// err_evt on a start with an empty region; cfg_evt when a reconfiguration
// ends; STATUS fields; a ConvRepl1 and a ConvConst run started through CTRL,
// whose Y contents (read over the bus) match tb_ref_pkg and whose CYCLES
// register equals N*N*taps + CONV_EXTRA_CYCLES; done_evt pulses once per run.
module tb_ru_user_logic;
  import nav_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 16;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;

  logic              ip_cs, ip_we;
  logic [RU_AW-1:0]  ip_addr;
  logic [31:0]       ip_wdata, ip_rdata;
  logic              done_evt, cfg_evt, err_evt, cfg_start, cfg_done;
  rm_id_e            cfg_id;

  ru_user_logic #(.N(N)) dut (
    .clk, .rst_n, .cfg_rst_n(rst_n), .ip_cs, .ip_we, .ip_addr, .ip_wdata, .ip_rdata,
    .done_evt, .cfg_evt, .err_evt, .cfg_start, .cfg_id, .cfg_done
  );

  int checks = 0, failures = 0;
  int n_done = 0, n_cfg = 0, n_err = 0;
  always @(negedge clk) begin
    if (done_evt) n_done++;
    if (cfg_evt)  n_cfg++;
    if (err_evt)  n_err++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [15:0] adr(region_e rg, int i);
    return {rg, 14'(i)};
  endfunction

  task automatic wr(logic [15:0] a, logic [31:0] d);
    @(negedge clk); ip_cs = 1; ip_we = 1; ip_addr = a; ip_wdata = d;
    @(negedge clk); ip_cs = 0; ip_we = 0;
  endtask

  task automatic rd(logic [15:0] a, output logic [31:0] d);
    @(negedge clk); ip_cs = 1; ip_we = 0; ip_addr = a;
    @(negedge clk); ip_cs = 0; d = ip_rdata;
  endtask

  task automatic configure(rm_id_e id);
    int c0 = n_cfg;
    @(negedge clk); cfg_start = 1; cfg_id = id;
    @(negedge clk); cfg_start = 0;
    repeat (30) @(negedge clk);
    cfg_done = 1; @(negedge clk); cfg_done = 0;
    repeat (2) @(negedge clk);
    check(n_cfg == c0 + 1, "cfg_evt once per reconfiguration");
  endtask

  task automatic run(string name, int kh, int kw, bit repl, int sh);
    logic [31:0] uu[], hh[], yy[], v;
    int d0 = n_done, bad = 0;
    uu = new[N*N]; hh = new[kh*kw];
    for (int i = 0; i < N*N; i++) begin uu[i] = 32'(signed'(18'($urandom()))); wr(adr(RGN_U, i), uu[i]); end
    for (int i = 0; i < kh*kw; i++) begin hh[i] = 32'(signed'(14'($urandom()))); wr(adr(RGN_H, i), hh[i]); end
    conv_ref(uu, hh, N, kh, kw, repl, sh, yy);
    wr({RGN_CSR, 10'd0, CSR_SHIFT}, 32'(sh));
    wr({RGN_CSR, 10'd0, CSR_CTRL}, 32'd1);
    rd({RGN_CSR, 10'd0, CSR_STATUS}, v);
    check(v[0] == 1'b1, "busy while running");
    while (n_done == d0) @(negedge clk);
    repeat (3) @(negedge clk);
    check(n_done == d0 + 1, "done_evt once");
    rd({RGN_CSR, 10'd0, CSR_CYCLES}, v);
    check(v == 32'(N*N*kh*kw + int'(CONV_EXTRA_CYCLES)), $sformatf("%s: CYCLES=%0d", name, v));
    for (int i = 0; i < N*N; i++) begin
      rd(adr(RGN_Y, i), v);
      if (v !== yy[i]) bad++;
    end
    check(bad == 0, $sformatf("%s: %0d wrong Y words", name, bad));
  endtask

  initial begin
    logic [31:0] v;
    ip_cs = 0; ip_we = 0; ip_addr = '0; ip_wdata = '0; cfg_start = 0; cfg_done = 0; cfg_id = RM_NONE;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // memories and registers read back
    wr(adr(RGN_U, 5), 32'hCAFE_0005);
    wr(adr(RGN_H, 88), 32'h0000_0058);
    wr({RGN_CSR, 10'd0, CSR_SHIFT}, 32'd45);
    rd(adr(RGN_U, 5), v);  check(v == 32'hCAFE_0005, "U read-back");
    rd(adr(RGN_H, 88), v); check(v == 32'h0000_0058, "H read-back (last of 89 words)");
    rd({RGN_CSR, 10'd0, CSR_SHIFT}, v); check(v == 32'd45, "SHIFT read-back");
    rd({RGN_CSR, 10'd0, CSR_STATUS}, v); check(v == 32'd0, "STATUS idle and empty");
    // start with no accelerator
    wr({RGN_CSR, 10'd0, CSR_CTRL}, 32'd1);
    repeat (2) @(negedge clk);
    check(n_err == 1 && n_done == 0, $sformatf("empty start gives err_evt (err=%0d done=%0d)", n_err, n_done));

    configure(RM_CONV_REPL1);
    rd({RGN_CSR, 10'd0, CSR_STATUS}, v); check(v[3:2] == RM_CONV_REPL1, "STATUS loaded id");
    run("ConvRepl1", 1, 11, 1'b1, 6);
    configure(RM_CONV_CONST);
    run("ConvConst", 3, 3, 1'b0, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
