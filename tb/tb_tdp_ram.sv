// tb_tdp_ram: self-checking testbench for the true dual-port block RAM at
// its default size (9216 x 32). Random reads and writes on both ports are
// compared with an array model: read data one clock after the address,
// read-first on a same-port write, writes beyond DEPTH ignored and reads
// there returning zero, and port B winning a same-address write collision.
module tb_tdp_ram;
  localparam int DEPTH = 9216;
  localparam int AW = $clog2(DEPTH);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic          a_en, a_we, b_en, b_we;
  logic [AW-1:0] a_addr, b_addr;
  logic [31:0]   a_d, b_d, a_q, b_q;

  tdp_ram dut (.clk, .a_en, .a_we, .a_addr, .a_d, .a_q, .b_en, .b_we, .b_addr, .b_d, .b_q);

  logic [31:0] model [DEPTH];
  int checks = 0, failures = 0;

  task automatic expect_eq(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    logic [31:0] ea, eb;
    bit          ca, cb;
    a_en = 0; a_we = 0; b_en = 0; b_we = 0; a_addr = '0; b_addr = '0; a_d = '0; b_d = '0;
    // fill through both ports
    for (int i = 0; i < DEPTH; i += 2) begin
      @(negedge clk);
      a_en = 1; a_we = 1; a_addr = AW'(i);   a_d = $urandom();
      b_en = 1; b_we = 1; b_addr = AW'(i+1); b_d = $urandom();
      model[i] = a_d; model[i+1] = b_d;
    end
    @(negedge clk);
    a_we = 0; b_we = 0;
    // random traffic
    for (int t = 0; t < 40000; t++) begin
      a_en = 1'($urandom()); a_we = 1'($urandom());
      b_en = 1'($urandom()); b_we = 1'($urandom());
      a_addr = AW'($urandom_range(DEPTH + 100));
      b_addr = (t % 17 == 0) ? a_addr : AW'($urandom_range(DEPTH + 100));
      a_d = $urandom(); b_d = $urandom();
      ca = a_en; cb = b_en;
      ea = (32'(a_addr) < DEPTH) ? model[a_addr] : '0;
      eb = (32'(b_addr) < DEPTH) ? model[b_addr] : '0;
      if (a_en && a_we && 32'(a_addr) < DEPTH) model[a_addr] = a_d;
      if (b_en && b_we && 32'(b_addr) < DEPTH) model[b_addr] = b_d;
      @(negedge clk);
      if (ca) expect_eq(a_q, ea, $sformatf("port A read at %0d", t));
      if (cb) expect_eq(b_q, eb, $sformatf("port B read at %0d", t));
    end
    // final read-back of everything
    a_we = 0; b_we = 0;
    for (int i = 0; i < DEPTH; i++) begin
      a_en = 1; a_addr = AW'(i);
      b_en = 1; b_addr = AW'(DEPTH - 1 - i);
      @(negedge clk);
      expect_eq(a_q, model[i], "read-back A");
      expect_eq(b_q, model[DEPTH-1-i], "read-back B");
    end
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
