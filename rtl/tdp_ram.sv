// tdp_ram: true dual-port block RAM with synchronous read.
//
// Each Reconfigurable Unit holds three of these: U (input matrix, 9216 x 32),
// Y (output matrix, 9216 x 32) and H (filter taps, 89 x 32). Port A faces the
// bus, port B faces the accelerator in the reconfigurable region. Both ports
// read and write; a read returns the word one clock after the address is
// presented (read-first: a write in the same cycle returns the old word;
// if both ports write one word in the same cycle, port B wins).
// Writes to addresses at or above DEPTH are ignored and reads there return 0.
// The sizes follow the published memory names; the port behaviour is this
// design's choice, matching a Virtex-5 block RAM in READ_FIRST mode.
module tdp_ram #(
  parameter int unsigned DEPTH = 9216,
  parameter int unsigned WIDTH = 32,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  // port A
  input  logic             a_en,
  input  logic             a_we,
  input  logic [AW-1:0]    a_addr,
  input  logic [WIDTH-1:0] a_d,
  output logic [WIDTH-1:0] a_q,
  // port B
  input  logic             b_en,
  input  logic             b_we,
  input  logic [AW-1:0]    b_addr,
  input  logic [WIDTH-1:0] b_d,
  output logic [WIDTH-1:0] b_q
);

  logic [WIDTH-1:0] mem [DEPTH];

  // One process for both ports so the array has a single driver. When both
  // ports write the same word in the same cycle, port B wins.
  always_ff @(posedge clk) begin
    if (a_en) begin
      a_q <= (32'(a_addr) < DEPTH) ? mem[a_addr] : '0;
      if (a_we && 32'(a_addr) < DEPTH) mem[a_addr] <= a_d;
    end
    if (b_en) begin
      b_q <= (32'(b_addr) < DEPTH) ? mem[b_addr] : '0;
      if (b_we && 32'(b_addr) < DEPTH) mem[b_addr] <= b_d;
    end
  end

endmodule
