// conv_const: the ConvConst accelerator (reconfigurable module).
//
// Convolves a 96x96 block of integers in U with a 3x3 filter in H and writes
// the 96x96 integer result to Y. In the feature-extraction flow it runs twice
// per block, once with the horizontal Prewitt filter [1 1 1; 0 0 0; -1 -1 -1]
// and once with the vertical one [1 0 -1; 1 0 -1; 1 0 -1], giving the two
// image gradients. Taps that fall outside the block read as the constant 0.
// The 64-bit sum of each pixel is clamped to a signed 32-bit word.
//
// Interface: the common reconfigurable-module interface (see reconfig_module):
// a start pulse, busy and a one-clock done pulse, a U read port and an H read
// port (synchronous block RAMs, one clock latency), a Y write port. shift is
// part of that interface but not used: ConvConst takes and gives integers.
// Timing: one multiply-accumulate per clock. With start high in clock 0,
// done is high in clock N*N*9 + CONV_EXTRA_CYCLES (82,947 at N = 96).
// The filter sizes, block size and integer in/out follow the published design;
// the zero border (read from the function's name) and clamping are this
// design's choices.
module conv_const
  import nav_pkg::*;
#(
  parameter int unsigned N   = 96,
  parameter int unsigned KH  = 3,
  parameter int unsigned KW  = 3,
  parameter int unsigned AW  = $clog2(N*N),
  parameter int unsigned HAW = 7
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic [5:0]               shift,
  output logic                     busy,
  output logic                     done,
  output logic [AW-1:0]            u_addr,
  output logic                     u_en,
  input  logic [DATA_W-1:0]        u_q,
  output logic [HAW-1:0]           h_addr,
  output logic                     h_en,
  input  logic [DATA_W-1:0]        h_q,
  output logic [AW-1:0]            y_addr,
  output logic                     y_we,
  output logic [DATA_W-1:0]        y_d
);

  logic                    acc_valid, acc_last, core_busy;
  logic [AW-1:0]           acc_addr;
  logic signed [ACC_W-1:0] acc;

  conv_core #(.N(N), .KH(KH), .KW(KW), .BORDER(BORDER_ZERO), .AW(AW), .HAW(HAW)) u_core (
    .clk, .rst_n, .start, .busy(core_busy),
    .u_addr, .u_en, .u_q, .h_addr, .h_en, .h_q,
    .acc_valid, .acc_last, .acc_addr, .acc
  );

  // Integer output: no scaling, clamp to 32 bits
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_we   <= 1'b0;
      y_addr <= '0;
      y_d    <= '0;
      done   <= 1'b0;
    end else begin
      y_we   <= acc_valid;
      y_addr <= acc_addr;
      y_d    <= sat32(acc);
      done   <= acc_last;
    end
  end

  assign busy = core_busy || y_we;

  // shift is unused here: ConvConst works on integers only
  wire unused_shift = ^shift;

endmodule
