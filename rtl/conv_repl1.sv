// conv_repl1: the ConvRepl1 accelerator (reconfigurable module).
//
// Convolves a 96x96 block in U, holding integers (products of gradients), with a 1x11 horizontal Gaussian filter
// whose 11 taps are in H, and writes the 96x96 result to Y. It runs three times per block, on Ix*Ix, Iy*Iy and Ix*Iy.
// Taps that fall outside the block read the nearest edge pixel (replicated
// border). The published design replaced floating point by 32-bit fixed point
// with the scaling split between hardware and software; here software chooses
// the Q format of the taps, and the accelerator rounds the 64-bit sum of each
// pixel to nearest, shifts it right by 'shift' bits and clamps it to a signed
// 32-bit word. With taps in Q16 and shift = 16 the output keeps the input's
// scale; a smaller shift keeps fraction bits.
//
// Interface: the common reconfigurable-module interface (see reconfig_module):
// start pulse, busy, one-clock done pulse, U and H read ports (one clock
// latency), Y write port, and the output shift.
// Timing: one multiply-accumulate per clock. With start high in clock 0,
// done is high in clock N*N*11 + CONV_EXTRA_CYCLES (101,379 at N = 96).
// The filter shape, block size and 32-bit fixed point follow the published
// design; the replicated border (read from the function's name), rounding
// and clamping are this design's choices.
module conv_repl1
  import nav_pkg::*;
#(
  parameter int unsigned N   = 96,
  parameter int unsigned KH  = 1,
  parameter int unsigned KW  = 11,
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
  logic [5:0]              shift_q;

  conv_core #(.N(N), .KH(KH), .KW(KW), .BORDER(BORDER_REPLICATE), .AW(AW), .HAW(HAW)) u_core (
    .clk, .rst_n, .start, .busy(core_busy),
    .u_addr, .u_en, .u_q, .h_addr, .h_en, .h_q,
    .acc_valid, .acc_last, .acc_addr, .acc
  );

  // The shift is sampled at start so a register write during a run has no effect
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  shift_q <= '0;
    else if (start && !core_busy) shift_q <= shift;
  end

  // Fixed-point output: round, shift, clamp
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_we   <= 1'b0;
      y_addr <= '0;
      y_d    <= '0;
      done   <= 1'b0;
    end else begin
      y_we   <= acc_valid;
      y_addr <= acc_addr;
      y_d    <= shift_round_sat(acc, shift_q);
      done   <= acc_last;
    end
  end

  assign busy = core_busy || y_we;

endmodule
