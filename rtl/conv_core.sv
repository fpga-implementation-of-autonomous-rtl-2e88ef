// conv_core: sequential 2-D convolution engine, one multiply-accumulate per clock.
//
// Shared datapath of the three accelerators. For every output pixel (r, c) of
// an N x N block, in raster order, it walks the KH x KW taps and accumulates
//   acc = sum over (ky, kx) of h[ky*KW + kx] * u[r + ky - KH/2][c + kx - KW/2]
// with one product per clock (acc_n = u[i] * h[j] + acc_(n-1)). The taps are
// applied in the order written (no kernel flip). A tap outside the block reads
// zero (BORDER_ZERO) or the nearest edge pixel (BORDER_REPLICATE).
//
// Pipeline: stage 0 drives the U and H read addresses from the loop counters;
// stage 1 receives the words one clock later (synchronous block RAM) and
// multiplies-accumulates into a 64-bit signed accumulator. After the last tap
// of a pixel, acc_valid pulses for one clock with the full sum in acc and the
// pixel's index in acc_addr; acc_last marks the final pixel of the block.
// A start pulse while idle begins a block; acc_last follows N*N*KH*KW + 2
// clocks after the clock in which start is high (acc_last is high in clock
// N*N*KH*KW + 2 when start is high in clock 0). Starts while busy are ignored.
// The MAC recurrence and the block and filter sizes follow the published
// design; the loop order, border rule and pipeline are this design's choice.
module conv_core
  import nav_pkg::*;
#(
  parameter int unsigned N      = 96,
  parameter int unsigned KH     = 3,
  parameter int unsigned KW     = 3,
  parameter border_e     BORDER = BORDER_ZERO,
  parameter int unsigned AW     = $clog2(N*N),
  parameter int unsigned HAW    = 7
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  output logic                     busy,
  // U read port (block RAM, one clock latency)
  output logic [AW-1:0]            u_addr,
  output logic                     u_en,
  input  logic [DATA_W-1:0]        u_q,
  // H read port
  output logic [HAW-1:0]           h_addr,
  output logic                     h_en,
  input  logic [DATA_W-1:0]        h_q,
  // finished sums
  output logic                     acc_valid,
  output logic                     acc_last,
  output logic [AW-1:0]            acc_addr,
  output logic signed [ACC_W-1:0]  acc
);

  localparam int unsigned CW = $clog2(N) + 1;
  localparam int signed   OY = KH / 2;
  localparam int signed   OX = KW / 2;

  // stage 0: loop counters
  logic          run;
  logic [CW-1:0] r, c;
  logic [7:0]    ky, kx;

  // stage 1: what the words arriving now belong to
  logic          s1_valid, s1_inb, s1_first, s1_last_tap, s1_last_pix;
  logic [AW-1:0] s1_pix;

  logic signed [ACC_W-1:0] acc_run;  // running sum of the current pixel

  // tap coordinates and address
  int signed rr, cc;
  logic      inb;
  always_comb begin
    rr  = int'(r) + int'(ky) - OY;
    cc  = int'(c) + int'(kx) - OX;
    inb = (rr >= 0) && (rr < int'(N)) && (cc >= 0) && (cc < int'(N));
    if (rr < 0)          rr = 0;
    if (rr > int'(N)-1)  rr = int'(N) - 1;
    if (cc < 0)          cc = 0;
    if (cc > int'(N)-1)  cc = int'(N) - 1;
  end

  assign u_addr = AW'(rr * int'(N) + cc);
  assign u_en   = run;
  assign h_addr = HAW'(int'(ky) * int'(KW) + int'(kx));
  assign h_en   = run;

  wire last_kx  = (32'(kx) == KW - 1);
  wire last_ky  = (32'(ky) == KH - 1);
  wire last_c   = (32'(c)  == N - 1);
  wire last_r   = (32'(r)  == N - 1);
  wire last_tap = last_kx && last_ky;
  wire last_pix = last_tap && last_c && last_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0;
      r   <= '0;
      c   <= '0;
      ky  <= '0;
      kx  <= '0;
    end else if (!run) begin
      if (start && !busy) begin
        run <= 1'b1;
        r   <= '0;
        c   <= '0;
        ky  <= '0;
        kx  <= '0;
      end
    end else begin
      if (!last_kx) kx <= kx + 8'd1;
      else begin
        kx <= '0;
        if (!last_ky) ky <= ky + 8'd1;
        else begin
          ky <= '0;
          if (!last_c) c <= c + 1'b1;
          else begin
            c <= '0;
            if (!last_r) r <= r + 1'b1;
            else begin
              r   <= '0;
              run <= 1'b0;
            end
          end
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid    <= 1'b0;
      s1_inb      <= 1'b0;
      s1_first    <= 1'b0;
      s1_last_tap <= 1'b0;
      s1_last_pix <= 1'b0;
      s1_pix      <= '0;
    end else begin
      s1_valid    <= run;
      s1_inb      <= inb || (BORDER == BORDER_REPLICATE);
      s1_first    <= (kx == 8'd0) && (ky == 8'd0);
      s1_last_tap <= last_tap;
      s1_last_pix <= last_pix;
      s1_pix      <= AW'(int'(r) * int'(N) + int'(c));
    end
  end

  // stage 1: multiply-accumulate
  logic signed [ACC_W-1:0] prod, sum;
  always_comb begin
    prod = s1_inb ? ACC_W'(signed'(u_q)) * ACC_W'(signed'(h_q)) : '0;
    sum  = (s1_first ? '0 : acc_run) + prod;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_run   <= '0;
      acc_valid <= 1'b0;
      acc_last  <= 1'b0;
      acc_addr  <= '0;
      acc       <= '0;
    end else begin
      acc_valid <= 1'b0;
      acc_last  <= 1'b0;
      if (s1_valid) begin
        acc_run <= sum;
        if (s1_last_tap) begin
          acc_valid <= 1'b1;
          acc_last  <= s1_last_pix;
          acc_addr  <= s1_pix;
          acc       <= sum;
        end
      end
    end
  end

  assign busy = run || s1_valid || acc_valid;

endmodule
