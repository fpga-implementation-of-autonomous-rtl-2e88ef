// ru_user_logic: user logic of one Reconfigurable Unit.
//
// Holds the three memories of the unit (U: 9216 x 32 input matrix, Y: 9216 x
// 32 output matrix, H: 89 x 32 filter taps), the reconfigurable region, and
// the timing-control and data-transfer logic between them and the bus.
//
// Bus side (from reconfig_unit): one access per clock at most, ip_cs with
// ip_we, a 16-bit word address and write data; read data appears on ip_rdata
// one clock later, so back-to-back accesses stream one word per clock (burst).
// Address bits [15:14] select U, Y, H or the registers (see nav_pkg).
// Registers: CTRL (write bit0 = 1 to start the loaded accelerator), STATUS
// (bit0 busy, bit1 reconfiguring, bits[3:2] loaded accelerator id), SHIFT
// (fixed-point output shift, 6 bits), CYCLES (clock cycles from start to done
// of the last run, measured here).
// Events (one-clock pulses to the interrupt service): done_evt when the
// accelerator has written its last output word, cfg_evt when a
// reconfiguration completes, err_evt when a start is refused because the
// region is empty or being reconfigured.
// The memories' sizes and the presence of timing control and data transfer
// follow the published design; the register map and event set are this
// design's own.
module ru_user_logic
  import nav_pkg::*;
#(
  parameter int unsigned N   = 96,
  parameter int unsigned AW  = $clog2(N*N),
  parameter int unsigned HAW = $clog2(H_DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,      // system or soft reset
  input  logic              cfg_rst_n,  // system reset only (region contents)
  // IP side of the bus slave
  input  logic              ip_cs,
  input  logic              ip_we,
  input  logic [RU_AW-1:0]  ip_addr,
  input  logic [DATA_W-1:0] ip_wdata,
  output logic [DATA_W-1:0] ip_rdata,
  // events
  output logic              done_evt,
  output logic              cfg_evt,
  output logic              err_evt,
  // partial reconfiguration port
  input  logic              cfg_start,
  input  rm_id_e            cfg_id,
  input  logic              cfg_done
);

  region_e       rgn;
  logic [3:0]    csr_off;
  assign rgn     = region_e'(ip_addr[RU_AW-1 -: 2]);
  assign csr_off = ip_addr[3:0];

  // ---------------- memories ----------------
  logic [DATA_W-1:0] u_qa, y_qa, h_qa, u_qb, h_qb;
  logic [DATA_W-1:0] y_qb_unused;  // the accelerator only writes Y
  logic [AW-1:0]     rm_u_addr, rm_y_addr;
  logic [HAW-1:0]    rm_h_addr;
  logic              rm_u_en, rm_h_en, rm_y_we;
  logic [DATA_W-1:0] rm_y_d;

  tdp_ram #(.DEPTH(N*N), .WIDTH(DATA_W), .AW(AW)) u_bram_u (
    .clk,
    .a_en(ip_cs && rgn == RGN_U), .a_we(ip_we), .a_addr(ip_addr[AW-1:0]), .a_d(ip_wdata), .a_q(u_qa),
    .b_en(rm_u_en), .b_we(1'b0), .b_addr(rm_u_addr), .b_d('0), .b_q(u_qb)
  );

  tdp_ram #(.DEPTH(N*N), .WIDTH(DATA_W), .AW(AW)) u_bram_y (
    .clk,
    .a_en(ip_cs && rgn == RGN_Y), .a_we(ip_we), .a_addr(ip_addr[AW-1:0]), .a_d(ip_wdata), .a_q(y_qa),
    .b_en(rm_y_we), .b_we(rm_y_we), .b_addr(rm_y_addr), .b_d(rm_y_d), .b_q(y_qb_unused)
  );

  tdp_ram #(.DEPTH(H_DEPTH), .WIDTH(DATA_W), .AW(HAW)) u_bram_h (
    .clk,
    .a_en(ip_cs && rgn == RGN_H), .a_we(ip_we), .a_addr(ip_addr[HAW-1:0]), .a_d(ip_wdata), .a_q(h_qa),
    .b_en(rm_h_en), .b_we(1'b0), .b_addr(rm_h_addr), .b_d('0), .b_q(h_qb)
  );

  // ---------------- registers ----------------
  logic       start_pulse, rm_busy, rm_done, rm_err, reconfiguring;
  logic [5:0] shift_q;
  logic [31:0] cycles_q, cycles_run;
  logic       timing;
  rm_id_e     loaded_id;

  wire csr_wr = ip_cs && ip_we && (rgn == RGN_CSR);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start_pulse <= 1'b0;
      shift_q     <= '0;
    end else begin
      start_pulse <= csr_wr && (csr_off == CSR_CTRL) && ip_wdata[0];
      if (csr_wr && csr_off == CSR_SHIFT) shift_q <= ip_wdata[5:0];
    end
  end

  // Timing control: count clocks from start to done of each run
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      timing     <= 1'b0;
      cycles_run <= '0;
      cycles_q   <= '0;
    end else begin
      if (start_pulse && !rm_busy && !rm_err) begin
        timing     <= 1'b1;
        cycles_run <= 32'd1;
      end else if (timing) begin
        cycles_run <= cycles_run + 32'd1;
        if (rm_done) begin
          timing   <= 1'b0;
          cycles_q <= cycles_run;
        end
      end
    end
  end

  // ---------------- reconfigurable region ----------------
  reconfig_module #(.N(N), .AW(AW), .HAW(HAW)) u_region (
    .clk, .rst_n, .cfg_rst_n,
    .cfg_start, .cfg_id, .cfg_done, .loaded_id, .reconfiguring,
    .start(start_pulse), .shift(shift_q), .busy(rm_busy), .done(rm_done), .start_err(rm_err),
    .u_addr(rm_u_addr), .u_en(rm_u_en), .u_q(u_qb),
    .h_addr(rm_h_addr), .h_en(rm_h_en), .h_q(h_qb),
    .y_addr(rm_y_addr), .y_we(rm_y_we), .y_d(rm_y_d)
  );

  // ---------------- read path ----------------
  region_e           rd_rgn;
  logic [DATA_W-1:0] csr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_rgn <= RGN_U;
      csr_q  <= '0;
    end else if (ip_cs && !ip_we) begin
      rd_rgn <= rgn;
      unique case (csr_off)
        CSR_STATUS: csr_q <= {28'd0, loaded_id, reconfiguring, rm_busy};
        CSR_SHIFT:  csr_q <= {26'd0, shift_q};
        CSR_CYCLES: csr_q <= cycles_q;
        default:    csr_q <= '0;
      endcase
    end
  end

  always_comb begin
    unique case (rd_rgn)
      RGN_U:   ip_rdata = u_qa;
      RGN_Y:   ip_rdata = y_qa;
      RGN_H:   ip_rdata = h_qa;
      default: ip_rdata = csr_q;
    endcase
  end

  // ---------------- events ----------------
  logic reconf_q;
  always_ff @(posedge clk or negedge cfg_rst_n) begin
    if (!cfg_rst_n) reconf_q <= 1'b0;
    else        reconf_q <= reconfiguring;
  end

  assign done_evt = rm_done;
  assign cfg_evt  = reconf_q && !reconfiguring;
  // a start while the region is empty, being rewritten, or still busy is refused
  assign err_evt  = start_pulse && (rm_err || rm_busy);

endmodule
