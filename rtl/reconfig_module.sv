// reconfig_module: the reconfigurable region of one unit.
//
// In the FPGA this is a fixed area whose contents are rewritten at run time by
// a partial bitstream: it holds exactly one of the three accelerators
// (ConvConst, ConvRepl1, ConvRepl2), all of which share the interface below.
// This RTL models the region by instantiating the three candidates and
// enabling only the one that was configured last; the others are held in
// reset and their outputs are ignored, so the region behaves as if only that
// accelerator were present.
//
// Reconfiguration: a cfg_start pulse (with cfg_id naming the accelerator in
// the bitstream) marks the region as being rewritten. From then until the
// cfg_done pulse, loaded_id reads RM_NONE, every accelerator is held in reset
// and start is refused (start_err pulses). On cfg_done the new accelerator
// appears, freshly reset. The partial-reconfiguration controller (HwICAP and
// ICAP in the published system) drives these pins; it is outside this RTL.
// After a system reset (cfg_rst_n) the region is empty (RM_NONE). A soft
// reset (rst_n only) resets the present accelerator but keeps it loaded, as
// a logic reset does not erase configuration memory.
//
// Accelerator interface: start pulse, shift, busy, one-clock done pulse, U
// and H read ports and a Y write port on block RAMs with one clock latency.
// What follows the published design: one region per unit, one accelerator at a
// time, the three accelerators sharing one interface. The reset-and-isolate
// behaviour during reconfiguration and the pin-level handshake are this
// design's own.
module reconfig_module
  import nav_pkg::*;
#(
  parameter int unsigned N   = 96,
  parameter int unsigned AW  = $clog2(N*N),
  parameter int unsigned HAW = 7
) (
  input  logic              clk,
  input  logic              rst_n,      // accelerator reset (system or soft reset)
  input  logic              cfg_rst_n,  // system reset only: empties the region
  // partial reconfiguration port
  input  logic              cfg_start,
  input  rm_id_e            cfg_id,
  input  logic              cfg_done,
  output rm_id_e            loaded_id,
  output logic              reconfiguring,
  // accelerator control
  input  logic              start,
  input  logic [5:0]        shift,
  output logic              busy,
  output logic              done,
  output logic              start_err,
  // memories
  output logic [AW-1:0]     u_addr,
  output logic              u_en,
  input  logic [DATA_W-1:0] u_q,
  output logic [HAW-1:0]    h_addr,
  output logic              h_en,
  input  logic [DATA_W-1:0] h_q,
  output logic [AW-1:0]     y_addr,
  output logic              y_we,
  output logic [DATA_W-1:0] y_d
);

  rm_id_e pending_id, present_id;

  always_ff @(posedge clk or negedge cfg_rst_n) begin
    if (!cfg_rst_n) begin
      reconfiguring <= 1'b0;
      pending_id    <= RM_NONE;
      present_id    <= RM_NONE;
    end else if (cfg_start) begin
      reconfiguring <= 1'b1;
      pending_id    <= cfg_id;
      present_id    <= RM_NONE;
    end else if (cfg_done && reconfiguring) begin
      reconfiguring <= 1'b0;
      present_id    <= pending_id;
    end
  end

  assign loaded_id = present_id;

  // configuration port rules: a rewrite is begun and ended by separate pulses,
  // and it ends only after it has begun
  a_cfg_pulses: assert property (@(posedge clk) disable iff (!cfg_rst_n) !(cfg_start && cfg_done));
  a_cfg_order:  assert property (@(posedge clk) disable iff (!cfg_rst_n) cfg_done |-> reconfiguring);

  // One candidate per accelerator kind; index 0 is unused (RM_NONE)
  logic [3:1]              m_rst_n, m_start, m_busy, m_done, m_u_en, m_h_en, m_y_we;
  logic [3:1][AW-1:0]      m_u_addr, m_y_addr;
  logic [3:1][HAW-1:0]     m_h_addr;
  logic [3:1][DATA_W-1:0]  m_y_d;

  always_comb begin
    for (int i = 1; i <= 3; i++) begin
      m_rst_n[i] = rst_n && (present_id == rm_id_e'(i));
      m_start[i] = start && (present_id == rm_id_e'(i));
    end
  end

  conv_const #(.N(N), .AW(AW), .HAW(HAW)) u_conv_const (
    .clk, .rst_n(m_rst_n[1]), .start(m_start[1]), .shift,
    .busy(m_busy[1]), .done(m_done[1]),
    .u_addr(m_u_addr[1]), .u_en(m_u_en[1]), .u_q,
    .h_addr(m_h_addr[1]), .h_en(m_h_en[1]), .h_q,
    .y_addr(m_y_addr[1]), .y_we(m_y_we[1]), .y_d(m_y_d[1])
  );

  conv_repl1 #(.N(N), .AW(AW), .HAW(HAW)) u_conv_repl1 (
    .clk, .rst_n(m_rst_n[2]), .start(m_start[2]), .shift,
    .busy(m_busy[2]), .done(m_done[2]),
    .u_addr(m_u_addr[2]), .u_en(m_u_en[2]), .u_q,
    .h_addr(m_h_addr[2]), .h_en(m_h_en[2]), .h_q,
    .y_addr(m_y_addr[2]), .y_we(m_y_we[2]), .y_d(m_y_d[2])
  );

  conv_repl2 #(.N(N), .AW(AW), .HAW(HAW)) u_conv_repl2 (
    .clk, .rst_n(m_rst_n[3]), .start(m_start[3]), .shift,
    .busy(m_busy[3]), .done(m_done[3]),
    .u_addr(m_u_addr[3]), .u_en(m_u_en[3]), .u_q,
    .h_addr(m_h_addr[3]), .h_en(m_h_en[3]), .h_q,
    .y_addr(m_y_addr[3]), .y_we(m_y_we[3]), .y_d(m_y_d[3])
  );

  // Region outputs come from the present accelerator only
  always_comb begin
    busy   = 1'b0;
    done   = 1'b0;
    u_addr = '0;
    u_en   = 1'b0;
    h_addr = '0;
    h_en   = 1'b0;
    y_addr = '0;
    y_we   = 1'b0;
    y_d    = '0;
    if (present_id != RM_NONE) begin
      busy   = m_busy[present_id];
      done   = m_done[present_id];
      u_addr = m_u_addr[present_id];
      u_en   = m_u_en[present_id];
      h_addr = m_h_addr[present_id];
      h_en   = m_h_en[present_id];
      y_addr = m_y_addr[present_id];
      y_we   = m_y_we[present_id];
      y_d    = m_y_d[present_id];
    end
  end

  assign start_err = start && (present_id == RM_NONE);

endmodule
