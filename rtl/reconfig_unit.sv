// reconfig_unit: one Reconfigurable Unit peripheral.
//
// A bus slave that gives the processor access to one accelerator region and
// its memories. It wraps ru_user_logic (memories, registers, region) with
// the three services the unit provides to the system:
//  * bus slave: accepts one beat per clock (valid, write, 16-bit word address,
//    data) and answers every beat exactly one clock later with ack and, for a
//    read, the data. Consecutive beats stream at one word per clock, which is
//    how burst transfers of the 9216-word matrices are carried.
//  * soft reset: writing SOFT_RST_KEY (0x0000000A) to CSR_SOFT_RST holds the
//    user logic (accelerator, registers) in reset for SOFT_RST_CYCLES clocks.
//    Memory contents, the interrupt registers, the bus slave and the
//    accelerator loaded in the region are kept.
//  * interrupt service: event flags ISR (sticky, write 1 to clear), enables
//    IER and a global enable GIE; irq = GIE and any (ISR and IER). Events are
//    accelerator done, reconfiguration done and refused start.
// The unit's parts (bus interface, soft reset, interrupt service, user logic)
// follow the published peripheral; the bus protocol is a simplified stand-in
// for the processor local bus, and the key, register layout and event set are
// this design's choices.
module reconfig_unit
  import nav_pkg::*;
#(
  parameter int unsigned N = 96
) (
  input  logic     clk,
  input  logic     rst_n,
  input  ru_req_t  bus_req,
  output bus_rsp_t bus_rsp,
  output logic     irq,
  input  logic     cfg_start,
  input  rm_id_e   cfg_id,
  input  logic     cfg_done
);

  wire is_csr = (region_e'(bus_req.addr[RU_AW-1 -: 2]) == RGN_CSR);
  wire [3:0] off = bus_req.addr[3:0];
  // registers kept by this wrapper rather than the user logic
  wire own_reg = is_csr && (off == CSR_SOFT_RST || off == CSR_GIE ||
                            off == CSR_ISR || off == CSR_IER);

  // ---------------- soft reset ----------------
  logic [$clog2(SOFT_RST_CYCLES+1)-1:0] srst_cnt;
  logic ul_rst_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) srst_cnt <= '0;
    else if (bus_req.valid && bus_req.we && is_csr && off == CSR_SOFT_RST &&
             bus_req.wdata == SOFT_RST_KEY)
      srst_cnt <= ($bits(srst_cnt))'(SOFT_RST_CYCLES);
    else if (srst_cnt != '0)
      srst_cnt <= srst_cnt - 1'b1;
  end

  // synchronous assertion from a register, released on the clock
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ul_rst_n <= 1'b0;
    else        ul_rst_n <= (srst_cnt == '0);
  end

  // ---------------- user logic ----------------
  logic [DATA_W-1:0] ul_rdata;
  logic              done_evt, cfg_evt, err_evt;

  ru_user_logic #(.N(N)) u_user_logic (
    .clk, .rst_n(ul_rst_n), .cfg_rst_n(rst_n),
    .ip_cs(bus_req.valid && !own_reg), .ip_we(bus_req.we), .ip_addr(bus_req.addr),
    .ip_wdata(bus_req.wdata), .ip_rdata(ul_rdata),
    .done_evt, .cfg_evt, .err_evt,
    .cfg_start, .cfg_id, .cfg_done
  );

  // ---------------- interrupt service ----------------
  logic [NUM_EV-1:0] isr, ier;
  logic              gie;
  logic [NUM_EV-1:0] ev;
  assign ev = NUM_EV'({err_evt, cfg_evt, done_evt});

  wire wr_own = bus_req.valid && bus_req.we && own_reg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      isr <= '0;
      ier <= '0;
      gie <= 1'b0;
    end else begin
      logic [NUM_EV-1:0] clr;
      clr = (wr_own && off == CSR_ISR) ? bus_req.wdata[NUM_EV-1:0] : '0;
      isr <= (isr & ~clr) | ev;
      if (wr_own && off == CSR_IER) ier <= bus_req.wdata[NUM_EV-1:0];
      if (wr_own && off == CSR_GIE) gie <= bus_req.wdata[0];
    end
  end

  assign irq = gie && |(isr & ier);

  // ---------------- response ----------------
  logic              ack_q, own_rd_q;
  logic [DATA_W-1:0] own_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ack_q    <= 1'b0;
      own_rd_q <= 1'b0;
      own_q    <= '0;
    end else begin
      ack_q    <= bus_req.valid;
      own_rd_q <= bus_req.valid && own_reg;
      unique case (off)
        CSR_GIE: own_q <= {31'd0, gie};
        CSR_ISR: own_q <= {{(DATA_W-NUM_EV){1'b0}}, isr};
        CSR_IER: own_q <= {{(DATA_W-NUM_EV){1'b0}}, ier};
        default: own_q <= '0;
      endcase
    end
  end

  // bus rule: every beat is answered exactly one clock later
  a_ack_one_clock: assert property (@(posedge clk) disable iff (!rst_n)
                                    bus_rsp.ack == $past(bus_req.valid));

  assign bus_rsp.ack   = ack_q;
  assign bus_rsp.rdata = !ack_q ? '0 : (own_rd_q ? own_q : ul_rdata);

endmodule
