// nav_fe_top: feature-extraction accelerator subsystem with three
// Reconfigurable Units.
//
// The Harris corner step of the navigation application is eight 2-D
// convolutions per 96x96 image block. Three units, each holding one
// reconfigurable region with its own U, H and Y memories, sit on one slave
// bus. Software on the processor loads data and filters, has the regions
// rewritten with the accelerator it needs (ConvConst, ConvRepl1 or ConvRepl2)
// and starts them; how often regions are rewritten and how many units work
// in parallel is the reconfiguration strategy (one unit, two units in
// ping-pong, three fixed units, three units pipelined).
//
// Bus: one beat per clock, word address; bits [17:16] select the unit (0..2),
// bits [15:0] go to that unit (see nav_pkg for its map). Every beat is
// acknowledged one clock later, also for the unused unit number 3 (reads 0).
// irq[i] is unit i's interrupt. cfg_start/cfg_id/cfg_done[i] are unit i's
// partial-reconfiguration pins, driven by the configuration controller.
// Three units, their memories and one region each follow the published
// system; the bus is a simplified stand-in for its processor local bus, and
// the processor, memory controller, DMA, interrupt controller and
// configuration controller are outside this RTL.
module nav_fe_top
  import nav_pkg::*;
#(
  parameter int unsigned NUM_UNITS = NUM_RU,
  parameter int unsigned N         = IMG_N
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  bus_req_t              bus_req,
  output bus_rsp_t              bus_rsp,
  output logic [NUM_UNITS-1:0]  irq,
  input  logic [NUM_UNITS-1:0]  cfg_start,
  input  rm_id_e [NUM_UNITS-1:0] cfg_id,
  input  logic [NUM_UNITS-1:0]  cfg_done
);

  wire [1:0] sel = bus_req.addr[BUS_AW-1 -: 2];

  bus_rsp_t [NUM_UNITS-1:0] rsp;
  logic                     miss_q;

  for (genvar i = 0; i < NUM_UNITS; i++) begin : g_ru
    ru_req_t req;
    always_comb begin
      req.valid = bus_req.valid && (32'(sel) == i);
      req.we    = bus_req.we;
      req.addr  = bus_req.addr[RU_AW-1:0];
      req.wdata = bus_req.wdata;
    end

    reconfig_unit #(.N(N)) u_ru (
      .clk, .rst_n,
      .bus_req(req), .bus_rsp(rsp[i]), .irq(irq[i]),
      .cfg_start(cfg_start[i]), .cfg_id(cfg_id[i]), .cfg_done(cfg_done[i])
    );
  end

  // beats to a unit number that does not exist are still acknowledged
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) miss_q <= 1'b0;
    else        miss_q <= bus_req.valid && (32'(sel) >= NUM_UNITS);
  end

  // only one unit answers per clock, so the responses can be ORed
  logic [NUM_UNITS:0] acks;
  always_comb begin
    acks[NUM_UNITS] = miss_q;
    for (int i = 0; i < NUM_UNITS; i++) acks[i] = rsp[i].ack;
  end
  a_one_responder: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(acks));

  always_comb begin
    bus_rsp.ack   = miss_q;
    bus_rsp.rdata = '0;
    for (int i = 0; i < NUM_UNITS; i++) begin
      bus_rsp.ack   = bus_rsp.ack   | rsp[i].ack;
      bus_rsp.rdata = bus_rsp.rdata | rsp[i].rdata;
    end
  end

endmodule
