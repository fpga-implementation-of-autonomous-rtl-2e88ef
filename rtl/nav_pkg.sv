// nav_pkg: constants and types shared by the feature-extraction accelerator.
//
// The design accelerates the Harris corner feature-extraction step of a stereo
// navigation application. Each image is processed in 96x96 pixel blocks; every
// block goes through eight 2-D convolutions done by three kinds of accelerator
// (ConvConst, ConvRepl1, ConvRepl2) that are swapped in and out of three
// reconfigurable regions. This package holds the block size, word widths, the
// address map of one Reconfigurable Unit, the accelerator identifiers and the
// bus beat types. The 96x96 block, the 32-bit words, the 89-word and 9216-word
// memories and the three units follow the published design; the address map,
// register layout, bus beat format and interrupt events are this design's own.
package nav_pkg;

  // Image block and word sizes
  localparam int unsigned IMG_N   = 96;            // pixels per block side
  localparam int unsigned DATA_W  = 32;            // word width of U, H, Y
  localparam int unsigned ACC_W   = 64;            // MAC accumulator width
  localparam int unsigned H_DEPTH = 89;            // coefficient memory words
  localparam int unsigned NUM_RU  = 3;             // reconfigurable units

  // Addresses are word addresses. One unit decodes 16 bits; the top uses
  // two more bits to select the unit.
  localparam int unsigned RU_AW  = 16;
  localparam int unsigned BUS_AW = RU_AW + 2;

  // Unit-local address map: bits [15:14] select the region.
  typedef enum logic [1:0] {
    RGN_U   = 2'd0,   // input matrix U   (write, read back)
    RGN_Y   = 2'd1,   // output matrix Y  (read)
    RGN_H   = 2'd2,   // filter taps H    (write, read back)
    RGN_CSR = 2'd3    // control and status registers
  } region_e;

  // Register offsets inside RGN_CSR (bits [3:0])
  localparam logic [3:0] CSR_CTRL     = 4'd0;  // W: bit0 start
  localparam logic [3:0] CSR_STATUS   = 4'd1;  // R: busy, reconfiguring, loaded id
  localparam logic [3:0] CSR_SHIFT    = 4'd2;  // RW: output right shift (fixed point)
  localparam logic [3:0] CSR_CYCLES   = 4'd3;  // R: clock cycles of the last run
  localparam logic [3:0] CSR_SOFT_RST = 4'd4;  // W: write SOFT_RST_KEY to reset user logic
  localparam logic [3:0] CSR_GIE      = 4'd8;  // RW: bit0 global interrupt enable
  localparam logic [3:0] CSR_ISR      = 4'd9;  // R, write 1 to clear: event flags
  localparam logic [3:0] CSR_IER      = 4'd10; // RW: event enables

  localparam logic [31:0] SOFT_RST_KEY    = 32'h0000_000A;
  localparam int unsigned SOFT_RST_CYCLES = 16;

  // Interrupt events
  localparam int unsigned NUM_EV = 3;
  localparam int unsigned EV_DONE = 0;   // accelerator finished a block
  localparam int unsigned EV_CFG  = 1;   // reconfiguration of the region finished
  localparam int unsigned EV_ERR  = 2;   // start refused (no module or reconfiguring)

  // Which accelerator a region holds
  typedef enum logic [1:0] {
    RM_NONE       = 2'd0,
    RM_CONV_CONST = 2'd1,
    RM_CONV_REPL1 = 2'd2,
    RM_CONV_REPL2 = 2'd3
  } rm_id_e;

  // How a convolution treats taps that fall outside the block
  typedef enum logic {
    BORDER_ZERO      = 1'b0,   // constant zero outside the block
    BORDER_REPLICATE = 1'b1    // nearest edge pixel is repeated
  } border_e;

  // Clocks from the start pulse (clock 0) to the done pulse, beyond one per MAC
  localparam int unsigned CONV_EXTRA_CYCLES = 3;

  // One bus beat: request, and the response that follows one cycle later
  typedef struct packed {
    logic              valid;
    logic              we;
    logic [BUS_AW-1:0] addr;
    logic [DATA_W-1:0] wdata;
  } bus_req_t;

  typedef struct packed {
    logic              valid;
    logic              we;
    logic [RU_AW-1:0]  addr;
    logic [DATA_W-1:0] wdata;
  } ru_req_t;

  typedef struct packed {
    logic              ack;
    logic [DATA_W-1:0] rdata;
  } bus_rsp_t;

  // Clamp a 64-bit signed value into a 32-bit signed word
  function automatic logic signed [DATA_W-1:0] sat32(input logic signed [ACC_W-1:0] v);
    if (v > 64'sh0000_0000_7FFF_FFFF)       return 32'sh7FFF_FFFF;
    else if (v < -64'sh0000_0000_8000_0000) return 32'sh8000_0000;
    else                                    return v[DATA_W-1:0];
  endfunction

  // Round to nearest, then arithmetic shift right by sh, then clamp
  function automatic logic signed [DATA_W-1:0] shift_round_sat(input logic signed [ACC_W-1:0] v,
                                                              input logic [5:0] sh);
    logic signed [ACC_W-1:0] r;
    r = (sh == 6'd0) ? v : (v + (64'sd1 <<< (sh - 6'd1))) >>> sh;
    return sat32(r);
  endfunction

endpackage
