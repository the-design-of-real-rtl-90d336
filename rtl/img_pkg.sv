// img_pkg: constants and types shared by the FPGA side of the high-frame-rate
// image acquisition system.
//
// The frame geometry (600 x 480 gray pixels, 100 frames/s) and the 16-bit EMIF
// data bus come from the system description. The SRAM organisation (256K x 16
// with byte lanes), the token format on the camera-to-system FIFO and the
// EMIF address map are choices of this design; they are explained where they
// are used.
package img_pkg;

  // Frame geometry: 600 x 480 8-bit gray pixels per frame.
  localparam int unsigned IMG_W      = 600;
  localparam int unsigned IMG_H      = 480;
  localparam int unsigned PIX_BITS   = 8;

  // External SRAM: 256K words of 16 bits, one pixel per byte lane.
  localparam int unsigned SRAM_AW    = 18;
  localparam int unsigned SRAM_DW    = 16;

  // EMIF: 16-bit data bus, word address on EA.
  localparam int unsigned EMIF_DW    = 16;
  localparam int unsigned EMIF_AW    = 20;

  // Token kinds carried with each pixel from the Camera Link clock domain.
  typedef enum logic [1:0] {
    TOK_PIX  = 2'd0,   // pixel continuing the current line
    TOK_SOL  = 2'd1,   // first pixel of a line (not the first line)
    TOK_SOF  = 2'd2,   // first pixel of a frame
    TOK_EOF  = 2'd3    // end-of-frame marker, pixel field unused
  } tok_kind_e;

  typedef struct packed {
    tok_kind_e           kind;
    logic [PIX_BITS-1:0] pix;
  } pix_tok_t;

  // Request bundle driven to one asynchronous SRAM chip (active-low controls).
  typedef struct packed {
    logic [SRAM_AW-1:0] addr;
    logic [SRAM_DW-1:0] wdata;
    logic               ce_n;
    logic               oe_n;
    logic               we_n;
    logic               ub_n;  // upper byte lane (odd pixel address)
    logic               lb_n;  // lower byte lane (even pixel address)
  } sram_req_t;

  // Ping-pong cache states, named as in the state transition diagram.
  typedef enum logic [1:0] {
    S0 = 2'd0,   // reset / idle, waiting for the first frame
    S1 = 2'd1,   // first frame being written into SRAM0, nothing to read
    S2 = 2'd2,   // SRAM0 read out, SRAM1 written
    S3 = 2'd3    // SRAM1 read out, SRAM0 written
  } pp_state_e;

endpackage
