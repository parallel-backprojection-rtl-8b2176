// Shared types and constants of the backprojection unit.
// Target-image pixels are complex integers with 18-bit real and imaginary parts (36 bits, two
// per 72-bit SRAM word); projection samples are complex integers with 16-bit parts (32 bits,
// one BlockRAM word); the complex magnitude is an 18-bit unsigned integer. These widths follow
// the memories' word widths. The packing order ({im, re}, re in the low bits) and the register
// map of the control/status block are this design's own choices.
package bp_pkg;
  localparam int PIX_W  = 18;           // per component, target pixel
  localparam int SMP_W  = 16;           // per component, projection sample
  localparam int MAG_W  = 18;           // magnitude output
  localparam int WORD_W = 72;           // SRAM word as seen through its controller
  localparam int CSR_W  = 32;           // PIO and DMA data word

  typedef struct packed {
    logic signed [PIX_W-1:0] im;
    logic signed [PIX_W-1:0] re;
  } pix_t;

  typedef struct packed {
    logic signed [SMP_W-1:0] im;
    logic signed [SMP_W-1:0] re;
  } smp_t;

  // Flight parameters of one pipeline, all in fast-time sample units (dt = 1).
  typedef struct packed {
    logic [15:0]        rmin;    // range of pixel column x = 0
    logic [7:0]         dx;      // range pixel spacing
    logic [7:0]         dy;      // azimuth pixel spacing
    logic [17:0]        tanphi;  // tan(beam half-angle), unsigned 2.16 fixed point
    logic [15:0]        t0;      // fast-time index of BlockRAM word 0
    logic signed [15:0] ubase;   // slow-time index (pixel rows) of adder stage 0
  } flight_t;

  // Memory-clock side operation of a pipeline.
  typedef enum logic [1:0] {OP_STEP = 2'd0, OP_ZERO = 2'd1, OP_READ = 2'd2} mop_e;

  // CSR word addresses. Per-pipeline registers live at PIPE_BASE + 8*pipe + offset.
  localparam logic [7:0] A_CTRL    = 8'h00;  // W: b0 step, b1 zero, b2 readout, b3 dma rx
  localparam logic [7:0] A_STATUS  = 8'h01;  // R: b0 busy, b1 rx busy, b2 tx busy, b3 clocks ok, b4 step done
  localparam logic [7:0] A_CONFIG  = 8'h02;  // R: [7:0] N, [15:8] R, [23:16] PIPES
  localparam logic [7:0] A_BANK    = 8'h03;  // R/W: bit p = SRAM of pipeline p holding the latest image
  localparam logic [7:0] A_RDPIPE  = 8'h04;  // R/W: pipeline read out by the next readout
  localparam logic [7:0] A_STEPS   = 8'h05;  // R: processing steps completed
  localparam logic [7:0] PIPE_BASE = 8'h10;
  localparam logic [2:0] O_RMIN = 3'd0, O_DXDY = 3'd1, O_TANPHI = 3'd2, O_T0 = 3'd3, O_UBASE = 3'd4;
endpackage
