// radio_pkg: types and constants shared by the PHY processing chains and the
// processor-side peripherals of the flexible-radio platform.
//
// Stream items travel between processing blocks with a valid/ready handshake
// and carry an ID label that the stream multiplexers use to change path.
// Samples on the RF side are 10-bit two's-complement I/Q pairs (the MAX19713
// bus width); correlator results are widened to CORR_W bits. A phase is an
// unsigned PHASE_W-bit fraction of a turn (2**PHASE_W = 2*pi).
// The 802.11 DSSS numbers (11-chip Barker code, 4 samples per chip at
// 44 MHz, SFD 0xF3A0) are defaults that the registers can change.
package radio_pkg;
  localparam int ID_W     = 4;
  localparam int SAMPLE_W = 10;
  localparam int CORR_W   = 16;
  localparam int PHASE_W  = 8;
  localparam int SPS      = 4;    // samples per chip (44 MHz / 11 MChip/s)
  localparam int CHIPS    = 11;   // chips per symbol
  // Barker 11: +1+1+1-1-1-1+1-1-1+1-1, first chip in bit 10, 1 = +1
  localparam logic [CHIPS-1:0] BARKER11 = 11'b111_0001_0010;
  localparam logic [31:0] SFD_8021 = 32'h0000_F3A0;  // first bit in bit 0
  localparam int SFD_LEN  = 16;

  typedef logic [ID_W-1:0]    id_t;
  typedef logic [PHASE_W-1:0] phase_t;

  typedef struct packed {
    logic signed [SAMPLE_W-1:0] i;
    logic signed [SAMPLE_W-1:0] q;
  } sample_t;

  typedef struct packed {
    logic signed [CORR_W-1:0] i;
    logic signed [CORR_W-1:0] q;
  } corr_t;

  // Simple single-cycle processor bus: a request is a cycle with cs high;
  // read data returns on the cycle after a read request.
  typedef struct packed {
    logic        cs;
    logic        we;
    logic [3:0]  be;
    logic [31:0] addr;
    logic [31:0] wdata;
  } bus_req_t;

  // Path switch rule of a stream (de)multiplexer.
  typedef struct packed {
    logic init_sel;   // path taken after init
    logic sw_en;      // switch on ID enabled
    logic sw_sel;     // path taken when sw_id is seen
    id_t  sw_id;      // ID that triggers the switch
  } switch_cfg_t;
endpackage
