// euart_pkg: types and constants shared by the enhanced UART (eUART).
//
// The eUART is a single-wire UART for time-triggered field buses (TTP/A,
// LIN). Every bit cell is sampled 16 times, the bit period is held as a
// fixed-point number of clock cycles with 4 fractional bits (Q12.4), and a
// synchronisation detector measures that period from the bus traffic.
// The register map, the field layout of each register and the encodings
// below are this design's own choice; the document only names the registers.
package euart_pkg;

  // Samples taken per bit cell (16-fold oversampling).
  localparam int unsigned OVERSAMPLE = 16;
  // Data bits per UART frame.
  localparam int unsigned DATA_BITS  = 8;
  // Width of a processor register.
  localparam int unsigned REG_W      = 16;
  // Width of the Q12.4 bit-period setting (EUBRS).
  localparam int unsigned BRS_W      = 16;
  // Fractional bits of the bit-period setting.
  localparam int unsigned BRS_FRAC   = 4;

  typedef logic [REG_W-1:0] reg_t;
  typedef logic [BRS_W-1:0] brs_t;
  typedef logic [OVERSAMPLE-1:0] samples_t;

  // Register addresses on the memory interface, in the order of Fig. 1.
  typedef enum logic [2:0] {
    ADDR_STATUS  = 3'd0,
    ADDR_CONFIG  = 3'd1,
    ADDR_ECONFIG = 3'd2,
    ADDR_COMMAND = 3'd3,
    ADDR_MESSAGE = 3'd4,
    ADDR_TIMER   = 3'd5,
    ADDR_TSTM    = 3'd6,
    ADDR_EUBRS   = 3'd7
  } reg_addr_e;

  typedef enum logic [1:0] {
    PAR_NONE = 2'd0,
    PAR_EVEN = 2'd1,
    PAR_ODD  = 2'd2
  } parity_e;

  // Oversampling interpretation: majority for availability, threshold for
  // robustness.
  typedef enum logic {
    OS_MAJORITY = 1'b0,
    OS_ROBUST   = 1'b1
  } os_mode_e;

  // Contents of the EUART CONFIG register.
  typedef struct packed {
    logic [5:0] reserved;   // [15:10]
    logic [4:0] threshold;  // [9:5]  samples needed in robust mode
    logic [1:0] spare;      // [4:3]
    os_mode_e   os_mode;    // [2]
    parity_e    parity;     // [1:0]
  } econfig_t;

  // Bit positions in the STATUS register (and the CONFIGURATION interrupt
  // enable mask, which uses the same positions).
  localparam int unsigned ST_RX_FULL     = 0;
  localparam int unsigned ST_TX_BUSY     = 1;
  localparam int unsigned ST_SYNCED      = 2;
  localparam int unsigned ST_SYNC_ACTIVE = 3;
  localparam int unsigned ST_PARITY_ERR  = 4;
  localparam int unsigned ST_FRAME_ERR   = 5;
  localparam int unsigned ST_SAMPLE_ERR  = 6;
  localparam int unsigned ST_BIT_ERR     = 7;
  localparam int unsigned ST_TIME_MARK   = 8;
  localparam int unsigned ST_OVERRUN     = 9;
  localparam int unsigned ST_DIAG_TIMING = 10;
  localparam int unsigned ST_TX_DONE     = 11;
  localparam int unsigned ST_SEND_PEND   = 12;

  // Bit positions in the COMMAND register.
  localparam int unsigned CMD_SYNC       = 0;
  localparam int unsigned CMD_SEND       = 1;
  localparam int unsigned CMD_SEND_MARK  = 2;
  localparam int unsigned CMD_SYNC_STOP  = 3;

  // One received frame, as the receiver hands it to error control.
  typedef struct packed {
    logic [DATA_BITS-1:0] data;
    logic                 parity_bit;  // meaningless without parity
    logic                 stop_bit;
    logic                 sample_err;  // some bit cell failed evaluation
    samples_t             err_pattern; // samples of the last failing cell
  } rx_frame_t;

  // Even parity over the data bits (1 when the number of ones is odd).
  function automatic logic data_parity(input logic [DATA_BITS-1:0] d);
    return ^d;
  endfunction

  // Parity bit a transmitter appends for the configured mode.
  function automatic logic parity_bit_for(input parity_e mode,
                                          input logic [DATA_BITS-1:0] d);
    return (mode == PAR_ODD) ? ~data_parity(d) : data_parity(d);
  endfunction

endpackage
