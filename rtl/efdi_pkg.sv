// efdi_pkg: types and constants shared by the integrator FPGA blocks.
//
// The 25 MHz universal time counter (UTC) clocks the whole acquisition side;
// the 32-bit multiplexed local bus to the PCI 9056 bridge runs at 40 MHz.
// ADC words are 18 bits. Everything else here (record layout, register map)
// is this design's own choice, documented next to each constant.
package efdi_pkg;

  // Width that follows the hardware: the 18-bit ADC.
  localparam int unsigned ADC_W  = 18;

  // Widths chosen here: a 64-bit UTC never wraps in practice (2^64 x 40 ns),
  // a 16-bit divider covers sampling rates down to 25 MHz / 65535, and a
  // 64-bit accumulator holds 2^17 x 65535 x 2^30 without overflow.
  localparam int unsigned UTC_W = 64;
  localparam int unsigned DIV_W = 16;
  localparam int unsigned ACC_W = 64;

  // One acquisition result: a flux increment (integrator mode) or a raw
  // ADC code (digitizer mode), with its UTC time stamp.
  typedef struct packed {
    logic                    raw;    // 1: digitizer-mode sample, 0: integral
    logic [UTC_W-1:0]        utc;    // trigger time (integral) or sample time (raw)
    logic signed [ACC_W-1:0] value;  // LSB x UTC ticks, or sign-extended code
  } result_t;

  // Time tag attached by the time measurement to each ADC sample.
  typedef struct packed {
    logic             trig;   // a trigger fell inside this sample's interval
    logic [DIV_W-1:0] tau_b;  // UTC ticks from the previous sample to the trigger
    logic [UTC_W-1:0] t_trig; // UTC value at the trigger
    logic [UTC_W-1:0] t_smp;  // UTC value at this sample's conversion start
  } smp_tag_t;

  // Local-bus register map (byte addresses, 32-bit registers).
  localparam logic [15:0] REG_CTRL   = 16'h0000; // [0] run [1] digitizer [2] internal trigger
  localparam logic [15:0] REG_DIV    = 16'h0004; // ADC sample period in UTC ticks
  localparam logic [15:0] REG_OSR    = 16'h0008; // samples per internal trigger
  localparam logic [15:0] REG_SPISEL = 16'h000C; // SPI target, see spi_dispatch
  localparam logic [15:0] REG_RELAY  = 16'h0010; // front-end relay drive bits
  localparam logic [15:0] REG_STATUS = 16'h0014; // read only, see local_bus_slave
  localparam logic [15:0] REG_ID     = 16'h0018; // read only
  localparam logic [15:0] REG_TRIGS  = 16'h001C; // read only: triggers accepted in the last run
  localparam logic [15:0] REG_DROPS  = 16'h0020; // read only: results dropped in the last run
  localparam logic [31:0] ID_VALUE   = 32'hEFD1_0001;
  // Any address with bit 15 set reads (and pops) the acquisition buffer.
  localparam int unsigned FIFO_WIN_BIT = 15;

  // SPI targets behind the dispatcher.
  typedef enum logic [1:0] {
    SPI_DAC_P = 2'd0,  // DAC generating VREF+
    SPI_DAC_N = 2'd1,  // DAC generating VREF-
    SPI_FLASH = 2'd2,  // non-volatile flash
    SPI_MEM   = 2'd3   // memory inside the FPGA
  } spi_sel_e;

endpackage
