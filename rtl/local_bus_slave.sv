// local_bus_slave: FPGA target on the 32-bit multiplexed local bus of the
// PCI 9056 PCI/PXI bridge.
//
// The bridge is the bus master: for host accesses and for its DMA engine
// alike it starts a transfer by pulling ADS# low for one lclk cycle with the
// byte address on LAD and LW/R# telling the direction (1 = write). Data
// phases follow; in each one the target answers with READY# low, and the
// master marks the last phase with BLAST# low. Bursts of any length are
// accepted; the address advances by 4 per phase.
//
// Behind the bus: the control registers of the acquisition (see the
// register map in efdi_pkg), a status word, an identification word, and a
// read window onto the acquisition buffer (any address with bit 15 set).
// Each data phase in the window pops one buffer word, so a DMA burst of N
// phases moves N words. A window read on an empty buffer inserts wait states
// (READY# high) until a word arrives. Register reads and writes take no wait
// states. Only LAD[15:0] of the address is decoded: the core occupies a
// 64 kB local address space. LAD is split into lad_in / lad_out / lad_oe for
// a tri-state pad outside.
//
// STATUS word: [12:0] buffer fill in words, [16] record dropped (overflow),
// [17] trigger overrun, [18] ADC overrun, [19] run. TRIGS and DROPS show
// counters of the acquisition clock domain without synchronization: they
// are only meaningful once run has been low for a few cycles.
//
// From the source: a 32-bit multiplexed local bus at 40 MHz between the
// PCI 9056 and the FPGA, DMA from the FPGA's internal dual-port RAM. The
// register map, the window and the wait-state rule are this design's.
module local_bus_slave
  import efdi_pkg::*;
#(
  parameter int unsigned CNT_BITS = 13
) (
  input  logic                lclk,
  input  logic                lrst_n,
  // local bus
  input  logic                ads_n,
  input  logic                lw_r_n,
  input  logic                blast_n,
  input  logic [31:0]         lad_in,
  output logic [31:0]         lad_out,
  output logic                lad_oe,
  output logic                ready_n,
  // acquisition buffer read port (first-word-fall-through)
  output logic                fifo_rd_en,
  input  logic [31:0]         fifo_data,
  input  logic                fifo_empty,
  input  logic [CNT_BITS-1:0] fifo_count,
  // control registers
  output logic                cfg_run,
  output logic                cfg_digitizer,
  output logic                cfg_trig_int,
  output logic [DIV_W-1:0]    cfg_div,
  output logic [15:0]         cfg_osr,
  output spi_sel_e            cfg_spi_sel,
  output logic [15:0]         cfg_relay,
  // status, already in the lclk domain
  input  logic                st_overflow,
  input  logic                st_trig_overrun,
  input  logic                st_adc_overrun,
  // counters from the acquisition domain, read only while run is low
  input  logic [31:0]         st_trig_count,
  input  logic [15:0]         st_drop_count
);

  typedef enum logic {S_IDLE, S_DATA} state_e;
  state_e      state;
  logic [15:0] addr;
  logic        wr;
  logic        win;
  logic        ready;
  logic [31:0] reg_rdata;

  assign win = addr[FIFO_WIN_BIT];

  always_comb begin
    unique case (addr & 16'h7FFC)
      REG_CTRL:   reg_rdata = {29'h0, cfg_trig_int, cfg_digitizer, cfg_run};
      REG_DIV:    reg_rdata = 32'(cfg_div);
      REG_OSR:    reg_rdata = 32'(cfg_osr);
      REG_SPISEL: reg_rdata = 32'(cfg_spi_sel);
      REG_RELAY:  reg_rdata = 32'(cfg_relay);
      REG_STATUS: reg_rdata = {12'h0, cfg_run, st_adc_overrun, st_trig_overrun,
                               st_overflow, 3'h0, 13'(fifo_count)};
      REG_ID:     reg_rdata = ID_VALUE;
      REG_TRIGS:  reg_rdata = st_trig_count;
      REG_DROPS:  reg_rdata = 32'(st_drop_count);
      default:    reg_rdata = 32'h0;
    endcase
  end

  always_comb begin
    ready      = 1'b0;
    fifo_rd_en = 1'b0;
    lad_out    = 32'h0;
    if (state == S_DATA) begin
      if (wr) begin
        ready = 1'b1;
      end else if (win) begin
        ready      = !fifo_empty;
        fifo_rd_en = !fifo_empty;
        lad_out    = fifo_data;
      end else begin
        ready   = 1'b1;
        lad_out = reg_rdata;
      end
    end
  end

  assign ready_n = !ready;
  assign lad_oe  = (state == S_DATA) && !wr;

  always_ff @(posedge lclk or negedge lrst_n) begin
    if (!lrst_n) begin
      state         <= S_IDLE;
      addr          <= '0;
      wr            <= 1'b0;
      cfg_run       <= 1'b0;
      cfg_digitizer <= 1'b0;
      cfg_trig_int  <= 1'b0;
      cfg_div       <= DIV_W'(50);    // 500 kS/s from 25 MHz
      cfg_osr       <= 16'd500;
      cfg_spi_sel   <= SPI_DAC_P;
      cfg_relay     <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (!ads_n) begin
          addr  <= lad_in[15:0];
          wr    <= lw_r_n;
          state <= S_DATA;
        end
        S_DATA: if (ready) begin
          if (wr && !win) begin
            unique case (addr & 16'h7FFC)
              REG_CTRL: begin
                cfg_run       <= lad_in[0];
                cfg_digitizer <= lad_in[1];
                cfg_trig_int  <= lad_in[2];
              end
              REG_DIV:    cfg_div     <= lad_in[DIV_W-1:0];
              REG_OSR:    cfg_osr     <= lad_in[15:0];
              REG_SPISEL: cfg_spi_sel <= spi_sel_e'(lad_in[1:0]);
              REG_RELAY:  cfg_relay   <= lad_in[15:0];
              default: ;
            endcase
          end
          addr <= addr + 16'd4;
          if (!blast_n) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
