// scproc_pkg: constants and types shared by the SC_PROC board logic.
//
// The processor board maps its I/O ports into program-memory bank 1 of the
// 21020 DSP.  PMA[23:21] picks the card or device, PMA[3:0] picks the port
// within the SC_PROC I/O block and PMA[20:4] are ignored.  Every status or
// control register sits on the top byte of the 48-bit program data bus,
// PMD[47:40]; the constants below give each flag's bit index within that byte
// (bit 7 = PMD47 ... bit 0 = PMD40).  Flags whose names start with "n" are
// active low, as on the board.
package scproc_pkg;

  // ---------------------------------------------------------------- bus
  localparam int unsigned PMA_W = 24;
  localparam int unsigned PMD_W = 48;

  // PMA[23:21] decode inside bank 1
  localparam logic [2:0] BANK_CM_CTL = 3'b100;  // 0x80 0000 camera / MHC card
  localparam logic [2:0] BANK_MON    = 3'b101;  // 0xA0 0000 PSU monitor card
  localparam logic [2:0] BANK_SC_IO  = 3'b110;  // 0xC0 0000 SC_PROC I/O ports
  localparam logic [2:0] BANK_PROM   = 3'b111;  // 0xE0 0000 boot PROM

  // PMA[3:0] port numbers of the SC_PROC I/O block
  typedef enum logic [3:0] {
    PORT_SCTIME  = 4'h0,  // spacecraft time, read and write
    PORT_WD      = 4'h1,  // watchdog status / control
    PORT_CMD_CTL = 4'h2,  // command interface status / control
    PORT_CMD_DAT = 4'h3,  // command FIFO data read
    PORT_ST_CTL  = 4'h4,  // status interface status / control
    PORT_ST_DAT  = 4'h5,  // status FIFO data write
    PORT_MD_CTL  = 4'h6,  // mission data interface status / control
    PORT_MD_DAT  = 4'h7,  // mission data FIFO data write
    PORT_OD0     = 4'h8,  // test port strobe ~OD0
    PORT_OD1     = 4'h9   // test port strobe ~OD1
  } io_port_e;

  // ------------------------------------------------- register bit indices
  // CMD_IF status (read) / control (write)
  localparam int CMD_BITERR = 6;  // rd ~BitErr     wr ~ClrBitErr
  localparam int CMD_HF     = 5;  // rd ~HF
  localparam int CMD_IRQ    = 4;  // rd ~Irq        wr ~ClrIrq
  localparam int CMD_OVR    = 3;  // rd ~OvrFlw     wr ~ClrOvrFlw
  localparam int CMD_EF     = 2;  // rd ~EF         wr ~RST
  localparam int CMD_RST    = 2;
  localparam int CMD_FF     = 1;  // rd ~FF
  localparam int CMD_ENA    = 0;  // rd CMD_ENA

  // ST_IF
  localparam int ST_GO  = 7;  // rd/wr ~ST_GO
  localparam int ST_EF  = 2;  // rd ~EF   wr ~RST
  localparam int ST_RST = 2;
  localparam int ST_FF  = 1;  // rd ~FF
  localparam int ST_ENA = 0;  // rd ST_ENA

  // MD_IF
  localparam int MD_RST = 7;  // wr ~RST
  localparam int MD_FF  = 6;  // rd ~FF
  localparam int MD_EF  = 5;  // rd ~EF
  localparam int MD_BSY = 4;  // rd BSY
  localparam int MD_IRQ = 3;  // rd ~IRQ  wr ~ClrIrq
  localparam int MD_EOP = 2;  // rd/wr ~EOP
  localparam int MD_GO  = 1;  // rd/wr ~GO

  // WD_IF
  localparam int WD_TRIP  = 7;  // rd ~WDTrip    wr ~WDTripRst
  localparam int WD_EN    = 6;  // rd/wr ~WD_EN
  localparam int WD_TOSEL = 5;  // rd/wr ~WDTToSel
  localparam int WD_RSTC  = 4;  // wr ~WD_RST
  localparam int WD_DCRST = 3;  // rd ~DC_RST

  // ------------------------------------------------------------- FIFOs
  localparam int unsigned FIFO_W = 9;  // one IDT7204 is 9 bits wide

  // A 9-bit segment of the command FIFO: end-of-packet flag and a byte.
  typedef struct packed {
    logic       eop;
    logic [7:0] data;
  } cmd_seg_t;

  // One 27-bit command FIFO word; seg[2] is the first byte received and
  // appears on PMD[47:39].
  typedef cmd_seg_t [2:0] cmd_word_t;

  // Active-low flags of one FIFO.
  typedef struct packed {
    logic ef_n;
    logic ff_n;
    logic hf_n;
  } fifo_flags_t;

endpackage
