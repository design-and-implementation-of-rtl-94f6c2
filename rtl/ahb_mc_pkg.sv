// ahb_mc_pkg: types and constants shared by the AHB memory controller.
//
// Holds the AMBA AHB encodings (HTRANS, HBURST, HSIZE, HRESP), the command
// word that the AHB slave interface passes to the external memory interface
// through the command FIFO, the write-data FIFO entry, and the per-chip
// timing (CYCLE) and operation-mode (OPMODE) register layouts.
// The AHB encodings are the standard AMBA 2 ones. The field layouts of the
// command word and of the CYCLE/OPMODE registers are this design's own.
package ahb_mc_pkg;

  localparam int unsigned DATA_W  = 32;  // AHB and external data width
  localparam int unsigned XADDR_W = 31;  // external address bus XA[30:0]
  localparam int unsigned NBANK   = 4;   // memory banks / chips, one XCSN each
  localparam int unsigned MAX_BEATS = 16;

  typedef enum logic [1:0] {
    HTRANS_IDLE = 2'b00, HTRANS_BUSY = 2'b01,
    HTRANS_NONSEQ = 2'b10, HTRANS_SEQ = 2'b11
  } htrans_e;

  typedef enum logic [2:0] {
    HBURST_SINGLE = 3'd0, HBURST_INCR = 3'd1,
    HBURST_WRAP4 = 3'd2, HBURST_INCR4 = 3'd3,
    HBURST_WRAP8 = 3'd4, HBURST_INCR8 = 3'd5,
    HBURST_WRAP16 = 3'd6, HBURST_INCR16 = 3'd7
  } hburst_e;

  typedef enum logic [1:0] {
    HRESP_OKAY = 2'b00, HRESP_ERROR = 2'b01,
    HRESP_RETRY = 2'b10, HRESP_SPLIT = 2'b11
  } hresp_e;

  // HSIZE values used by this controller (byte, half-word, word).
  localparam logic [2:0] HSIZE_BYTE = 3'd0;
  localparam logic [2:0] HSIZE_HALF = 3'd1;
  localparam logic [2:0] HSIZE_WORD = 3'd2;

  // Timing register of one chip. Each field counts wait states.
  typedef struct packed {
    logic [3:0] seq_wait;  // wait states of a sequential (burst) read beat
    logic [3:0] wr_wait;   // wait states of a write beat
    logic [3:0] rd_wait;   // wait states of a first (random) read beat
  } cycle_t;

  // Operation-mode register of one chip.
  typedef struct packed {
    logic burst_en;  // 1: later beats of a read burst use seq_wait
  } opmode_t;

  typedef struct packed {
    opmode_t opmode;
    cycle_t  cycle;
  } chip_cfg_t;

  // Reset value of every chip: two wait states everywhere, no burst timing.
  localparam chip_cfg_t CHIP_CFG_RESET = '{opmode: '{burst_en: 1'b0},
                                           cycle: '{seq_wait: 4'd2, wr_wait: 4'd2, rd_wait: 4'd2}};

  // Command word carried by the command FIFO, one per memory burst.
  typedef struct packed {
    logic               write;
    logic [1:0]         bank;   // chip select index, XCSN[bank] goes low
    logic               rom;    // bank holds ROM
    logic [XADDR_W-1:0] addr;   // first byte address on XA
    logic [1:0]         size;   // 0 byte, 1 half-word, 2 word
    logic [4:0]         beats;  // 1..16
    logic               wrap;   // wrapping burst
  } mem_cmd_t;

  // Write-data FIFO entry: data and byte strobes. An all-zero strobe is a
  // padding beat that writes nothing.
  typedef struct packed {
    logic [3:0]        strb;
    logic [DATA_W-1:0] data;
  } wdata_t;

  // Number of memory beats a burst type is translated into. Fixed-length
  // bursts keep their length; SINGLE is one beat; INCR becomes INCR4.
  function automatic logic [4:0] burst_beats(hburst_e b);
    case (b)
      HBURST_SINGLE:               return 5'd1;
      HBURST_INCR:                 return 5'd4;
      HBURST_WRAP4, HBURST_INCR4:  return 5'd4;
      HBURST_WRAP8, HBURST_INCR8:  return 5'd8;
      default:                     return 5'd16;
    endcase
  endfunction

  function automatic logic burst_wraps(hburst_e b);
    return (b == HBURST_WRAP4) || (b == HBURST_WRAP8) || (b == HBURST_WRAP16);
  endfunction

  // Address of the beat after `a` within a burst of `beats` beats of 2**size
  // bytes; wrapping bursts stay inside their aligned block.
  function automatic logic [XADDR_W-1:0] next_beat_addr(logic [XADDR_W-1:0] a,
                                                        logic [1:0] size,
                                                        logic [4:0] beats,
                                                        logic wrap);
    logic [XADDR_W-1:0] step, span, inc;
    step = XADDR_W'(1) << size;
    span = XADDR_W'(beats) << size;
    inc  = a + step;
    if (wrap) return (a & ~(span - 1'b1)) | (inc & (span - 1'b1));
    return inc;
  endfunction

endpackage
