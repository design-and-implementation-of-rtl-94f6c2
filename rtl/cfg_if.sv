// cfg_if: configuration interface of the memory controller.
//
// An APB slave holding two staging registers, SETCYCLE and SETOPMODE, and
// for each of the four chips (banks) a CYCLE timing register and an OPMODE
// register. Software writes the timing it wants into SETCYCLE, then writes
// SETOPMODE; the chip field of SETOPMODE says which chip's registers are
// loaded, and in the next PCLK cycle that chip's CYCLE and OPMODE take the
// values of SETCYCLE and SETOPMODE. Each chip's registers can be read back.
//
// Register map (word offsets, PADDR[4:2]):
//   0x00 SETCYCLE   RW  [3:0] rd_wait, [7:4] wr_wait, [11:8] seq_wait
//   0x04 SETOPMODE  RW  [0] burst_en, [5:4] chip; a write loads that chip
//   0x10..0x1C CHIPn_CFG  RO  [11:0] CYCLE, [16] OPMODE.burst_en of chip n
// Other offsets read as zero. Writes take effect at the access cycle.
//
// The chip registers are used by the external memory interface, which runs
// on the memory clock. Each load flips a toggle; the toggle crosses to the
// memory clock through a two-flip-flop synchronizer and, when it changes,
// the memory side copies all chip registers into its own set. The copied
// registers have been stable for at least two memory clocks by then; two
// loads must be a few memory clocks apart for the second one to be seen
// whole, which any APB write sequence at comparable clock rates gives.
// The staging registers, per-chip CYCLE/OPMODE registers and the read-back
// paths follow the document; the field layout, the offsets, the chip field
// in SETOPMODE and the clock crossing are this design's choice.
module cfg_if
  import ahb_mc_pkg::*;
(
  input  logic        pclk,
  input  logic        presetn,
  input  logic        psel,
  input  logic        penable,
  input  logic        pwrite,
  input  logic [31:0] paddr,
  input  logic [31:0] pwdata,
  output logic [31:0] prdata,

  input  logic        mclk,
  input  logic        mresetn,
  output chip_cfg_t   chip_cfg_m [NBANK]   // memory-clock copy
);
  cycle_t     set_cycle;
  opmode_t    set_opmode;
  logic [1:0] set_chip;
  logic       load;
  chip_cfg_t  chip_cfg [NBANK];
  logic       tgl;

  logic wr_access;
  assign wr_access = psel && penable && pwrite;

  always_ff @(posedge pclk or negedge presetn) begin
    if (!presetn) begin
      set_cycle  <= CHIP_CFG_RESET.cycle;
      set_opmode <= CHIP_CFG_RESET.opmode;
      set_chip   <= '0;
      load       <= 1'b0;
      tgl        <= 1'b0;
      for (int i = 0; i < NBANK; i++) chip_cfg[i] <= CHIP_CFG_RESET;
    end else begin
      load <= 1'b0;
      if (wr_access) begin
        unique case (paddr[4:2])
          3'd0: set_cycle <= cycle_t'(pwdata[11:0]);
          3'd1: begin
            set_opmode <= opmode_t'(pwdata[0]);
            set_chip   <= pwdata[5:4];
            load       <= 1'b1;
          end
          default: ;
        endcase
      end
      if (load) begin
        chip_cfg[set_chip] <= '{opmode: set_opmode, cycle: set_cycle};
        tgl                <= ~tgl;
      end
    end
  end

  always_comb begin
    prdata = '0;
    unique case (paddr[4:2])
      3'd0: prdata[11:0] = set_cycle;
      3'd1: prdata[5:0]  = {set_chip, 3'b000, set_opmode.burst_en};
      3'd4, 3'd5, 3'd6, 3'd7: begin
        prdata[11:0] = chip_cfg[paddr[3:2]].cycle;
        prdata[16]   = chip_cfg[paddr[3:2]].opmode.burst_en;
      end
      default: ;
    endcase
  end

  // ---------------- memory clock copy ----------------
  logic tgl_m, tgl_m_d;

  sync_2ff #(.WIDTH(1)) u_sync_tgl (.clk(mclk), .rst_n(mresetn), .d(tgl), .q(tgl_m));

  always_ff @(posedge mclk or negedge mresetn) begin
    if (!mresetn) begin
      tgl_m_d <= 1'b0;
      for (int i = 0; i < NBANK; i++) chip_cfg_m[i] <= CHIP_CFG_RESET;
    end else begin
      tgl_m_d <= tgl_m;
      if (tgl_m != tgl_m_d)
        for (int i = 0; i < NBANK; i++) chip_cfg_m[i] <= chip_cfg[i];
    end
  end
endmodule
