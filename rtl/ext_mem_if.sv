// ext_mem_if: external memory interface, memory clock domain.
//
// Takes one command at a time from the command FIFO and carries out its
// beats on the shared external bus: address XA[30:0], data XD[31:0] (split
// here into xd_out / xd_oe / xd_in; the pad or the board combines them),
// one active-low chip select per bank XCSN[3:0], active-low output enable
// XOEN and active-low byte write enables XWEN[3:0]. ROM and SRAM banks share
// the same address and data wires.
//
// State machine:
//   IDLE        -> CMD_RECV1 when the command FIFO is not empty
//   CMD_RECV1   (the command was taken from the FIFO leaving IDLE) loads
//               the bank's CYCLE/OPMODE registers
//   CMD_RECV2   loads the wait-state and beat counters
//   WR_DATA     takes one entry from the write-data FIFO (waiting while it is
//               empty), then drives XD and XWEN for wr_wait+1 cycles
//   RD_RAM_DATA / RD_ROM_DATA
//               drive XOEN low for wait+1 cycles and store XD in the
//               read-data FIFO at the last one (holding while it is full);
//               wait is rd_wait for the first beat, and seq_wait for later
//               beats when the bank's OPMODE.burst_en is set
//   LAST_ADDR   XOEN/XWEN high, address and write data held one cycle; back
//               to IDLE after the last beat, else step the address (wrapping
//               for WRAP bursts) and return to the data state
// So a beat takes wait+2 memory clocks, the last of them the LAST_ADDR cycle.
// A write entry with no strobe bit set is a padding beat: it goes through
// the same cycles with XWEN held high.
// The states, the per-chip timing registers and the shared bus follow the
// document; the cycle-level timing inside each state is this design's choice.
module ext_mem_if
  import ahb_mc_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // command FIFO (read side)
  input  logic               cmd_empty,
  input  mem_cmd_t           cmd,
  output logic               cmd_pop,
  // write-data FIFO (read side)
  input  logic               wf_empty,
  input  wdata_t             wf_data,
  output logic               wf_pop,
  // read-data FIFO (write side)
  input  logic               rf_full,
  output logic               rf_push,
  output logic [DATA_W-1:0]  rf_data,
  // timing of each chip
  input  chip_cfg_t          chip_cfg [NBANK],
  // external memory bus
  output logic [XADDR_W-1:0] xa,
  output logic [DATA_W-1:0]  xd_out,
  output logic               xd_oe,
  input  logic [DATA_W-1:0]  xd_in,
  output logic [NBANK-1:0]   xcsn,
  output logic               xoen,
  output logic [3:0]         xwen
);
  typedef enum logic [2:0] {
    IDLE, CMD_RECV1, CMD_RECV2, WR_DATA, RD_RAM_DATA, RD_ROM_DATA, LAST_ADDR
  } state_e;

  state_e     state;
  mem_cmd_t   cur;
  chip_cfg_t  cfg;
  logic [4:0] beat;       // beats completed so far
  logic [3:0] cnt;        // wait states left in this beat
  logic       have_wd;    // write entry loaded for this beat
  wdata_t     wreg;

  logic rd_state;
  assign rd_state = (state == RD_RAM_DATA) || (state == RD_ROM_DATA);

  assign cmd_pop = (state == IDLE) && !cmd_empty;
  assign wf_pop  = (state == WR_DATA) && !have_wd && !wf_empty;
  assign rf_push = rd_state && (cnt == 0) && !rf_full;
  assign rf_data = xd_in;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= IDLE;
      cur     <= '0;
      cfg     <= CHIP_CFG_RESET;
      beat    <= '0;
      cnt     <= '0;
      have_wd <= 1'b0;
      wreg    <= '0;
    end else begin
      unique case (state)
        IDLE: if (!cmd_empty) begin
          state <= CMD_RECV1;
        end
        CMD_RECV1: begin
          cfg   <= chip_cfg[cur.bank];
          state <= CMD_RECV2;
        end
        CMD_RECV2: begin
          beat    <= '0;
          have_wd <= 1'b0;
          cnt     <= cur.write ? cfg.cycle.wr_wait : cfg.cycle.rd_wait;
          state   <= cur.write ? WR_DATA : (cur.rom ? RD_ROM_DATA : RD_RAM_DATA);
        end
        WR_DATA: begin
          if (!have_wd) begin
            if (!wf_empty) begin
              wreg    <= wf_data;
              have_wd <= 1'b1;
              cnt     <= cfg.cycle.wr_wait;
            end
          end else if (cnt != 0) begin
            cnt <= cnt - 1'b1;
          end else begin
            state <= LAST_ADDR;
          end
        end
        RD_RAM_DATA, RD_ROM_DATA: begin
          if (cnt != 0) cnt <= cnt - 1'b1;
          else if (!rf_full) state <= LAST_ADDR;
        end
        LAST_ADDR: begin
          if (beat + 1'b1 == cur.beats) begin
            state <= IDLE;
          end else begin
            beat     <= beat + 1'b1;
            cur.addr <= next_beat_addr(cur.addr, cur.size, cur.beats, cur.wrap);
            have_wd  <= 1'b0;
            if (cur.write) begin
              state <= WR_DATA;
            end else begin
              cnt   <= cfg.opmode.burst_en ? cfg.cycle.seq_wait : cfg.cycle.rd_wait;
              state <= cur.rom ? RD_ROM_DATA : RD_RAM_DATA;
            end
          end
        end
        default: state <= IDLE;
      endcase
      // the command is taken from the FIFO as IDLE is left
      if (cmd_pop) cur <= cmd;
    end
  end

  logic active;
  assign active = (state == WR_DATA) || rd_state || (state == LAST_ADDR);

  always_comb begin
    xa     = cur.addr;
    xcsn   = active ? ~(NBANK'(1) << cur.bank) : '1;
    xoen   = !rd_state;
    xd_oe  = cur.write && active && (have_wd || state == LAST_ADDR);
    xd_out = wreg.data;
    xwen   = (state == WR_DATA && have_wd) ? ~wreg.strb : 4'hF;
  end

  // A ROM bank is never written.
  a_no_rom_write: assert property (@(posedge clk) disable iff (!rst_n)
                                   (xwen != 4'hF) |-> !cur.rom)
    else $error("ext_mem_if: write strobe on a ROM bank");
endmodule
