// ahb_slave_if: AHB slave side of the memory controller, AHB clock domain.
//
// Turns AHB transfers into the controller's internal protocol: one command
// per memory burst into the command FIFO, write data with byte strobes into
// the write-data FIFO, and read data out of the read-data FIFO.
//
// Burst translation. A burst's first beat (NONSEQ) makes one command.
// SINGLE is one beat, INCR4/8/16 and WRAP4/8/16 keep their length and
// wrapping, and an undefined-length INCR becomes INCR4. When an INCR burst
// goes on past its four beats, the next SEQ beat issues another INCR4.
//
// Reads and RETRY. When the first beat of a read arrives and nothing is
// prefetched, the command for the whole burst is issued and the transfer is
// answered with a two-cycle RETRY (RETRY_EN = 1), so the bus is free while
// the memory side fills the read-data FIFO. When the master repeats the same
// transfer (same address, burst and size), its beats are served from the
// FIFO, with wait states only while a beat has not yet arrived. If anything
// else comes first, the prefetched beats are stale: they are drained from the
// FIFO, with the new transfer held in wait states, before it is served. Later
// beats of a burst never get RETRY. With RETRY_EN = 0 a read waits with
// HREADYOUT low instead.
//
// Writes. Each beat's data goes into the write-data FIFO with no wait state
// while the FIFO has room. If a write burst ends before the beats its command
// announced (an INCR cut short, say), the missing beats are filled with
// padding entries that write nothing. This happens in the background and
// holds up only the next transfer that needs a new command.
//
// A write to a ROM bank gets a two-cycle ERROR response and is not done.
// IDLE and BUSY transfers get a zero-wait OKAY.
//
// States (data phase): IDLE, CMD_GEN (first beat: make the command),
// WR_RAM_WAIT / RD_RAM_WAIT / RD_ROM_WAIT (first beat waiting for FIFO room or
// data), WR_SEQ / RD_SEQ (later beats), RETRY2 / ERROR2 (second response
// cycle). The first RETRY or ERROR cycle is given from CMD_GEN.
// The state names, the burst translation, RETRY while data is being prepared
// and the read-data FIFO prefetch follow the document. Repeat matching,
// draining, write padding and the ERROR on a ROM write are this design's own.
module ahb_slave_if
  import ahb_mc_pkg::*;
#(
  parameter bit RETRY_EN = 1'b1
) (
  input  logic               hclk,
  input  logic               hresetn,
  input  logic               remap,
  // AHB slave port
  input  logic               hsel,
  input  logic [31:0]        haddr,
  input  logic [1:0]         htrans,
  input  logic               hwrite,
  input  logic [2:0]         hsize,
  input  logic [2:0]         hburst,
  input  logic [DATA_W-1:0]  hwdata,
  input  logic               hready,     // bus HREADY
  output logic               hreadyout,
  output logic [1:0]         hresp,
  output logic [DATA_W-1:0]  hrdata,
  // command FIFO (write side)
  input  logic               cmd_full,
  output logic               cmd_push,
  output mem_cmd_t           cmd,
  // write-data FIFO (write side)
  input  logic               wf_full,
  output logic               wf_push,
  output wdata_t             wf_data,
  // read-data FIFO (read side)
  input  logic               rf_empty,
  output logic               rf_pop,
  input  logic [DATA_W-1:0]  rf_data
);
  typedef enum logic [3:0] {
    S_IDLE, S_CMD_GEN, S_WR_RAM_WAIT, S_RD_RAM_WAIT, S_RD_ROM_WAIT,
    S_WR_SEQ, S_RD_SEQ, S_RETRY2, S_ERROR2
  } state_e;

  state_e state, state_next;

  // one-cycle event pulses: RETRY given, stale beat drained, padding beat
  // pushed, ERROR given (for monitoring in simulation)
  logic ev_retry, ev_drain, ev_pad, ev_error;
  logic [4:0] wr_left_next, rd_left_next;

  // ---------------- address phase ----------------
  logic accept;
  assign accept = hsel && hready && htrans[1];

  logic [1:0]         ap_bank;
  logic               ap_rom;
  logic [XADDR_W-1:0] ap_xaddr;

  mem_decode u_decode (
    .haddr(haddr), .remap(remap),
    .bank(ap_bank), .rom(ap_rom), .xaddr(ap_xaddr)
  );

  // data-phase copy of the transfer
  logic               dp_write, dp_seq, dp_rom;
  logic [31:0]        dp_haddr;
  logic [2:0]         dp_size;
  hburst_e            dp_burst;
  logic [1:0]         dp_bank;
  logic [XADDR_W-1:0] dp_xaddr;

  logic [3:0] dp_strb;
  wen_gen u_wen (.addr_lo(dp_haddr[1:0]), .size(dp_size), .strb(dp_strb));

  // ---------------- outstanding beats ----------------
  logic [4:0]  rd_left;        // beats of the last read command not yet popped
  logic        rd_match_vld;   // a RETRYed first beat is waiting to be repeated
  logic [31:0] rd_match_addr;
  logic [2:0]  rd_match_size;
  hburst_e     rd_match_burst;
  logic [4:0]  wr_left;        // beats of the last write command not yet pushed
  logic        wr_pad;         // that write burst has ended: pad the rest

  logic repeat_hit;
  assign repeat_hit = rd_match_vld && !dp_write && !dp_seq &&
                      dp_haddr == rd_match_addr && dp_size == rd_match_size &&
                      dp_burst == rd_match_burst;

  logic [4:0] new_beats;
  logic       new_wrap;
  assign new_beats = dp_seq ? 5'd4 : burst_beats(dp_burst);
  assign new_wrap  = dp_seq ? 1'b0 : burst_wraps(dp_burst);

  assign cmd = '{write: dp_write, bank: dp_bank, rom: dp_rom, addr: dp_xaddr,
                 size: dp_size[1:0], beats: new_beats, wrap: new_wrap};

  logic wr_real, wr_padpush;
  assign wr_padpush = wr_pad && (wr_left != 0) && !wf_full && !wr_real;
  assign wf_push    = wr_real || wr_padpush;
  assign wf_data    = wr_real ? '{strb: dp_strb, data: hwdata} : '{strb: 4'b0, data: '0};
  assign hrdata     = rf_data;

  // ---------------- data phase ----------------
  logic done;   // the data phase ends this cycle with HREADYOUT high

  always_comb begin
    state_next = state;
    hreadyout  = 1'b1;
    hresp      = HRESP_OKAY;
    cmd_push   = 1'b0;
    wr_real    = 1'b0;
    rf_pop     = 1'b0;
    done       = 1'b0;
    ev_retry   = 1'b0;
    ev_drain   = 1'b0;
    ev_error   = 1'b0;
    unique case (state)
      S_IDLE: done = 1'b1;

      S_CMD_GEN: begin
        hreadyout = 1'b0;
        if (dp_write && dp_rom) begin
          hresp      = HRESP_ERROR;
          state_next = S_ERROR2;
          ev_error   = 1'b1;
        end else if (rd_left != 0 && !repeat_hit) begin
          rf_pop   = !rf_empty;           // drain stale prefetched beats
          ev_drain = !rf_empty;
        end else if (rd_left != 0) begin  // the repeat of a RETRYed read
          if (!rf_empty) begin
            rf_pop    = 1'b1;
            hreadyout = 1'b1;
            done      = 1'b1;
          end else begin
            state_next = dp_rom ? S_RD_ROM_WAIT : S_RD_RAM_WAIT;
          end
        end else if (wr_left != 0 || cmd_full) begin
          // padding of an earlier write, or no room for the command
        end else begin
          cmd_push = 1'b1;
          if (dp_write) begin
            if (!wf_full) begin
              wr_real   = 1'b1;
              hreadyout = 1'b1;
              done      = 1'b1;
            end else begin
              state_next = S_WR_RAM_WAIT;
            end
          end else if (RETRY_EN && !dp_seq) begin
            hresp      = HRESP_RETRY;
            state_next = S_RETRY2;
            ev_retry   = 1'b1;
          end else begin
            state_next = dp_rom ? S_RD_ROM_WAIT : S_RD_RAM_WAIT;
          end
        end
      end

      S_WR_RAM_WAIT, S_WR_SEQ: begin
        hreadyout = !wf_full;
        wr_real   = !wf_full;
        done      = !wf_full;
      end

      S_RD_RAM_WAIT, S_RD_ROM_WAIT, S_RD_SEQ: begin
        hreadyout = !rf_empty;
        rf_pop    = !rf_empty;
        done      = !rf_empty;
      end

      S_RETRY2: begin
        hresp = HRESP_RETRY;
        done  = 1'b1;
      end

      S_ERROR2: begin
        hresp = HRESP_ERROR;
        done  = 1'b1;
      end

      default: state_next = S_IDLE;
    endcase

    if (done) begin
      if (!accept) state_next = S_IDLE;
      else if (htrans == HTRANS_SEQ && hwrite && wr_left_next != 0) state_next = S_WR_SEQ;
      else if (htrans == HTRANS_SEQ && !hwrite && rd_left_next != 0) state_next = S_RD_SEQ;
      else state_next = S_CMD_GEN;
    end
  end

  assign wr_left_next = ((cmd_push && dp_write) ? new_beats : wr_left) - 5'(wf_push);
  assign rd_left_next = ((cmd_push && !dp_write) ? new_beats : rd_left) - 5'(rf_pop);

  assign ev_pad = wr_padpush;

  // burst continues when the next address phase is a SEQ or BUSY of ours
  logic burst_goes_on;
  assign burst_goes_on = hsel && (htrans == HTRANS_SEQ || htrans == HTRANS_BUSY);

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      state          <= S_IDLE;
      dp_write       <= 1'b0;
      dp_seq         <= 1'b0;
      dp_rom         <= 1'b0;
      dp_haddr       <= '0;
      dp_size        <= HSIZE_WORD;
      dp_burst       <= HBURST_SINGLE;
      dp_bank        <= '0;
      dp_xaddr       <= '0;
      rd_left        <= '0;
      rd_match_vld   <= 1'b0;
      rd_match_addr  <= '0;
      rd_match_size  <= '0;
      rd_match_burst <= HBURST_SINGLE;
      wr_left        <= '0;
      wr_pad         <= 1'b0;
    end else begin
      state   <= state_next;
      rd_left <= rd_left_next;
      wr_left <= wr_left_next;

      if (accept) begin
        dp_write <= hwrite;
        dp_seq   <= (htrans == HTRANS_SEQ);
        dp_rom   <= ap_rom;
        dp_haddr <= haddr;
        dp_size  <= hsize;
        dp_burst <= hburst_e'(hburst);
        dp_bank  <= ap_bank;
        dp_xaddr <= ap_xaddr;
      end

      if (cmd_push && !dp_write && RETRY_EN && !dp_seq) begin
        rd_match_vld   <= 1'b1;
        rd_match_addr  <= dp_haddr;
        rd_match_size  <= dp_size;
        rd_match_burst <= dp_burst;
      end else if (rf_pop) begin
        rd_match_vld <= 1'b0;
      end

      if (wr_left_next == 0) wr_pad <= 1'b0;
      else if (hready && !burst_goes_on) wr_pad <= 1'b1;
    end
  end

  // ---------------- AHB rules ----------------
  // A RETRY or ERROR takes two cycles: HREADYOUT low, then high.
  a_two_cycle_resp: assert property (@(posedge hclk) disable iff (!hresetn)
      (hresp != HRESP_OKAY && !hreadyout) |=> (hresp == $past(hresp) && hreadyout))
    else $error("ahb_slave_if: broken two-cycle response");
  // Reads are never popped from an empty FIFO nor data pushed into a full one.
  a_fifo_rules: assert property (@(posedge hclk) disable iff (!hresetn)
      !(rf_pop && rf_empty) && !(wf_push && wf_full) && !(cmd_push && cmd_full))
    else $error("ahb_slave_if: FIFO misuse");
endmodule
