// async_fifo: dual-clock FIFO between the AHB and the memory clock domains.
//
// The controller uses three of these: the command FIFO and the write-data
// FIFO (AHB side writes, memory side reads) and the read-data FIFO (memory
// side writes, AHB side reads). DEPTH entries are stored in a register
// array. Each side keeps a binary pointer one bit wider than the address and
// its Gray-coded copy; the Gray pointer crosses to the other domain through
// a two-flip-flop synchronizer. Full and empty are computed from the local
// pointer and the synchronized remote one, so they are pessimistic: a slot
// freed or filled on the other side becomes visible two to three clocks
// later.
// Interface: push with `wr_en` when `!full`, the entry is stored at the
// rising edge of wr_clk. `rd_data` shows the oldest entry whenever `!empty`
// (first-word fall-through); `rd_en` removes it at the rising edge of rd_clk.
// A push on full or a pop on empty is ignored.
// The document gives the FIFO's role and its 16-beat burst size; the Gray
// pointer scheme is this design's choice.
module async_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 16   // power of two
) (
  input  logic             wr_clk,
  input  logic             wr_rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,

  input  logic             rd_clk,
  input  logic             rd_rst_n,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] wgray_sync, rgray_sync;
  logic [AW:0] wbin_next, rbin_next;

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // ---------------- write side ----------------
  assign wbin_next = wbin + (AW+1)'(wr_en && !full);

  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n) begin
      wbin  <= '0;
      wgray <= '0;
    end else begin
      wbin  <= wbin_next;
      wgray <= bin2gray(wbin_next);
    end
  end

  always_ff @(posedge wr_clk) begin
    if (wr_en && !full) mem[wbin[AW-1:0]] <= wr_data;
  end

  sync_2ff #(.WIDTH(AW+1)) u_sync_r2w (
    .clk(wr_clk), .rst_n(wr_rst_n), .d(rgray), .q(rgray_sync)
  );

  // Full when the Gray pointers differ only in their two top bits.
  assign full = (wgray == {~rgray_sync[AW:AW-1], rgray_sync[AW-2:0]});

  // ---------------- read side ----------------
  assign rbin_next = rbin + (AW+1)'(rd_en && !empty);

  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) begin
      rbin  <= '0;
      rgray <= '0;
    end else begin
      rbin  <= rbin_next;
      rgray <= bin2gray(rbin_next);
    end
  end

  sync_2ff #(.WIDTH(AW+1)) u_sync_w2r (
    .clk(rd_clk), .rst_n(rd_rst_n), .d(wgray), .q(wgray_sync)
  );

  assign empty   = (rgray == wgray_sync);
  assign rd_data = mem[rbin[AW-1:0]];

endmodule
