// ext_mem_model: behavioural model of the external memory of the testbenches.
//
// Four banks on a shared bus, selected by the active-low chip selects. Each
// bank is four byte-wide chips, one per byte lane, addressed by XA[n+2:2]
// with n+1 = WORDS_LOG2. Banks whose bit is set in ROM_BANKS are ROM: their
// contents are a fixed function of bank and word address (rom_word) and
// they ignore writes. The other banks are SRAM, written one byte lane at a
// time on each rising edge of clk where the lane's XWEN bit and the bank's
// XCSN are low. Reads are asynchronous: XD shows the selected word while
// XCSN and XOEN are low. The model counts rule violations in `errors`:
// XOEN and XWEN low at once, a write without the controller driving XD, or
// two chip selects low together.
module ext_mem_model #(
  parameter int unsigned WORDS_LOG2 = 8,
  parameter logic [3:0]  ROM_BANKS  = 4'b1000
) (
  input  logic        clk,
  input  logic [30:0] xa,
  input  logic [31:0] xd_out,
  input  logic        xd_oe,
  output logic [31:0] xd_in,
  input  logic [3:0]  xcsn,
  input  logic        xoen,
  input  logic [3:0]  xwen
);
  localparam int unsigned WORDS = 1 << WORDS_LOG2;

  logic [31:0] sram [4][WORDS];
  int errors = 0;
  int writes = 0;   // clock cycles with a write to SRAM

  function automatic logic [31:0] rom_word(int bank, int word);
    return 32'hA000_0000 | (32'(bank) << 24) | (32'(word) * 32'h0001_0003);
  endfunction

  initial begin
    for (int b = 0; b < 4; b++)
      for (int w = 0; w < WORDS; w++) sram[b][w] = 32'h5A5A_0000 | 32'(w);
  end

  logic [1:0] bank;
  logic       sel;
  logic [WORDS_LOG2-1:0] word;
  always_comb begin
    sel  = (xcsn != 4'hF);
    bank = 2'd0;
    for (int b = 0; b < 4; b++) if (!xcsn[b]) bank = 2'(b);
    word = xa[WORDS_LOG2+1:2];
  end

  always_comb begin
    xd_in = 32'hDEAD_BEEF;
    if (sel && !xoen) xd_in = ROM_BANKS[bank] ? rom_word(int'(bank), int'(word)) : sram[bank][word];
  end

  always_ff @(posedge clk) begin
    if (sel && xwen != 4'hF) begin
      if (!xoen) errors <= errors + 1;
      if (!xd_oe) errors <= errors + 1;
      if (!ROM_BANKS[bank]) begin
        writes <= writes + 1;
        for (int i = 0; i < 4; i++)
          if (!xwen[i]) sram[bank][word][8*i +: 8] <= xd_out[8*i +: 8];
      end
    end
    if (!$onehot0(~xcsn)) errors <= errors + 1;
  end
endmodule
