// mem_decode: memory bank selection and boot remap.
//
// The controller drives four banks, each with its own active-low chip select
// XCSN[n]. The bank of a transfer is taken from HADDR[29:28], so the banks
// sit at 0x0000_0000, 0x1000_0000, 0x2000_0000 and 0x3000_0000 (aliased every
// 1 GiB). Bank 3 holds the boot ROM. Until `remap` is set, region 0 is also
// routed to the boot ROM, so a processor fetching its reset vector at
// address 0 reads ROM; after remap region 0 is the SRAM of bank 0.
// Outputs: the bank index (the memory interface drives XCSN[bank] low),
// whether the bank is ROM, and the external byte address XA, which is HADDR[30:0] with
// the bank bits replaced by the selected bank. Purely combinational.
// The boot ROM at 0x3000_0000, its alias at 0 before remap and XCSN bank
// selection follow the document; the 256 MiB bank spacing and which banks
// hold ROM (parameter ROM_BANKS) are this design's choice.
module mem_decode
  import ahb_mc_pkg::*;
#(
  parameter logic [NBANK-1:0] ROM_BANKS = 4'b1000,  // bit n set: bank n is ROM
  parameter int unsigned      BOOT_BANK = 3
) (
  input  logic [31:0]        haddr,
  input  logic               remap,
  output logic [1:0]         bank,
  output logic               rom,
  output logic [XADDR_W-1:0] xaddr
);
  always_comb begin
    bank = haddr[29:28];
    if (!remap && haddr[29:28] == 2'd0) bank = 2'(BOOT_BANK);
    rom   = ROM_BANKS[bank];
    xaddr = {haddr[30], bank, haddr[27:0]};
  end
endmodule
