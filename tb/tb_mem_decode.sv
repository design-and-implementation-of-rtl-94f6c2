// tb_mem_decode: checks bank selection, the ROM flag and the external
// address for random addresses in all four regions, before and after remap.
// Before remap region 0 must reach the boot ROM (bank 3); after remap it is
// SRAM bank 0. Regions 1..3 are unaffected by remap.
module tb_mem_decode;
  logic [31:0] haddr;
  logic        remap;
  logic [1:0]  bank;
  logic        rom;
  logic [30:0] xaddr;
  int checks = 0, failures = 0;

  mem_decode dut (.haddr, .remap, .bank, .rom, .xaddr);

  initial begin
    for (int i = 0; i < 400; i++) begin
      int region, eb;
      haddr = $urandom;
      remap = 1'($urandom);
      #1;
      region = int'(haddr[29:28]);
      eb = (region == 0 && !remap) ? 3 : region;
      checks++;
      if (bank !== 2'(eb) || rom !== (eb == 3) ||
          xaddr !== {haddr[30], 2'(eb), haddr[27:0]}) begin
        failures++;
        $display("haddr %h remap %0d: bank %0d rom %0d xaddr %h", haddr, remap, bank, rom, xaddr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
