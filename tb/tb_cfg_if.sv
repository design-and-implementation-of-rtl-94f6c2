// tb_cfg_if: drives the configuration interface with APB transfers (setup
// cycle, then access cycle) on a 10-unit clock while the memory side runs on
// a 26-unit clock. For each chip in turn it writes SETCYCLE and SETOPMODE
// and checks: the staging registers read back, only the addressed chip's
// CHIPn_CFG register changes, and the memory-clock copy takes the new value
// within six memory clocks while the other chips keep theirs. Reset values
// (two wait states, no burst timing) are checked first.
module tb_cfg_if;
  import ahb_mc_pkg::*;
  logic pclk = 0, mclk = 0, presetn = 1, mresetn = 1;
  initial #1 begin presetn = 0; mresetn = 0; end  // falling edge applies the asynchronous resets
  always #5 pclk = ~pclk;
  always #13 mclk = ~mclk;

  logic        psel = 0, penable = 0, pwrite = 0;
  logic [31:0] paddr = 0, pwdata = 0, prdata;
  chip_cfg_t   chip_cfg_m [NBANK];
  chip_cfg_t   expect_cfg [NBANK];
  int checks = 0, failures = 0;

  cfg_if dut (.pclk, .presetn, .psel, .penable, .pwrite, .paddr, .pwdata, .prdata,
              .mclk, .mresetn, .chip_cfg_m);

  task automatic apb(input bit wr, input logic [7:0] a, input logic [31:0] d, output logic [31:0] q);
    @(posedge pclk); #1;
    psel = 1; penable = 0; pwrite = wr; paddr = 32'(a); pwdata = d;
    @(posedge pclk); #1;
    penable = 1;
    @(posedge pclk);
    q = prdata;
    #1 psel = 0; penable = 0;
  endtask

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #500000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] q;
    for (int c = 0; c < NBANK; c++) expect_cfg[c] = '{opmode: '{burst_en: 1'b0}, cycle: 12'h222};
    repeat (3) @(posedge mclk);
    presetn = 1; mresetn = 1;
    for (int c = 0; c < NBANK; c++) begin
      apb(0, 8'h10 + 8'(4 * c), 0, q);
      check(q == 32'h0000_0222, $sformatf("reset CHIP%0d_CFG %h", c, q));
      check(chip_cfg_m[c] == expect_cfg[c], "reset memory-side copy");
    end
    for (int round = 0; round < 3; round++)
      for (int c = 0; c < NBANK; c++) begin
        logic [11:0] cy;
        logic        be;
        cy = 12'($urandom);
        be = 1'($urandom);
        apb(1, 8'h00, 32'(cy), q);
        apb(0, 8'h00, 0, q);
        check(q == 32'(cy), "SETCYCLE read back");
        apb(1, 8'h04, {26'd0, 2'(c), 3'b000, be}, q);
        apb(0, 8'h04, 0, q);
        check(q == {26'd0, 2'(c), 3'b000, be}, "SETOPMODE read back");
        expect_cfg[c] = '{opmode: '{burst_en: be}, cycle: cy};
        for (int k = 0; k < NBANK; k++) begin
          apb(0, 8'h10 + 8'(4 * k), 0, q);
          check(q == {15'd0, expect_cfg[k].opmode.burst_en, 4'd0, expect_cfg[k].cycle},
                $sformatf("CHIP%0d_CFG %h", k, q));
        end
        repeat (6) @(posedge mclk);
        for (int k = 0; k < NBANK; k++)
          check(chip_cfg_m[k] == expect_cfg[k], $sformatf("memory-side copy of chip %0d", k));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
