// tb_ahb2apb_bridge: AHB master model -> bridge -> APB register model.
// Checks write and read data through the bridge, the APB sequence (a setup
// cycle with PSEL high and PENABLE low, then an access cycle with PENABLE
// high, PADDR/PWRITE/PWDATA stable across both), and the latency: exactly
// one AHB wait state per transfer, for single transfers and back-to-back
// beats of a burst.
module tb_ahb2apb_bridge;
  logic hclk = 0, hresetn = 1;
  initial #1 hresetn = 0;  // falling edge applies the asynchronous reset
  always #5 hclk = ~hclk;

  logic [31:0] haddr, hwdata, hrdata, paddr, pwdata, prdata;
  logic [1:0]  htrans, hresp;
  logic        hwrite, hreadyout, psel, penable, pwrite;
  logic [2:0]  hsize, hburst;
  int checks = 0, failures = 0;

  ahb_master_bfm u_m (.hclk, .haddr, .htrans, .hwrite, .hsize, .hburst, .hwdata,
                      .hready(hreadyout), .hresp, .hrdata);

  ahb2apb_bridge dut (.hclk, .hresetn, .hsel(1'b1), .haddr, .htrans, .hwrite, .hwdata,
                      .hready(hreadyout), .hreadyout, .hresp, .hrdata,
                      .paddr, .psel, .penable, .pwrite, .pwdata, .prdata);

  // APB slave model: 16 words
  logic [31:0] regs [16];
  initial for (int i = 0; i < 16; i++) regs[i] = 32'hC0DE_0000 + 32'(i);
  assign prdata = regs[paddr[5:2]];
  int accesses = 0;
  logic [31:0] s_addr, s_wdata;
  logic        s_write, prev_setup = 0;
  always @(posedge hclk) begin
    if (psel && !penable) begin
      s_addr = paddr; s_write = pwrite; s_wdata = pwdata;
    end
    if (psel && penable) begin
      checks++;
      if (!prev_setup || paddr != s_addr || pwrite != s_write || (pwrite && pwdata != s_wdata)) begin
        failures++;
        $display("APB access cycle without matching setup cycle at %0t", $time);
      end
      accesses++;
      if (pwrite) regs[paddr[5:2]] <= pwdata;
    end
    prev_setup = psel && !penable;
  end

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] wd [16], rd [16];
  int retries, w0;
  bit err;
  initial begin
    repeat (3) @(posedge hclk);
    hresetn = 1;
    @(posedge hclk);
    // single writes and reads
    for (int i = 0; i < 8; i++) begin
      wd[0] = $urandom;
      w0 = u_m.wait_cycles;
      u_m.burst(1'b1, 32'(i * 4), 3'd0, 3'd2, 1, wd, rd, retries, err);
      checks++; if (u_m.wait_cycles - w0 != 1) begin failures++; $display("write wait states %0d", u_m.wait_cycles - w0); end
      checks++; if (regs[i] != wd[0]) begin failures++; $display("reg %0d = %h expected %h", i, regs[i], wd[0]); end
      w0 = u_m.wait_cycles;
      u_m.burst(1'b0, 32'(i * 4), 3'd0, 3'd2, 1, wd, rd, retries, err);
      checks++; if (u_m.wait_cycles - w0 != 1) failures++;
      checks++; if (rd[0] != wd[0]) begin failures++; $display("read %h expected %h", rd[0], wd[0]); end
      checks++; if (err || hresp != 2'b00) failures++;
    end
    // a burst: four back-to-back transfers, one wait state each
    for (int k = 0; k < 4; k++) wd[k] = 32'h1111_0000 * 32'(k + 1);
    w0 = u_m.wait_cycles;
    u_m.burst(1'b1, 32'h20, 3'd3, 3'd2, 4, wd, rd, retries, err);
    checks++; if (u_m.wait_cycles - w0 != 4) begin failures++; $display("burst write waits %0d", u_m.wait_cycles - w0); end
    w0 = u_m.wait_cycles;
    u_m.burst(1'b0, 32'h20, 3'd3, 3'd2, 4, wd, rd, retries, err);
    checks++; if (u_m.wait_cycles - w0 != 4) failures++;
    for (int k = 0; k < 4; k++) begin
      checks++; if (rd[k] != wd[k] || regs[8 + k] != wd[k]) begin failures++; $display("burst beat %0d %h", k, rd[k]); end
    end
    checks++; if (accesses != 24) begin failures++; $display("APB accesses %0d", accesses); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
