// tb_ahb_mc_noretry: end-to-end test of the memory controller built with
// RETRY_EN = 0, where a read whose data is not yet in the read-data FIFO is
// held with HREADY low instead of being answered with RETRY.
// The bench around the controller is the same as in the default-parameter
// test: an AHB master model, the AHB bus multiplexer and a model of the
// external SRAM/ROM banks. HCLK has a period of 10 and the memory clock of
// 2 time units, so with the reset timing (a beat every four memory clocks)
// the memory side delivers a burst faster than the AHB side takes it.
// It boots from ROM, sets remap, writes and reads back bursts of every type,
// leaves prefetched beats behind with an INCR read cut short, and runs
// random single transfers. Read data is compared with a reference image of
// the memory. It checks that no transfer is ever answered with RETRY, that
// the first beat of every read is held with wait states, that a later beat
// already in the FIFO is returned without a wait state, and that stale
// beats are drained; each of these must happen at least once.
module tb_ahb_mc_noretry;
  import ahb_mc_pkg::*;

  logic hclk = 0, mclk = 0, hresetn = 1, mresetn = 1, remap = 0;
  initial #1 begin hresetn = 0; mresetn = 0; end  // falling edge applies the asynchronous resets
  always #5 hclk = ~hclk;
  always #1 mclk = ~mclk;

  logic [31:0] haddr, hwdata, hrdata, hrdata_mem, hrdata_cfg;
  logic [1:0]  htrans, hresp, hresp_mem, hresp_cfg;
  logic        hwrite, hready, hreadyout_mem, hreadyout_cfg, hsel_mem, hsel_cfg;
  logic [2:0]  hsize, hburst;
  logic [30:0] xa;
  logic [31:0] xd_out, xd_in;
  logic        xd_oe, xoen;
  logic [3:0]  xcsn, xwen;

  int checks = 0, failures = 0;

  // ---------------- bus ----------------
  assign hsel_mem = (haddr[31:30] == 2'b00);
  assign hsel_cfg = (haddr[31:28] == 4'h8);
  logic dsel_mem = 0, dsel_cfg = 0;
  always_ff @(posedge hclk)
    if (hready) begin
      dsel_mem <= hsel_mem && htrans[1];
      dsel_cfg <= hsel_cfg && htrans[1];
    end
  assign hready = dsel_mem ? hreadyout_mem : dsel_cfg ? hreadyout_cfg : 1'b1;
  assign hresp  = dsel_mem ? hresp_mem : dsel_cfg ? hresp_cfg : 2'b00;
  assign hrdata = dsel_mem ? hrdata_mem : hrdata_cfg;

  ahb_master_bfm u_m (.hclk, .haddr, .htrans, .hwrite, .hsize, .hburst, .hwdata,
                      .hready, .hresp, .hrdata);

  ahb_mc_top #(.RETRY_EN(1'b0)) dut (
    .hclk, .hresetn, .mclk, .mresetn, .remap,
    .haddr, .htrans, .hwrite, .hsize, .hburst, .hwdata, .hready,
    .hsel_mem, .hreadyout_mem, .hresp_mem, .hrdata_mem,
    .hsel_cfg, .hreadyout_cfg, .hresp_cfg, .hrdata_cfg,
    .xa, .xd_out, .xd_oe, .xd_in, .xcsn, .xoen, .xwen
  );

  ext_mem_model #(.WORDS_LOG2(8), .ROM_BANKS(4'b1000)) u_mem (
    .clk(mclk), .xa, .xd_out, .xd_oe, .xd_in, .xcsn, .xoen, .xwen
  );

  // ---------------- reference image ----------------
  logic [31:0] ref_mem [4][256];
  initial for (int b = 0; b < 4; b++) for (int w = 0; w < 256; w++) ref_mem[b][w] = 32'h5A5A_0000 | 32'(w);

  function automatic int ref_bank(logic [31:0] a);
    int b = int'(a[29:28]);
    return (b == 0 && !remap) ? 3 : b;
  endfunction

  function automatic logic [31:0] ref_word(logic [31:0] a);
    int b = ref_bank(a);
    if (b == 3) return u_mem.rom_word(3, int'(a[9:2]));
    return ref_mem[b][a[9:2]];
  endfunction

  // ---------------- mechanism counters ----------------
  int n_retry = 0, n_drain = 0, n_first_wait = 0, n_fast_beat = 0, n_reads = 0;

  // data-phase beats of memory-port reads: waited cycles before each one
  bit   rd_dphase = 0;
  bit   rd_first  = 0;
  int   rd_waits  = 0;
  always @(posedge hclk) if (hresetn) begin
    if (dut.u_ahb.ev_retry) n_retry++;
    if (dut.u_ahb.ev_drain) n_drain++;
    if (rd_dphase) begin
      if (!hready) rd_waits++;
      else begin
        if (rd_first && rd_waits > 0) n_first_wait++;
        if (!rd_first && rd_waits == 0) n_fast_beat++;
        rd_waits = 0;
      end
    end
    if (hready) begin
      rd_dphase = hsel_mem && htrans[1] && !hwrite;
      rd_first  = (htrans == HTRANS_NONSEQ);
      if (rd_dphase && rd_first) n_reads++;
    end
  end

  // ---------------- helpers ----------------
  logic [31:0] wd [16], rd [16];
  int retries;
  bit err;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic do_write(logic [31:0] a0, logic [2:0] bt, logic [2:0] size, int n);
    for (int k = 0; k < n; k++) wd[k] = $urandom;
    u_m.burst(1'b1, a0, bt, size, n, wd, rd, retries, err);
    check(!err && retries == 0, "write completed with OKAY");
    for (int k = 0; k < n; k++) begin
      logic [31:0] a = u_m.beat_addr(a0, bt, size, k);
      int b = ref_bank(a);
      int lo = int'(a[1:0]) & ~((1 << size) - 1);
      for (int l = 0; l < 4; l++)
        if (l >= lo && l < lo + (1 << size)) ref_mem[b][a[9:2]][8*l +: 8] = wd[k][8*l +: 8];
    end
  endtask

  task automatic do_read(logic [31:0] a0, logic [2:0] bt, int n);
    u_m.burst(1'b0, a0, bt, HSIZE_WORD, n, wd, rd, retries, err);
    check(!err && retries == 0, $sformatf("read %h completed without RETRY", a0));
    for (int k = 0; k < n; k++) begin
      logic [31:0] a = u_m.beat_addr(a0, bt, HSIZE_WORD, k);
      check(rd[k] == ref_word(a), $sformatf("read %h beat %0d: %h expected %h", a, k, rd[k], ref_word(a)));
    end
  endtask

  // ---------------- watchdog ----------------
  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- test ----------------
  initial begin
    repeat (4) @(posedge hclk);
    hresetn = 1; mresetn = 1;
    repeat (4) @(posedge hclk);
    do_read(32'h0000_0000, HBURST_INCR4, 4);      // boot ROM through the alias
    do_read(32'h3000_0040, HBURST_WRAP8, 8);
    remap = 1;
    @(posedge hclk);
    do_write(32'h0000_0040, HBURST_INCR4, HSIZE_WORD, 4);
    do_read (32'h0000_0048, HBURST_WRAP4, 4);
    do_write(32'h1000_0080, HBURST_INCR8, HSIZE_WORD, 8);
    do_read (32'h1000_0080, HBURST_INCR8, 8);
    do_write(32'h2000_0100, HBURST_INCR16, HSIZE_WORD, 16);
    do_read (32'h2000_0104, HBURST_WRAP16, 16);
    do_write(32'h1000_0010, HBURST_SINGLE, HSIZE_BYTE, 1);
    do_write(32'h1000_0016, HBURST_SINGLE, HSIZE_HALF, 1);
    do_read (32'h1000_0010, HBURST_INCR, 6);
    // an INCR read of one beat leaves three prefetched beats behind
    do_read (32'h2000_0200, HBURST_INCR, 1);
    do_read (32'h1000_0000, HBURST_INCR4, 4);
    for (int i = 0; i < 30; i++) begin
      logic [31:0] a;
      a = {2'b00, 2'($urandom_range(2)), 18'd0, 8'($urandom), 2'b00};
      if ($urandom_range(1) != 0) do_write(a, HBURST_SINGLE, HSIZE_WORD, 1);
      else                   do_read (a, HBURST_SINGLE, 1);
    end
    repeat (50) @(posedge hclk);
    check(u_mem.errors == 0, "external bus rules");
    check(n_retry == 0, "no RETRY with RETRY_EN = 0");
    check(u_m.retry_first_beat == 0 && u_m.retry_later_beat == 0, "master saw no RETRY");
    check(n_reads > 0 && n_first_wait == n_reads, $sformatf("first beat of every read held: %0d of %0d", n_first_wait, n_reads));
    check(n_fast_beat > 0, "mechanism: later beat returned without a wait state");
    check(n_drain > 0,     "mechanism: stale prefetch drained");
    $display("reads=%0d first_wait=%0d fast_beats=%0d drain=%0d", n_reads, n_first_wait, n_fast_beat, n_drain);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
