// tb_ahb_mc_top: end-to-end test of the memory controller at its default
// parameters (16-entry FIFOs, RETRY on), with an AHB master model, the AHB
// bus multiplexer, and a model of the external SRAM/ROM banks.
// HCLK has a period of 10 and the memory clock of 14 time units, so the two
// domains drift against each other.
//
// It boots from ROM through the address-0 alias, checks that a ROM write is
// refused with ERROR, sets remap, and then runs every burst type in reads
// and writes of every size, INCR bursts cut short (padding) and longer than
// four beats (continuation), a BUSY cycle, a prefetch made stale by another
// transfer (drain), a long RETRY gap in which a 16-beat burst fills the read-data FIFO, and
// back-to-back traffic that fills the command and write-data FIFOs. Read
// data is compared with a reference image of the memory kept by the test.
// Through the configuration port it programmes zero wait states with burst
// timing into a chip, reads the register back, and checks the number of
// memory clocks XOEN stays low per read beat before (three: two wait states)
// and after (one). Every mechanism is counted, and one that never occurred
// is a failure.
module tb_ahb_mc_top;
  import ahb_mc_pkg::*;

  logic hclk = 0, mclk = 0, hresetn = 1, mresetn = 1, remap = 0;
  initial #1 begin hresetn = 0; mresetn = 0; end  // falling edge applies the asynchronous resets
  always #5 hclk = ~hclk;
  always #7 mclk = ~mclk;

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

  ahb_mc_top dut (
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

  function automatic logic [31:0] baddr(logic [31:0] a0, logic [2:0] bt, logic [2:0] size, int k);
    return u_m.beat_addr(a0, bt, size, k);
  endfunction

  // ---------------- mechanism counters ----------------
  int n_retry = 0, n_drain = 0, n_pad = 0, n_error = 0, n_cont = 0, n_wrapcmd = 0;
  int n_cmd_full = 0, n_wf_full = 0, n_rf_full = 0, n_cfg_copy = 0, n_seq_timing = 0;
  int n_narrow = 0, n_busy = 0, n_rom_read = 0, n_ram_read = 0;

  always @(posedge hclk) if (hresetn) begin
    if (dut.u_ahb.ev_retry) n_retry++;
    if (dut.u_ahb.ev_drain) n_drain++;
    if (dut.u_ahb.ev_pad)   n_pad++;
    if (dut.u_ahb.ev_error) n_error++;
    if (dut.u_ahb.cmd_push && dut.u_ahb.dp_seq) n_cont++;
    if (dut.u_ahb.cmd_push && dut.u_ahb.cmd.wrap) n_wrapcmd++;
    if (dut.u_ahb.state == dut.u_ahb.S_CMD_GEN && dut.cmd_full) n_cmd_full++;
    if ((dut.u_ahb.state == dut.u_ahb.S_WR_SEQ || dut.u_ahb.state == dut.u_ahb.S_WR_RAM_WAIT) && dut.wf_full) n_wf_full++;
    if (dut.wf_push && dut.wf_in.strb != 4'hF && dut.wf_in.strb != 4'h0) n_narrow++;
    if (hsel_mem && htrans == HTRANS_BUSY && hready) n_busy++;
  end

  always @(posedge mclk) if (mresetn) begin
    if (dut.rf_full) n_rf_full++;
    if (dut.u_cfg.tgl_m != dut.u_cfg.tgl_m_d) n_cfg_copy++;
    if (dut.u_ext.state == dut.u_ext.LAST_ADDR && !dut.u_ext.cur.write && dut.u_ext.cfg.opmode.burst_en &&
        dut.u_ext.beat + 1 != dut.u_ext.cur.beats) n_seq_timing++;
    if (dut.rf_push && dut.u_ext.cur.rom)  n_rom_read++;
    if (dut.rf_push && !dut.u_ext.cur.rom) n_ram_read++;
  end

  // length of each run of XOEN low, in memory clocks
  int oen_run = 0, last_oen_run = 0;
  always @(posedge mclk) begin
    if (!xoen) oen_run++;
    else if (oen_run != 0) begin last_oen_run = oen_run; oen_run = 0; end
  end

  // ---------------- helpers ----------------
  logic [31:0] wd [16], rd [16];
  int retries;
  bit err;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic do_write(logic [31:0] a0, logic [2:0] bt, logic [2:0] size, int n, int busy_at = -1);
    for (int k = 0; k < n; k++) wd[k] = $urandom;
    u_m.burst(1'b1, a0, bt, size, n, wd, rd, retries, err, busy_at);
    check(!err, "write got ERROR");
    for (int k = 0; k < n; k++) begin
      logic [31:0] a = baddr(a0, bt, size, k);
      int b = ref_bank(a);
      int lo = int'(a[1:0]) & ~((1 << size) - 1);
      for (int l = 0; l < 4; l++)
        if (l >= lo && l < lo + (1 << size)) ref_mem[b][a[9:2]][8*l +: 8] = wd[k][8*l +: 8];
    end
  endtask

  task automatic do_read(logic [31:0] a0, logic [2:0] bt, logic [2:0] size, int n);
    u_m.burst(1'b0, a0, bt, size, n, wd, rd, retries, err);
    check(!err, "read got ERROR");
    for (int k = 0; k < n; k++) begin
      logic [31:0] a = baddr(a0, bt, size, k);
      check(rd[k] == ref_word(a), $sformatf("read %h beat %0d: %h expected %h", a, k, rd[k], ref_word(a)));
    end
  endtask

  task automatic cfg_write(logic [7:0] off, logic [31:0] v);
    wd[0] = v;
    u_m.burst(1'b1, 32'h8000_0000 | 32'(off), HBURST_SINGLE, HSIZE_WORD, 1, wd, rd, retries, err);
  endtask

  task automatic cfg_read(logic [7:0] off, output logic [31:0] v);
    u_m.burst(1'b0, 32'h8000_0000 | 32'(off), HBURST_SINGLE, HSIZE_WORD, 1, wd, rd, retries, err);
    v = rd[0];
  endtask

  // ---------------- watchdog ----------------
  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- test ----------------
  initial begin
    logic [31:0] v;
    int t0;
    time t1;
    repeat (4) @(posedge hclk);
    hresetn = 1; mresetn = 1;
    repeat (4) @(posedge hclk);

    // boot: region 0 is the ROM before remap
    do_read(32'h0000_0000, HBURST_INCR4, HSIZE_WORD, 4);
    check(retries == 1, "first read of a burst is RETRYed once");
    check(last_oen_run == 3, $sformatf("reset timing: XOEN low %0d clocks, expected 3", last_oen_run));
    do_read(32'h3000_0010, HBURST_SINGLE, HSIZE_WORD, 1);
    // a write to the ROM gets ERROR
    wd[0] = 32'h1234_5678;
    u_m.burst(1'b1, 32'h3000_0020, HBURST_SINGLE, HSIZE_WORD, 1, wd, rd, retries, err);
    check(err, "ROM write answered with ERROR");
    do_read(32'h3000_0020, HBURST_SINGLE, HSIZE_WORD, 1);

    remap = 1;
    @(posedge hclk);
    // fixed-length bursts
    do_write(32'h0000_0040, HBURST_INCR4, HSIZE_WORD, 4);
    do_read (32'h0000_0048, HBURST_WRAP4, HSIZE_WORD, 4);
    do_read (32'h0000_0040, HBURST_INCR4, HSIZE_WORD, 4);
    do_write(32'h1000_0080, HBURST_INCR8, HSIZE_WORD, 8);
    do_read (32'h1000_0094, HBURST_WRAP8, HSIZE_WORD, 8);
    do_write(32'h2000_0100, HBURST_INCR16, HSIZE_WORD, 16);
    do_write(32'h2000_0140, HBURST_WRAP16, HSIZE_WORD, 16);
    do_read (32'h2000_0144, HBURST_WRAP16, HSIZE_WORD, 16);
    do_read (32'h2000_0100, HBURST_INCR16, HSIZE_WORD, 16);
    // byte and half-word writes
    do_write(32'h1000_0001, HBURST_SINGLE, HSIZE_BYTE, 1);
    do_write(32'h1000_0006, HBURST_SINGLE, HSIZE_HALF, 1);
    do_write(32'h1000_0008, HBURST_INCR4, HSIZE_BYTE, 4);
    do_write(32'h1000_0010, HBURST_WRAP4, HSIZE_HALF, 4);
    do_read (32'h1000_0000, HBURST_INCR8, HSIZE_WORD, 8);
    // undefined-length INCR: continuation past four beats, BUSY, cut short
    do_write(32'h2000_0200, HBURST_INCR, HSIZE_WORD, 6, 2);
    do_read (32'h2000_0200, HBURST_INCR, HSIZE_WORD, 7);
    do_write(32'h2000_0240, HBURST_INCR, HSIZE_WORD, 2);
    do_read (32'h2000_0240, HBURST_INCR4, HSIZE_WORD, 4);
    // a read that leaves prefetched beats behind, then other transfers
    do_read (32'h1000_0100, HBURST_INCR, HSIZE_WORD, 1);
    do_read (32'h2000_0100, HBURST_SINGLE, HSIZE_WORD, 1);
    do_read (32'h1000_0100, HBURST_INCR, HSIZE_WORD, 1);
    do_write(32'h1000_0104, HBURST_SINGLE, HSIZE_WORD, 1);
    do_read (32'h1000_0100, HBURST_INCR4, HSIZE_WORD, 4);
    // long RETRY gap: the read-data FIFO fills up
    u_m.retry_gap = 200;
    do_read (32'h2000_0100, HBURST_INCR16, HSIZE_WORD, 16);
    u_m.retry_gap = 2;
    // back-to-back writes fill the write-data and command FIFOs
    do_write(32'h0000_0000, HBURST_INCR16, HSIZE_WORD, 16);
    do_write(32'h0000_0040, HBURST_INCR16, HSIZE_WORD, 16);
    for (int i = 0; i < 40; i++) begin
      logic [31:0] a;
      logic [2:0] s;
      s = 3'($urandom_range(2));
      a = {2'b00, 2'($urandom_range(2)), 18'd0, 8'($urandom), 2'($urandom)};
      a[1:0] = a[1:0] & ~((2'd1 << s) - 2'd1);
      do_write(a, HBURST_SINGLE, s, 1);
    end
    for (int w = 0; w < 64; w += 16) begin
      do_read(32'h0000_0000 | 32'(w * 4), HBURST_INCR16, HSIZE_WORD, 16);
      do_read(32'h1000_0000 | 32'(w * 4), HBURST_INCR16, HSIZE_WORD, 16);
    end
    for (int i = 0; i < 20; i++) begin
      logic [31:0] a;
      a = {2'b00, 2'($urandom_range(2)), 18'd0, 8'($urandom), 2'b00};
      do_read(a, HBURST_SINGLE, HSIZE_WORD, 1);
    end

    // configuration: chip 1 gets zero wait states and burst timing
    do_read(32'h1000_0000, HBURST_INCR4, HSIZE_WORD, 4);
    check(last_oen_run == 3, $sformatf("default timing: XOEN low %0d clocks, expected 3", last_oen_run));
    cfg_write(8'h00, 32'h0000_0000);          // SETCYCLE: all waits 0
    cfg_write(8'h04, 32'h0000_0011);          // SETOPMODE: burst_en, chip 1
    cfg_read(8'h14, v);
    check(v == 32'h0001_0000, $sformatf("CHIP1_CFG read %h", v));
    cfg_read(8'h10, v);
    check(v == 32'h0000_0222, $sformatf("CHIP0_CFG read %h", v));
    cfg_read(8'h00, v);
    check(v == 32'h0, "SETCYCLE read back");
    repeat (10) @(posedge hclk);
    t0 = n_seq_timing;
    do_read(32'h1000_0000, HBURST_INCR8, HSIZE_WORD, 8);
    check(last_oen_run == 1, $sformatf("programmed timing: XOEN low %0d clocks, expected 1", last_oen_run));
    check(n_seq_timing - t0 == 7, "seven sequential beats with burst timing");
    do_write(32'h1000_0020, HBURST_INCR4, HSIZE_WORD, 4);
    do_read (32'h1000_0020, HBURST_INCR4, HSIZE_WORD, 4);
    // zero-wait single transfers: a write is posted with no AHB wait state;
    // a read is RETRYed once and then served from the read-data FIFO
    t0 = u_m.wait_cycles;
    do_write(32'h1000_0030, HBURST_SINGLE, HSIZE_WORD, 1);
    check(u_m.wait_cycles == t0, "zero-wait write posted without wait states");
    repeat (20) @(posedge hclk);
    t1 = $time;
    do_read (32'h1000_0030, HBURST_SINGLE, HSIZE_WORD, 1);
    $display("zero-wait single read: %0d HCLK cycles including the RETRY", ($time - t1) / 10);
    check(($time - t1) / 10 <= 16, "zero-wait single read latency");
    // chip 1 wait states 3/1/0 without burst timing
    cfg_write(8'h00, 32'h0000_0013);
    cfg_write(8'h04, 32'h0000_0010);
    repeat (10) @(posedge hclk);
    do_read(32'h1000_0000, HBURST_INCR4, HSIZE_WORD, 4);
    check(last_oen_run == 4, $sformatf("rd_wait 3: XOEN low %0d clocks, expected 4", last_oen_run));

    repeat (50) @(posedge hclk);
    check(u_mem.errors == 0, "external bus rules");
    check(u_m.retry_later_beat == 0, "RETRY only on first beats");
    check(n_retry > 0,      "mechanism: RETRY");
    check(n_drain > 0,      "mechanism: stale prefetch drained");
    check(n_pad > 0,        "mechanism: write padding");
    check(n_error > 0,      "mechanism: ERROR on ROM write");
    check(n_cont > 0,       "mechanism: INCR continuation");
    check(n_wrapcmd > 0,    "mechanism: wrapping burst");
    check(n_cmd_full > 0,   "mechanism: command FIFO full");
    check(n_wf_full > 0,    "mechanism: write-data FIFO full");
    check(n_rf_full > 0,    "mechanism: read-data FIFO holds a whole 16-beat burst");
    check(n_cfg_copy > 0,   "mechanism: configuration copied to memory clock");
    check(n_seq_timing > 0, "mechanism: burst timing");
    check(n_narrow > 0,     "mechanism: byte/half-word write");
    check(n_busy > 0,       "mechanism: BUSY");
    check(n_rom_read > 0 && n_ram_read > 0, "mechanism: ROM and SRAM reads");
    $display("retry=%0d drain=%0d pad=%0d error=%0d cont=%0d wrap=%0d cmdfull=%0d wffull=%0d rffull=%0d cfg=%0d seq=%0d narrow=%0d busy=%0d rom=%0d ram=%0d",
             n_retry, n_drain, n_pad, n_error, n_cont, n_wrapcmd, n_cmd_full, n_wf_full, n_rf_full,
             n_cfg_copy, n_seq_timing, n_narrow, n_busy, n_rom_read, n_ram_read);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
