// tb_ahb_slave_if: the AHB slave interface alone, on one clock, with an AHB
// master model and a model of everything behind the FIFOs: queues for the
// command, write-data and read-data FIFOs (16 entries each) and a memory
// side that executes each command on a word image after a random delay.
// Checks: the command made for each burst type (beats, wrapping, bank, ROM
// flag, remapped address), one command per INCR4 worth of an undefined-
// length INCR, padding entries with no strobes for a burst cut short, byte
// strobes of narrow writes, read data against a reference image kept from
// the master's own writes, one RETRY for the first beat of each read and
// none later, the drain of stale prefetched beats, ERROR with no command for
// a ROM write, and the wait states of a write burst into a FIFO with room
// (none) and into a full one.
module tb_ahb_slave_if;
  import ahb_mc_pkg::*;
  logic hclk = 0, hresetn = 1, remap = 0;
  initial #1 hresetn = 0;  // falling edge applies the asynchronous reset
  always #5 hclk = ~hclk;

  logic [31:0] haddr, hwdata, hrdata;
  logic [1:0]  htrans, hresp;
  logic        hwrite, hreadyout;
  logic [2:0]  hsize, hburst;
  logic        cmd_push, wf_push, rf_pop;
  mem_cmd_t    cmd;
  wdata_t      wf_data;
  logic        cmd_full = 0, wf_full = 0, rf_empty = 1;
  logic [31:0] rf_head = '0;
  int checks = 0, failures = 0;

  ahb_master_bfm u_m (.hclk, .haddr, .htrans, .hwrite, .hsize, .hburst, .hwdata,
                      .hready(hreadyout), .hresp, .hrdata);

  ahb_slave_if dut (
    .hclk, .hresetn, .remap, .hsel(1'b1), .haddr, .htrans, .hwrite, .hsize, .hburst,
    .hwdata, .hready(hreadyout), .hreadyout, .hresp, .hrdata,
    .cmd_full, .cmd_push, .cmd, .wf_full, .wf_push, .wf_data,
    .rf_empty, .rf_pop, .rf_data(rf_head)
  );

  // ---------------- FIFO and memory-side model ----------------
  mem_cmd_t    cmd_q [$], cmd_log [$];
  wdata_t      wf_q [$], wf_log [$];
  logic [31:0] rf_q [$];
  bit          hold_wf = 0;     // memory side stops taking write data
  logic [31:0] mem [4][256];    // what the memory side wrote
  logic [31:0] exp_mem [4][256];
  initial for (int b = 0; b < 4; b++) for (int w = 0; w < 256; w++) begin
    mem[b][w] = 32'h5A5A_0000 | 32'(w); exp_mem[b][w] = mem[b][w];
  end

  function automatic void upd();
    cmd_full = (cmd_q.size() >= 16);
    wf_full  = (wf_q.size() >= 16);
    rf_empty = (rf_q.size() == 0);
    rf_head  = rf_empty ? 32'hBAD0_BAD0 : rf_q[0];
  endfunction

  always @(posedge hclk) begin
    logic pc, pw, pr;
    mem_cmd_t c;
    wdata_t   w;
    pc = cmd_push; pw = wf_push; pr = rf_pop; c = cmd; w = wf_data;
    #1;
    if (pc) begin cmd_q.push_back(c); cmd_log.push_back(c); end
    if (pw) begin wf_q.push_back(w); wf_log.push_back(w); end
    if (pr) void'(rf_q.pop_front());
    upd();
  end

  // memory side: executes commands in order
  initial begin
    forever begin
      mem_cmd_t c;
      logic [30:0] a;
      @(posedge hclk); #2;
      if (cmd_q.size() == 0) continue;
      c = cmd_q.pop_front(); upd();
      a = c.addr;
      for (int k = 0; k < c.beats; k++) begin
        repeat ($urandom_range(3)) @(posedge hclk);
        #2;
        if (c.write) begin
          while (wf_q.size() == 0 || hold_wf) begin @(posedge hclk); #2; end
          begin
            wdata_t e;
            e = wf_q.pop_front();
            for (int l = 0; l < 4; l++) if (e.strb[l]) mem[c.bank][a[9:2]][8*l +: 8] = e.data[8*l +: 8];
          end
        end else begin
          while (rf_q.size() >= 16) begin @(posedge hclk); #2; end
          rf_q.push_back(c.rom ? (32'hA000_0000 | 32'(a[9:2])) : mem[c.bank][a[9:2]]);
        end
        upd();
        a = next_beat_addr(a, c.size, c.beats, c.wrap);
      end
    end
  end

  // ---------------- helpers ----------------
  logic [31:0] wd [16], rd [16];
  int retries;
  bit err;

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic int bank_of(logic [31:0] a);
    return (a[29:28] == 0 && !remap) ? 3 : int'(a[29:28]);
  endfunction

  task automatic wr(logic [31:0] a0, logic [2:0] bt, logic [2:0] size, int n, int busy_at = -1);
    for (int k = 0; k < n; k++) wd[k] = $urandom;
    u_m.burst(1'b1, a0, bt, size, n, wd, rd, retries, err, busy_at);
    for (int k = 0; k < n && !err; k++) begin
      logic [31:0] a = u_m.beat_addr(a0, bt, size, k);
      int lo = int'(a[1:0]) & ~((1 << size) - 1);
      for (int l = 0; l < 4; l++)
        if (l >= lo && l < lo + (1 << size)) exp_mem[bank_of(a)][a[9:2]][8*l +: 8] = wd[k][8*l +: 8];
    end
  endtask

  task automatic rdb(logic [31:0] a0, logic [2:0] bt, logic [2:0] size, int n);
    u_m.burst(1'b0, a0, bt, size, n, wd, rd, retries, err);
    check(!err, "read without error");
    for (int k = 0; k < n; k++) begin
      logic [31:0] a = u_m.beat_addr(a0, bt, size, k);
      int b = bank_of(a);
      logic [31:0] e = (b == 3) ? (32'hA000_0000 | 32'(a[9:2])) : exp_mem[b][a[9:2]];
      check(rd[k] == e, $sformatf("read %h beat %0d: %h expected %h", a, k, rd[k], e));
    end
  endtask

  task automatic expect_cmd(bit w, int bank, logic [30:0] a, int beats, bit wrap);
    mem_cmd_t c;
    repeat (2) @(posedge hclk);
    check(cmd_log.size() != 0, "a command was made");
    if (cmd_log.size() == 0) return;
    c = cmd_log.pop_front();
    check(c.write == w && c.bank == 2'(bank) && c.rom == (bank == 3) && c.addr == a &&
          c.beats == 5'(beats) && c.wrap == wrap,
          $sformatf("command %p, expected w=%0d bank=%0d addr=%h beats=%0d wrap=%0d", c, w, bank, a, beats, wrap));
  endtask

  initial begin
    #3000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r0, w0;
    repeat (3) @(posedge hclk);
    hresetn = 1;
    @(posedge hclk);
    // boot alias: region 0 reads the ROM bank
    r0 = u_m.retry_first_beat;
    rdb(32'h0000_0010, HBURST_INCR4, HSIZE_WORD, 4);
    expect_cmd(0, 3, 31'h3000_0010, 4, 0);
    check(u_m.retry_first_beat - r0 == 1, "one RETRY for the first beat");
    // ROM write: ERROR, no command
    wd[0] = 0;
    u_m.burst(1'b1, 32'h3000_0000, HBURST_SINGLE, HSIZE_WORD, 1, wd, rd, retries, err);
    check(err, "ERROR for a ROM write");
    repeat (3) @(posedge hclk);
    check(cmd_log.size() == 0, "no command for the ROM write");
    remap = 1;
    @(posedge hclk);
    // fixed bursts
    w0 = u_m.wait_cycles;
    wr(32'h0000_0040, HBURST_INCR8, HSIZE_WORD, 8);
    check(u_m.wait_cycles - w0 == 0, "write burst with FIFO room has no wait state");
    expect_cmd(1, 0, 31'h0000_0040, 8, 0);
    rdb(32'h0000_0058, HBURST_WRAP8, HSIZE_WORD, 8);
    expect_cmd(0, 0, 31'h0000_0058, 8, 1);
    wr(32'h1000_0100, HBURST_WRAP16, HSIZE_WORD, 16);
    expect_cmd(1, 1, 31'h1000_0100, 16, 1);
    rdb(32'h1000_0100, HBURST_INCR16, HSIZE_WORD, 16);
    expect_cmd(0, 1, 31'h1000_0100, 16, 0);
    wr(32'h2000_0000, HBURST_SINGLE, HSIZE_WORD, 1);
    expect_cmd(1, 2, 31'h2000_0000, 1, 0);
    // narrow writes
    wf_log.delete();
    wr(32'h2000_0003, HBURST_SINGLE, HSIZE_BYTE, 1);
    wr(32'h2000_0006, HBURST_SINGLE, HSIZE_HALF, 1);
    repeat (2) @(posedge hclk);
    check(wf_log.size() == 2 && wf_log[0].strb == 4'b1000 && wf_log[1].strb == 4'b1100, "narrow strobes");
    void'(cmd_log.pop_front()); void'(cmd_log.pop_front());
    // INCR of 6 beats with a BUSY: INCR4 + INCR4, two padding entries
    wf_log.delete();
    wr(32'h2000_0040, HBURST_INCR, HSIZE_WORD, 6, 3);
    repeat (6) @(posedge hclk);
    expect_cmd(1, 2, 31'h2000_0040, 4, 0);
    expect_cmd(1, 2, 31'h2000_0050, 4, 0);
    check(wf_log.size() == 8 && wf_log[6].strb == 0 && wf_log[7].strb == 0 && wf_log[5].strb == 4'hF, "padding entries");
    // INCR read of 6 beats
    r0 = u_m.retry_first_beat;
    rdb(32'h2000_0040, HBURST_INCR, HSIZE_WORD, 6);
    expect_cmd(0, 2, 31'h2000_0040, 4, 0);
    expect_cmd(0, 2, 31'h2000_0050, 4, 0);
    check(u_m.retry_first_beat - r0 == 1, "continuation is not RETRYed");
    // the two stale beats left behind are drained by the next transfer
    r0 = int'(dut.rd_left);
    check(r0 == 2, "two beats left prefetched");
    rdb(32'h0000_0040, HBURST_INCR4, HSIZE_WORD, 4);
    expect_cmd(0, 0, 31'h0000_0040, 4, 0);
    check(rf_q.size() == 0 && dut.rd_left == 0, "prefetch drained");
    // write burst into a full write-data FIFO waits
    hold_wf = 1;
    w0 = u_m.wait_cycles;
    fork
      begin repeat (60) @(posedge hclk); hold_wf = 0; end
      begin wr(32'h1000_0000, HBURST_INCR16, HSIZE_WORD, 16); wr(32'h1000_0040, HBURST_INCR16, HSIZE_WORD, 16); end
    join
    check(u_m.wait_cycles - w0 > 0, "wait states while the write FIFO is full");
    void'(cmd_log.pop_front()); void'(cmd_log.pop_front());
    rdb(32'h1000_0000, HBURST_INCR16, HSIZE_WORD, 16);
    rdb(32'h1000_0040, HBURST_INCR16, HSIZE_WORD, 16);
    rdb(32'h2000_0000, HBURST_INCR8, HSIZE_WORD, 8);
    check(u_m.retry_later_beat == 0, "no RETRY on later beats");
    // memory image written by the commands equals the master's view
    repeat (40) @(posedge hclk);
    for (int b = 0; b < 3; b++) for (int w = 0; w < 256; w++)
      if (mem[b][w] != exp_mem[b][w]) check(0, $sformatf("image bank %0d word %0d", b, w));
    check(1, "image compared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
