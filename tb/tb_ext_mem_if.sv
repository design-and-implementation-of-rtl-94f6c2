// tb_ext_mem_if: the external memory interface alone, with queue models of
// the three FIFOs and the external memory model, all on one clock.
// Checks: write bursts reach the SRAM (byte strobes honoured, padding
// entries write nothing); read bursts return the SRAM/ROM words in the
// address order of INCR and WRAP bursts; XOEN stays low rd_wait+1 clocks
// for a first read beat and seq_wait+1 (burst timing on) or rd_wait+1
// (off) for later beats; XWEN stays low wr_wait+1 clocks; a full read-data
// FIFO holds the beat (no push, XOEN kept low) until there is room; the
// memory-bus rules of the model hold throughout.
module tb_ext_mem_if;
  import ahb_mc_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // falling edge applies the asynchronous reset
  always #5 clk = ~clk;

  mem_cmd_t    cmd_q [$];
  wdata_t      wf_q  [$];
  logic [31:0] rf_q  [$];
  logic        cmd_pop, wf_pop, rf_push, rf_full = 0;
  logic [31:0] rf_data;
  chip_cfg_t   chip_cfg [NBANK];
  logic [30:0] xa;
  logic [31:0] xd_out, xd_in;
  logic        xd_oe, xoen;
  logic [3:0]  xcsn, xwen;
  mem_cmd_t    cmd_head;
  wdata_t      wf_head;
  int checks = 0, failures = 0;

  logic        cmd_empty = 1, wf_empty = 1;

  // the FIFO model outputs follow the queues after every change
  function automatic void upd();
    cmd_empty = (cmd_q.size() == 0);
    wf_empty  = (wf_q.size() == 0);
    cmd_head  = cmd_empty ? '0 : cmd_q[0];
    wf_head   = wf_empty ? '0 : wf_q[0];
  endfunction

  ext_mem_if dut (
    .clk, .rst_n,
    .cmd_empty, .cmd(cmd_head), .cmd_pop,
    .wf_empty, .wf_data(wf_head), .wf_pop,
    .rf_full, .rf_push, .rf_data,
    .chip_cfg,
    .xa, .xd_out, .xd_oe, .xd_in, .xcsn, .xoen, .xwen
  );

  ext_mem_model #(.WORDS_LOG2(8), .ROM_BANKS(4'b1000)) u_mem (
    .clk, .xa, .xd_out, .xd_oe, .xd_in, .xcsn, .xoen, .xwen
  );

  // sample the handshakes at the edge, update the queues just after it
  always @(posedge clk) begin
    logic p_cmd, p_wf, p_rf;
    logic [31:0] d;
    p_cmd = cmd_pop; p_wf = wf_pop; p_rf = rf_push; d = rf_data;
    #1;
    if (p_cmd) void'(cmd_q.pop_front());
    if (p_wf)  void'(wf_q.pop_front());
    if (p_rf)  rf_q.push_back(d);
    upd();
  end

  // run lengths of XOEN and XWEN low
  int oen_runs [$], wen_runs [$];
  int oen_run = 0, wen_run = 0;
  always @(posedge clk) begin
    if (!xoen) oen_run++; else if (oen_run != 0) begin oen_runs.push_back(oen_run); oen_run = 0; end
    if (xwen != 4'hF) wen_run++; else if (wen_run != 0) begin wen_runs.push_back(wen_run); wen_run = 0; end
  end

  logic [31:0] ref_mem [4][256];
  initial for (int b = 0; b < 4; b++) for (int w = 0; w < 256; w++) ref_mem[b][w] = 32'h5A5A_0000 | 32'(w);

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // One check for the number of strobe pulses and one per pulse length:
  // the first pulse must last `first` clocks, every later one `rest`.
  task automatic check_runs(int q [$], int n, int first, int rest, string what);
    check(q.size() == n, $sformatf("%s: %0d pulses, expected %0d", what, q.size(), n));
    foreach (q[k])
      check(q[k] == (k == 0 ? first : rest), $sformatf("%s: pulse %0d lasts %0d", what, k, q[k]));
  endtask

  function automatic logic [30:0] baddr(logic [30:0] a0, int beats, bit wrap, int k);
    if (!wrap) return a0 + 31'(4 * k);
    return (a0 & ~31'(4 * beats - 1)) | ((a0 + 31'(4 * k)) & 31'(4 * beats - 1));
  endfunction

  task automatic wr_burst(int bank, logic [30:0] a0, int beats, bit wrap, bit with_pad);
    mem_cmd_t c;
    #1;
    c = '{write: 1'b1, bank: 2'(bank), rom: 1'b0, addr: a0, size: 2'd2, beats: 5'(beats), wrap: wrap};
    cmd_q.push_back(c);
    upd();
    for (int k = 0; k < beats; k++) begin
      wdata_t e;
      logic [30:0] a = baddr(a0, beats, wrap, k);
      e.data = $urandom;
      e.strb = (with_pad && k == beats - 1) ? 4'h0 : 4'($urandom_range(15, 1));
      for (int l = 0; l < 4; l++) if (e.strb[l]) ref_mem[bank][a[9:2]][8*l +: 8] = e.data[8*l +: 8];
      wf_q.push_back(e);
      upd();
    end
    do @(posedge clk); while (!(cmd_q.size() == 0 && wf_q.size() == 0 && dut.state == dut.IDLE));
    @(posedge clk);
  endtask

  task automatic rd_burst(int bank, logic [30:0] a0, int beats, bit wrap);
    mem_cmd_t c;
    #1;
    c = '{write: 1'b0, bank: 2'(bank), rom: (bank == 3), addr: a0, size: 2'd2, beats: 5'(beats), wrap: wrap};
    rf_q.delete();
    cmd_q.push_back(c);
    upd();
    do @(posedge clk); while (!(cmd_q.size() == 0 && dut.state == dut.IDLE));
    @(posedge clk);
    check(rf_q.size() == beats, "read beat count");
    for (int k = 0; k < beats && k < rf_q.size(); k++) begin
      logic [30:0] a = baddr(a0, beats, wrap, k);
      logic [31:0] e = (bank == 3) ? u_mem.rom_word(3, int'(a[9:2])) : ref_mem[bank][a[9:2]];
      check(rf_q[k] == e, $sformatf("read bank %0d addr %h: %h expected %h", bank, a, rf_q[k], e));
    end
  endtask

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < NBANK; c++) chip_cfg[c] = CHIP_CFG_RESET;
    chip_cfg[1] = '{opmode: '{burst_en: 1'b1}, cycle: '{seq_wait: 4'd0, wr_wait: 4'd1, rd_wait: 4'd3}};
    chip_cfg[2] = '{opmode: '{burst_en: 1'b0}, cycle: '{seq_wait: 4'd0, wr_wait: 4'd0, rd_wait: 4'd0}};
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);

    // bank 0: default timing, two wait states
    wen_runs.delete();
    wr_burst(0, 31'h0000_0040, 4, 0, 0);
    check_runs(wen_runs, 4, 3, 3, "XWEN, two wait states");
    oen_runs.delete();
    rd_burst(0, 31'h0000_0048, 4, 1);
    check_runs(oen_runs, 4, 3, 3, "XOEN, two wait states");
    // bank 1: rd 3, seq 0 with burst timing, wr 1; padding beat
    wen_runs.delete();
    wr_burst(1, 31'h1000_0080, 8, 0, 1);
    check_runs(wen_runs, 7, 2, 2, "XWEN, one wait state, one padding beat");
    oen_runs.delete();
    rd_burst(1, 31'h1000_0080, 8, 0);
    check_runs(oen_runs, 8, 4, 1, "XOEN, burst timing");
    // bank 2: zero wait states, 16-beat wrap
    wr_burst(2, 31'h2000_0100, 16, 1, 0);
    oen_runs.delete();
    rd_burst(2, 31'h2000_0124, 16, 1);
    check_runs(oen_runs, 16, 1, 1, "XOEN, zero wait states");
    // bank 3: ROM, writes never attempted; read with default timing
    rd_burst(3, 31'h3000_0010, 8, 0);
    // full read-data FIFO holds the beat
    #1 rf_full = 1;
    rf_q.delete();
    cmd_q.push_back('{write: 1'b0, bank: 2'd2, rom: 1'b0, addr: 31'h2000_0000, size: 2'd2, beats: 5'd2, wrap: 1'b0});
    upd();
    repeat (20) @(posedge clk);
    check(rf_q.size() == 0 && !xoen && dut.state == dut.RD_RAM_DATA, "held while the read FIFO is full");
    #1 rf_full = 0;
    do @(posedge clk); while (!(dut.state == dut.IDLE));
    @(posedge clk);
    check(rf_q.size() == 2 && rf_q[0] == ref_mem[2][0] && rf_q[1] == ref_mem[2][1], "data after the stall");
    // whole SRAM image
    for (int b = 0; b < 3; b++)
      for (int w = 0; w < 256; w++)
        if (u_mem.sram[b][w] != ref_mem[b][w]) begin
          check(0, $sformatf("SRAM bank %0d word %0d", b, w));
        end
    check(1, "SRAM image");
    check(u_mem.errors == 0, "memory bus rules");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
