// tb_async_fifo: random pushes and pops on two unrelated clocks (periods
// 10 and 16 time units, then 22 and 6). A reference queue checks that every
// entry comes out once and in order, that the FIFO never holds more than
// DEPTH entries, and that it reports full after DEPTH pushes with no pops
// and empty once drained.
module tb_async_fifo;
  localparam int DEPTH = 16;
  logic wclk = 0, rclk = 0, wrst_n = 1, rrst_n = 1;
  initial #1 begin wrst_n = 0; rrst_n = 0; end  // falling edge applies the asynchronous resets
  logic wr_en = 0, rd_en = 0, full, empty;
  logic [15:0] wr_data, rd_data;
  int checks = 0, failures = 0;
  bit second_phase = 0;   // selects the second pair of clock periods
  logic [15:0] ref_q [$];
  int pushed = 0, popped = 0;

  async_fifo #(.WIDTH(16), .DEPTH(DEPTH)) dut (
    .wr_clk(wclk), .wr_rst_n(wrst_n), .wr_en, .wr_data, .full,
    .rd_clk(rclk), .rd_rst_n(rrst_n), .rd_en, .rd_data, .empty
  );

  always begin
    if (second_phase) #11; else #5;
    wclk = ~wclk;
  end
  always begin
    if (second_phase) #3; else #8;
    rclk = ~rclk;
  end

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit run_w = 0, run_r = 0;
  int wprob = 50, rprob = 50;

  always @(posedge wclk) begin
    if (wr_en && !full) begin
      ref_q.push_back(wr_data);
      pushed++;
    end
    wr_en   <= run_w && ($urandom_range(99) < wprob);
    wr_data <= 16'($urandom);
  end

  always @(posedge rclk) begin
    if (rd_en && !empty) begin
      checks++;
      if (ref_q.size() == 0 || rd_data !== ref_q[0]) begin
        failures++;
        $display("pop %0d: got %h", popped, rd_data);
      end
      if (ref_q.size() != 0) void'(ref_q.pop_front());
      popped++;
    end
    if (pushed - popped > DEPTH) begin
      failures++;
      $display("more than DEPTH entries held");
    end
    rd_en <= run_r && ($urandom_range(99) < rprob);
  end

  initial begin
    repeat (3) @(posedge rclk);
    wrst_n = 1; rrst_n = 1;
    // fill with no pops: full after DEPTH pushes
    run_w = 1; wprob = 100;
    wait (pushed == DEPTH);
    @(posedge wclk); #1;
    checks++; if (!full) begin failures++; $display("not full after DEPTH pushes"); end
    run_w = 0;
    repeat (4) @(posedge wclk);
    checks++; if (pushed != DEPTH) begin failures++; $display("pushed beyond DEPTH"); end
    // drain
    run_r = 1; rprob = 100;
    wait (popped == DEPTH);
    repeat (4) @(posedge rclk);
    checks++; if (!empty) begin failures++; $display("not empty after draining"); end
    // random traffic, two clock ratios
    run_w = 1; wprob = 60; rprob = 40;
    wait (popped >= 600);
    second_phase = 1; wprob = 30; rprob = 90;
    wait (popped >= 1200);
    run_w = 0;
    wait (ref_q.size() == 0);
    repeat (6) @(posedge rclk);
    checks++; if (!empty) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
