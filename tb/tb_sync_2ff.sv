// tb_sync_2ff: checks that the synchronizer output equals its input
// delayed by exactly two clock edges, for random 4-bit inputs, and that
// reset clears both stages.
module tb_sync_2ff;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // falling edge applies the asynchronous reset
  logic [3:0] d, q;
  int checks = 0, failures = 0;
  logic [3:0] hist [3];

  sync_2ff #(.WIDTH(4)) dut (.clk, .rst_n, .d, .q);

  always #5 clk = ~clk;

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 4'hF;
    repeat (2) @(posedge clk);
    #1 checks++; if (q !== 4'h0) failures++;
    rst_n = 1;
    for (int i = 0; i < 3; i++) hist[i] = 4'h0;
    for (int i = 0; i < 200; i++) begin
      @(posedge clk);
      hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = d;
      #1;
      if (i >= 2) begin
        checks++;
        if (q !== hist[1]) begin
          failures++;
          $display("mismatch at %0d: q=%h expected %h", i, q, hist[1]);
        end
      end
      d = 4'($urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
