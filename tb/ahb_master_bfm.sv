// ahb_master_bfm: AHB master model for the testbenches.
//
// burst() performs one AHB burst with the address and data phases
// pipelined: SINGLE, INCR (any number of beats, optionally with one BUSY
// cycle before a chosen beat) and the fixed INCR/WRAP bursts. It obeys the
// two-cycle RETRY and ERROR responses: on the first cycle it cancels the
// pending address phase with IDLE; after a RETRY it waits a few idle cycles
// and repeats the burst from its first beat; after an ERROR it stops the
// burst. Beat addresses are computed here from the AHB rules. Responses are
// sampled at the rising edge of hclk and the bus is driven one time unit
// later.
module ahb_master_bfm (
  input  logic        hclk,
  output logic [31:0] haddr,
  output logic [1:0]  htrans,
  output logic        hwrite,
  output logic [2:0]  hsize,
  output logic [2:0]  hburst,
  output logic [31:0] hwdata,
  input  logic        hready,
  input  logic [1:0]  hresp,
  input  logic [31:0] hrdata
);
  int retry_first_beat = 0;   // RETRY responses given to a first beat
  int retry_later_beat = 0;   // RETRY responses given to a later beat
  int wait_cycles      = 0;   // data-phase cycles with HREADY low
  int retry_gap        = 2;   // idle cycles before a RETRYed burst is repeated

  initial begin
    haddr = '0; htrans = 2'b00; hwrite = 1'b0; hsize = 3'd2; hburst = 3'd0; hwdata = '0;
  end

  function automatic logic [31:0] beat_addr(logic [31:0] a0, logic [2:0] burst,
                                            logic [2:0] size, int k);
    int unsigned step, span, beats;
    step  = 1 << size;
    beats = (burst == 3'd2) ? 4 : (burst == 3'd4) ? 8 : (burst == 3'd6) ? 16 : 0;
    if (beats == 0) return a0 + k * step;
    span = beats * step;
    return (a0 & ~(span - 1)) | ((a0 + k * step) & (span - 1));
  endfunction

  task automatic burst(input bit wr, input logic [31:0] a0, input logic [2:0] bt,
                       input logic [2:0] size, input int n,
                       input logic [31:0] wd [16], output logic [31:0] rd [16],
                       output int retries, output bit err, input int busy_at = -1);
    int  nxt, a_idx, d_idx;
    bit  a_vld, d_vld, busy_done, retried;
    logic s_ready;
    logic [1:0] s_resp;
    logic [31:0] s_rdata;
    retries = 0;
    err     = 1'b0;
    for (int i = 0; i < 16; i++) rd[i] = '0;
    forever begin
      nxt = 0; a_vld = 0; d_vld = 0; busy_done = 0; retried = 0;
      #1;
      haddr  = beat_addr(a0, bt, size, 0);
      htrans = 2'b10;
      hwrite = wr;
      hsize  = size;
      hburst = bt;
      a_idx = 0; a_vld = 1; nxt = 1;
      forever begin
        @(posedge hclk);
        s_ready = hready; s_resp = hresp; s_rdata = hrdata;
        #1;
        if (s_ready) begin
          if (d_vld) begin
            if (s_resp == 2'b00) begin
              if (!wr) rd[d_idx] = s_rdata;
            end else if (s_resp == 2'b10) begin
              retried = 1;
              if (d_idx == 0) retry_first_beat++; else retry_later_beat++;
            end else begin
              err = 1;
            end
          end
          if (retried || err) begin
            htrans = 2'b00;
            break;
          end
          d_vld = a_vld; d_idx = a_idx;
          if (d_vld && wr) hwdata = wd[d_idx];
          if (nxt < n) begin
            if (nxt == busy_at && !busy_done) begin
              htrans = 2'b01;
              haddr  = beat_addr(a0, bt, size, nxt);
              busy_done = 1;
              a_vld = 0;
            end else begin
              htrans = 2'b11;
              haddr  = beat_addr(a0, bt, size, nxt);
              a_idx = nxt; a_vld = 1; nxt++;
            end
          end else begin
            htrans = 2'b00;
            a_vld = 0;
            if (!d_vld) break;
          end
        end else begin
          if (d_vld) wait_cycles++;
          if (s_resp != 2'b00) begin
            htrans = 2'b00;     // cancel the next address phase
            a_vld = 0;
          end
        end
      end
      if (!retried) break;
      retries++;
      repeat (retry_gap) @(posedge hclk);
    end
  endtask
endmodule
