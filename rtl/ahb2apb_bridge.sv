// ahb2apb_bridge: AHB slave on the configuration port, APB master towards
// the configuration interface.
//
// Each AHB transfer accepted on the configuration port becomes one APB
// transfer of two cycles: a setup cycle (PSEL high, PENABLE low) and an
// access cycle (PSEL and PENABLE high). PADDR and PWRITE are registered from
// the AHB address phase; PWDATA is HWDATA, which the AHB master holds for
// the whole data phase. The bridge holds HREADYOUT low during the setup
// cycle and raises it in the access cycle, when PRDATA is passed to HRDATA,
// so every configuration access costs one AHB wait state. A transfer that
// arrives in the access cycle starts its setup cycle right after, with no
// idle cycle between. The APB clock is HCLK. The response is always OKAY.
// The setup/access sequence follows the APB write and read timing diagrams
// in the document; the single wait state and PCLK = HCLK are this design's
// choice.
module ahb2apb_bridge
  import ahb_mc_pkg::*;
(
  input  logic        hclk,
  input  logic        hresetn,
  // AHB slave side
  input  logic        hsel,
  input  logic [31:0] haddr,
  input  logic [1:0]  htrans,
  input  logic        hwrite,
  input  logic [31:0] hwdata,
  input  logic        hready,     // bus HREADY
  output logic        hreadyout,
  output logic [1:0]  hresp,
  output logic [31:0] hrdata,
  // APB master side
  output logic [31:0] paddr,
  output logic        psel,
  output logic        penable,
  output logic        pwrite,
  output logic [31:0] pwdata,
  input  logic [31:0] prdata
);
  typedef enum logic [1:0] {ST_IDLE, ST_SETUP, ST_ENABLE} state_e;
  state_e state;

  logic accept;
  assign accept = hsel && hready && htrans[1];

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      state  <= ST_IDLE;
      paddr  <= '0;
      pwrite <= 1'b0;
    end else begin
      if (accept) begin
        paddr  <= haddr;
        pwrite <= hwrite;
      end
      unique case (state)
        ST_IDLE:   if (accept) state <= ST_SETUP;
        ST_SETUP:  state <= ST_ENABLE;
        ST_ENABLE: state <= accept ? ST_SETUP : ST_IDLE;
        default:   state <= ST_IDLE;
      endcase
    end
  end

  assign psel      = (state == ST_SETUP) || (state == ST_ENABLE);
  assign penable   = (state == ST_ENABLE);
  assign pwdata    = hwdata;
  assign hreadyout = (state != ST_SETUP);
  assign hresp     = HRESP_OKAY;
  assign hrdata    = prdata;

  // APB rule: an access cycle always follows a setup cycle.
  a_enable_after_setup: assert property (@(posedge hclk) disable iff (!hresetn)
                                         penable |-> $past(psel && !penable))
    else $error("ahb2apb_bridge: PENABLE without a setup cycle");
endmodule
