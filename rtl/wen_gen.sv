// wen_gen: byte write enables for word, half-word and byte writes.
//
// The external SRAM of each bank is four byte-wide chips, one per byte lane
// of XD[31:0], so a narrow write must enable only the chips it writes. From
// the low address bits and HSIZE of a write this block forms a 4-bit strobe,
// one bit per byte lane, active high (the memory interface drives the
// active-low XWEN pins as its complement). Lanes are little-endian: the byte
// at address offset 0 travels on XD[7:0]. Purely combinational.
// The need for per-byte enables follows the document; the little-endian lane
// order and the strobe encoding are this design's choice.
module wen_gen
  import ahb_mc_pkg::*;
(
  input  logic [1:0] addr_lo,  // HADDR[1:0]
  input  logic [2:0] size,     // HSIZE
  output logic [3:0] strb      // 1 = write this byte lane
);
  always_comb begin
    unique case (size)
      HSIZE_BYTE: strb = 4'b0001 << addr_lo;
      HSIZE_HALF: strb = addr_lo[1] ? 4'b1100 : 4'b0011;
      default:    strb = 4'b1111;
    endcase
  end
endmodule
