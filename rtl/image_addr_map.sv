// image_addr_map: where the image of a storage cell sits in the DDR2 image
// memory, for the three image sorting modes.
//
// The image memory holds one image buffer per ASIC storage cell, or two
// (an A and a D frame) in the A/D modes:
//   SORT_SINGLE        buffer = cell                 (buffers 0..351)
//   SORT_AD_INTERLEAV  A: buffer = 2*cell, D: 2*cell+1 (frames A,D,A,D,...)
//   SORT_AD_SEPARATE   A: buffer = cell,   D: cell+352 (all A, then all D)
// These formulas are the ones of the sorting figures. The byte address of a
// buffer is buffer * IMAGE_BYTES (131072 bytes per image); that the buffers
// are packed from address 0 is this design's choice. With IMAGE_BYTES a
// power of two, the low log2(IMAGE_BYTES) bits of byte_addr are always zero.
// The mapping is purely combinational. is_d is ignored in SORT_SINGLE; mode 3 is unused and maps
// like SORT_SINGLE.
module image_addr_map
  import agipd_pkg::*;
#(
  parameter int unsigned NUM_CELLS   = 352,
  parameter int unsigned IMAGE_BYTES = 131072,
  localparam int unsigned CW  = $clog2(NUM_CELLS),
  localparam int unsigned BW  = $clog2(2 * NUM_CELLS),
  localparam int unsigned AW  = $clog2(2 * NUM_CELLS * IMAGE_BYTES)
) (
  input  sort_mode_e     mode,
  input  logic [CW-1:0]  cell_id,
  input  logic           is_d,
  output logic [BW-1:0]  buffer,
  output logic [AW-1:0]  byte_addr
);

  always_comb begin
    unique case (mode)
      SORT_AD_INTERLEAV: buffer = (BW'(cell_id) << 1) | BW'(is_d);
      SORT_AD_SEPARATE:  buffer = BW'(cell_id) + (is_d ? BW'(NUM_CELLS) : '0);
      default:           buffer = BW'(cell_id);
    endcase
    byte_addr = AW'(buffer) * AW'(IMAGE_BYTES);
  end

endmodule
