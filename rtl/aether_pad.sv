// aether_pad -- padding and truncation of a 384-bit data block.
//
// AD and message are padded independently to a multiple of 384 bits by
// appending a single 1 bit and then zeros. Data is a big-endian bit string,
// so the n valid bits of a block are bits [383 -: n]; the pad bit goes to
// bit 383-n. nbits = 384 means a full block (no padding; only the last block
// of a string may be shorter). The same mask truncates the output block of a
// partial last message block.
//
// Interface: data and nbits (1..384) in; mask has ones on the n valid bits;
// padded = (data & mask) | pad bit. Combinational. Bit granularity is this
// design's choice; the specification pads bit strings.
module aether_pad
  import aether_pkg::*;
(
  input  block_t     data,
  input  logic [8:0] nbits,
  output block_t     mask,
  output block_t     padded
);

  block_t pad_bit;

  always_comb begin
    // ones in the top nbits positions
    mask    = ~({BLOCK_BITS{1'b1}} >> nbits);
    // the bit just below the last valid bit; none for a full block
    pad_bit = (nbits >= 9'(BLOCK_BITS)) ? '0 : ({1'b1, {(BLOCK_BITS-1){1'b0}}} >> nbits);
    padded  = (data & mask) | pad_bit;
  end

endmodule
