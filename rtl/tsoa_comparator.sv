// Response checker of the transparent SOA-MATS++ test.
// The word read back (temp) is XORed bit by bit with the backed-up word (original).
// In the invert phase the location was rewritten with the complement, so every bit
// of the XOR must be 1; a 0 marks a bit that could not be inverted (stuck-at or
// transition fault). In the restore phase the original was written back, so the XOR
// must be all zeros. syndrome has a 1 at each failing bit position; mismatch is its
// OR, gated by check. Purely combinational. The all-ones rule is the original scheme's;
// the all-zeros rule for the restoring read is this design's reading of the march.
module tsoa_comparator #(
  parameter int unsigned DATA_W = 4
) (
  input  logic              check,
  input  logic              expect_inverted,
  input  logic [DATA_W-1:0] temp,
  input  logic [DATA_W-1:0] original,
  output logic              mismatch,
  output logic [DATA_W-1:0] syndrome
);

  logic [DATA_W-1:0] diff;

  always_comb begin
    diff     = temp ^ original;
    syndrome = expect_inverted ? ~diff : diff;
    mismatch = check && (|syndrome);
  end

endmodule
