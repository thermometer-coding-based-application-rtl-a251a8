// tcr_rotl: rotate a W-bit vector left by an amount given in thermometer code.
//
// The amount is a W-bit thermometer code (k lowest bits set, k = 0 .. W).
// The code is turned into a one-hot select of W+1 lines by marking its 1-to-0
// edge: sel[0] = ~amt[0], sel[k] = amt[k-1] & ~amt[k], sel[W] = amt[W-1].
// Each select line gates one fixed rotation of the input and the gated copies
// are ORed, so the rotator is a single AND-OR level with no binary decoding.
// A rotation by W equals no rotation. If the amount is not a valid
// thermometer code, more than one select line may fire and the output is the
// OR of those rotations.
//
// The adder rotates its XOR vector left by the value of V; the select-by-edge
// construction is this design's own; the original only names the rotation.
//
// Interface: din (W bits), amt (W-bit thermometer code), dout (W bits).
// Timing: purely combinational.
module tcr_rotl #(
  parameter int unsigned W = 6
) (
  input  logic [W-1:0] din,
  input  logic [W-1:0] amt,
  output logic [W-1:0] dout
);

  logic [W:0] sel;

  always_comb begin
    sel[0] = ~amt[0];
    for (int k = 1; k < W; k++) sel[k] = amt[k-1] & ~amt[k];
    sel[W] = amt[W-1];
  end

  always_comb begin
    dout = '0;
    for (int k = 0; k <= W; k++) begin
      if (sel[k]) dout |= W'((din << (k % W)) | (din >> ((W - k % W) % W)));
    end
  end

endmodule
