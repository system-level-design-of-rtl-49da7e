// sleep_latch: set/reset latch that holds the "sleep" (power-off) request of
// one FSMD partition.
//
// The partition that is about to sleep sets it with its one-cycle Sleep
// pulse; the partition handing control back resets it with the Awake pulse.
// The latch sits outside the power-gated partition so the request survives
// while that partition is off. Set wins if both are high (they never are in
// the partitioned counter). A level-sensitive latch is intended here: it is
// the storage element the scheme calls for, and both inputs come from flops
// that change on the falling clock edge, so they are glitch free. rst_n
// clears it (this design's choice).
// In some contexts lint reports that it finds no latch in the always_latch
// block; synthesis does infer one latch bit, as intended.
module sleep_latch (
  input  logic rst_n,
  input  logic set_i,    // Sleep pulse from the partition going to sleep
  input  logic reset_i,  // Awake pulse addressed to that partition
  output logic sleep_o   // 1: partition may be powered off
);
  // Transparent while reset, set or reset is active; holds otherwise.
  always_latch
    if (!rst_n || set_i || reset_i) sleep_o = rst_n && set_i;
endmodule
