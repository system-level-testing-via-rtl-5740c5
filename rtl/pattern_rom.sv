// pattern_rom: read-only table of the interconnect test patterns.
//
// Holds the 2*ceil(log2 N_LINES) patterns of the counting-sequence bus test
// (each line labelled with its index, the label matrix read column by column,
// most significant label bit first, each pattern followed by its complement).
// The table is fixed when the design is elaborated: no pattern is computed at
// run time, which is how the test keeps its patterns free of extra hardware.
// For the default 32-line bus this gives 10 patterns.
//
// Interface: idx selects a pattern (0 .. NUM_PAT-1); pattern is combinational.
// An index past the end returns all zeros.  The bit-to-line mapping (bus bit L
// is line L) is this design's choice.
module pattern_rom
  import dti_pkg::*;
#(
  parameter int unsigned N_LINES = DATA_W,
  parameter int unsigned NUM_PAT = 2 * $clog2(N_LINES),
  parameter int unsigned IDX_W   = $clog2(NUM_PAT + 1)
) (
  input  logic [IDX_W-1:0]  idx,
  output logic [DATA_W-1:0] pattern
);

  logic [DATA_W-1:0] rom [NUM_PAT];

  for (genvar i = 0; i < NUM_PAT; i++) begin : g_rom
    assign rom[i] = tp_pattern(N_LINES, i);
  end

  always_comb begin
    pattern = '0;
    if (32'(idx) < NUM_PAT) pattern = rom[idx];
  end

endmodule
