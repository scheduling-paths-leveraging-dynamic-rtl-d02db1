// loop_lookup: finds the innermost detected loop that holds a PC.
//
// A loop is the address range [lower, upper] between a backward branch (upper)
// and its target (lower). Nested loops both stay in the loop table, so a PC can
// lie in several ranges; the innermost is the one with the smallest span.
// Ties (impossible for distinct backward branches with the same span and an
// overlapping range) go to the lowest index. Purely combinational.
//
// Interface: the valid bits and ranges of every loop-table entry, and the PC to
// classify. hit is set when some valid range holds pc; idx is that entry.
module loop_lookup #(
  parameter int unsigned LT_ENTRIES = 8,
  parameter int unsigned PC_W       = 32,
  localparam int unsigned IDX_W     = (LT_ENTRIES > 1) ? $clog2(LT_ENTRIES) : 1
) (
  input  logic              ent_valid [LT_ENTRIES],
  input  logic [PC_W-1:0]   ent_lower [LT_ENTRIES],
  input  logic [PC_W-1:0]   ent_upper [LT_ENTRIES],
  input  logic [PC_W-1:0]   pc,
  output logic              hit,
  output logic [IDX_W-1:0]  idx
);

  always_comb begin
    logic [PC_W-1:0] best_span;
    hit       = 1'b0;
    idx       = '0;
    best_span = '1;
    for (int i = 0; i < LT_ENTRIES; i++) begin
      if (ent_valid[i] && ent_lower[i] <= pc && pc <= ent_upper[i]) begin
        if (!hit || (ent_upper[i] - ent_lower[i]) < best_span) begin
          hit       = 1'b1;
          idx       = IDX_W'(i);
          best_span = ent_upper[i] - ent_lower[i];
        end
      end
    end
  end

endmodule
