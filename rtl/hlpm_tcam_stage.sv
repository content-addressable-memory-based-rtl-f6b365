// hlpm_tcam_stage: one stage of a pipelined TCAM with hardware longest-prefix
// matching (HLPM).
//
// Every entry holds a slice of a routing prefix as value bits plus a care
// mask (care=0 is a don't-care cell). An entry is searched in this stage only
// if its precharge-control bit (`active`) is set: the valid bit in the first
// stage, the previous stage's verdict afterwards. The last cell of each entry
// is the modified cell: besides taking part in the normal match it reports
// whether it stores a don't-care. Per entry (the architecture's entry
// evaluation table):
//   match, last cell not don't-care -> search again in the next stage
//   match, last cell don't-care     -> final match here (prefix ends here)
//   no match                        -> dropped
// In the last stage of the pipeline every matching entry is a final match.
// This gives the first-level search: a prefix that ends in a later stage is
// always longer than one that ended earlier.
//
// Purely combinational; the caller registers next_active/final_match between
// stages. The transistor-level match-line precharge and sensing are
// represented only by their logic function.
module hlpm_tcam_stage #(
  parameter int unsigned ENTRIES = 18432,
  parameter int unsigned W       = 17,
  parameter bit          LAST    = 1'b0
) (
  input  logic [W-1:0]       key,          // address slice for this stage
  input  logic [ENTRIES-1:0] active,       // precharge control per entry
  input  logic [W-1:0]       value [ENTRIES],
  input  logic [W-1:0]       care  [ENTRIES],
  output logic [ENTRIES-1:0] local_match,  // entry slice matches the key
  output logic [ENTRIES-1:0] final_match,  // entry is a matching prefix ending here
  output logic [ENTRIES-1:0] next_active   // search this entry in the next stage
);
  always_comb begin
    for (int unsigned i = 0; i < ENTRIES; i++) begin
      logic last_dc;  // the modified last cell holds a don't-care
      last_dc        = !care[i][0];
      local_match[i] = active[i] && (((key ^ value[i]) & care[i]) == '0);
      final_match[i] = local_match[i] && (last_dc || LAST);
      next_active[i] = local_match[i] && !last_dc && !LAST;
    end
  end
endmodule
