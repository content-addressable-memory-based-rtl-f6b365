// hlpm_length_column: second-level search of the HLPM lookup table.
//
// When several matching prefixes end in the same TCAM stage, the longest of
// them is the one whose coded length (number of non-don't-care bits in the
// ending stage, LEN_W bits, stored per entry in an SRAM column) is largest.
// The column finds that maximum bit-serially, most significant bit first, one
// pipeline stage per bit. Stage j looks at bit LEN_W-1-j of every entry whose
// second-search signal SSS(j) is set:
//   exactly one candidate has a 1 -> it is the maximum, search resolved
//   several candidates have a 1   -> only those continue (SSS(j+1))
//   no candidate has a 1          -> all candidates continue
// A search that enters with at most one candidate needs no second level and
// is marked resolved at once. After LEN_W stages the remaining candidates
// have equal lengths (duplicate prefixes); the caller picks the lowest index.
//
// Interface: in_valid/in_sss enter stage 0 combinationally; out_valid/out_sss
// appear LEN_W cycles later. out_second marks searches that entered with
// more than one candidate, i.e. that really used the column. The column
// contents (`len`) are read every cycle and must be stable during a search.
// The bit-serial structure is the architecture's; the tie rule is this
// design's choice.
module hlpm_length_column #(
  parameter int unsigned ENTRIES = 18432,
  parameter int unsigned LEN_W   = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic [ENTRIES-1:0] in_sss,
  input  logic [LEN_W-1:0]   len [ENTRIES],
  output logic               out_valid,
  output logic [ENTRIES-1:0] out_sss,
  output logic               out_second
);
  // *_q[j] (j >= 1) is the registered state entering bit stage j.
  logic               v_q   [1:LEN_W];
  logic [ENTRIES-1:0] sss_q [1:LEN_W];
  logic               res_q [1:LEN_W];  // resolved: a single candidate remains
  logic               sec_q [1:LEN_W];

  function automatic logic more_than_one(input logic [ENTRIES-1:0] x);
    return |(x & (x - 1'b1));
  endfunction

  for (genvar j = 0; j < LEN_W; j++) begin : g_bit
    logic [ENTRIES-1:0] ones;
    logic [ENTRIES-1:0] nxt;
    logic               nres;
    logic               c_v, c_res, c_sec;
    logic [ENTRIES-1:0] c_sss;
    if (j == 0) begin : g_first
      // stage 0 works on the unregistered request
      assign c_v   = in_valid;
      assign c_sss = in_sss;
      assign c_sec = more_than_one(in_sss);
      assign c_res = !c_sec;
    end else begin : g_next
      assign c_v   = v_q[j];
      assign c_sss = sss_q[j];
      assign c_sec = sec_q[j];
      assign c_res = res_q[j];
    end
    always_comb begin
      for (int unsigned i = 0; i < ENTRIES; i++)
        ones[i] = c_sss[i] && len[i][LEN_W-1-j];
      if (c_res) begin
        nxt  = c_sss;
        nres = 1'b1;
      end else if (!(|ones)) begin
        nxt  = c_sss;
        nres = 1'b0;
      end else begin
        nxt  = ones;
        nres = !more_than_one(ones);
      end
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) v_q[j+1] <= 1'b0;
      else        v_q[j+1] <= c_v;
    end
    always_ff @(posedge clk) begin
      sss_q[j+1] <= nxt;
      res_q[j+1] <= nres;
      sec_q[j+1] <= c_sec;
    end
  end

  assign out_valid  = v_q[LEN_W];
  assign out_sss    = sss_q[LEN_W];
  assign out_second = sec_q[LEN_W];
endmodule
