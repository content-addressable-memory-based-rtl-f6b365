// hlpm_lut: routing lookup table on a pipelined TCAM with hardware-based
// longest prefix matching (HLPM).
//
// Prefixes are stored in any free entry, in no particular order: the
// hardware finds the longest match itself, so a table update is one write.
// The address is split over NSTAGES TCAM stages (default: the IPv4 split,
// 17 most significant bits in stage 0 and the remaining 15 in stage 1). Each
// stage searches only entries that matched in the previous one and whose
// last cell there was not a don't-care (hlpm_tcam_stage). A matching entry
// whose last cell is a don't-care is a final match in that stage; final
// matches in a later stage replace those of an earlier one (first-level
// search). The final matches of the deepest stage that had any enter the
// Length Column (hlpm_length_column), which picks the largest coded length
// (second-level search). The winner's next hop is read from an SRAM column.
// With the default split, a search that ends in stage 0 has found a prefix
// of 16 bits or fewer; with a table prepared by short prefix expansion that
// prefix is the only match and may be cached as a prefix, and the second
// TCAM stage does no work for it.
//
// Interface:
//   lk_valid/lk_addr   one search per cycle, no backpressure
//   res_*              answer LATENCY = NSTAGES + LEN_W + 1 cycles later, in
//                      order: found, index of the winning entry, its next hop,
//                      its care mask (the prefix), the stage the prefix ended
//                      in, and whether the Length Column had to decide
//   wr_*               table write: entry index, valid, prefix value and
//                      length, next hop. Care mask and Length Column code are
//                      derived from the length in hardware.
// The Length Column code is the number of prefix bits in the ending stage,
// saturated to LEN_W bits; with SPE tables the saturation never decides.
// Pipeline widths, the write port and the saturation are this design's own
// choices; the stage split, the modified last cell and the bit-serial column
// follow the architecture. Writes during searches in flight are not
// interlocked.
module hlpm_lut #(
  parameter int unsigned ENTRIES = 18432,
  parameter int unsigned ADDR_W  = 32,
  parameter int unsigned FIRST_W = 17,
  parameter int unsigned NSTAGES = 2,
  parameter int unsigned LEN_W   = 4,
  parameter int unsigned NH_W    = 8,
  localparam int unsigned IDX_W   = $clog2(ENTRIES),
  localparam int unsigned PLEN_W  = $clog2(ADDR_W + 1),
  localparam int unsigned STAGE_W = $clog2(NSTAGES + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  // search
  input  logic               lk_valid,
  input  logic [ADDR_W-1:0]  lk_addr,
  output logic               res_valid,
  output logic [ADDR_W-1:0]  res_addr,
  output logic               res_found,
  output logic [IDX_W-1:0]   res_index,
  output logic [NH_W-1:0]    res_nexthop,
  output logic [ADDR_W-1:0]  res_care,
  output logic [STAGE_W-1:0] res_end_stage,
  output logic               res_second_level,
  // table write
  input  logic               wr_en,
  input  logic [IDX_W-1:0]   wr_index,
  input  logic               wr_valid,
  input  logic [ADDR_W-1:0]  wr_prefix,
  input  logic [PLEN_W-1:0]  wr_plen,
  input  logic [NH_W-1:0]    wr_nexthop
);
  localparam int unsigned REST_W = (NSTAGES > 1) ? (ADDR_W - FIRST_W) / (NSTAGES - 1) : 1;

  // Bit range of stage s, counted from the MSB: stage s holds address bits
  // [ADDR_W-1-start(s) -: width(s)].
  function automatic int unsigned st_w(input int unsigned s);
    return (s == 0) ? FIRST_W : REST_W;
  endfunction
  function automatic int unsigned st_start(input int unsigned s);
    return (s == 0) ? 0 : FIRST_W + (s - 1) * REST_W;
  endfunction

  // ---------------- table storage ----------------
  logic [ENTRIES-1:0] t_valid;
  logic [ADDR_W-1:0] t_value [ENTRIES];
  logic [ADDR_W-1:0] t_care  [ENTRIES];
  logic [LEN_W-1:0]  t_len   [ENTRIES];
  logic [NH_W-1:0]   t_nh    [ENTRIES];

  logic [ADDR_W-1:0] wr_care;
  logic [LEN_W-1:0]  wr_code;

  // Care mask: the top wr_plen bits. Code: prefix bits inside the stage the
  // prefix ends in (the first stage whose last cell is a don't-care, or the
  // last stage).
  always_comb begin
    int unsigned end_s;
    int unsigned cnt;
    for (int unsigned b = 0; b < ADDR_W; b++)
      wr_care[ADDR_W-1-b] = (b < 32'(wr_plen));
    end_s = NSTAGES - 1;
    for (int s = NSTAGES - 2; s >= 0; s--)
      if (32'(wr_plen) < st_start(s) + st_w(s)) end_s = s;
    cnt = (32'(wr_plen) > st_start(end_s)) ? 32'(wr_plen) - st_start(end_s) : 0;
    wr_code = (cnt > (1 << LEN_W) - 1) ? '1 : LEN_W'(cnt);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t_valid <= '0;
    end else if (wr_en) begin
      t_valid[wr_index] <= wr_valid;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) begin
      t_value[wr_index] <= wr_prefix & wr_care;
      t_care[wr_index]  <= wr_care;
      t_len[wr_index]   <= wr_code;
      t_nh[wr_index]    <= wr_nexthop;
    end
  end

  // ---------------- TCAM pipeline (first-level search) ----------------
  // p_*[s] (s >= 1) is the registered state entering stage s; stage 0 works
  // on the request itself, with every valid entry precharged.
  logic               p_valid  [1:NSTAGES];
  logic [ADDR_W-1:0]  p_addr   [1:NSTAGES];
  logic [ENTRIES-1:0] p_active [1:NSTAGES];
  logic [ENTRIES-1:0] p_cand   [1:NSTAGES];
  logic [STAGE_W-1:0] p_cstage [1:NSTAGES];

  for (genvar s = 0; s < NSTAGES; s++) begin : g_stage
    localparam int unsigned W  = st_w(s);
    localparam int unsigned HI = ADDR_W - 1 - st_start(s);
    logic [W-1:0]       sval  [ENTRIES];
    logic [W-1:0]       scare [ENTRIES];
    logic [ENTRIES-1:0] lmatch, fmatch, nact;
    logic               in_valid;
    logic [ADDR_W-1:0]  in_addr;
    logic [ENTRIES-1:0] in_active, in_cand;
    logic [STAGE_W-1:0] in_cstage;

    if (s == 0) begin : g_first
      assign in_valid  = lk_valid;
      assign in_addr   = lk_addr;
      assign in_active = t_valid;
      assign in_cand   = '0;
      assign in_cstage = '0;
    end else begin : g_next
      assign in_valid  = p_valid[s];
      assign in_addr   = p_addr[s];
      assign in_active = p_active[s];
      assign in_cand   = p_cand[s];
      assign in_cstage = p_cstage[s];
    end

    always_comb begin
      for (int unsigned i = 0; i < ENTRIES; i++) begin
        sval[i]  = t_value[i][HI -: W];
        scare[i] = t_care[i][HI -: W];
      end
    end

    hlpm_tcam_stage #(.ENTRIES(ENTRIES), .W(W), .LAST(s == NSTAGES - 1)) u_stage (
      .key        (in_addr[HI -: W]),
      .active     (in_active),
      .value      (sval),
      .care       (scare),
      .local_match(lmatch),  // not needed past this stage
      .final_match(fmatch),
      .next_active(nact)
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) p_valid[s+1] <= 1'b0;
      else        p_valid[s+1] <= in_valid;
    end
    always_ff @(posedge clk) begin
      p_addr[s+1]   <= in_addr;
      p_active[s+1] <= nact;
      // A deeper final match is a longer prefix: it replaces earlier ones.
      if (|fmatch) begin
        p_cand[s+1]   <= fmatch;
        p_cstage[s+1] <= STAGE_W'(s);
      end else begin
        p_cand[s+1]   <= in_cand;
        p_cstage[s+1] <= in_cstage;
      end
    end
  end

  // ---------------- Length Column (second-level search) ----------------
  logic               lc_valid;
  logic [ENTRIES-1:0] lc_sss;
  logic               lc_second;

  hlpm_length_column #(.ENTRIES(ENTRIES), .LEN_W(LEN_W)) u_lencol (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (p_valid[NSTAGES]),
    .in_sss    (p_cand[NSTAGES]),
    .len       (t_len),
    .out_valid (lc_valid),
    .out_sss   (lc_sss),
    .out_second(lc_second)
  );

  // Side information travels beside the column.
  logic [ADDR_W-1:0]  sd_addr   [LEN_W];
  logic [STAGE_W-1:0] sd_cstage [LEN_W];
  always_ff @(posedge clk) begin
    sd_addr[0]   <= p_addr[NSTAGES];
    sd_cstage[0] <= p_cstage[NSTAGES];
    for (int unsigned j = 1; j < LEN_W; j++) begin
      sd_addr[j]   <= sd_addr[j-1];
      sd_cstage[j] <= sd_cstage[j-1];
    end
  end

  // ---------------- winner encode and next-hop read ----------------
  logic             win_found;
  logic [IDX_W-1:0] win_idx;
  always_comb begin
    win_found = 1'b0;
    win_idx   = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (lc_sss[i]) begin
        win_found = 1'b1;
        win_idx   = IDX_W'(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) res_valid <= 1'b0;
    else        res_valid <= lc_valid;
  end
  always_ff @(posedge clk) begin
    res_addr         <= sd_addr[LEN_W-1];
    res_found        <= win_found;
    res_index        <= win_idx;
    res_nexthop      <= t_nh[win_idx];
    res_care         <= win_found ? t_care[win_idx] : '0;
    res_end_stage    <= sd_cstage[LEN_W-1];
    res_second_level <= lc_second;
  end
endmodule
