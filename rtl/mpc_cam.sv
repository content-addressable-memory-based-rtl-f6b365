// mpc_cam: one piece of the cache's Destination Address Array.
//
// The cache splits its address array into three content-addressable pieces
// that sit in different pipeline stages: CAM1 (upper 16 address bits of the
// full-address zone, binary), CAM2 (lower 16 bits of the same entries,
// binary) and the prefix zone (upper 16 bits, ternary, holding prefixes of
// 16 bits or fewer). This module is any one of them: N entries of W bits, a
// valid bit and, when TERNARY is set, a care mask per entry.
//
// Search is combinational: match[i] is set when entry i is valid, enabled by
// en[i] (precharge control: CAM2 is searched only in the rows that hit in
// CAM1) and equal to key on its cared bits. Write is one entry per cycle and
// is seen by searches from the next cycle on. Binary pieces ignore wr_care.
// Reset invalidates every entry. The split and the per-row enable follow the
// architecture; the write port is this design's choice.
module mpc_cam #(
  parameter int unsigned N       = 512,
  parameter int unsigned W       = 16,
  parameter bit          TERNARY = 1'b0,
  localparam int unsigned IW     = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [W-1:0]  key,
  input  logic [N-1:0]  en,
  output logic [N-1:0]  match,
  input  logic          wr_en,
  input  logic [IW-1:0] wr_idx,
  input  logic [W-1:0]  wr_value,
  input  logic [W-1:0]  wr_care
);
  logic         valid [N];
  logic [W-1:0] value [N];
  logic [W-1:0] care  [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < N; i++) valid[i] <= 1'b0;
    end else if (wr_en) begin
      valid[wr_idx] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) begin
      care[wr_idx]  <= TERNARY ? wr_care : '1;
      value[wr_idx] <= wr_value & (TERNARY ? wr_care : '1);
    end
  end

  always_comb begin
    for (int unsigned i = 0; i < N; i++)
      match[i] = valid[i] && en[i] && (((key ^ value[i]) & care[i]) == '0);
  end
endmodule
