// mpc_nha: Next Hop Array of the cache.
//
// An SRAM co-indexed with the Destination Address Array: row r holds the
// output port of address-array entry r (full-address zone rows first, then
// prefix-zone rows). It is read in the third cache pipeline stage with the
// index of the entry that hit, and written in the same stage by an update.
// Read is asynchronous (the stage register before it plays the role of the
// address latch); write takes effect at the clock edge, so a read in the
// same cycle returns the old contents. Contents are undefined until written;
// the cache never reads a row whose address entry is invalid.
module mpc_nha #(
  parameter int unsigned N    = 1024,
  parameter int unsigned NH_W = 8,
  localparam int unsigned IW  = $clog2(N)
) (
  input  logic            clk,
  input  logic [IW-1:0]   rd_idx,
  output logic [NH_W-1:0] rd_data,
  input  logic            wr_en,
  input  logic [IW-1:0]   wr_idx,
  input  logic [NH_W-1:0] wr_data
);
  logic [NH_W-1:0] mem [N];

  assign rd_data = mem[rd_idx];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_idx] <= wr_data;
  end
endmodule
