// rdc_tag_way: tag array, index multiplexer and tag comparator of one RDC way.
//
// 256 entries, each a valid bit, line state (dirty, transactional write-set
// bit `txw`, Valid Shadow Copy bit `vsc`) and a 35-bit tag A47..A13. The tag
// keeps the same width in both modes because A13, the top index bit, is stored
// in it as well. The index multiplexer passes A13..A6 when TMM=0 and 0,A12..A6
// when TMM=1, so TM mode uses only the top half of the entries.
//
// The entry at the muxed index is read combinationally and compared with
// `cmp_tag`; `hit` is valid AND tag equal. One entry write per cycle at the
// same index (`we`, `wentry`). Flash operations act on every entry in one cycle:
// `set_vsc_all` (StoreAll at transaction begin), `clr_vsc_all` (commit-time
// flash clear of VSC), and `clr_txw_all` (write-set cleared at commit). Reset
// clears all valid bits; the other fields are reset too so that nothing is
// read uninitialised. Storing dirty/txw next to the tag is this design's choice.
module rdc_tag_way
  import rdc_pkg::*;
#(
  parameter int unsigned ENTRIES = TAG_ROWS
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             tmm,
  input  logic [7:0]       idx,        // A13..A6
  input  logic [TAG_W-1:0] cmp_tag,    // A47..A13
  output tag_entry_t       rd_entry,
  output logic             hit,
  input  logic             we,
  input  tag_entry_t       wentry,
  input  logic             set_vsc_all,
  input  logic             clr_vsc_all,
  input  logic             clr_txw_all
);

  tag_entry_t       mem [ENTRIES];
  logic [7:0]       tidx;

  // TMM index multiplexer of the tag array.
  assign tidx = tmm ? {1'b0, idx[6:0]} : idx;

  always_comb begin
    rd_entry = mem[tidx];
    hit      = rd_entry.valid && (rd_entry.tag == cmp_tag);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < ENTRIES; i++) mem[i] <= '0;
    end else begin
      for (int unsigned i = 0; i < ENTRIES; i++) begin
        if (set_vsc_all) mem[i].vsc <= 1'b1;
        if (clr_vsc_all) mem[i].vsc <= 1'b0;
        if (clr_txw_all) mem[i].txw <= 1'b0;
      end
      if (we) mem[tidx] <= wentry;
    end
  end

endmodule
