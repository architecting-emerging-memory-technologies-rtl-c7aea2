// mlc_addr_decomp -- physical address decomposition for a cache whose sets
// run either in large block mode (LBM, 64-byte blocks) or small block mode
// (SBM, 32-byte blocks).
//
// The set index is the same in both modes (address bits 6..18 for 8K sets),
// so a memory location always maps to one set whatever its block size.  The
// tag is the address above the index with one extra bit appended: in LBM that
// bit is 0 and the offset is the low 6 bits; in SBM it is address bit 5
// (which half of the 64-byte chunk) and the offset keeps only 5 bits, its top
// bit forced to 0.  Example: 0xc7a97eeb maps to set 0x5fb in both modes, tag
// 0x31ea (LBM) or 0x31eb (SBM), offset 0x2b or 0x0b.
// Purely combinational.  The field layout follows the document; the widths
// are derived from ADDR_W and SET_BITS.
module mlc_addr_decomp #(
  parameter int unsigned ADDR_W   = 32,
  parameter int unsigned SET_BITS = 13,
  localparam int unsigned TAG_W   = ADDR_W - SET_BITS - 6 + 1
) (
  input  logic [ADDR_W-1:0]   addr,
  input  logic                ms,       // mode selection: 0 = LBM, 1 = SBM
  output logic [SET_BITS-1:0] set_idx,
  output logic [TAG_W-1:0]    tag,
  output logic [5:0]          offset
);
  assign set_idx = addr[6 +: SET_BITS];
  assign tag     = {addr[ADDR_W-1:SET_BITS+6], ms ? addr[5] : 1'b0};
  assign offset  = ms ? {1'b0, addr[4:0]} : addr[5:0];
endmodule
