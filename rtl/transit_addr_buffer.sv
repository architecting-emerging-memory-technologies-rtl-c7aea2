// transit_addr_buffer -- small fully associative buffer of STT-RAM set
// indices that recently lost a block which was never re-read nor written
// (transit data).
//
// When the STT-RAM part evicts a block whose read and write reference
// counters are both zero, its set index is inserted (ins_en).  Before a read
// miss is filled into the STT-RAM part, the set index is looked up
// (lk_key -> lk_hit); on a match the block goes to the SRAM part instead
// and the entry is removed (rm_en, same cycle as the lookup, at the clock
// edge).  Inserting a key that is already present does nothing; otherwise
// the entries are replaced in FIFO order.  Lookup is combinational, updates
// happen at the clock edge, reset empties the buffer.  The document does
// not size the buffer; ENTRIES = 16 and FIFO replacement are this design's
// choices.
module transit_addr_buffer #(
  parameter int unsigned ENTRIES = 16,
  parameter int unsigned KEY_W   = 9
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ins_en,
  input  logic [KEY_W-1:0] ins_key,
  input  logic [KEY_W-1:0] lk_key,
  output logic             lk_hit,
  input  logic             rm_en,
  output logic [$clog2(ENTRIES+1)-1:0] occupancy
);
  localparam int unsigned EW = $clog2(ENTRIES);
  logic [ENTRIES-1:0] v_q;
  logic [KEY_W-1:0]   key_q [ENTRIES];
  logic [EW-1:0]      ptr_q;
  logic [ENTRIES-1:0] lk_m, ins_m;

  always_comb begin
    for (int e = 0; e < ENTRIES; e++) begin
      lk_m[e]  = v_q[e] && key_q[e] == lk_key;
      ins_m[e] = v_q[e] && key_q[e] == ins_key;
    end
    occupancy = '0;
    for (int e = 0; e < ENTRIES; e++) occupancy = occupancy + v_q[e];
  end
  assign lk_hit = |lk_m;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q   <= '0;
      ptr_q <= '0;
    end else begin
      if (rm_en) v_q <= v_q & ~lk_m;
      if (ins_en && !(|ins_m) && !(rm_en && lk_key == ins_key)) begin
        v_q[ptr_q]   <= 1'b1;
        key_q[ptr_q] <= ins_key;
        ptr_q        <= (32'(ptr_q) == ENTRIES - 1) ? '0 : ptr_q + 1'b1;
      end
    end
  end
endmodule
