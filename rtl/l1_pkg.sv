// l1_pkg -- types shared by the hybrid SRAM/STT-RAM L1 cache and its
// testbenches: MOESI coherence states, bus and snoop commands, and the
// block management policy.
package l1_pkg;
  typedef enum logic [2:0] {
    ST_I = 3'd0,   // invalid
    ST_S = 3'd1,   // shared, clean
    ST_E = 3'd2,   // exclusive, clean
    ST_O = 3'd3,   // owned: dirty, possibly shared, writes are broadcast
    ST_M = 3'd4    // modified: dirty, only copy
  } moesi_t;

  // requests this cache puts on the shared bus
  typedef enum logic [1:0] {
    BUS_RD  = 2'd0,  // read miss: fetch a line
    BUS_RDX = 2'd1,  // write miss: fetch a line, invalidate other copies
    BUS_UPD = 2'd2,  // write to a shared line: broadcast the new line
    BUS_WB  = 2'd3   // write back a dirty line
  } bus_cmd_t;

  // remote operations seen by snooping
  typedef enum logic [1:0] {
    SNP_RD  = 2'd0,  // remote read
    SNP_RDX = 2'd1,  // remote write miss (invalidate)
    SNP_UPD = 2'd2   // remote write broadcast to sharers (update)
  } snp_cmd_t;

  typedef enum logic [1:0] {
    POL_NAIVE   = 2'd0,  // allocate by miss type, never migrate
    POL_IMM     = 2'd1,  // immediate migration on coherence state change
    POL_DELAYED = 2'd2   // migrate after two consecutive qualifying operations
  } policy_t;

  // blocks that will be written belong in SRAM, read-only ones in STT-RAM
  function automatic logic write_state(input moesi_t s);
    return (s == ST_M) || (s == ST_O);
  endfunction
endpackage
